// async_fifo: dual-clock first-word-fall-through FIFO.
//
// Carries scanned-out activity counts from a module's clock domain (write
// side) to the system-bus clock domain (read side), so the module and the bus
// can be clocked independently. Classic Gray-coded pointer design: each side
// keeps a binary pointer with one extra wrap bit, publishes it in Gray code,
// and synchronises the other side's Gray pointer through two flops.
//   write: wr_en is ignored while wr_full.
//   read : rd_data shows the oldest entry while !rd_empty; rd_en pops it.
//   rd_count is the read side's (conservative) view of the occupancy.
// Depth is 2^AW entries of DW bits. Pointer and flag logic is this design's
// own; the document only says that the read-back FIFO handles the crossing.
module async_fifo #(
  parameter int unsigned DW = 9,
  parameter int unsigned AW = 9
) (
  input  logic          wclk,
  input  logic          wrst,       // synchronous to wclk, active high
  input  logic          wr_en,
  input  logic [DW-1:0] wr_data,
  output logic          wr_full,

  input  logic          rclk,
  input  logic          rrst,       // synchronous to rclk, active high
  input  logic          rd_en,
  output logic [DW-1:0] rd_data,
  output logic          rd_empty,
  output logic [AW:0]   rd_count
);

  logic [DW-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in read domain
  logic [AW:0] wbin_r;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    for (int i = AW; i >= 0; i--) b[i] = (i == AW) ? g[i] : (b[i+1] ^ g[i]);
    return b;
  endfunction

  // ---------------- write side ----------------
  logic do_write;
  assign do_write = wr_en && !wr_full;

  always_ff @(posedge wclk) begin
    if (do_write) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (do_write) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // Full when the pointers differ only in their two top Gray bits.
  assign wr_full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // ---------------- read side ----------------
  logic do_read;
  assign do_read = rd_en && !rd_empty;

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (do_read) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  assign wbin_r   = gray2bin(wgray_r2);
  assign rd_empty = (rgray == wgray_r2);
  assign rd_count = wbin_r - rbin;
  assign rd_data  = mem[rbin[AW-1:0]];

  initial begin
    assert (AW >= 2) else $error("async_fifo: AW must be at least 2");
  end

endmodule
