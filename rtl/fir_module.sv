// fir_module: one individually addressable, instrumented FIR accelerator.
//
// It joins the 5x5 filter, its image RAM and the activity instrumentation
// behind one memory-mapped slave port of 16 words (byte offsets in
// kapow_pkg). The first four words belong to the accelerator:
//   0x00 FIR_CTRL  W: bit0 run.  R: {frames completed[30:0], run}
//   0x04 FIR_COEF  W: stream one Q4.8 coefficient (25 writes load a kernel,
//                     first write = top-left tap).  R: checksum (sum of all
//                     output pixels) of the last completed frame
//   0x08 RAM_ADDR  R/W: image RAM write pointer
//   0x0C RAM_DATA  W: store bits [7:0] at the pointer, pointer + 1
// and the next six to the instrumentation (see instr_template).
// Reads return data one clk_bus cycle after the request.
//
// Clocking: the bus port, the registers and the RAM write side use clk_bus;
// the filter, RAM reads and counters use clk_mod. `run` crosses through a
// 3-flop synchroniser. While stopped, the filter side keeps copying the
// coefficient bank and rewinds to pixel 0; the copy is frozen while running,
// so coefficients are to be streamed while the module is stopped. Frame
// results return with a toggle handshake: at the end of each frame the
// module side holds the checksum and flips a toggle; the bus side copies
// the held value when the synchronised toggle changes.
//
// The first N bits of the filter's probe vector (products first) are the
// monitored nets. In the KAPow flow the nets are the N most active ones of
// the placed netlist, chosen by a power analyser; a fixed RTL choice stands
// in for that ranking here. Register layout, handshakes and the probe choice
// are this design's own.
module fir_module
  import kapow_pkg::*;
#(
  parameter int unsigned N     = kapow_pkg::N_DEFAULT,
  parameter int unsigned W     = kapow_pkg::W_DEFAULT,
  parameter int unsigned IMG_W = kapow_pkg::IMG_W_DEFAULT,
  parameter int unsigned IMG_H = kapow_pkg::IMG_H_DEFAULT
) (
  input  logic        clk_bus,
  input  logic        rst_bus,     // synchronous, active high
  input  mm_req_t     req,
  output logic [31:0] rdata,
  input  logic        clk_mod,
  input  logic        rst_mod,     // synchronous, active high
  output logic        out_valid,
  output logic [7:0]  out_pix
);

  localparam int unsigned DEPTH = IMG_W * IMG_H;
  localparam int unsigned AW    = $clog2(DEPTH);

  // ================================================================ bus side
  logic                     run_reg;
  logic signed [COEF_W-1:0] coef_bus [NTAPS];
  logic [AW-1:0]            ram_wptr;
  logic [31:0]              checksum_bus;
  logic [30:0]              frames_bus;
  logic                     ram_we;
  logic [3:0]               word;
  logic                     is_instr;
  instr_reg_e               ireg_sel;
  logic [31:0]              ireg_rdata;

  assign word     = req.addr[5:2];
  assign is_instr = (word >= 4'd4) && (word <= 4'd9);
  assign ireg_sel = instr_reg_e'(3'(word - 4'd4));
  assign ram_we   = req.write && (req.addr == REG_RAM_DATA);

  always_ff @(posedge clk_bus) begin
    if (rst_bus) begin
      run_reg  <= 1'b0;
      ram_wptr <= '0;
      for (int i = 0; i < NTAPS; i++) coef_bus[i] <= '0;
    end else if (req.write) begin
      case (req.addr)
        REG_FIR_CTRL: run_reg  <= req.wdata[0];
        REG_FIR_COEF: begin
          for (int i = 0; i < NTAPS - 1; i++) coef_bus[i] <= coef_bus[i+1];
          coef_bus[NTAPS-1] <= req.wdata[COEF_W-1:0];
        end
        REG_RAM_ADDR: ram_wptr <= req.wdata[AW-1:0];
        REG_RAM_DATA: ram_wptr <= ram_wptr + 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk_bus) begin
    if (rst_bus) rdata <= '0;
    else if (req.read) begin
      case (req.addr)
        REG_FIR_CTRL: rdata <= {frames_bus, run_reg};
        REG_FIR_COEF: rdata <= checksum_bus;
        REG_RAM_ADDR: rdata <= 32'(ram_wptr);
        default:      rdata <= is_instr ? ireg_rdata : 32'd0;
      endcase
    end
  end

  // ============================================================= module side
  logic                     run_m;
  logic signed [COEF_W-1:0] coef_m [NTAPS];
  logic [AW-1:0]            ram_raddr;
  logic [7:0]               ram_rdata;
  logic                     pix_valid;
  logic                     f_valid, f_last;
  logic [7:0]               f_pix;
  logic [FIR_PROBE_W-1:0]   probe;
  logic [31:0]              checksum_acc, checksum_hold;
  logic                     frame_tgl;

  sync_bit #(.STAGES(3)) u_sync_run (
    .clk(clk_mod), .rst(rst_mod), .d(run_reg), .q(run_m));

  always_ff @(posedge clk_mod) begin
    if (!run_m) coef_m <= coef_bus;
  end

  image_ram #(.DEPTH(DEPTH), .AW(AW)) u_ram (
    .clk_w (clk_bus),
    .we    (ram_we),
    .waddr (ram_wptr),
    .wdata (req.wdata[7:0]),
    .clk_r (clk_mod),
    .raddr (ram_raddr),
    .rdata (ram_rdata)
  );

  // Cyclic reader: one address per clock while running.
  always_ff @(posedge clk_mod) begin
    if (rst_mod || !run_m) begin
      ram_raddr <= '0;
      pix_valid <= 1'b0;
    end else begin
      ram_raddr <= (ram_raddr == AW'(DEPTH-1)) ? '0 : ram_raddr + 1'b1;
      pix_valid <= 1'b1;
    end
  end

  fir5x5 #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_fir (
    .clk       (clk_mod),
    .rst       (rst_mod),
    .clear     (!run_m),
    .coef      (coef_m),
    .pix_valid (pix_valid),
    .pix_in    (ram_rdata),
    .out_valid (f_valid),
    .out_last  (f_last),
    .out_pix   (f_pix),
    .probe     (probe)
  );

  assign out_valid = f_valid;
  assign out_pix   = f_pix;

  always_ff @(posedge clk_mod) begin
    if (rst_mod) begin
      checksum_acc  <= '0;
      checksum_hold <= '0;
      frame_tgl     <= 1'b0;
    end else if (!run_m) begin
      checksum_acc  <= '0;
    end else if (f_valid) begin
      if (f_last) begin
        checksum_hold <= checksum_acc + 32'(f_pix);
        checksum_acc  <= '0;
        frame_tgl     <= ~frame_tgl;
      end else begin
        checksum_acc  <= checksum_acc + 32'(f_pix);
      end
    end
  end

  // Frame-done handshake back to the bus side.
  logic frame_tgl_b, frame_tgl_b_d;
  sync_bit #(.STAGES(3)) u_sync_frame (
    .clk(clk_bus), .rst(rst_bus), .d(frame_tgl), .q(frame_tgl_b));

  always_ff @(posedge clk_bus) begin
    if (rst_bus) begin
      frame_tgl_b_d <= 1'b0;
      checksum_bus  <= '0;
      frames_bus    <= '0;
    end else begin
      frame_tgl_b_d <= frame_tgl_b;
      if (frame_tgl_b != frame_tgl_b_d) begin
        checksum_bus <= checksum_hold;
        frames_bus   <= frames_bus + 1'b1;
      end
    end
  end

  // ========================================================= instrumentation
  instr_template #(.N(N), .W(W)) u_instr (
    .clk_bus   (clk_bus),
    .rst_bus   (rst_bus),
    .reg_sel   (ireg_sel),
    .reg_wr    (req.write && is_instr),
    .reg_wdata (req.wdata),
    .reg_rd    (req.read && is_instr),
    .reg_rdata (ireg_rdata),
    .clk_mod   (clk_mod),
    .rst_mod   (rst_mod),
    .probes    (probe[N-1:0])
  );

  initial begin
    assert (N <= FIR_PROBE_W) else $error("fir_module: N exceeds the filter's probe nets");
  end

endmodule
