// image_ram: dual-clock frame store feeding one FIR module.
//
// The host fills it byte by byte over the system bus (write port, clk_w);
// the filter reads it cyclically, one byte per module clock (read port,
// clk_r, one cycle read latency). DEPTH defaults to one 240x160 frame of
// 8-bit pixels. The document only says that a RAM, filled by the host,
// fed each filter cyclically; the simple dual-port organisation is this
// design's choice and maps onto FPGA block RAM.
module image_ram #(
  parameter int unsigned DEPTH = kapow_pkg::IMG_W_DEFAULT * kapow_pkg::IMG_H_DEFAULT,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk_w,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic          clk_r,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk_w) begin
    if (we && waddr < AW'(DEPTH)) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk_r) begin
    rdata <= mem[raddr];
  end

endmodule
