// kapow_system: the instrumented multi-module FIR system.
//
// M filter modules, each with its own clock (the benchmark clocks every
// module independently from a runtime-adjustable PLL, so each module clock
// is a port here), share one memory-mapped system bus clocked by clk_bus.
// Module m owns the 64-byte window at byte address m*64; inside it the
// register map of fir_module applies. A host reads per-module activity
// counts through these windows and measures system power externally; the
// power model itself (recursive least squares) runs in host software.
//
// Bus protocol: a request (bus_addr, bus_write or bus_read, bus_wdata) is
// taken in the cycle it is presented; read data comes back one cycle later
// with bus_rvalid. Addresses beyond the last module read as zero.
// Each module's filtered pixel stream is brought out for observation.
// Module count, counter count and width default to the benchmark's
// M = 7, N = 512, W = 9; the address map is this design's choice.
module kapow_system
  import kapow_pkg::*;
#(
  parameter int unsigned M     = kapow_pkg::M_DEFAULT,
  parameter int unsigned N     = kapow_pkg::N_DEFAULT,
  parameter int unsigned W     = kapow_pkg::W_DEFAULT,
  parameter int unsigned IMG_W = kapow_pkg::IMG_W_DEFAULT,
  parameter int unsigned IMG_H = kapow_pkg::IMG_H_DEFAULT,
  parameter int unsigned BUS_AW = 6 + ((M < 2) ? 1 : $clog2(M))
) (
  input  logic              clk_bus,
  input  logic              rst_bus,          // synchronous, active high
  input  logic [BUS_AW-1:0] bus_addr,
  input  logic              bus_write,
  input  logic              bus_read,
  input  logic [31:0]       bus_wdata,
  output logic [31:0]       bus_rdata,
  output logic              bus_rvalid,
  input  logic [M-1:0]      clk_mod,
  input  logic [M-1:0]      rst_mod,          // synchronous to clk_mod[m]
  output logic [M-1:0]      out_valid,
  output logic [7:0]        out_pix [M]
);

  localparam int unsigned SW = BUS_AW - 6;

  logic [SW-1:0] sel, sel_q;
  logic [31:0]   mod_rdata [M];

  assign sel = bus_addr[BUS_AW-1:6];

  for (genvar m = 0; m < M; m++) begin : g_mod
    mm_req_t req;
    assign req.addr  = bus_addr[5:0];
    assign req.write = bus_write && (sel == SW'(m));
    assign req.read  = bus_read  && (sel == SW'(m));
    assign req.wdata = bus_wdata;

    fir_module #(.N(N), .W(W), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_mod (
      .clk_bus   (clk_bus),
      .rst_bus   (rst_bus),
      .req       (req),
      .rdata     (mod_rdata[m]),
      .clk_mod   (clk_mod[m]),
      .rst_mod   (rst_mod[m]),
      .out_valid (out_valid[m]),
      .out_pix   (out_pix[m])
    );
  end

  always_ff @(posedge clk_bus) begin
    if (rst_bus) begin
      bus_rvalid <= 1'b0;
      sel_q      <= '0;
    end else begin
      bus_rvalid <= bus_read;
      sel_q      <= sel;
    end
  end

  always_comb begin
    bus_rdata = 32'd0;
    for (int m = 0; m < M; m++)
      if (sel_q == SW'(m)) bus_rdata = mod_rdata[m];
  end

endmodule
