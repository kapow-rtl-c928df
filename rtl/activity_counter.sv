// activity_counter: counts rising edges of one monitored net in a W-bit LFSR
// and can be read out and cleared through a one-bit scan chain.
//
// Structure (after the scan-capable counter of the KAPow instrumentation):
//   * Positive-edge detector: two registers delay the monitored signal; an
//     edge is "first register high and second register low".
//   * The LFSR clock enable is (edge OR scan_en) AND enable, so the LFSR only
//     moves while the instrument is enabled.
//   * The first LFSR stage takes either the counting feedback (scan_en = 0)
//     or scan_in (scan_en = 1), a 2:1 selection that the FPGA register's
//     second data port can provide for free. The last stage is scan_out.
// Counting: enable = 1, scan_en = 0. Scanning: enable = 1, scan_en = 1, where
// every clock shifts the LFSR one place towards scan_out.
//
// Choices of this design: XNOR feedback with the taps of kapow_pkg, so that
// an all-zero counter (what a read-out leaves behind) is a valid start state;
// the edge-detector registers sample on every clock, so only edges inside
// the enabled window are counted and a window of 2*(2^W-2) cycles can never
// count more than 2^W-2 events; a synchronous reset clears all registers.
// Counts are not consecutive binary numbers: software decodes them with a
// table of the LFSR sequence.
module activity_counter #(
  parameter int unsigned W = kapow_pkg::W_DEFAULT
) (
  input  logic         clk,
  input  logic         rst,        // synchronous, active high
  input  logic         enable,
  input  logic         scan_en,
  input  logic         sig,        // monitored net
  input  logic         scan_in,
  output logic         scan_out,
  output logic [W-1:0] count       // raw LFSR state, for observation
);

  logic         d1, d2;
  logic         edge_det;
  logic         lfsr_ce;
  logic         feedback;
  logic [W-1:0] lfsr;

  localparam logic [W-1:0] TAPS = W'(kapow_pkg::lfsr_taps(W));

  initial begin
    assert (W >= 2 && W <= 16) else $error("activity_counter: W must be 2..16");
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      d1 <= 1'b0;
      d2 <= 1'b0;
    end else begin
      d1 <= sig;
      d2 <= d1;
    end
  end

  assign edge_det = d1 & ~d2;
  assign lfsr_ce  = (edge_det | scan_en) & enable;
  assign feedback = ~(^(lfsr & TAPS));

  always_ff @(posedge clk) begin
    if (rst)          lfsr <= '0;
    else if (lfsr_ce) lfsr <= {lfsr[W-2:0], scan_en ? scan_in : feedback};
  end

  assign scan_out = lfsr[W-1];
  assign count    = lfsr;

endmodule
