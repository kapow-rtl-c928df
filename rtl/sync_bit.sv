// sync_bit: multi-flop synchroniser for a level signal entering a clock
// domain. STAGES flops in series; the output follows the input after STAGES
// rising edges of clk. Used for the Enable and Scan-enable levels that cross
// from the system-bus clock into a module's clock. Three stages follow the
// three-register chains drawn on those paths in the instrumentation template.
module sync_bit #(
  parameter int unsigned STAGES = 3
) (
  input  logic clk,
  input  logic rst,   // synchronous, active high
  input  logic d,
  output logic q
);

  logic [STAGES-1:0] ff;

  always_ff @(posedge clk) begin
    if (rst) ff <= '0;
    else     ff <= {ff[STAGES-2:0], d};
  end

  assign q = ff[STAGES-1];

endmodule
