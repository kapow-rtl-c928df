// measurement_timer: holds the instruments' Enable high for a programmed
// number of system-bus clock cycles.
//
// Writing a period P (start = 1, period = P) makes `active` high for exactly
// P bus cycles, starting on the cycle after the write; `remaining` counts
// down to zero. A new start while active restarts the window; P = 0 stops it.
// For W-bit counters the period should be 2*(2^W-2) module-clock cycles,
// scaled by f_bus/f_module, which is the longest window in which a counter
// cannot wrap. The timer runs in the bus clock domain as in the KAPow
// template; the start-on-write behaviour is this design's choice.
module measurement_timer #(
  parameter int unsigned PW = 32
) (
  input  logic          clk,
  input  logic          rst,        // synchronous, active high
  input  logic          start,
  input  logic [PW-1:0] period,
  output logic          active,
  output logic [PW-1:0] remaining
);

  always_ff @(posedge clk) begin
    if (rst)             remaining <= '0;
    else if (start)      remaining <= period;
    else if (remaining != '0) remaining <= remaining - 1'b1;
  end

  assign active = (remaining != '0);

endmodule
