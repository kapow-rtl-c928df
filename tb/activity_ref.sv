// activity_ref: testbench reference for one module's activity counters.
// Counts, per monitored net, the rising edges seen while the counters are
// enabled and not scanning, sampling the nets on every clock so that an
// edge counts in the cycle after it is first sampled high. `clear` zeroes the
// counts, as a completed read-out does in hardware.
module activity_ref #(
  parameter int N = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         enable,
  input  logic         scan,
  input  logic         clear,
  input  logic [N-1:0] sig,
  output int           cnt [N]
);
  bit d1 [N], d2 [N];

  always @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) begin d1[i] = 0; d2[i] = 0; cnt[i] = 0; end
    end else begin
      if (clear) for (int i = 0; i < N; i++) cnt[i] = 0;
      for (int i = 0; i < N; i++) begin
        if (enable && !scan && d1[i] && !d2[i]) cnt[i]++;
        d2[i] = d1[i];
        d1[i] = sig[i];
      end
    end
  end
endmodule
