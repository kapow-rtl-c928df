// tb_measurement_timer: checks that a programmed period P keeps `active`
// high for exactly P clocks, that `remaining` counts down, that a restart
// reloads and that P = 0 stops the window.
module tb_measurement_timer;
  logic clk = 1'b0;
  logic rst, start, active;
  logic [31:0] period, remaining;
  int checks = 0, failures = 0;

  measurement_timer #(.PW(32)) dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_window(input int p);
    int n = 0;
    @(negedge clk) begin start = 1; period = p; end
    @(negedge clk) start = 0;
    while (active) begin
      n++;
      check(remaining == 32'(p - n + 1), $sformatf("remaining at step %0d", n));
      @(negedge clk);
      if (n > p + 5) break;
    end
    check(n == p, $sformatf("window of %0d lasted %0d", p, n));
  endtask

  initial begin
    rst = 1; start = 0; period = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(!active, "idle after reset");
    run_window(1);
    run_window(7);
    run_window(1020);
    run_window(255);
    // restart in the middle
    @(negedge clk) begin start = 1; period = 100; end
    @(negedge clk) start = 0;
    repeat (40) @(negedge clk);
    @(negedge clk) begin start = 1; period = 10; end
    @(negedge clk) start = 0;
    check(remaining == 10, "restart reloads");
    // stop
    @(negedge clk) begin start = 1; period = 0; end
    @(negedge clk) start = 0;
    check(!active, "period 0 stops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
