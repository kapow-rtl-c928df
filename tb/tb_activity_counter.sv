// tb_activity_counter: self-checking test of one scan-capable LFSR activity
// counter (W = 9).
// Checks: random edge counting against a reference LFSR, no counting while
// disabled, the worst case of one edge every two cycles for 2*(2^W-2) cycles
// (2^W-2 events, no wrap back to zero), and scan shifting: the old value
// leaves MSB first on scan_out while a new value enters from scan_in.
module tb_activity_counter;
  import kapow_tb_pkg::*;

  localparam int W = 9;

  logic clk = 1'b0;
  logic rst, enable, scan_en, sig, scan_in, scan_out;
  logic [W-1:0] count;
  int checks = 0, failures = 0;

  activity_counter #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Drive a bit sequence; returns the number of rising edges it contains,
  // starting from the given previous level.
  task automatic drive_random(input int cycles, inout bit prev, output int edges);
    edges = 0;
    for (int i = 0; i < cycles; i++) begin
      bit v = 1'($urandom);
      @(negedge clk) sig = v;
      if (v && !prev) edges++;
      prev = v;
    end
  endtask

  initial begin
    int edges, total;
    bit prev;
    logic [W-1:0] old, shifted;
    rst = 1; enable = 0; scan_en = 0; sig = 0; scan_in = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // 1: random counting
    enable = 1; prev = 0; total = 0;
    for (int rep = 0; rep < 5; rep++) begin
      drive_random(60, prev, edges);
      total += edges;
      @(negedge clk) sig = prev;          // hold, let the pipeline drain
      repeat (3) @(negedge clk);
      check(count == W'(lfsr_after(total, W)),
            $sformatf("random count %0d: got %h exp %h", total, count, lfsr_after(total, W)));
    end

    // 2: disabled, edges ignored
    @(negedge clk) enable = 0;
    old = count;
    drive_random(80, prev, edges);
    repeat (3) @(negedge clk);
    check(count == old, "counter moved while disabled");

    // 3: scan out the value, scan in a pattern; also clears with zeros
    @(negedge clk) begin enable = 1; scan_en = 1; end
    old = count;
    shifted = '0;
    for (int i = 0; i < W; i++) begin
      check(scan_out == old[W-1-i], $sformatf("scan_out bit %0d", i));
      scan_in = 1'b0;
      @(negedge clk);
    end
    check(count == '0, "counter not cleared by shifting in zeros");
    @(negedge clk) scan_en = 0;

    // 4: worst case, toggling every cycle for 2*(2^W-2) cycles
    @(negedge clk) rst = 1;
    @(negedge clk) begin rst = 0; sig = 0; end
    for (int i = 0; i < 2 * ((1 << W) - 2); i++) @(negedge clk) sig = ~sig;
    @(negedge clk) enable = 0;
    check(count == W'(lfsr_after((1 << W) - 2, W)),
          $sformatf("worst case: got %h exp %h", count, lfsr_after((1 << W) - 2, W)));
    check(count != '0, "worst case wrapped to zero");

    // 5: scan in an arbitrary pattern
    @(negedge clk) begin enable = 1; scan_en = 1; end
    shifted = W'($urandom);
    for (int i = 0; i < W; i++) begin
      scan_in = shifted[W-1-i];
      @(negedge clk);
    end
    check(count == shifted, "pattern scanned in");
    scan_en = 0; enable = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
