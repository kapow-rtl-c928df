// tb_instr_template: the instrumentation template with N = 8 counters of
// W = 9 bits, bus clock 20 ns and module clock 7 ns.
// Random activity drives the 8 monitored nets. A reference model counts the
// rising edges of every net while the counters are enabled (edge detector
// with two registers sampling every clock). The test then programs
// a measurement window, checks that the timer is active for exactly the
// programmed number of bus cycles, reads the counts back through SCAN_EN,
// FIFO_FULL and FIFO_DATA, decodes the LFSR states and compares them with
// the model (word j holds counter N-1-j). A second read-out must return
// zeros (the grounded chain head clears the counters), a second measurement
// must count afresh, and the N and W registers must read back. The scan
// read-out takes N*W module cycles, which is checked too.
module tb_instr_template;
  import kapow_pkg::*;
  import kapow_tb_pkg::*;

  localparam int N = 8, W = 9;

  logic clk_bus = 0, clk_mod = 0;
  logic rst_bus, rst_mod;
  instr_reg_e reg_sel;
  logic reg_wr, reg_rd;
  logic [31:0] reg_wdata, reg_rdata;
  logic [N-1:0] probes;
  int checks = 0, failures = 0;

  instr_template #(.N(N), .W(W)) dut (.*);

  always #10  clk_bus = ~clk_bus;
  always #3.5 clk_mod = ~clk_mod;

  initial begin
    #500us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------- reference model
  int  ref_cnt [N];
  bit  m_d1 [N], m_d2 [N];
  bit  model_clear;
  int  scan_cycles;
  logic en_m, scan_m;
  assign en_m   = dut.inst_enable;
  assign scan_m = dut.scan_en_m;

  always @(posedge clk_mod) begin
    if (rst_mod) begin
      for (int i = 0; i < N; i++) begin m_d1[i] = 0; m_d2[i] = 0; ref_cnt[i] = 0; end
    end else begin
      if (model_clear) for (int i = 0; i < N; i++) ref_cnt[i] = 0;
      for (int i = 0; i < N; i++) begin
        if (en_m && !scan_m && m_d1[i] && !m_d2[i]) ref_cnt[i]++;
        m_d2[i] = m_d1[i];
        m_d1[i] = probes[i];
      end
      if (scan_m) scan_cycles++;
    end
  end

  // Random activity, different per net.
  always @(negedge clk_mod) begin
    for (int i = 0; i < N; i++)
      if ($urandom_range(0, 7) < (i % 4) + 1) probes[i] <= ~probes[i];
  end

  // ---------------------------------------------------- bus tasks
  task automatic wr(input instr_reg_e s, input logic [31:0] d);
    @(negedge clk_bus);
    reg_sel = s; reg_wdata = d; reg_wr = 1;
    @(negedge clk_bus);
    reg_wr = 0;
  endtask

  task automatic rd(input instr_reg_e s, output logic [31:0] d);
    @(negedge clk_bus);
    reg_sel = s; reg_rd = 1;
    #1 d = reg_rdata;
    @(negedge clk_bus);
    reg_rd = 0;
  endtask

  task automatic measure(input int period);
    int active_cycles = 0;
    logic [31:0] v;
    wr(IR_MEAS_PER, period);
    while (dut.meas_active) begin
      @(negedge clk_bus);
      active_cycles++;
    end
    check(active_cycles == period, $sformatf("window %0d bus cycles, expected %0d", active_cycles, period));
    rd(IR_MEAS_PER, v);
    check(v == 0, "remaining reads 0 after the window");
    repeat (6) @(negedge clk_mod);  // let the enable fall in the module domain
  endtask

  task automatic readout(input bit expect_zero);
    logic [31:0] v;
    int guard = 0;
    int exp_cnt [N];
    for (int i = 0; i < N; i++) exp_cnt[i] = expect_zero ? 0 : ref_cnt[i];
    scan_cycles = 0;
    wr(IR_SCAN_EN, 1);
    do begin
      rd(IR_FIFO_FULL, v);
      guard++;
    end while (!v[0] && guard < 1000);
    check(v[0], "FIFO_FULL set after scan");
    for (int j = 0; j < N; j++) begin
      rd(IR_FIFO_DATA, v);
      check(v == 32'(lfsr_after(exp_cnt[N-1-j], W)),
            $sformatf("word %0d: got %h exp %h (count %0d)", j, v, lfsr_after(exp_cnt[N-1-j], W), exp_cnt[N-1-j]));
    end
    rd(IR_FIFO_FULL, v);
    check(!v[0], "FIFO_FULL clear after reading N words");
    wr(IR_SCAN_EN, 0);
    repeat (6) @(negedge clk_mod);
    // chain read all N*W bits while scan enable was seen in the module domain
    check(scan_cycles >= N * W, $sformatf("scan lasted %0d module cycles", scan_cycles));
    @(negedge clk_mod) model_clear = 1;
    @(negedge clk_mod) model_clear = 0;
  endtask

  initial begin
    logic [31:0] v;
    int total;
    rst_bus = 1; rst_mod = 1; reg_wr = 0; reg_rd = 0; reg_sel = IR_MEAS_PER;
    reg_wdata = 0; probes = '0; model_clear = 0; scan_cycles = 0;
    repeat (4) @(negedge clk_bus);
    rst_bus = 0; rst_mod = 0;
    rd(IR_INST_N, v); check(v == N, "N register");
    rd(IR_INST_W, v); check(v == W, "W register");

    // Window of 2*(2^W-2) module cycles in bus cycles: 1020*7/20 = 357.
    measure(357);
    total = 0;
    for (int i = 0; i < N; i++) total += ref_cnt[i];
    check(total > 0, "some activity was counted");
    for (int i = 0; i < N; i++) check(ref_cnt[i] <= (1 << W) - 2, "no overflow in the window");
    readout(0);
    readout(1);          // counters were cleared by the first read-out
    measure(120);
    readout(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
