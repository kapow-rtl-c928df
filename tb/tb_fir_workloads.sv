// tb_fir_workloads: the FIR benchmark workloads on the full-size system
// (7 modules, N = 512 counters of W = 9 bits, 240x160 frames).
// Three iterations, as in the power-breakdown experiments: in each, every
// module is stopped, given its own module clock drawn at random between 10
// and 200 MHz, one of the ten benchmark kernels and one of six synthetic
// input frames (kapow_tb_pkg), and restarted; then every module is measured
// and read out. Kernels and frames rotate so that all ten kernels and all six
// frames are used. Checked: output checksums against the reference filter,
// every read-out count against a reference edge count, zero activity for a
// module running the all-zero kernel (all its monitored nets are products),
// activity that differs between workloads, and, in the last iteration, a
// 12-cycle window that emulates 3-bit counters (at most 2^3-2 = 6 events
// per counter). Following the benchmark: ten 5x5 filtering kernels, three
// iterations, random 10-200 MHz module clocks. Choices of this testbench:
// the exact Q4.8 kernel values and the six synthetic frames, since the
// photographic input frames of the benchmark are not reproduced.
module tb_fir_workloads;
  import kapow_pkg::*;
  import kapow_tb_pkg::*;

  localparam int M = M_DEFAULT, N = N_DEFAULT, W = W_DEFAULT;
  localparam int IW = IMG_W_DEFAULT, IH = IMG_H_DEFAULT;
  localparam int ITERS = 3;
  localparam int BUS_AW = 6 + $clog2(M);

  logic clk_bus = 0;
  logic rst_bus;
  logic [BUS_AW-1:0] bus_addr;
  logic bus_write, bus_read, bus_rvalid;
  logic [31:0] bus_wdata, bus_rdata;
  logic [M-1:0] clk_mod = '0;
  logic [M-1:0] rst_mod;
  logic [M-1:0] out_valid;
  logic [7:0] out_pix [M];
  int checks = 0, failures = 0;

  kapow_system dut (.*);

  int tmod_ps [M];   // current module clock periods
  always #10ns clk_bus = ~clk_bus;
  for (genvar m = 0; m < M; m++) begin : g_clk
    initial tmod_ps[m] = 5000;
    always begin
      #(tmod_ps[m] * 1ps / 2);
      clk_mod[m] = ~clk_mod[m];
    end
  end

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------ per-module references
  int  cnt [M][N];
  bit  ref_clear [M];
  for (genvar m = 0; m < M; m++) begin : g_ref
    int c [N];
    activity_ref #(.N(N)) u_ref (
      .clk(clk_mod[m]), .rst(rst_mod[m]),
      .enable(dut.g_mod[m].u_mod.u_instr.inst_enable),
      .scan(dut.g_mod[m].u_mod.u_instr.scan_en_m),
      .clear(ref_clear[m]), .sig(dut.g_mod[m].u_mod.probe[N-1:0]), .cnt(c));
    always_comb for (int i = 0; i < N; i++) cnt[m][i] = c[i];
  end

  // ------------------------------------------------------------ bus tasks
  function automatic logic [BUS_AW-1:0] ad(input int m, input logic [5:0] off);
    return BUS_AW'(m * 64 + int'(off));
  endfunction

  task automatic bus_wr(input int m, input logic [5:0] off, input logic [31:0] d);
    @(negedge clk_bus);
    bus_addr = ad(m, off); bus_wdata = d; bus_write = 1;
    @(negedge clk_bus);
    bus_write = 0;
  endtask

  task automatic bus_burst(input int m, input byte unsigned img[]);
    @(negedge clk_bus);
    bus_addr = ad(m, REG_RAM_DATA); bus_write = 1;
    foreach (img[i]) begin
      bus_wdata = 32'(img[i]);
      @(negedge clk_bus);
    end
    bus_write = 0;
  endtask

  task automatic bus_rd(input logic [BUS_AW-1:0] a, output logic [31:0] d);
    @(negedge clk_bus);
    bus_addr = a; bus_read = 1;
    @(negedge clk_bus);
    bus_read = 0;
    d = bus_rdata;
  endtask

  // ------------------------------------------------------------- phases
  longint unsigned ref_sum [M];
  int kernel_of [M], data_of [M];
  int kernels_used [10], data_used [6];
  int zero_kernel_checked = 0, w3_windows = 0, distinct_seen = 0;

  task automatic load_module(input int m, input int kid, input int did);
    byte unsigned img[];
    byte unsigned ref_out[$];
    int c[25];
    fir_kernel(kid, c);
    fir_dataset(did, IW, IH, img);
    for (int k = 0; k < 25; k++) bus_wr(m, REG_FIR_COEF, 32'(c[k]));
    bus_wr(m, REG_RAM_ADDR, 0);
    bus_burst(m, img);
    fir_ref(img, IW, IH, c, ref_out);
    ref_sum[m] = 0;
    foreach (ref_out[i]) ref_sum[m] += ref_out[i];
  endtask

  task automatic readout(input int m, output int total);
    logic [31:0] v;
    int guard = 0;
    int exp_cnt [N];
    int bad = 0;
    total = 0;
    for (int i = 0; i < N; i++) begin exp_cnt[i] = cnt[m][i]; total += cnt[m][i]; end
    bus_wr(m, REG_SCAN_EN, 1);
    do begin bus_rd(ad(m, REG_FIFO_FULL), v); guard++; end while (!v[0] && guard < 4 * N * W + 200);
    check(v[0], "FIFO_FULL after scan");
    for (int j = 0; j < N; j++) begin
      bus_rd(ad(m, REG_FIFO_DATA), v);
      if (v != 32'(lfsr_after(exp_cnt[N-1-j], W))) bad++;
    end
    check(bad == 0, $sformatf("module %0d: %0d of %0d counts differ", m, bad, N));
    bus_wr(m, REG_SCAN_EN, 0);
    repeat (6) @(posedge clk_mod[m]);
    @(negedge clk_mod[m]) ref_clear[m] = 1;
    @(negedge clk_mod[m]) ref_clear[m] = 0;
  endtask

  initial begin
    logic [31:0] v;
    int totals [M];
    void'($urandom(20160501));
    bus_addr = '0; bus_write = 0; bus_read = 0; bus_wdata = 0;
    for (int m = 0; m < M; m++) ref_clear[m] = 0;
    rst_bus = 1; rst_mod = '1;
    repeat (6) @(negedge clk_bus);
    rst_bus = 0; rst_mod = '0;

    for (int it = 0; it < ITERS; it++) begin
      automatic bit w3 = (it == ITERS - 1);
      logic [31:0] f0 [M];
      for (int m = 0; m < M; m++) bus_wr(m, REG_FIR_CTRL, 0);
      repeat (20) @(negedge clk_bus);
      for (int m = 0; m < M; m++) begin
        kernel_of[m] = (it * M + m) % 10;
        data_of[m]   = (it * M + m) % 6;
        kernels_used[kernel_of[m]]++;
        data_used[data_of[m]]++;
        tmod_ps[m] = 1000000 / $urandom_range(10, 200);   // 10..200 MHz
        load_module(m, kernel_of[m], data_of[m]);
      end
      for (int m = 0; m < M; m++) begin
        bus_rd(ad(m, REG_FIR_CTRL), v);
        f0[m] = v >> 1;
        bus_wr(m, REG_FIR_CTRL, 1);
      end
      // let the pipelines fill before measuring
      repeat (200) @(negedge clk_bus);
      for (int m = 0; m < M; m++) begin
        automatic int cyc = w3 ? 2 * ((1 << 3) - 2) : 2 * ((1 << W) - 2);
        automatic int p = (cyc * tmod_ps[m]) / 20000;
        bus_wr(m, REG_MEAS_PER, (p < 1) ? 1 : p);
      end
      for (int m = 0; m < M; m++) do bus_rd(ad(m, REG_MEAS_PER), v); while (v != 0);
      for (int m = 0; m < M; m++) repeat (8) @(posedge clk_mod[m]);
      for (int m = 0; m < M; m++) begin
        automatic int lim = w3 ? (1 << 3) - 2 : (1 << W) - 2;
        automatic int over = 0;
        for (int i = 0; i < N; i++) if (cnt[m][i] > lim) over++;
        check(over == 0, $sformatf("module %0d: %0d counters beyond %0d events", m, over, lim));
        if (w3) w3_windows++;
      end
      for (int m = 0; m < M; m++) begin
        readout(m, totals[m]);
        $display("iteration %0d module %0d: kernel %0d data %0d clock %0d ps: %0d events",
                 it, m, kernel_of[m], data_of[m], tmod_ps[m], totals[m]);
        if (kernel_of[m] == 0) begin
          check(totals[m] == 0, "all-zero kernel shows no product activity");
          zero_kernel_checked++;
        end
      end
      begin
        automatic int distinct = 0;
        for (int m = 1; m < M; m++) if (totals[m] != totals[0]) distinct++;
        if (distinct > 0) distinct_seen++;
      end
      for (int m = 0; m < M; m++) begin
        automatic int guard = 0;
        do begin bus_rd(ad(m, REG_FIR_CTRL), v); guard++; end
        while (((v >> 1) - f0[m]) < 1 && guard < 8 * IW * IH);
        check(((v >> 1) - f0[m]) >= 1, "a frame completed");
        bus_rd(ad(m, REG_FIR_COEF), v);
        check(v == 32'(ref_sum[m]), $sformatf("iteration %0d module %0d checksum %0d exp %0d",
                                              it, m, v, ref_sum[m]));
      end
    end

    foreach (kernels_used[k]) check(kernels_used[k] > 0, $sformatf("kernel %0d used", k));
    foreach (data_used[d]) check(data_used[d] > 0, $sformatf("input frame %0d used", d));
    check(zero_kernel_checked > 0, "all-zero kernel run");
    check(w3_windows > 0, "3-bit window emulated");
    check(distinct_seen == ITERS, "activity differs between workloads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
