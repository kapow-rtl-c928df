// tb_kapow_system: end-to-end run of the instrumented multi-module system
// with 3 modules, N = 8 counters of W = 9 bits and 12x8 frames. Bus clock
// 20 ns; module clocks 5 ns, 7 ns and 25 ns, so modules run both faster and
// slower than the bus.
// The host, through the single system bus: loads a different kernel and
// image into every module, starts them, checks every module's output stream,
// frame counter and checksum against the reference filter, programs each
// module's measurement window (2*(2^W-2) module cycles converted to bus
// cycles), reads all counts back and compares them with reference edge
// counts, reads out again to see the counters cleared, then stops the
// modules, streams new kernels and repeats. It counts how often each
// mechanism happened (measurement window, scan read-out, clear on read-out,
// FIFO full, completed frame, kernel reload while stopped, module restart,
// unmapped read) and fails for any that never did.
module tb_kapow_system;
  import kapow_pkg::*;
  import kapow_tb_pkg::*;

  localparam int M = 3, N = 8, W = 9, IW = 12, IH = 8;
  localparam int ROUNDS = 2;
  localparam int BUS_AW = 6 + $clog2(M);
  localparam realtime TBUS = 20ns;
  localparam int TMOD_PS [7] = '{5000, 7000, 25000, 9000, 11000, 6000, 13000};

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

  kapow_system #(.M(M), .N(N), .W(W), .IMG_W(IW), .IMG_H(IH)) dut (.*);

  always #(TBUS/2) clk_bus = ~clk_bus;
  for (genvar m = 0; m < M; m++) begin : g_clk
    always #(TMOD_PS[m] * 1ps / 2) clk_mod[m] = ~clk_mod[m];
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_measure = 0, n_readout = 0, n_cleared = 0, n_fifo_full = 0;
  int n_frames = 0, n_reload = 0, n_restart = 0, n_unmapped = 0;

  // ------------------------------------------------ per-module references
  int  cnt [M][N];
  bit  ref_clear [M];
  byte unsigned frame_ref [M][$];
  int  out_idx [M], out_err [M], out_total [M];

  for (genvar m = 0; m < M; m++) begin : g_ref
    int c [N];
    activity_ref #(.N(N)) u_ref (
      .clk(clk_mod[m]), .rst(rst_mod[m]),
      .enable(dut.g_mod[m].u_mod.u_instr.inst_enable),
      .scan(dut.g_mod[m].u_mod.u_instr.scan_en_m),
      .clear(ref_clear[m]), .sig(dut.g_mod[m].u_mod.probe[N-1:0]), .cnt(c));
    always_comb for (int i = 0; i < N; i++) cnt[m][i] = c[i];
    always @(posedge clk_mod[m]) begin
      if (out_valid[m] && frame_ref[m].size() > 0) begin
        if (out_pix[m] != frame_ref[m][out_idx[m]]) out_err[m]++;
        out_total[m]++;
        out_idx[m] = (out_idx[m] + 1) % frame_ref[m].size();
      end
    end
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

  // Back-to-back byte writes into a module's image RAM.
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
    check(bus_rvalid, "read data valid one cycle after the request");
    d = bus_rdata;
  endtask

  // ------------------------------------------------------------- phases
  longint unsigned ref_sum [M];
  logic [31:0] frames0 [M];

  task automatic load_module(input int m, input int round);
    byte unsigned img[];
    int c[25];
    logic [31:0] v;
    img = new[IW*IH];
    foreach (img[i]) img[i] = byte'($urandom);
    for (int k = 0; k < 25; k++) c[k] = $urandom_range(0, 40 + 20*m) - 8;
    if (round > 0) n_reload++;
    for (int k = 0; k < 25; k++) bus_wr(m, REG_FIR_COEF, 32'(c[k]));
    bus_wr(m, REG_RAM_ADDR, 0);
    bus_burst(m, img);
    bus_rd(ad(m, REG_RAM_ADDR), v);
    check(v == IW*IH, "image pointer");
    fir_ref(img, IW, IH, c, frame_ref[m]);
    ref_sum[m] = 0;
    foreach (frame_ref[m][i]) ref_sum[m] += frame_ref[m][i];
    out_idx[m] = 0; out_err[m] = 0; out_total[m] = 0;
  endtask

  task automatic readout(input int m, input bit expect_zero);
    logic [31:0] v;
    int guard = 0;
    int exp_cnt [N];
    for (int i = 0; i < N; i++) exp_cnt[i] = expect_zero ? 0 : cnt[m][i];
    bus_wr(m, REG_SCAN_EN, 1);
    do begin bus_rd(ad(m, REG_FIFO_FULL), v); guard++; end while (!v[0] && guard < 4 * N * W + 200);
    check(v[0], "FIFO_FULL after scan");
    if (v[0]) n_fifo_full++;
    for (int j = 0; j < N; j++) begin
      bus_rd(ad(m, REG_FIFO_DATA), v);
      check(v == 32'(lfsr_after(exp_cnt[N-1-j], W)),
            $sformatf("module %0d word %0d: got %h exp %h (%0d events)", m, j, v,
                      lfsr_after(exp_cnt[N-1-j], W), exp_cnt[N-1-j]));
    end
    bus_wr(m, REG_SCAN_EN, 0);
    repeat (6) @(posedge clk_mod[m]);
    @(negedge clk_mod[m]) ref_clear[m] = 1;
    @(negedge clk_mod[m]) ref_clear[m] = 0;
    if (expect_zero) n_cleared++; else n_readout++;
  endtask

  initial begin
    logic [31:0] v;
    bus_addr = '0; bus_write = 0; bus_read = 0; bus_wdata = 0;
    for (int m = 0; m < M; m++) ref_clear[m] = 0;
    rst_bus = 1; rst_mod = '1;
    repeat (6) @(negedge clk_bus);
    rst_bus = 0; rst_mod = '0;

    for (int m = 0; m < M; m++) begin
      bus_rd(ad(m, REG_INST_N), v); check(v == N, "N register");
      bus_rd(ad(m, REG_INST_W), v); check(v == W, "W register");
    end
    if (M < 2**(BUS_AW-6)) begin
      bus_rd(ad(M, REG_INST_N), v);
      check(v == 0, "unmapped window reads zero");
      n_unmapped++;
    end

    for (int round = 0; round < ROUNDS; round++) begin
      // stop all modules, stream kernels and images, restart
      for (int m = 0; m < M; m++) bus_wr(m, REG_FIR_CTRL, 0);
      repeat (4) @(negedge clk_bus);
      for (int m = 0; m < M; m++) load_module(m, round);
      for (int m = 0; m < M; m++) begin
        bus_rd(ad(m, REG_FIR_CTRL), v);
        frames0[m] = v >> 1;
        bus_wr(m, REG_FIR_CTRL, 1);
        if (round > 0) n_restart++;
      end
      // measurement window on every module: 2*(2^W-2) module cycles
      for (int m = 0; m < M; m++)
        bus_wr(m, REG_MEAS_PER, (2 * ((1 << W) - 2) * TMOD_PS[m]) / 20000);
      for (int m = 0; m < M; m++) begin
        do bus_rd(ad(m, REG_MEAS_PER), v); while (v != 0);
        n_measure++;
      end
      for (int m = 0; m < M; m++) repeat (8) @(posedge clk_mod[m]);
      for (int m = 0; m < M; m++) begin
        automatic int total = 0;
        for (int i = 0; i < N; i++) begin
          total += cnt[m][i];
          check(cnt[m][i] <= (1 << W) - 2, "window short enough to avoid overflow");
        end
        check(total > 0, $sformatf("module %0d activity counted", m));
      end
      for (int m = 0; m < M; m++) begin
        readout(m, 0);
        readout(m, 1);
      end
      // let every module finish at least two frames, then check results
      for (int m = 0; m < M; m++) begin
        automatic int guard = 0;
        do begin bus_rd(ad(m, REG_FIR_CTRL), v); guard++; end
        while (((v >> 1) - frames0[m]) < 2 && guard < 4 * IW * IH + 20000);
        check(((v >> 1) - frames0[m]) >= 2, "frames completed");
        n_frames += (v >> 1) - frames0[m];
        bus_rd(ad(m, REG_FIR_COEF), v);
        check(v == 32'(ref_sum[m]), $sformatf("module %0d checksum %0d exp %0d", m, v, ref_sum[m]));
        check(out_err[m] == 0, $sformatf("module %0d: %0d output pixels differ", m, out_err[m]));
        check(out_total[m] >= 2 * (IW-4)*(IH-4), "output pixels seen");
      end
    end

    $display("mechanisms: measure=%0d readout=%0d cleared=%0d fifo_full=%0d frames=%0d reload=%0d restart=%0d unmapped=%0d",
             n_measure, n_readout, n_cleared, n_fifo_full, n_frames, n_reload, n_restart, n_unmapped);
    check(n_measure > 0,   "measurement window happened");
    check(n_readout > 0,   "scan read-out happened");
    check(n_cleared > 0,   "clear on read-out happened");
    check(n_fifo_full > 0, "FIFO full happened");
    check(n_frames > 0,    "frame completion happened");
    check(n_reload > 0,    "kernel reload happened");
    check(n_restart > 0,   "module restart happened");
    check(n_unmapped > 0 || M == 2**(BUS_AW-6), "unmapped read happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
