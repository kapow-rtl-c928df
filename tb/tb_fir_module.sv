// tb_fir_module: one instrumented FIR module (N = 16, W = 9, 12x8 frames)
// driven through its memory-mapped port, bus clock 20 ns, module clock 6 ns.
// The host streams a kernel, loads an image, starts the filter and checks
// the output stream, the frame counter and the frame checksum against the
// reference filter. It then runs a measurement window, reads the 16
// activity counts back and compares them with a reference edge count of the
// monitored nets; finally it stops, loads a second kernel and repeats.
module tb_fir_module;
  import kapow_pkg::*;
  import kapow_tb_pkg::*;

  localparam int N = 16, W = 9, IW = 12, IH = 8;

  logic clk_bus = 0, clk_mod = 0;
  logic rst_bus, rst_mod;
  mm_req_t req;
  logic [31:0] rdata;
  logic out_valid;
  logic [7:0] out_pix;
  int checks = 0, failures = 0;

  fir_module #(.N(N), .W(W), .IMG_W(IW), .IMG_H(IH)) dut (.*);

  always #10 clk_bus = ~clk_bus;
  always #3  clk_mod = ~clk_mod;

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference activity counts from the monitored nets
  int  cnt [N];
  bit  ref_clear = 0;
  activity_ref #(.N(N)) u_ref (
    .clk(clk_mod), .rst(rst_mod), .enable(dut.u_instr.inst_enable),
    .scan(dut.u_instr.scan_en_m), .clear(ref_clear), .sig(dut.probe[N-1:0]), .cnt(cnt));

  // ------------------------------------------------------------ bus tasks
  task automatic bus_wr(input logic [5:0] a, input logic [31:0] d);
    @(negedge clk_bus);
    req = '{addr: a, write: 1'b1, read: 1'b0, wdata: d};
    @(negedge clk_bus);
    req.write = 0;
  endtask

  task automatic bus_rd(input logic [5:0] a, output logic [31:0] d);
    @(negedge clk_bus);
    req = '{addr: a, write: 1'b0, read: 1'b1, wdata: 32'd0};
    @(negedge clk_bus);
    req.read = 0;
    d = rdata;
  endtask

  // ------------------------------------------------------ output checking
  byte unsigned frame_ref[$];
  int  out_idx = 0, out_err = 0, out_total = 0;
  longint unsigned ref_sum;
  always @(posedge clk_mod) begin
    if (out_valid && frame_ref.size() > 0) begin
      if (out_pix != frame_ref[out_idx]) out_err++;
      out_total++;
      out_idx = (out_idx + 1) % frame_ref.size();
    end
  end

  task automatic load_and_run(input int kind);
    byte unsigned img[];
    int c[25];
    logic [31:0] v;
    img = new[IW*IH];
    foreach (img[i]) img[i] = byte'($urandom);
    for (int k = 0; k < 25; k++)
      c[k] = (kind == 0) ? ($urandom_range(0, 64) - 16) : ((k % 6 == 0) ? 51 : -3);
    bus_wr(REG_FIR_CTRL, 0);
    repeat (3) @(negedge clk_bus);
    for (int k = 0; k < 25; k++) bus_wr(REG_FIR_COEF, 32'(c[k]));
    bus_wr(REG_RAM_ADDR, 0);
    for (int i = 0; i < IW*IH; i++) bus_wr(REG_RAM_DATA, 32'(img[i]));
    bus_rd(REG_RAM_ADDR, v);
    check(v == IW*IH, "RAM pointer advanced once per byte");
    fir_ref(img, IW, IH, c, frame_ref);
    ref_sum = 0;
    foreach (frame_ref[i]) ref_sum += frame_ref[i];
    out_idx = 0; out_err = 0; out_total = 0;
    bus_rd(REG_FIR_CTRL, v);
    bus_wr(REG_FIR_CTRL, 1);
    // wait for three frames
    begin
      logic [31:0] f0 = v >> 1;
      int guard = 0;
      do begin
        bus_rd(REG_FIR_CTRL, v);
        guard++;
      end while (((v >> 1) - f0) < 3 && guard < 5000);
      check(((v >> 1) - f0) >= 3, "frames completed");
    end
    bus_rd(REG_FIR_COEF, v);
    check(v == 32'(ref_sum), $sformatf("frame checksum %0d exp %0d", v, ref_sum));
    check(out_total >= 3 * (IW-4)*(IH-4), "outputs of three frames seen");
    check(out_err == 0, $sformatf("%0d output pixels differ", out_err));
  endtask

  task automatic measure_and_read(input int period);
    logic [31:0] v;
    int exp_cnt [N];
    int guard = 0, total = 0;
    bus_wr(REG_MEAS_PER, period);
    do bus_rd(REG_MEAS_PER, v); while (v != 0);
    repeat (8) @(negedge clk_mod);
    for (int i = 0; i < N; i++) begin exp_cnt[i] = cnt[i]; total += cnt[i]; end
    check(total > 0, "filter activity counted");
    bus_wr(REG_SCAN_EN, 1);
    do begin bus_rd(REG_FIFO_FULL, v); guard++; end while (!v[0] && guard < 1000);
    check(v[0], "FIFO_FULL after scan");
    for (int j = 0; j < N; j++) begin
      bus_rd(REG_FIFO_DATA, v);
      check(v == 32'(lfsr_after(exp_cnt[N-1-j], W)),
            $sformatf("count word %0d: got %h exp %h", j, v, lfsr_after(exp_cnt[N-1-j], W)));
    end
    bus_wr(REG_SCAN_EN, 0);
    repeat (6) @(negedge clk_mod);
    @(negedge clk_mod) ref_clear = 1;
    @(negedge clk_mod) ref_clear = 0;
  endtask

  initial begin
    logic [31:0] v;
    req = '0;
    rst_bus = 1; rst_mod = 1;
    repeat (4) @(negedge clk_bus);
    rst_bus = 0; rst_mod = 0;
    bus_rd(REG_INST_N, v); check(v == N, "N readable");
    bus_rd(REG_INST_W, v); check(v == W, "W readable");
    load_and_run(0);
    // window of 2*(2^9-2) = 1020 module cycles = 306 bus cycles at 6/20 ns
    measure_and_read(306);
    load_and_run(1);
    measure_and_read(150);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
