// tb_fir5x5: the 5x5 filter on small 12x8 frames.
// Three frames are streamed: random pixels with random kernels, one frame
// fed with gaps between pixels, and an identity kernel (centre tap 1.0 in
// Q4.8) that must reproduce the centre pixel. Every output is compared with
// the reference convolution; the number of outputs per frame, the out_last
// marker and the 4-clock latency from input to output are checked.
module tb_fir5x5;
  import kapow_pkg::*;
  import kapow_tb_pkg::*;

  localparam int IW = 12, IH = 8;

  logic clk = 0;
  logic rst, clear, pix_valid, out_valid, out_last;
  logic [7:0] pix_in, out_pix;
  logic signed [COEF_W-1:0] coef [NTAPS];
  logic [FIR_PROBE_W-1:0] probe;
  int checks = 0, failures = 0;

  fir5x5 #(.IMG_W(IW), .IMG_H(IH)) dut (.*);

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
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  byte unsigned expq[$];
  int  outs_seen, last_seen;
  longint in_time[$];   // cycle of each input pixel that completes a window
  longint cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    if (out_valid) begin
      byte unsigned e;
      longint t;
      outs_seen++;
      if (expq.size() == 0) begin
        check(0, "unexpected output");
      end else begin
        e = expq.pop_front();
        t = in_time.pop_front();
        check(out_pix == e, $sformatf("output %0d: got %0d exp %0d", outs_seen, out_pix, e));
        check(cyc - t == 4, $sformatf("latency %0d", cyc - t));
      end
      if (out_last) last_seen++;
    end
  end

  task automatic run_frame(input int kind, input bit gaps);
    byte unsigned img[];
    byte unsigned ref_out[$];
    int c[25];
    img = new[IW*IH];
    foreach (img[i]) img[i] = byte'($urandom);
    for (int k = 0; k < 25; k++) begin
      if (kind == 0)      c[k] = $urandom_range(0, 4095) - 2048;
      else if (kind == 1) c[k] = $urandom_range(0, 96) - 32;
      else                c[k] = (k == 12) ? 256 : 0;
      coef[k] = COEF_W'(c[k]);
    end
    fir_ref(img, IW, IH, c, ref_out);
    foreach (ref_out[i]) expq.push_back(ref_out[i]);
    if (kind == 2) begin
      int n = 0;
      for (int r = 4; r < IH; r++)
        for (int cc = 4; cc < IW; cc++) begin
          check(ref_out[n] == img[(r-2)*IW + cc-2], "identity reference");
          n++;
        end
    end
    outs_seen = 0; last_seen = 0;
    for (int r = 0; r < IH; r++)
      for (int cc = 0; cc < IW; cc++) begin
        if (gaps) while ($urandom_range(0, 2) == 0) @(negedge clk) pix_valid = 0;
        @(negedge clk);
        pix_valid = 1;
        pix_in = img[r*IW + cc];
        if (r >= 4 && cc >= 4) in_time.push_back(cyc + 1);
      end
    @(negedge clk) pix_valid = 0;
    repeat (8) @(negedge clk);
    check(outs_seen == (IW-4)*(IH-4), $sformatf("outputs per frame %0d", outs_seen));
    check(last_seen == 1, "one out_last per frame");
    check(expq.size() == 0, "all expected outputs seen");
  endtask

  initial begin
    rst = 1; clear = 0; pix_valid = 0; pix_in = 0;
    for (int k = 0; k < 25; k++) coef[k] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    run_frame(0, 0);
    run_frame(1, 0);
    in_time.delete();
    run_frame(1, 1);
    run_frame(2, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
