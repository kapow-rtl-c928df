// tb_image_ram: fills a 192-byte frame store from a 20 ns write clock and
// reads it back from an unrelated 7 ns read clock, checking every byte and
// the one-cycle read latency; then overwrites part of it and re-checks.
module tb_image_ram;
  localparam int DEPTH = 192, AW = 8;
  logic clk_w = 0, clk_r = 0;
  logic we;
  logic [AW-1:0] waddr, raddr;
  logic [7:0] wdata, rdata;
  byte unsigned model [DEPTH];
  int checks = 0, failures = 0;

  image_ram #(.DEPTH(DEPTH), .AW(AW)) dut (.*);

  always #10  clk_w = ~clk_w;
  always #3.5 clk_r = ~clk_r;

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write_range(input int lo, input int hi);
    for (int a = lo; a < hi; a++) begin
      @(negedge clk_w);
      we = 1; waddr = AW'(a); wdata = 8'($urandom);
      model[a] = wdata;
    end
    @(negedge clk_w) we = 0;
  endtask

  task automatic read_all();
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk_r) raddr = AW'(a);
      @(posedge clk_r) #1;
      check(rdata == model[a], $sformatf("addr %0d: got %h exp %h", a, rdata, model[a]));
    end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    write_range(0, DEPTH);
    read_all();
    write_range(17, 90);
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
