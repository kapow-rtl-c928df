// tb_async_fifo: dual-clock FIFO with unrelated clocks (7 ns write, 20 ns
// read). Random writes and reads; the read order and data are compared with
// a queue. Also checks full (no write is lost or accepted when full), empty,
// and the read-side count once both sides are idle.
module tb_async_fifo;
  localparam int DW = 9, AW = 3;
  logic wclk = 0, rclk = 0;
  logic wrst, rrst, wr_en, rd_en, wr_full, rd_empty;
  logic [DW-1:0] wr_data, rd_data;
  logic [AW:0] rd_count;
  int checks = 0, failures = 0;
  logic [DW-1:0] model[$];

  async_fifo #(.DW(DW), .AW(AW)) dut (.*);

  always #3.5 wclk = ~wclk;
  always #10  rclk = ~rclk;

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

  int written = 0, readn = 0, full_seen = 0;
  bit writer_done = 0;

  initial begin
    wrst = 1; wr_en = 0; wr_data = 0;
    repeat (4) @(posedge wclk);
    #1 wrst = 0;
    // phase 1: fill until full without reads
    repeat (40) begin
      @(negedge wclk);
      wr_en = 1; wr_data = DW'($urandom);
      if (!wr_full) begin model.push_back(wr_data); written++; end
      else full_seen++;
    end
    @(negedge wclk) wr_en = 0;
    // phase 2: random writes while reader drains
    repeat (600) begin
      @(negedge wclk);
      wr_en = 1'($urandom_range(0, 1)); wr_data = DW'($urandom);
      if (wr_en && !wr_full) begin model.push_back(wr_data); written++; end
    end
    @(negedge wclk) wr_en = 0;
    writer_done = 1;
  end

  initial begin
    rrst = 1; rd_en = 0;
    repeat (4) @(posedge rclk);
    #1 rrst = 0;
    repeat (10) @(posedge rclk);
    check(rd_count == (AW+1)'(2**AW), $sformatf("count when full = %0d", rd_count));
    check(written == 2**AW, "accepted exactly depth entries while full");
    while (!(writer_done && model.size() == 0)) begin
      @(negedge rclk);
      rd_en = 1'($urandom_range(0, 3) != 0);
      if (rd_en && !rd_empty) begin
        check(model.size() > 0, "read with model empty");
        if (model.size() > 0) begin
          logic [DW-1:0] exp;
          exp = model.pop_front();
          check(rd_data == exp, $sformatf("data %h exp %h", rd_data, exp));
          readn++;
        end
      end
      if (writer_done && model.size() == 0) break;
    end
    @(negedge rclk) rd_en = 0;
    repeat (5) @(posedge rclk);
    check(rd_empty, "empty at end");
    check(rd_count == 0, "count 0 at end");
    check(full_seen > 0, "full was reached");
    check(readn == written, "all entries read");
    $display("written=%0d read=%0d", written, readn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
