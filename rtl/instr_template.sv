// instr_template: the per-module activity instrumentation.
//
// N activity counters, one per monitored net, are joined into a single scan
// chain whose head is tied to 0, so reading the counts out also clears them.
// Six registers on the system bus control it (word index in kapow_pkg):
//   MEAS_PER  W: start a measurement of `value` bus cycles; R: cycles left
//   SCAN_EN   R/W bit0: scan enable
//   FIFO_FULL R bit0: all N counts of a read-out wait in the FIFO
//   FIFO_DATA R: oldest count (W bits, zero-extended); the read pops it
//   INST_N    R: N
//   INST_W    R: W
// Clock domains: the registers, the measurement timer and the FIFO read side
// run on clk_bus; the counters, the deserialiser and the FIFO write side run
// on clk_mod. The timer's window and the scan-enable bit cross into clk_mod
// through 3-flop synchronisers. The counters' Enable is high while the
// window is open or while scanning (a counter only shifts with Enable high).
//
// Read-out: software sets SCAN_EN; from the first clk_mod cycle that sees it,
// the chain shifts one bit per cycle for N*W cycles. The deserialiser
// regroups the bits into W-bit words and writes N words into the FIFO: word 0
// is the counter at the tail of the chain (index N-1), word N-1 the counter
// at the head (index 0). Software waits for FIFO_FULL, reads FIFO_DATA N
// times and clears SCAN_EN before the next read-out. A read takes N*W module
// cycles plus the synchroniser latency.
//
// The counter structure, the grounded chain head, the timer in the bus domain
// and the six-register interface follow the KAPow template; register
// offsets, the start-on-write timer, the word grouping and the FIFO depth
// (next power of two at or above N) are this design's choices.
module instr_template
  import kapow_pkg::*;
#(
  parameter int unsigned N = kapow_pkg::N_DEFAULT,
  parameter int unsigned W = kapow_pkg::W_DEFAULT
) (
  // system bus side
  input  logic        clk_bus,
  input  logic        rst_bus,     // synchronous, active high
  input  instr_reg_e  reg_sel,
  input  logic        reg_wr,
  input  logic [31:0] reg_wdata,
  input  logic        reg_rd,
  output logic [31:0] reg_rdata,   // combinational from reg_sel
  // module side
  input  logic        clk_mod,
  input  logic        rst_mod,     // synchronous, active high
  input  logic [N-1:0] probes      // the N monitored nets
);

  localparam int unsigned AW = (N < 4) ? 2 : $clog2(N);
  localparam int unsigned NW = N * W;
  localparam int unsigned IW = $clog2(NW + 1);
  localparam int unsigned BW = (W < 2) ? 1 : $clog2(W);

  // ---------------------------------------------------------------- bus side
  logic        scan_en_reg;
  logic        meas_active;
  logic [31:0] meas_remaining;
  logic [W-1:0] fifo_rd_data;
  logic        fifo_empty;
  logic [AW:0] fifo_count;
  logic        fifo_full_flag;

  always_ff @(posedge clk_bus) begin
    if (rst_bus)                              scan_en_reg <= 1'b0;
    else if (reg_wr && reg_sel == IR_SCAN_EN) scan_en_reg <= reg_wdata[0];
  end

  measurement_timer #(.PW(32)) u_timer (
    .clk       (clk_bus),
    .rst       (rst_bus),
    .start     (reg_wr && reg_sel == IR_MEAS_PER),
    .period    (reg_wdata),
    .active    (meas_active),
    .remaining (meas_remaining)
  );

  assign fifo_full_flag = (fifo_count >= (AW+1)'(N));

  always_comb begin
    case (reg_sel)
      IR_MEAS_PER:  reg_rdata = meas_remaining;
      IR_SCAN_EN:   reg_rdata = {31'd0, scan_en_reg};
      IR_FIFO_FULL: reg_rdata = {31'd0, fifo_full_flag};
      IR_FIFO_DATA: reg_rdata = 32'(fifo_rd_data);
      IR_INST_N:    reg_rdata = 32'(N);
      IR_INST_W:    reg_rdata = 32'(W);
      default:      reg_rdata = 32'd0;
    endcase
  end

  // ------------------------------------------------------------- module side
  logic meas_en_m, scan_en_m, inst_enable;

  sync_bit #(.STAGES(3)) u_sync_en (
    .clk(clk_mod), .rst(rst_mod), .d(meas_active), .q(meas_en_m));
  sync_bit #(.STAGES(3)) u_sync_scan (
    .clk(clk_mod), .rst(rst_mod), .d(scan_en_reg), .q(scan_en_m));

  assign inst_enable = meas_en_m | scan_en_m;

  logic [N:0] chain;   // chain[i] feeds counter i; chain[N] is the tail
  assign chain[0] = 1'b0;

  for (genvar i = 0; i < N; i++) begin : g_cnt
    logic [W-1:0] count;
    activity_counter #(.W(W)) u_cnt (
      .clk      (clk_mod),
      .rst      (rst_mod),
      .enable   (inst_enable),
      .scan_en  (scan_en_m),
      .sig      (probes[i]),
      .scan_in  (chain[i]),
      .scan_out (chain[i+1]),
      .count    (count)
    );
  end

  // Deserialiser: groups the first N*W bits after scan enable into words.
  logic [IW-1:0] bit_idx;
  logic [BW-1:0] bit_in_word;
  logic [W-1:0]  shreg;
  logic          scan_done;
  logic          take_bit;
  logic          fifo_wr;
  logic [W-1:0]  fifo_wr_data;
  logic          fifo_wfull;

  assign take_bit     = scan_en_m && !scan_done;
  assign fifo_wr_data = {shreg[W-2:0], chain[N]};
  assign fifo_wr      = take_bit && (bit_in_word == BW'(W-1));

  always_ff @(posedge clk_mod) begin
    if (rst_mod || !scan_en_m) begin
      bit_idx     <= '0;
      bit_in_word <= '0;
      shreg       <= '0;
      scan_done   <= 1'b0;
    end else if (take_bit) begin
      shreg       <= fifo_wr_data;
      bit_in_word <= (bit_in_word == BW'(W-1)) ? '0 : bit_in_word + 1'b1;
      bit_idx     <= bit_idx + 1'b1;
      if (bit_idx == IW'(NW-1)) scan_done <= 1'b1;
    end
  end

  async_fifo #(.DW(W), .AW(AW)) u_fifo (
    .wclk     (clk_mod),
    .wrst     (rst_mod),
    .wr_en    (fifo_wr),
    .wr_data  (fifo_wr_data),
    .wr_full  (fifo_wfull),
    .rclk     (clk_bus),
    .rrst     (rst_bus),
    .rd_en    (reg_rd && reg_sel == IR_FIFO_DATA),
    .rd_data  (fifo_rd_data),
    .rd_empty (fifo_empty),
    .rd_count (fifo_count)
  );

  initial begin
    assert (N >= 1) else $error("instr_template: N must be at least 1");
    assert (W >= 2 && W <= 16) else $error("instr_template: W must be 2..16");
  end

endmodule
