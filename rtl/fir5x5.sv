// fir5x5: streaming 5x5 two-dimensional FIR filter for 8-bit greyscale
// frames, the accelerator of the KAPow FIR benchmark system.
//
// Pixels arrive in raster order, one per clock when pix_valid is high, and
// the filter tracks the row and column itself (`clear` restarts a frame).
// Four line buffers of IMG_W bytes and a 5x5 register window hold the
// neighbourhood. For every pixel at row >= 4 and column >= 4 the window is
// complete and one output is produced:
//     out = sat_0_255( (sum_{r,c} win[r][c] * coef[r*5+c]) >>> 8 )
// where win[0][0] is the oldest (top-left) pixel and coefficients are Q4.8
// two's-complement numbers (sign, 4 integer, 8 fraction bits), so the
// output has the input's scale. Output pixel (row-2, col-2) appears 4 clocks
// after the input pixel (row, col); throughput is one pixel per clock.
// `out_last` marks the output belonging to the last input pixel of the frame.
//
// Frame size, kernel size and Q4.8 coefficients follow the benchmark
// description; the border policy (only full windows produce output), the
// rounding (arithmetic shift), saturation, the window orientation and the
// 4-stage pipeline are this design's choices. `probe` exposes internal
// registers (products, sum, window) for activity monitoring.
module fir5x5
  import kapow_pkg::*;
#(
  parameter int unsigned IMG_W = kapow_pkg::IMG_W_DEFAULT,
  parameter int unsigned IMG_H = kapow_pkg::IMG_H_DEFAULT
) (
  input  logic                     clk,
  input  logic                     rst,      // synchronous, active high
  input  logic                     clear,    // restart at row 0, column 0
  input  logic signed [COEF_W-1:0] coef [NTAPS],
  input  logic                     pix_valid,
  input  logic [7:0]               pix_in,
  output logic                     out_valid,
  output logic                     out_last,
  output logic [7:0]               out_pix,
  output logic [FIR_PROBE_W-1:0]   probe
);

  localparam int unsigned CW = $clog2(IMG_W);
  localparam int unsigned RW = $clog2(IMG_H);

  logic [CW-1:0] col;
  logic [RW-1:0] row;
  logic [7:0]    lines [KDIM-1][IMG_W];   // lines[k][c]: row (current-1-k)
  logic [7:0]    win   [KDIM][KDIM];      // [row][column], [0][0] oldest
  logic [7:0]    newcol [KDIM];

  // ----------------------------------------------- position and line buffers
  always_comb begin
    for (int k = 0; k < KDIM - 1; k++) newcol[KDIM-2-k] = lines[k][col];
    newcol[KDIM-1] = pix_in;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      col <= '0;
      row <= '0;
    end else if (pix_valid) begin
      if (col == CW'(IMG_W-1)) begin
        col <= '0;
        row <= (row == RW'(IMG_H-1)) ? '0 : row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (pix_valid) begin
      lines[0][col] <= pix_in;
      for (int k = 1; k < KDIM - 1; k++) lines[k][col] <= lines[k-1][col];
    end
  end

  // ------------------------------------------------------ stage 1: window
  logic v1, l1;
  always_ff @(posedge clk) begin
    if (pix_valid) begin
      for (int r = 0; r < KDIM; r++) begin
        for (int c = 0; c < KDIM - 1; c++) win[r][c] <= win[r][c+1];
        win[r][KDIM-1] <= newcol[r];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      v1 <= 1'b0;
      l1 <= 1'b0;
    end else begin
      v1 <= pix_valid && (row >= RW'(KDIM-1)) && (col >= CW'(KDIM-1));
      l1 <= pix_valid && (row == RW'(IMG_H-1)) && (col == CW'(IMG_W-1));
    end
  end

  // ---------------------------------------------------- stage 2: products
  logic signed [PROD_W-1:0] prod [NTAPS];
  logic v2, l2;
  always_ff @(posedge clk) begin
    for (int r = 0; r < KDIM; r++)
      for (int c = 0; c < KDIM; c++)
        prod[r*KDIM+c] <= $signed({1'b0, win[r][c]}) * coef[r*KDIM+c];
  end

  // --------------------------------------------------------- stage 3: sum
  logic signed [SUM_W-1:0] sum;
  logic signed [SUM_W-1:0] sum_next;
  logic v3, l3;
  always_comb begin
    sum_next = '0;
    for (int i = 0; i < NTAPS; i++) sum_next += SUM_W'(prod[i]);
  end
  always_ff @(posedge clk) sum <= sum_next;

  // ------------------------------------------------- stage 4: scale, clamp
  logic signed [SUM_W-1:0] scaled;
  assign scaled = sum >>> COEF_FRAC;

  always_ff @(posedge clk) begin
    if (scaled < 0)                          out_pix <= 8'd0;
    else if (scaled > SUM_W'(signed'(255)))  out_pix <= 8'd255;
    else                                     out_pix <= scaled[7:0];
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      {v2, v3, out_valid} <= '0;
      {l2, l3, out_last}  <= '0;
    end else begin
      {v2, v3, out_valid} <= {v1, v2, v3};
      {l2, l3, out_last}  <= {l1, l2, l3};
    end
  end

  // ------------------------------------------------------------ monitoring
  always_comb begin
    for (int i = 0; i < NTAPS; i++) probe[i*PROD_W +: PROD_W] = prod[i];
    probe[NTAPS*PROD_W +: SUM_W] = sum;
    for (int r = 0; r < KDIM; r++)
      for (int c = 0; c < KDIM; c++)
        probe[NTAPS*PROD_W + SUM_W + (r*KDIM+c)*8 +: 8] = win[r][c];
  end

endmodule
