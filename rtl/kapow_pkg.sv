// kapow_pkg: constants and helpers shared by the per-module activity
// instrumentation and the FIR benchmark system.
//
// The default sizes are those of the instrumented benchmark hardware: every
// module carries N = 512 activity counters of W = 9 bits, and the FIR system
// has M = 7 modules. The word offsets of the six instrumentation control
// registers and the LFSR feedback taps are this design's own choices.
package kapow_pkg;

  localparam int unsigned N_DEFAULT = 512;  // activity counters per module
  localparam int unsigned W_DEFAULT = 9;    // bits per activity counter
  localparam int unsigned M_DEFAULT = 7;    // modules in the FIR system

  // Byte offsets inside one module's 64-byte address window. The first four
  // words belong to the FIR accelerator, the next six to the instrumentation.
  localparam logic [5:0] REG_FIR_CTRL   = 6'h00; // W: bit0 run. R: frames done
  localparam logic [5:0] REG_FIR_COEF   = 6'h04; // W: stream one coefficient. R: last frame checksum
  localparam logic [5:0] REG_RAM_ADDR   = 6'h08; // R/W: image RAM write pointer
  localparam logic [5:0] REG_RAM_DATA   = 6'h0C; // W: store byte, pointer++
  localparam logic [5:0] REG_MEAS_PER   = 6'h10; // W: start measurement. R: bus cycles left
  localparam logic [5:0] REG_SCAN_EN    = 6'h14; // R/W: bit0 scan enable
  localparam logic [5:0] REG_FIFO_FULL  = 6'h18; // R: bit0 all N counter values waiting
  localparam logic [5:0] REG_FIFO_DATA  = 6'h1C; // R: pop one counter value
  localparam logic [5:0] REG_INST_N     = 6'h20; // R: N
  localparam logic [5:0] REG_INST_W     = 6'h24; // R: W

  // One request on a module's memory-mapped slave port (byte address inside
  // the module's 64-byte window). Read data returns one bus cycle later.
  typedef struct packed {
    logic [5:0]  addr;
    logic        write;
    logic        read;
    logic [31:0] wdata;
  } mm_req_t;

  // FIR benchmark geometry: 240x160 8-bit greyscale frames, 5x5 kernels of
  // Q4.8 coefficients: sign, 4 integer and 8 fraction bits (13-bit two's
  // complement, range -16 .. +15.996), wide enough for the centre tap 8.0
  // of the usual 3x3 edge-detection kernel.
  localparam int unsigned IMG_W_DEFAULT = 240;
  localparam int unsigned IMG_H_DEFAULT = 160;
  localparam int unsigned KDIM          = 5;
  localparam int unsigned NTAPS         = KDIM * KDIM;
  localparam int unsigned COEF_W        = 13;
  localparam int unsigned COEF_FRAC     = 8;
  localparam int unsigned PROD_W        = 8 + COEF_W + 1;  // signed pixel*coef
  localparam int unsigned SUM_W         = PROD_W + 5;      // 25 products
  // Internal nets a filter offers for monitoring: 25 products, the sum and
  // the 5x5 window of pixels.
  localparam int unsigned FIR_PROBE_W   = NTAPS * PROD_W + SUM_W + NTAPS * 8;

  // Instrumentation register index (word offset from REG_MEAS_PER).
  typedef enum logic [2:0] {
    IR_MEAS_PER  = 3'd0,
    IR_SCAN_EN   = 3'd1,
    IR_FIFO_FULL = 3'd2,
    IR_FIFO_DATA = 3'd3,
    IR_INST_N    = 3'd4,
    IR_INST_W    = 3'd5
  } instr_reg_e;

  // Feedback taps of a maximal-length W-bit LFSR, one bit per stage (bit i is
  // stage i+1, stage W being the scan output). With XNOR feedback the all-zero
  // state is on the cycle, so a counter cleared to zero counts up to 2^W-2
  // events before it would return to zero.
  function automatic logic [31:0] lfsr_taps(input int unsigned w);
    case (w)
      2:  return 32'h0000_0003; // 2,1
      3:  return 32'h0000_0006; // 3,2
      4:  return 32'h0000_000C; // 4,3
      5:  return 32'h0000_0014; // 5,3
      6:  return 32'h0000_0030; // 6,5
      7:  return 32'h0000_0060; // 7,6
      8:  return 32'h0000_00B8; // 8,6,5,4
      9:  return 32'h0000_0110; // 9,5
      10: return 32'h0000_0240; // 10,7
      11: return 32'h0000_0500; // 11,9
      12: return 32'h0000_0829; // 12,6,4,1
      13: return 32'h0000_100D; // 13,4,3,1
      14: return 32'h0000_2015; // 14,5,3,1
      15: return 32'h0000_6000; // 15,14
      16: return 32'h0000_D008; // 16,15,13,4
      default: return 32'h0;
    endcase
  endfunction

  // Next state of a W-bit XNOR LFSR in counting mode (stage 1 = bit 0).
  function automatic logic [31:0] lfsr_next(input logic [31:0] q, input int unsigned w);
    logic [31:0] taps;
    logic        fb;
    taps = lfsr_taps(w);
    fb   = ~(^(q & taps));
    return ((q << 1) | 32'(fb)) & ((32'h1 << w) - 32'h1);
  endfunction

endpackage
