// kapow_tb_pkg: reference models shared by the testbenches.
//
// lfsr_ref_step : next state of a W-bit XNOR LFSR written out from its tap
//                 positions (stage numbers 1..W, stage W is the scan output),
//                 kept separate from the RTL's tap masks.
// lfsr_after    : state reached from zero after k counted events.
// fir_ref       : the 5x5 filter on a whole frame, full windows only,
//                 Q4.8 coefficients, arithmetic shift by 8, clamp to 0..255.
// fir_kernel    : the ten benchmark kernels in Q4.8 (value * 256): all-zero,
//                 identity, two 3x3 edge detectors, 3x3 and 5x5 box blur,
//                 3x3 and 5x5 Gaussian blur, 3x3 sharpen, 5x5 unsharp mask.
//                 3x3 kernels sit in the centre of the 5x5 grid; box-blur
//                 weights are rounded down (1/9 -> 28/256, 1/25 -> 10/256).
// fir_dataset   : synthetic input frames: checkerboards of 1- and 8-pixel
//                 squares (alternating 0 and 255), gradients repeating every
//                 256 and every 32 columns, and two uniform random frames.
package kapow_tb_pkg;

  function automatic int unsigned lfsr_ref_step(int unsigned q, int unsigned w);
    int taps[$];
    bit fb;
    case (w)
      3:  taps = '{3, 2};
      4:  taps = '{4, 3};
      5:  taps = '{5, 3};
      6:  taps = '{6, 5};
      7:  taps = '{7, 6};
      8:  taps = '{8, 6, 5, 4};
      9:  taps = '{9, 5};
      10: taps = '{10, 7};
      default: taps = '{w, w-1};
    endcase
    fb = 1'b0;
    foreach (taps[i]) fb ^= q[taps[i]-1];
    fb = ~fb;
    return ((q << 1) | int'(fb)) & ((1 << w) - 1);
  endfunction

  function automatic int unsigned lfsr_after(int unsigned k, int unsigned w);
    int unsigned q = 0;
    for (int unsigned i = 0; i < k; i++) q = lfsr_ref_step(q, w);
    return q;
  endfunction

  // img[r*iw + c], coef[k] for row k/5, column k%5 of the window whose top
  // left is the oldest pixel. Returns outputs in raster order.
  function automatic void fir_ref(input byte unsigned img[], input int iw, input int ih,
                                  input int coef[25], output byte unsigned out[$]);
    out.delete();
    for (int r = 4; r < ih; r++)
      for (int c = 4; c < iw; c++) begin
        longint acc = 0;
        longint s;
        for (int kr = 0; kr < 5; kr++)
          for (int kc = 0; kc < 5; kc++)
            acc += longint'(img[(r-4+kr)*iw + (c-4+kc)]) * longint'(coef[kr*5+kc]);
        s = acc >>> 8;
        if (s < 0) s = 0;
        if (s > 255) s = 255;
        out.push_back(byte'(s));
      end
  endfunction

  function automatic void fir_kernel(input int id, output int c[25]);
    int g5 [5] = '{1, 4, 6, 4, 1};
    int g3 [3] = '{1, 2, 1};
    for (int k = 0; k < 25; k++) c[k] = 0;
    case (id)
      1: c[12] = 256;
      2: begin  // [0 -1 0; -1 4 -1; 0 -1 0]
        c[7] = -256; c[11] = -256; c[13] = -256; c[17] = -256; c[12] = 1024;
      end
      3: begin  // [-1 -1 -1; -1 8 -1; -1 -1 -1]
        for (int r = 1; r <= 3; r++) for (int q = 1; q <= 3; q++) c[r*5+q] = -256;
        c[12] = 2048;
      end
      4: for (int r = 1; r <= 3; r++) for (int q = 1; q <= 3; q++) c[r*5+q] = 28;
      5: for (int k = 0; k < 25; k++) c[k] = 10;
      6: for (int r = 0; r < 3; r++) for (int q = 0; q < 3; q++) c[(r+1)*5+q+1] = 16 * g3[r] * g3[q];
      7: for (int r = 0; r < 5; r++) for (int q = 0; q < 5; q++) c[r*5+q] = g5[r] * g5[q];
      8: begin  // [0 -1 0; -1 5 -1; 0 -1 0]
        c[7] = -256; c[11] = -256; c[13] = -256; c[17] = -256; c[12] = 1280;
      end
      9: begin  // -(1/256) * Gaussian 5x5 with centre -476
        for (int r = 0; r < 5; r++) for (int q = 0; q < 5; q++) c[r*5+q] = -(g5[r] * g5[q]);
        c[12] = 476;
      end
      default: ;
    endcase
  endfunction

  function automatic void fir_dataset(input int id, input int iw, input int ih,
                                      output byte unsigned img[]);
    img = new[iw*ih];
    for (int r = 0; r < ih; r++)
      for (int q = 0; q < iw; q++) begin
        int v;
        case (id)
          0: v = ((r + q) % 2) ? 255 : 0;
          1: v = (((r / 8) + (q / 8)) % 2) ? 255 : 0;
          2: v = q % 256;
          3: v = (q % 32) * 8;
          default: v = $urandom_range(0, 255);
        endcase
        img[r*iw + q] = byte'(v);
      end
  endfunction

endpackage
