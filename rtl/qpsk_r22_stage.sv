// qpsk_r22_stage: the first radix-2^2 stage of the FFT, specialised for QPSK
// input so that it needs no adders or subtractors, only multiplexers.
//
// Every input component is +-0.707, given as a 1-bit code (0 -> +0.707,
// 1 -> -0.707). The two butterfly substages therefore have only a handful of
// possible results, and each is picked by a multiplexer:
//   * substage 1 (butterflies between lanes 0/2 and 1/3, the x[n], x[n+32]
//     pairs): a sum or a difference of two +-0.707 values is 0, +1.414 or
//     -1.414, chosen by a 4-input multiplexer on the two code bits. The
//     multiplication by -j of the difference in lane 3 is a swap of real and
//     imaginary parts with a sign change, i.e. only wiring of the selection.
//   * substage 2 (butterflies between lanes 0/1 and 2/3): a sum or difference
//     of two substage-1 results is 0, +-1.414 or +-2.828, chosen by a
//     multiplexer on the two 2-bit substage-1 selections.
// Results leave as levels (fft_pkg::level_t): signed integers -2..2 standing
// for multiples of 2*0.707 = 1.414. The following rotators multiply by these
// levels with shifts (ccm_rotator), and lane 0 turns them into data words.
//
// Lane order: input lane l carries x[16*l + t] in cycle t of a frame; output
// lane 2*k0 + k1 carries the result for the frequency-index bits (k0, k1)
// produced by the two substages (k0 from substage 1).
// Timing: one register after each substage, latency 2, one frame of four
// samples per cycle, no stalls. The register placement is this design's
// choice.
module qpsk_r22_stage
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  qpsk_code_t in_code [P],
  output logic       out_valid,
  output level_c_t   out_lvl [P]
);

  // Substage-1 selection: which of the three possible values (in units of
  // 1.414) a component takes.
  typedef enum logic [1:0] {
    S_ZERO = 2'b00,
    S_POS  = 2'b01,
    S_NEG  = 2'b11
  } sel_e;

  typedef struct packed {
    sel_e re;
    sel_e im;
  } sel_c_t;

  // 4-input multiplexer for a sum: codes (a, b) of two +-0.707 values.
  function automatic sel_e sum_sel(logic a, logic b);
    case ({a, b})
      2'b00:   return S_POS;   //  0.707 + 0.707
      2'b11:   return S_NEG;   // -0.707 - 0.707
      default: return S_ZERO;
    endcase
  endfunction

  // 4-input multiplexer for a difference a - b.
  function automatic sel_e dif_sel(logic a, logic b);
    case ({a, b})
      2'b01:   return S_POS;   //  0.707 - (-0.707)
      2'b10:   return S_NEG;   // -0.707 - 0.707
      default: return S_ZERO;
    endcase
  endfunction

  function automatic sel_e neg_sel(sel_e s);
    case (s)
      S_POS:   return S_NEG;
      S_NEG:   return S_POS;
      default: return S_ZERO;
    endcase
  endfunction

  // Substage-2 multiplexer: the level of a +- b for two substage-1
  // selections. Nine selection pairs map onto the five results 0, +-1, +-2.
  function automatic level_t sub2_sel(sel_e a, sel_e b, logic subtract);
    case ({a, subtract ? neg_sel(b) : b})
      {S_POS,  S_POS }: return 3'sd2;
      {S_POS,  S_ZERO},
      {S_ZERO, S_POS }: return 3'sd1;
      {S_NEG,  S_ZERO},
      {S_ZERO, S_NEG }: return -3'sd1;
      {S_NEG,  S_NEG }: return -3'sd2;
      default:          return 3'sd0;
    endcase
  endfunction

  sel_c_t s1_d [P];
  sel_c_t s1_q [P];
  logic   s1_valid;

  // Substage 1: lanes 0/2 and 1/3; -j on the lane-3 difference.
  always_comb begin
    s1_d[0].re = sum_sel(in_code[0].re, in_code[2].re);
    s1_d[0].im = sum_sel(in_code[0].im, in_code[2].im);
    s1_d[1].re = sum_sel(in_code[1].re, in_code[3].re);
    s1_d[1].im = sum_sel(in_code[1].im, in_code[3].im);
    s1_d[2].re = dif_sel(in_code[0].re, in_code[2].re);
    s1_d[2].im = dif_sel(in_code[0].im, in_code[2].im);
    // (d.re + j d.im) * (-j) = d.im - j d.re
    s1_d[3].re = dif_sel(in_code[1].im, in_code[3].im);
    s1_d[3].im = neg_sel(dif_sel(in_code[1].re, in_code[3].re));
  end

  always_ff @(posedge clk) begin
    s1_q <= s1_d;
    if (rst) s1_valid <= 1'b0;
    else     s1_valid <= in_valid;
  end

  // Substage 2: lanes 0/1 and 2/3.
  always_ff @(posedge clk) begin
    out_lvl[0].re <= sub2_sel(s1_q[0].re, s1_q[1].re, 1'b0);
    out_lvl[0].im <= sub2_sel(s1_q[0].im, s1_q[1].im, 1'b0);
    out_lvl[1].re <= sub2_sel(s1_q[0].re, s1_q[1].re, 1'b1);
    out_lvl[1].im <= sub2_sel(s1_q[0].im, s1_q[1].im, 1'b1);
    out_lvl[2].re <= sub2_sel(s1_q[2].re, s1_q[3].re, 1'b0);
    out_lvl[2].im <= sub2_sel(s1_q[2].im, s1_q[3].im, 1'b0);
    out_lvl[3].re <= sub2_sel(s1_q[2].re, s1_q[3].re, 1'b1);
    out_lvl[3].im <= sub2_sel(s1_q[2].im, s1_q[3].im, 1'b1);
    if (rst) out_valid <= 1'b0;
    else     out_valid <= s1_valid;
  end

endmodule
