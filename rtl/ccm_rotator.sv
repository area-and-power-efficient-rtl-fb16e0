// ccm_rotator: complex constant multiplier (CCM) after the first stage.
//
// The first stage delivers each component as a level m in -2..2, worth
// m * 1.414 (fft_pkg::level_t). Multiplying (mr + j*mi) * 1.414 by the
// twiddle W therefore needs no general multiplier: the constant
// K = 1.414 * W = Kr + j*Ki is read from a small table and
//     re = mr*Kr - mi*Ki,   im = mr*Ki + mi*Kr,
// where each product by m is a selection of 0, K, 2K (a one-bit shift) or
// their negatives. One CCM is two adders, two subtract-or-add selections and
// shift wiring.
//
// The twiddle exponent of sample t (t = 0..15, the position of the sample in
// its frame) is t * MULT of W_NW, with NW = 64 and MULT = 1, 2 or 3 for the
// three rotated lanes; the table K[t] is computed at elaboration time.
// Table constants carry TW_FRAC = 14 fraction bits; the result is rounded to
// the 8 fraction bits of a data word (round half up). The rounding and the
// table precision are this design's choice. The rounded result is at most
// 4 in magnitude, so its upper bits are dropped on purpose.
// Interface: in_valid qualifies in_lvl; t counts valid samples modulo 16, so
// frames must arrive as 16 consecutive valid cycles (gaps only between
// frames). Timing: output registered, latency 1.
module ccm_rotator
  import fft_pkg::*;
#(
  parameter int MULT = 1,    // twiddle exponent per sample position
  parameter int NW   = N     // twiddle base W_NW
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     in_valid,
  input  level_c_t in_lvl,
  output logic     out_valid,
  output cplx_t    out_data
);

  localparam int SHIFT = TW_FRAC - FRAC;
  localparam int PW    = TW + 3;           // product width: |m| <= 2, sum of two

  typedef logic signed [PW-1:0] prod_t;

  twc_t rom [FRAME];
  for (genvar i = 0; i < FRAME; i++) begin : g_rom
    localparam twc_t K = twiddle(i * MULT, NW, 2.0 * KMOD);
    assign rom[i] = K;
  end

  logic [TBITS-1:0] t;
  always_ff @(posedge clk) begin
    if (rst)           t <= '0;
    else if (in_valid) t <= t + 1'b1;
  end

  // m * k by selection and shift.
  function automatic prod_t shift_mul(level_t m, tw_t k);
    prod_t kk;
    kk = prod_t'(k);
    case (m)
      3'sd1:   return kk;
      3'sd2:   return kk <<< 1;
      -3'sd1:  return -kk;
      -3'sd2:  return -(kk <<< 1);
      default: return '0;
    endcase
  endfunction

  function automatic data_t round_out(prod_t v);
    prod_t r;
    r = (v + prod_t'(1 << (SHIFT - 1))) >>> SHIFT;
    return data_t'(r);
  endfunction

  twc_t  k;
  prod_t acc_re, acc_im;

  always_comb begin
    k      = rom[t];
    acc_re = shift_mul(in_lvl.re, k.re) - shift_mul(in_lvl.im, k.im);
    acc_im = shift_mul(in_lvl.re, k.im) + shift_mul(in_lvl.im, k.re);
  end

  always_ff @(posedge clk) begin
    out_data.re <= round_out(acc_re);
    out_data.im <= round_out(acc_im);
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
  end

endmodule
