// cm_rotator: general complex multiplier (CM) by a twiddle factor, used after
// the second radix-2^2 stage.
//
// Sample t of a frame (t = 0..15) is multiplied by W_NW^(e) with
// e = (t mod NW/4) * MULT; with NW = 16 this is the W16 rotation between
// the second and third radix-2^2 stages, MULT = 1, 2 or 3 per lane. The
// twiddles come from a 16-entry table computed at elaboration time, with
// TW_FRAC = 14 fraction bits.
// The product uses four real multipliers: re = ar*wr - ai*wi,
// im = ar*wi + ai*wr, rounded (half up) back to the 16-bit data format. The
// multiplier structure, rounding and pipelining are this design's choice.
// Interface: in_valid qualifies in_data; t counts valid samples modulo 16, so
// frames must arrive as 16 consecutive valid cycles. Timing: a register after
// the multipliers and one after the adders, latency 2. The upper bits of the
// rounded sums are dropped on purpose: in this FFT a rotated value never
// leaves the 16-bit range, because the twiddles have magnitude 1.
module cm_rotator
  import fft_pkg::*;
#(
  parameter int MULT = 1,    // twiddle exponent per sample position
  parameter int NW   = 16    // twiddle base W_NW
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  out_valid,
  output cplx_t out_data
);

  localparam int PW = DW + TW;
  typedef logic signed [PW-1:0] prod_t;

  twc_t rom [FRAME];
  for (genvar i = 0; i < FRAME; i++) begin : g_rom
    localparam twc_t W = twiddle((i % (NW / 4)) * MULT, NW, 1.0);
    assign rom[i] = W;
  end

  logic [TBITS-1:0] t;
  always_ff @(posedge clk) begin
    if (rst)           t <= '0;
    else if (in_valid) t <= t + 1'b1;
  end

  twc_t  w;
  prod_t p_rr, p_ii, p_ri, p_ir;
  logic  v1;

  assign w = rom[t];

  always_ff @(posedge clk) begin
    p_rr <= PW'(in_data.re) * PW'(w.re);
    p_ii <= PW'(in_data.im) * PW'(w.im);
    p_ri <= PW'(in_data.re) * PW'(w.im);
    p_ir <= PW'(in_data.im) * PW'(w.re);
    if (rst) v1 <= 1'b0;
    else     v1 <= in_valid;
  end

  logic signed [PW:0] s_re, s_im;
  localparam logic signed [PW:0] HALF = (PW + 1)'(1 << (TW_FRAC - 1));

  always_comb begin
    s_re = ((PW + 1)'(p_rr) - (PW + 1)'(p_ii) + HALF) >>> TW_FRAC;
    s_im = ((PW + 1)'(p_ri) + (PW + 1)'(p_ir) + HALF) >>> TW_FRAC;
  end

  always_ff @(posedge clk) begin
    out_data.re <= data_t'(s_re);
    out_data.im <= data_t'(s_im);
    if (rst) out_valid <= 1'b0;
    else     out_valid <= v1;
  end

endmodule
