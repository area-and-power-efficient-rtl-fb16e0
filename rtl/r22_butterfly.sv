// r22_butterfly: radix-2^2 butterfly with four complex inputs and outputs.
//
// Substage 1 forms sums and differences of lanes 0/2 and 1/3 (a radix-2
// butterfly on the upper lane-index bit); the difference of lanes 1/3 is
// multiplied by -j by swapping real and imaginary parts and negating one.
// Substage 2 forms sums and differences of the resulting lanes 0/1 and 2/3.
// This is a 4-point DFT (with outputs in bit-reversed order: output lane
// 2*k0 + k1 holds frequency k0 + 2*k1), 16 real additions/subtractions and no
// multiplier.
// Words keep the 16-bit data format without scaling: fft_pkg's format has
// room for the largest value a 64-point transform of QPSK input can reach,
// so the wrap-around of an addition cannot occur in that use.
// Timing: a register after each substage, latency 2, four samples per
// cycle. The register placement is this design's choice.
module r22_butterfly
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  cplx_t in_data [P],
  output logic  out_valid,
  output cplx_t out_data [P]
);

  function automatic cplx_t cadd(cplx_t a, cplx_t b);
    cplx_t y;
    y.re = a.re + b.re;
    y.im = a.im + b.im;
    return y;
  endfunction

  function automatic cplx_t csub(cplx_t a, cplx_t b);
    cplx_t y;
    y.re = a.re - b.re;
    y.im = a.im - b.im;
    return y;
  endfunction

  cplx_t s1 [P];
  logic  v1;

  always_ff @(posedge clk) begin
    s1[0] <= cadd(in_data[0], in_data[2]);
    s1[1] <= cadd(in_data[1], in_data[3]);
    s1[2] <= csub(in_data[0], in_data[2]);
    s1[3] <= mul_mj(csub(in_data[1], in_data[3]));
    if (rst) v1 <= 1'b0;
    else     v1 <= in_valid;
  end

  always_ff @(posedge clk) begin
    out_data[0] <= cadd(s1[0], s1[1]);
    out_data[1] <= csub(s1[0], s1[1]);
    out_data[2] <= cadd(s1[2], s1[3]);
    out_data[3] <= csub(s1[2], s1[3]);
    if (rst) out_valid <= 1'b0;
    else     out_valid <= v1;
  end

endmodule
