// qpsk_mapper: QPSK modulator. Each input bit pair becomes one symbol on the
// four-point constellation (+-KMOD) + j(+-KMOD), KMOD = 0.707.
//
// The first bit of the pair (bits[1]) selects the in-phase component and the
// second (bits[0]) the quadrature component; a 1 gives +KMOD and a 0 gives
// -KMOD, so the pair 11 maps to (1 + j)*KMOD as the constellation of the
// design requires. The other three assignments (Gray mapping by component)
// are this design's choice.
//
// Two outputs carry the same symbol:
//   * code : the 1-bit-per-component code the FFT takes (+KMOD -> 0,
//            -KMOD -> 1), i.e. the sign of each component;
//   * sym  : the symbol in the 16-bit data format of fft_pkg, for any user
//            that needs the sample values themselves.
// Timing: one symbol per cycle when in_valid is high, outputs registered
// (latency 1). Synchronous active-high reset clears out_valid.
module qpsk_mapper
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic [1:0] in_bits,
  output logic       out_valid,
  output qpsk_code_t out_code,
  output cplx_t      out_sym
);

  localparam data_t POS = to_data(KMOD);
  localparam data_t NEG = to_data(-KMOD);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
    end
    if (in_valid) begin
      out_code.re <= ~in_bits[1];
      out_code.im <= ~in_bits[0];
      out_sym.re  <= in_bits[1] ? POS : NEG;
      out_sym.im  <= in_bits[0] ? POS : NEG;
    end
  end

endmodule
