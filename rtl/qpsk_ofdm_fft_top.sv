// qpsk_ofdm_fft_top: QPSK front end and 64-point transform of one OFDM
// symbol.
//
// A serial bit stream, two bits per cycle, is mapped to QPSK symbols
// (qpsk_mapper), 64 symbols are gathered and handed over four at a time
// (qpsk_sp_buffer), and the four-parallel FFT (fft64_qpsk) transforms them.
// The FFT output leaves in bit-reversed order with the frequency index of
// each lane on out_bin. The mapper's fixed-point symbols are brought out as
// well (sym_valid / sym), since the later OFDM steps (cyclic prefix,
// channel, receiver) are outside this design.
// Interface: in_valid qualifies in_bits (first bit in_bits[1] -> in-phase).
// Timing: the mapper adds one cycle; an OFDM symbol's FFT frame starts three
// cycles after its 64th bit pair reaches the buffer, and its spectrum starts
// 24 cycles after that, 16 cycles per symbol. With one bit pair per cycle a
// new OFDM symbol is ready every 64 cycles.
module qpsk_ofdm_fft_top
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic [1:0] in_bits,
  output logic       sym_valid,
  output cplx_t      sym,
  output logic       out_valid,
  output cplx_t      out_data [P],
  output logic [5:0] out_bin [P]
);

  qpsk_code_t code;
  qpsk_code_t par_code [P];
  logic       par_valid;

  qpsk_mapper u_mapper (
    .clk, .rst,
    .in_valid  (in_valid),
    .in_bits   (in_bits),
    .out_valid (sym_valid),
    .out_code  (code),
    .out_sym   (sym)
  );

  qpsk_sp_buffer u_sp (
    .clk, .rst,
    .in_valid  (sym_valid),
    .in_code   (code),
    .out_valid (par_valid),
    .out_code  (par_code)
  );

  fft64_qpsk u_fft (
    .clk, .rst,
    .in_valid  (par_valid),
    .in_code   (par_code),
    .out_valid (out_valid),
    .out_data  (out_data),
    .out_bin   (out_bin)
  );

endmodule
