// qpsk_sp_buffer: serial-to-parallel conversion between the QPSK mapper and
// the four-parallel FFT.
//
// Symbols arrive one per cycle (in_valid) in natural order n = 0..N-1 of an
// OFDM symbol. Once N of them are stored, they are issued as one frame of
// N/P = 16 consecutive cycles, P = 4 per cycle, in the order the FFT takes
// them: in cycle t of the frame, lane l carries symbol n = 16*l + t.
//
// Storage is two banks of N 2-bit codes (ping-pong): while one bank is read
// out, the next OFDM symbol is written into the other. Reading a bank takes
// 16 cycles and filling one takes at least 64, so the writer never has to
// wait and the input needs no back-pressure. The bank structure and the
// output order are this design's choice; the design only names the
// serial-to-parallel step.
// Timing: the frame starts three cycles after the last symbol of an OFDM
// symbol is written; out_valid stays high for 16 consecutive cycles.
module qpsk_sp_buffer
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  qpsk_code_t in_code,
  output logic       out_valid,
  output qpsk_code_t out_code [P]
);

  localparam int AW = $clog2(N);

  qpsk_code_t       mem [2][N];
  logic [AW-1:0]    wr_addr;
  logic             wr_bank;
  logic [1:0]       full;        // bank holds a complete OFDM symbol
  logic             rd_active;
  logic             rd_bank;
  logic [TBITS-1:0] rd_t;

  always_ff @(posedge clk) begin
    if (in_valid) mem[wr_bank][wr_addr] <= in_code;
  end

  // Writer and reader bookkeeping.
  always_ff @(posedge clk) begin
    if (rst) begin
      wr_addr   <= '0;
      wr_bank   <= 1'b0;
      full      <= '0;
      rd_active <= 1'b0;
      rd_bank   <= 1'b0;
      rd_t      <= '0;
    end else begin
      logic [1:0] full_n;
      full_n = full;
      if (in_valid) begin
        wr_addr <= wr_addr + 1'b1;
        if (wr_addr == AW'(N - 1)) begin
          full_n[wr_bank] = 1'b1;
          wr_bank <= ~wr_bank;
        end
      end
      if (rd_active) begin
        rd_t <= rd_t + 1'b1;
        if (rd_t == TBITS'(FRAME - 1)) begin
          rd_active       <= 1'b0;
          full_n[rd_bank] = 1'b0;
          rd_bank         <= ~rd_bank;
        end
      end else if (full[rd_bank]) begin
        rd_active <= 1'b1;
        rd_t      <= '0;
      end
      full <= full_n;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= rd_active;
    for (int l = 0; l < P; l++) begin
      out_code[l] <= mem[rd_bank][AW'(l * FRAME) + AW'(rd_t)];
    end
  end

endmodule
