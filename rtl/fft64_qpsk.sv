// fft64_qpsk: 64-point, four-parallel, radix-2^2 feedforward (multi-path
// delay commutator) FFT whose first stage is specialised for QPSK input.
//
// Data path (one frame = 64 samples = 16 cycles of 4 samples):
//   stage 1  qpsk_r22_stage   radix-2^2 butterfly made of multiplexers on the
//                             1-bit QPSK codes (no adders)
//            ccm_rotator x3   W64 rotation by shifts and adders (CCM);
//                             lane 0 needs no rotation, only the conversion
//                             of its level to a data word
//   stage 2  shuffle L=8, shuffle L=4, r22_butterfly
//            cm_rotator x3    W16 rotation by full complex multipliers (CM)
//   stage 3  shuffle L=2, shuffle L=1, r22_butterfly
// The decimation-in-frequency index bookkeeping: the input sample index n is
// placed as lane = n[5:4], cycle t = n[3:0]. Stage 1 works across lanes on
// n[5] and n[4]; the two shuffles of stage 2 bring n[3] and n[2] onto the
// lanes, those of stage 3 bring n[1] and n[0]. After stage 1 the lane holds
// the frequency bits (k0, k1) and is rotated by W64^(t*(k0 + 2*k1)); after
// stage 2 by W16^(t[1:0]*(k2 + 2*k3)).
//
// Output order: X[k] leaves in cycle t on lane l with 4*t + l equal to the
// 6-bit reversal of k (bit-reversed order). out_bin gives k per lane; its
// two upper bits are fixed per lane (the reversed lane number).
// Stage 1 has no shuffling structure: the input order already places the
// butterfly pairs x[n], x[n+16], x[n+32], x[n+48] on the four lanes.
// Arithmetic: 16-bit words with 8 fraction bits, no scaling (see fft_pkg);
// X[k] is the unscaled forward DFT sum over n of x[n]*W64^(n*k).
//
// Interface: in_valid qualifies in_code. A frame is 16 consecutive valid
// cycles; frames may follow each other without a gap (one 64-point transform
// every 16 cycles) or with any gap. Timing: latency 24 cycles from a frame's
// first input cycle to its first output cycle; out_valid is high for the 16
// cycles of each output frame. Synchronous active-high reset.
// The arrangement of stages, rotators and shuffles follows the architecture;
// the buffer placement within each shuffle, the index mapping, the
// pipeline registers and the number formats are this design's choices.
module fft64_qpsk
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  qpsk_code_t in_code [P],
  output logic       out_valid,
  output cplx_t      out_data [P],
  output logic [5:0] out_bin [P]
);

  // Frame discipline: once a frame has started it must continue.
  logic [TBITS-1:0] in_t;
  always_ff @(posedge clk) begin
    if (rst)           in_t <= '0;
    else if (in_valid) in_t <= in_t + 1'b1;
  end

  a_frame_contiguous: assert property (@(posedge clk) disable iff (rst)
    (in_t != '0) |-> in_valid)
    else $error("fft64_qpsk: input frame interrupted");

  // ---------------- stage 1: multiplexer radix-2^2 + CCMs ----------------
  logic     s1_valid;
  level_c_t s1_lvl [P];

  qpsk_r22_stage u_stage1 (
    .clk, .rst,
    .in_valid  (in_valid),
    .in_code   (in_code),
    .out_valid (s1_valid),
    .out_lvl   (s1_lvl)
  );

  // Twiddle exponent multiplier of each lane: lane 2*k0 + k1 -> k0 + 2*k1.
  localparam int LANE_MULT [P] = '{0, 2, 1, 3};

  logic  r1_valid [P];
  cplx_t r1_data  [P];

  // Lane 0: level -> data word, a multiplexer over the five values.
  localparam data_t LV1 = to_data(2.0 * KMOD);
  localparam data_t LV2 = to_data(4.0 * KMOD);

  function automatic data_t level_value(level_t m);
    case (m)
      3'sd1:   return LV1;
      3'sd2:   return LV2;
      -3'sd1:  return -LV1;
      -3'sd2:  return -LV2;
      default: return '0;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    r1_data[0].re <= level_value(s1_lvl[0].re);
    r1_data[0].im <= level_value(s1_lvl[0].im);
    if (rst) r1_valid[0] <= 1'b0;
    else     r1_valid[0] <= s1_valid;
  end

  for (genvar l = 1; l < P; l++) begin : g_ccm
    ccm_rotator #(.MULT(LANE_MULT[l]), .NW(N)) u_ccm (
      .clk, .rst,
      .in_valid  (s1_valid),
      .in_lvl    (s1_lvl[l]),
      .out_valid (r1_valid[l]),
      .out_data  (r1_data[l])
    );
  end

  // ---------------- stage 2: shuffles, radix-2^2 butterfly, CMs ----------
  logic  sa_valid, sb_valid, b2_valid;
  cplx_t sa_data [P];
  cplx_t sb_data [P];
  cplx_t b2_data [P];

  shuffle_stage #(.L(8), .LANE_BIT(1)) u_shuf_a (
    .clk, .rst,
    .in_valid (r1_valid[0]), .in_data (r1_data),
    .out_valid(sa_valid),    .out_data(sa_data)
  );

  shuffle_stage #(.L(4), .LANE_BIT(0)) u_shuf_b (
    .clk, .rst,
    .in_valid (sa_valid), .in_data (sa_data),
    .out_valid(sb_valid), .out_data(sb_data)
  );

  r22_butterfly u_bf2 (
    .clk, .rst,
    .in_valid (sb_valid), .in_data (sb_data),
    .out_valid(b2_valid), .out_data(b2_data)
  );

  logic  r2_valid [P];
  cplx_t r2_data  [P];
  cplx_t b2_d1;

  // Lane 0 is not rotated; it is delayed to match the CM latency.
  always_ff @(posedge clk) begin
    b2_d1      <= b2_data[0];
    r2_data[0] <= b2_d1;
  end
  logic b2_v1;
  always_ff @(posedge clk) begin
    if (rst) begin
      b2_v1       <= 1'b0;
      r2_valid[0] <= 1'b0;
    end else begin
      b2_v1       <= b2_valid;
      r2_valid[0] <= b2_v1;
    end
  end

  for (genvar l = 1; l < P; l++) begin : g_cm
    cm_rotator #(.MULT(LANE_MULT[l]), .NW(16)) u_cm (
      .clk, .rst,
      .in_valid  (b2_valid),
      .in_data   (b2_data[l]),
      .out_valid (r2_valid[l]),
      .out_data  (r2_data[l])
    );
  end

  // ---------------- stage 3: shuffles, radix-2^2 butterfly ---------------
  logic  sc_valid, sd_valid;
  cplx_t sc_data [P];
  cplx_t sd_data [P];

  shuffle_stage #(.L(2), .LANE_BIT(1)) u_shuf_c (
    .clk, .rst,
    .in_valid (r2_valid[0]), .in_data (r2_data),
    .out_valid(sc_valid),    .out_data(sc_data)
  );

  shuffle_stage #(.L(1), .LANE_BIT(0)) u_shuf_d (
    .clk, .rst,
    .in_valid (sc_valid), .in_data (sc_data),
    .out_valid(sd_valid), .out_data(sd_data)
  );

  r22_butterfly u_bf3 (
    .clk, .rst,
    .in_valid (sd_valid), .in_data (sd_data),
    .out_valid(out_valid), .out_data(out_data)
  );

  // Frequency index of each output lane: bit reversal of 4*t + lane.
  logic [TBITS-1:0] out_t;
  always_ff @(posedge clk) begin
    if (rst)            out_t <= '0;
    else if (out_valid) out_t <= out_t + 1'b1;
  end

  always_comb begin
    for (int l = 0; l < P; l++) begin
      logic [5:0] q;
      q = {out_t, 2'(l)};
      for (int b = 0; b < 6; b++) out_bin[l][b] = q[5-b];
    end
  end

endmodule
