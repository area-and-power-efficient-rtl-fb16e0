// shuffle_stage: shuffling structure of the feedforward FFT (buffers and
// multiplexers that reorder data between butterflies).
//
// The position of a sample is described by its lane (2 bits) and its cycle t
// within a 16-cycle frame (4 bits). This block exchanges lane bit LANE_BIT
// with the bit of weight L of t, for L = 8, 4, 2 or 1. Each pair of lanes
// that differ only in LANE_BIT (upper lane A, lower lane B) goes through the
// usual delay / switch / delay arrangement:
//   1. B is delayed by L cycles;
//   2. while bit log2(L) of the frame position of A is 1, the two lanes are
//      crossed (A continues with the delayed B, the delayed line gets A);
//   3. the upper path is delayed by L cycles.
// Both paths thus have latency L, and per lane pair the block holds 2*L
// words, which is the buffer length L the architecture labels each
// shuffling structure with.
// Interface: in_valid qualifies in_data; the frame position counts valid
// samples modulo 16, so a frame must be 16 consecutive valid cycles (gaps
// only between frames). out_valid is in_valid delayed by L.
module shuffle_stage
  import fft_pkg::*;
#(
  parameter int L        = 8,   // buffer length, weight of the time bit
  parameter int LANE_BIT = 1    // lane-index bit exchanged with it
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  cplx_t in_data [P],
  output logic  out_valid,
  output cplx_t out_data [P]
);

  localparam int SBIT = $clog2(L);
  localparam int STEP = 1 << LANE_BIT;

  logic [TBITS-1:0] t;
  always_ff @(posedge clk) begin
    if (rst)           t <= '0;
    else if (in_valid) t <= t + 1'b1;
  end

  logic sw;
  assign sw = t[SBIT];

  // Valid pipeline of length L.
  logic [L:0] vdly;
  assign vdly[0] = in_valid;
  always_ff @(posedge clk) begin
    if (rst) vdly[L:1] <= '0;
    else     vdly[L:1] <= vdly[L-1:0];
  end
  assign out_valid = vdly[L];

  for (genvar p = 0; p < P / 2; p++) begin : g_pair
    // Upper lane index: LANE_BIT clear; lower: LANE_BIT set.
    localparam int UA = ((p >> LANE_BIT) << (LANE_BIT + 1)) | (p & (STEP - 1));
    localparam int LB = UA + STEP;

    cplx_t dly_b [L];
    cplx_t dly_a [L];
    cplx_t a2, b2;

    always_comb begin
      if (sw) begin
        a2 = dly_b[L-1];
        b2 = in_data[UA];
      end else begin
        a2 = in_data[UA];
        b2 = dly_b[L-1];
      end
    end

    always_ff @(posedge clk) begin
      dly_b[0] <= in_data[LB];
      dly_a[0] <= a2;
      for (int i = 1; i < L; i++) begin
        dly_b[i] <= dly_b[i-1];
        dly_a[i] <= dly_a[i-1];
      end
    end

    assign out_data[UA] = dly_a[L-1];
    assign out_data[LB] = b2;
  end

endmodule
