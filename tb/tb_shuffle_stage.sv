// tb_shuffle_stage: the four shuffling structures of the FFT (L = 8, 4, 2, 1
// on lane bits 1, 0, 1, 0) receive three frames of samples tagged with
// their frame, lane and cycle (two frames back to back, then a gap). An
// output in cycle t' on lane l' must be the input sample whose lane is l'
// with bit LANE_BIT replaced by bit log2(L) of t', and whose cycle is t' with
// that bit replaced by bit LANE_BIT of l'. The output must start L cycles
// after the input.
module tb_shuffle_stage;
  import fft_pkg::*;

  localparam int NFR = 3;
  localparam int LS [4] = '{8, 4, 2, 1};
  localparam int BS [4] = '{1, 0, 1, 0};

  logic  clk = 1'b0;
  logic  rst = 1'b1;
  logic  in_valid = 1'b0;
  cplx_t in_data [P];

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int first_in = -1;
  int total_out [4];

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && in_valid && first_in < 0) first_in = cycle;
  end

  for (genvar c = 0; c < 4; c++) begin : g_cfg
    localparam int L    = LS[c];
    localparam int B    = BS[c];
    localparam int SBIT = $clog2(L);

    logic  out_valid;
    cplx_t out_data [P];
    int    count = 0;

    shuffle_stage #(.L(L), .LANE_BIT(B)) dut (
      .clk, .rst, .in_valid, .in_data,
      .out_valid(out_valid),
      .out_data (out_data)
    );

    always @(posedge clk) begin
      if (!rst && out_valid) begin
        int f, tp;
        f  = count / FRAME;
        tp = count % FRAME;
        if (count == 0) begin
          checks++;
          if (cycle - first_in != L) begin
            failures++;
            $display("FAIL L=%0d: latency %0d", L, cycle - first_in);
          end
        end
        for (int lp = 0; lp < P; lp++) begin
          int ls, ts, tag;
          ls = lp;
          ts = tp;
          ls[B]    = tp[SBIT];
          ts[SBIT] = lp[B];
          tag = f * 64 + ls * 16 + ts;
          checks++;
          if (int'(out_data[lp].re) != tag || int'(out_data[lp].im) != -tag) begin
            failures++;
            $display("FAIL L=%0d frame %0d t %0d lane %0d: got tag %0d, expected %0d",
                     L, f, tp, lp, out_data[lp].re, tag);
          end
        end
        count++;
      end
      total_out[c] = count;
    end
  end

  initial begin
    for (int l = 0; l < P; l++) in_data[l] = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int f = 0; f < NFR; f++) begin
      if (f == 2) begin
        in_valid <= 1'b0;
        repeat (3) @(posedge clk);
      end
      for (int t = 0; t < FRAME; t++) begin
        in_valid <= 1'b1;
        for (int l = 0; l < P; l++) begin
          in_data[l].re <= data_t'(f * 64 + l * 16 + t);
          in_data[l].im <= data_t'(-(f * 64 + l * 16 + t));
        end
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (12) @(posedge clk);
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (total_out[c] != NFR * FRAME) begin
        failures++;
        $display("FAIL config %0d: %0d output cycles", c, total_out[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
