// tb_qpsk_sp_buffer: writes three OFDM symbols of 64 random codes, one per
// cycle without pauses (the last with a few idle cycles in it), and checks
// that each comes out as one frame of 16 consecutive cycles with lane l of
// cycle t holding symbol 16*l + t, starting three cycles after its last
// symbol was written.
module tb_qpsk_sp_buffer;
  import fft_pkg::*;

  localparam int NS = 3;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       in_valid = 1'b0;
  qpsk_code_t in_code = '0;
  logic       out_valid;
  qpsk_code_t out_code [P];

  int checks = 0;
  int failures = 0;

  qpsk_sp_buffer dut (.*);

  always #5 clk = ~clk;

  qpsk_code_t sym [NS][N];
  int cycle = 0;
  int last_wr_cycle [NS];
  int out_count = 0;
  int frame_start [NS];

  int in_count = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && in_valid) begin
      if (in_count % N == N - 1) last_wr_cycle[in_count / N] = cycle;
      in_count++;
    end
    if (!rst && out_valid) begin
      int s, t;
      s = out_count / FRAME;
      t = out_count % FRAME;
      if (t == 0 && s < NS) frame_start[s] = cycle;
      for (int l = 0; l < P; l++) begin
        checks++;
        if (s >= NS || out_code[l] != sym[s][16 * l + t]) begin
          failures++;
          $display("FAIL symbol %0d cycle %0d lane %0d", s, t, l);
        end
      end
      out_count++;
    end
  end

  initial begin
    for (int s = 0; s < NS; s++)
      for (int n = 0; n < N; n++) sym[s][n] = qpsk_code_t'($urandom);
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int s = 0; s < NS; s++) begin
      for (int n = 0; n < N; n++) begin
        if (s == 2 && n % 20 == 7) begin
          in_valid <= 1'b0;
          repeat (3) @(posedge clk);
        end
        in_valid <= 1'b1;
        in_code  <= sym[s][n];
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (40) @(posedge clk);
    checks++;
    if (out_count != NS * FRAME) begin
      failures++;
      $display("FAIL %0d output cycles, expected %0d", out_count, NS * FRAME);
    end
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (frame_start[s] - last_wr_cycle[s] != 3) begin
        failures++;
        $display("FAIL symbol %0d frame starts %0d cycles after its last write",
                 s, frame_start[s] - last_wr_cycle[s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Frames are 16 consecutive valid cycles.
  int run = 0;
  always @(posedge clk) begin
    if (out_valid) run++;
    else if (run != 0) begin
      checks++;
      if (run != FRAME) begin
        failures++;
        $display("FAIL output frame of %0d cycles", run);
      end
      run = 0;
    end
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
