// tb_qpsk_r22_stage: applies all 256 combinations of four QPSK codes and
// compares each output level with a 4-point DFT of the symbols computed in
// integers (units of 0.707): output lane 2*k0 + k1 must equal
// sum_m x_m * (-j)^(m*(k0 + 2*k1)), divided by two (one level = 1.414).
// Also checks the latency of two cycles and that every level -2..2 occurs.
module tb_qpsk_r22_stage;
  import fft_pkg::*;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       in_valid = 1'b0;
  qpsk_code_t in_code [P];
  logic       out_valid;
  level_c_t   out_lvl [P];

  int checks = 0;
  int failures = 0;
  int seen [5];

  qpsk_r22_stage dut (.*);

  always #5 clk = ~clk;

  // Expected outputs for stimulus i.
  function automatic void expect_lvl(int i, output int er [P], output int ei [P]);
    int xr [P];
    int xi [P];
    for (int m = 0; m < P; m++) begin
      xr[m] = i[2*m+1] ? -1 : 1;
      xi[m] = i[2*m]   ? -1 : 1;
    end
    for (int l = 0; l < P; l++) begin
      int kp, sr, si;
      kp = (l >> 1) + 2 * (l & 1);
      sr = 0;
      si = 0;
      for (int m = 0; m < P; m++) begin
        case ((m * kp) % 4)        // multiply by (-j)^e
          0: begin sr += xr[m]; si += xi[m]; end
          1: begin sr += xi[m]; si -= xr[m]; end
          2: begin sr -= xr[m]; si -= xi[m]; end
          default: begin sr -= xi[m]; si += xr[m]; end
        endcase
      end
      er[l] = sr / 2;
      ei[l] = si / 2;
    end
  endfunction

  int sent = 0;
  int got = 0;
  int vpipe [3];

  initial begin
    for (int l = 0; l < P; l++) in_code[l] = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < 256; i++) begin
      in_valid <= 1'b1;
      for (int m = 0; m < P; m++) in_code[m] <= '{re: i[2*m+1], im: i[2*m]};
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (got != 256) begin
      failures++;
      $display("FAIL %0d outputs, expected 256", got);
    end
    for (int v = 0; v < 5; v++) begin
      checks++;
      if (seen[v] == 0) begin
        failures++;
        $display("FAIL level %0d never produced", v - 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus index two cycles back, for the latency check.
  int idx_in = 0;
  int idx_d1 = -1;
  int idx_d2 = -1;
  always @(posedge clk) begin
    idx_d2 <= idx_d1;
    idx_d1 <= (!rst && in_valid) ? idx_in : -1;
    if (!rst && in_valid) idx_in <= idx_in + 1;
    checks++;
    if (!rst && (out_valid != (idx_d2 >= 0))) begin
      failures++;
      $display("FAIL out_valid %0d at latency 2", out_valid);
    end
    if (!rst && out_valid) begin
      int er [P];
      int ei [P];
      expect_lvl(idx_d2, er, ei);
      for (int l = 0; l < P; l++) begin
        checks++;
        if (int'(out_lvl[l].re) != er[l] || int'(out_lvl[l].im) != ei[l]) begin
          failures++;
          $display("FAIL input %0d lane %0d: %0d %0d expected %0d %0d", idx_d2, l,
                   out_lvl[l].re, out_lvl[l].im, er[l], ei[l]);
        end
        seen[int'(out_lvl[l].re) + 2]++;
        seen[int'(out_lvl[l].im) + 2]++;
      end
      got++;
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
