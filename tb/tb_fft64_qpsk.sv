// tb_fft64_qpsk: self-checking test of the 64-point QPSK FFT core.
//
// Sends NF frames of QPSK codes (random ones and two fixed patterns: all
// symbols equal, which gives the largest possible output value, and an
// alternating pattern), the first four back to back and the rest with gaps.
// Every output sample is compared with a floating-point DFT of the same
// symbols (tolerance TOL in data LSBs); out_bin is checked against the
// bit-reversed order; the latency of 24 cycles and the throughput of one
// transform per 16 cycles (back-to-back frames leave back to back) are
// checked too.
module tb_fft64_qpsk;
  import fft_pkg::*;

  localparam int NF  = 8;
  localparam int TOL = 6;           // allowed error in LSBs of the 8-bit fraction
  localparam int LATENCY = 24;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       in_valid = 1'b0;
  qpsk_code_t in_code [P];
  logic       out_valid;
  cplx_t      out_data [P];
  logic [5:0] out_bin [P];

  int checks = 0;
  int failures = 0;

  fft64_qpsk dut (.*);

  always #5 clk = ~clk;

  qpsk_code_t frames [NF][N];
  real        ref_re [NF][N];
  real        ref_im [NF][N];

  function automatic void make_ref(int f);
    for (int k = 0; k < N; k++) begin
      real sr, si;
      sr = 0.0;
      si = 0.0;
      for (int n = 0; n < N; n++) begin
        real xr, xi, a;
        xr = frames[f][n].re ? -KMOD : KMOD;
        xi = frames[f][n].im ? -KMOD : KMOD;
        a  = -2.0 * PI * real'((n * k) % N) / real'(N);
        sr += xr * $cos(a) - xi * $sin(a);
        si += xr * $sin(a) + xi * $cos(a);
      end
      ref_re[f][k] = sr;
      ref_im[f][k] = si;
    end
  endfunction

  function automatic logic [5:0] bitrev6(logic [5:0] v);
    logic [5:0] r;
    for (int b = 0; b < 6; b++) r[b] = v[5-b];
    return r;
  endfunction

  real max_err = 0.0;
  int  first_in_cycle = -1;
  int  first_out_cycle = -1;
  int  cycle = 0;
  int  out_count = 0;
  int  contiguous_run = 0;
  int  max_run = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // Monitor.
  always @(posedge clk) begin
    if (!rst && in_valid && first_in_cycle < 0) first_in_cycle = cycle;
    if (!rst && out_valid) begin
      int f, t;
      f = out_count / FRAME;
      t = out_count % FRAME;
      if (first_out_cycle < 0) first_out_cycle = cycle;
      contiguous_run++;
      if (contiguous_run > max_run) max_run = contiguous_run;
      for (int l = 0; l < P; l++) begin
        int  k;
        real er, ei;
        k = int'(bitrev6(6'(4 * t + l)));
        checks++;
        if (out_bin[l] != 6'(k)) begin
          failures++;
          $display("FAIL frame %0d t %0d lane %0d: bin %0d, expected %0d", f, t, l, out_bin[l], k);
        end
        if (f < NF) begin
          er = real'(out_data[l].re) / 256.0 - ref_re[f][k];
          ei = real'(out_data[l].im) / 256.0 - ref_im[f][k];
          if (er < 0) er = -er;
          if (ei < 0) ei = -ei;
          if (er > max_err) max_err = er;
          if (ei > max_err) max_err = ei;
          checks++;
          if (er > TOL / 256.0 || ei > TOL / 256.0) begin
            failures++;
            if (failures < 20)
              $display("FAIL frame %0d X[%0d] = %f %fj, expected %f %fj", f, k,
                       real'(out_data[l].re) / 256.0, real'(out_data[l].im) / 256.0,
                       ref_re[f][k], ref_im[f][k]);
          end
        end
      end
      out_count++;
    end else begin
      contiguous_run = 0;
    end
  end

  initial begin
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < N; n++) begin
        case (f)
          1:       frames[f][n] = '{re: 1'b0, im: 1'b0};           // all 0.707+0.707j
          2:       frames[f][n] = '{re: n[0], im: n[1]};           // periodic pattern
          3:       frames[f][n] = '{re: 1'b1, im: 1'b0};           // all -0.707+0.707j
          default: frames[f][n] = '{re: 1'($urandom), im: 1'($urandom)};
        endcase
      end
    for (int f = 0; f < NF; f++) make_ref(f);
    for (int l = 0; l < P; l++) in_code[l] = '{re: 1'b0, im: 1'b0};

    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int f = 0; f < NF; f++) begin
      // Frames 0..3 back to back, then gaps of f cycles.
      if (f >= 4) begin
        in_valid <= 1'b0;
        repeat (f) @(posedge clk);
      end
      for (int t = 0; t < FRAME; t++) begin
        in_valid <= 1'b1;
        for (int l = 0; l < P; l++) in_code[l] <= frames[f][16 * l + t];
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (60) @(posedge clk);

    checks++;
    if (out_count != NF * FRAME) begin
      failures++;
      $display("FAIL %0d output cycles, expected %0d", out_count, NF * FRAME);
    end
    checks++;
    if (first_out_cycle - first_in_cycle != LATENCY) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", first_out_cycle - first_in_cycle, LATENCY);
    end
    checks++;
    if (max_run < 4 * FRAME) begin
      failures++;
      $display("FAIL back-to-back frames left in runs of %0d cycles, expected %0d", max_run, 4 * FRAME);
    end
    $display("max abs error %f (LSB %f)", max_err, 1.0 / 256.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
