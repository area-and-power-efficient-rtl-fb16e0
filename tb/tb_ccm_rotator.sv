// tb_ccm_rotator: three CCMs (twiddle multipliers 1, 2, 3 as in the FFT)
// receive frames of random levels -2..2; each output must equal
// level * 1.414 * W64^(t*MULT), computed in floating point, within 0.6 LSB
// (the result is rounded once). Also checks latency 1 and that a gap
// between frames does not disturb the frame position.
module tb_ccm_rotator;
  import fft_pkg::*;

  localparam int NFR = 4;

  logic     clk = 1'b0;
  logic     rst = 1'b1;
  logic     in_valid = 1'b0;
  level_c_t in_lvl [3];
  logic     out_valid [3];
  cplx_t    out_data [3];

  int checks = 0;
  int failures = 0;

  for (genvar i = 0; i < 3; i++) begin : g_dut
    ccm_rotator #(.MULT(i + 1)) dut (
      .clk, .rst, .in_valid,
      .in_lvl   (in_lvl[i]),
      .out_valid(out_valid[i]),
      .out_data (out_data[i])
    );
  end

  always #5 clk = ~clk;

  level_c_t stim [NFR * FRAME][3];
  int got = 0;

  always @(posedge clk) begin
    if (!rst && out_valid[0]) begin
      for (int i = 0; i < 3; i++) begin
        real a, mr, mi, wr, wi, er, ei;
        int t;
        t  = got % FRAME;
        a  = -2.0 * PI * real'(t * (i + 1)) / 64.0;
        wr = $cos(a);
        wi = $sin(a);
        mr = real'(stim[got][i].re) * 2.0 * KMOD;
        mi = real'(stim[got][i].im) * 2.0 * KMOD;
        er = (mr * wr - mi * wi) * 256.0 - real'(out_data[i].re);
        ei = (mr * wi + mi * wr) * 256.0 - real'(out_data[i].im);
        checks++;
        if (er > 0.6 || er < -0.6 || ei > 0.6 || ei < -0.6 || !out_valid[i]) begin
          failures++;
          $display("FAIL sample %0d ccm %0d: %0d %0d, errors %f %f", got, i,
                   out_data[i].re, out_data[i].im, er, ei);
        end
      end
      got++;
    end
  end

  int vcount = 0;
  initial begin
    for (int s = 0; s < NFR * FRAME; s++)
      for (int i = 0; i < 3; i++) begin
        stim[s][i].re = level_t'($signed($urandom_range(0, 4)) - 2);
        stim[s][i].im = level_t'($signed($urandom_range(0, 4)) - 2);
      end
    for (int i = 0; i < 3; i++) in_lvl[i] = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int s = 0; s < NFR * FRAME; s++) begin
      if (s == 2 * FRAME) begin
        in_valid <= 1'b0;
        repeat (5) @(posedge clk);
      end
      in_valid <= 1'b1;
      for (int i = 0; i < 3; i++) in_lvl[i] <= stim[s][i];
      @(posedge clk);
      // Latency 1: the sample just sent must be the next one out.
      #1;
      checks++;
      if (got != s || !out_valid[0]) begin
        failures++;
        $display("FAIL latency: sample %0d not out one cycle later", s);
      end
    end
    in_valid <= 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (got != NFR * FRAME) begin
      failures++;
      $display("FAIL %0d outputs", got);
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
