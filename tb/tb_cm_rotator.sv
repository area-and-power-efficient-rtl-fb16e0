// tb_cm_rotator: three complex multipliers (twiddle multipliers 1, 2, 3 as
// in the FFT, base W16) receive frames of random data; each output must
// equal x * W16^((t mod 4)*MULT), computed in floating point, within 1.5 LSB.
// Also checks latency 2 and a gap between frames.
module tb_cm_rotator;
  import fft_pkg::*;

  localparam int NFR = 4;

  logic  clk = 1'b0;
  logic  rst = 1'b1;
  logic  in_valid = 1'b0;
  cplx_t in_data [3];
  logic  out_valid [3];
  cplx_t out_data [3];

  int checks = 0;
  int failures = 0;

  for (genvar i = 0; i < 3; i++) begin : g_dut
    cm_rotator #(.MULT(i + 1)) dut (
      .clk, .rst, .in_valid,
      .in_data  (in_data[i]),
      .out_valid(out_valid[i]),
      .out_data (out_data[i])
    );
  end

  always #5 clk = ~clk;

  cplx_t stim [NFR * FRAME][3];
  int got = 0;

  always @(posedge clk) begin
    if (!rst && out_valid[0]) begin
      for (int i = 0; i < 3; i++) begin
        real a, xr, xi, wr, wi, er, ei;
        int t;
        t  = got % FRAME;
        a  = -2.0 * PI * real'((t % 4) * (i + 1)) / 16.0;
        wr = $cos(a);
        wi = $sin(a);
        xr = real'(stim[got][i].re);
        xi = real'(stim[got][i].im);
        er = (xr * wr - xi * wi) - real'(out_data[i].re);
        ei = (xr * wi + xi * wr) - real'(out_data[i].im);
        checks++;
        if (er > 1.5 || er < -1.5 || ei > 1.5 || ei < -1.5 || !out_valid[i]) begin
          failures++;
          $display("FAIL sample %0d cm %0d: %0d %0d, errors %f %f", got, i,
                   out_data[i].re, out_data[i].im, er, ei);
        end
      end
      got++;
    end
  end

  initial begin
    for (int s = 0; s < NFR * FRAME; s++)
      for (int i = 0; i < 3; i++) begin
        stim[s][i].re = data_t'($signed($urandom_range(0, 28000)) - 14000);
        stim[s][i].im = data_t'($signed($urandom_range(0, 28000)) - 14000);
      end
    for (int i = 0; i < 3; i++) in_data[i] = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int s = 0; s < NFR * FRAME; s++) begin
      if (s == 2 * FRAME) begin
        in_valid <= 1'b0;
        repeat (5) @(posedge clk);
      end
      in_valid <= 1'b1;
      for (int i = 0; i < 3; i++) in_data[i] <= stim[s][i];
      @(posedge clk);
      // Latency 2: one cycle after sending sample s, sample s-1 is out
      // (after the gap, the previous sample has already left).
      #1;
      checks++;
      if (s > 0 && s != 2 * FRAME && (got != s - 1 || !out_valid[0])) begin
        failures++;
        $display("FAIL latency: sample %0d not out two cycles after input", s - 1);
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
