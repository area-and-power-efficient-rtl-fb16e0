// tb_r22_butterfly: random complex inputs; each output lane 2*k0 + k1 must
// equal, exactly, the 4-point DFT term sum_m x_m * (-j)^(m*(k0 + 2*k1)),
// two cycles after the input.
module tb_r22_butterfly;
  import fft_pkg::*;

  localparam int NV = 200;

  logic  clk = 1'b0;
  logic  rst = 1'b1;
  logic  in_valid = 1'b0;
  cplx_t in_data [P];
  logic  out_valid;
  cplx_t out_data [P];

  int checks = 0;
  int failures = 0;

  r22_butterfly dut (.*);

  always #5 clk = ~clk;

  cplx_t vec [NV][P];
  int got = 0;
  int lat_ok = 0;
  int in_cnt = 0;
  int in_cycle [NV];
  int cycle = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && in_valid) begin
      in_cycle[in_cnt] = cycle;
      in_cnt++;
    end
    if (!rst && out_valid) begin
      if (got < NV) begin
        checks++;
        if (cycle - in_cycle[got] != 2) begin
          failures++;
          $display("FAIL latency %0d", cycle - in_cycle[got]);
        end
        for (int l = 0; l < P; l++) begin
          int kp, sr, si;
          kp = (l >> 1) + 2 * (l & 1);
          sr = 0;
          si = 0;
          for (int m = 0; m < P; m++) begin
            int xr, xi;
            xr = int'(vec[got][m].re);
            xi = int'(vec[got][m].im);
            case ((m * kp) % 4)
              0: begin sr += xr; si += xi; end
              1: begin sr += xi; si -= xr; end
              2: begin sr -= xr; si -= xi; end
              default: begin sr -= xi; si += xr; end
            endcase
          end
          checks++;
          if (int'(out_data[l].re) != sr || int'(out_data[l].im) != si) begin
            failures++;
            $display("FAIL vector %0d lane %0d: %0d %0d expected %0d %0d", got, l,
                     out_data[l].re, out_data[l].im, sr, si);
          end
        end
      end
      got++;
    end
  end

  initial begin
    for (int v = 0; v < NV; v++)
      for (int m = 0; m < P; m++) begin
        vec[v][m].re = data_t'($signed($urandom_range(0, 8000)) - 4000);
        vec[v][m].im = data_t'($signed($urandom_range(0, 8000)) - 4000);
      end
    for (int l = 0; l < P; l++) in_data[l] = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int v = 0; v < NV; v++) begin
      in_valid <= 1'b1;
      in_data  <= vec[v];
      @(posedge clk);
      if (v % 7 == 3) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (got != NV) begin
      failures++;
      $display("FAIL %0d outputs, expected %0d", got, NV);
    end
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
