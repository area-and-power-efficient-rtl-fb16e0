// tb_qpsk_ofdm_fft_top: end-to-end test of the whole design at its default
// (and only) size: a stream of bit pairs for NS OFDM symbols of 64 QPSK
// symbols each goes through the mapper, the serial-to-parallel buffer and
// the 64-point FFT. Each spectrum is compared with a floating-point DFT of
// the same symbols (tolerance TOL LSBs), each output lane's bin index with
// the bit-reversed order, the mapper's symbol output with +-0.707, and the
// delay from the last bit pair of a symbol to its first FFT output with 28
// cycles. The stimulus mixes random symbols, constant symbols (largest
// output value) and a pause in the input stream.
// Mechanisms counted, each must occur: every multiplexer result of the first
// stage (levels 0, +-1.414, +-2.828), the shifted (x2) path of the CCMs,
// crossing of each shuffling structure, reads from both buffer banks, and an
// input pause inside an OFDM symbol.
module tb_qpsk_ofdm_fft_top;
  import fft_pkg::*;

  localparam int NS  = 6;
  localparam int TOL = 6;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       in_valid = 1'b0;
  logic [1:0] in_bits = '0;
  logic       sym_valid;
  cplx_t      sym;
  logic       out_valid;
  cplx_t      out_data [P];
  logic [5:0] out_bin [P];

  int checks = 0;
  int failures = 0;

  qpsk_ofdm_fft_top dut (.*);

  always #5 clk = ~clk;

  logic [1:0] bits [NS][N];
  real ref_re [NS][N];
  real ref_im [NS][N];

  function automatic void make_ref(int s);
    for (int k = 0; k < N; k++) begin
      real sr, si;
      sr = 0.0;
      si = 0.0;
      for (int n = 0; n < N; n++) begin
        real xr, xi, a;
        xr = bits[s][n][1] ? KMOD : -KMOD;
        xi = bits[s][n][0] ? KMOD : -KMOD;
        a  = -2.0 * PI * real'((n * k) % N) / real'(N);
        sr += xr * $cos(a) - xi * $sin(a);
        si += xr * $sin(a) + xi * $cos(a);
      end
      ref_re[s][k] = sr;
      ref_im[s][k] = si;
    end
  endfunction

  function automatic logic [5:0] bitrev6(logic [5:0] v);
    logic [5:0] r;
    for (int b = 0; b < 6; b++) r[b] = v[5-b];
    return r;
  endfunction

  // Mechanism counters.
  int n_level [5];
  int n_ccm_shift = 0;
  int n_cross [4];
  int n_bank [2];
  int n_pause = 0;

  int cycle = 0;
  int in_count = 0;
  int sym_count = 0;
  int out_count = 0;
  int last_in_cycle [NS];
  real max_err = 0.0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      if (in_valid) begin
        if (in_count % N == N - 1) last_in_cycle[in_count / N] = cycle;
        in_count++;
      end else if (in_count % N != 0) begin
        n_pause++;
      end

      if (sym_valid) begin
        logic [1:0] b;
        b = bits[sym_count / N][sym_count % N];
        checks++;
        if (sym.re != (b[1] ? 16'sd181 : -16'sd181) || sym.im != (b[0] ? 16'sd181 : -16'sd181)) begin
          failures++;
          $display("FAIL mapper symbol %0d", sym_count);
        end
        sym_count++;
      end

      if (dut.u_fft.s1_valid) begin
        for (int l = 0; l < P; l++) begin
          n_level[int'(dut.u_fft.s1_lvl[l].re) + 2]++;
          n_level[int'(dut.u_fft.s1_lvl[l].im) + 2]++;
          if (l > 0 && (dut.u_fft.s1_lvl[l].re == 3'sd2 || dut.u_fft.s1_lvl[l].re == -3'sd2))
            n_ccm_shift++;
        end
      end
      if (dut.u_fft.r1_valid[0] && dut.u_fft.u_shuf_a.sw) n_cross[0]++;
      if (dut.u_fft.sa_valid    && dut.u_fft.u_shuf_b.sw) n_cross[1]++;
      if (dut.u_fft.r2_valid[0] && dut.u_fft.u_shuf_c.sw) n_cross[2]++;
      if (dut.u_fft.sc_valid    && dut.u_fft.u_shuf_d.sw) n_cross[3]++;
      if (dut.u_sp.rd_active) n_bank[dut.u_sp.rd_bank]++;

      if (out_valid) begin
        int s, t;
        s = out_count / FRAME;
        t = out_count % FRAME;
        if (t == 0 && s < NS) begin
          checks++;
          if (cycle - last_in_cycle[s] != 28) begin
            failures++;
            $display("FAIL symbol %0d: spectrum starts %0d cycles after its last input",
                     s, cycle - last_in_cycle[s]);
          end
        end
        for (int l = 0; l < P; l++) begin
          int  k;
          real er, ei;
          k = int'(bitrev6(6'(4 * t + l)));
          checks++;
          if (out_bin[l] != 6'(k)) begin
            failures++;
            $display("FAIL symbol %0d lane %0d: bin %0d, expected %0d", s, l, out_bin[l], k);
          end
          if (s < NS) begin
            er = real'(out_data[l].re) / 256.0 - ref_re[s][k];
            ei = real'(out_data[l].im) / 256.0 - ref_im[s][k];
            if (er < 0) er = -er;
            if (ei < 0) ei = -ei;
            if (er > max_err) max_err = er;
            if (ei > max_err) max_err = ei;
            checks++;
            if (er > TOL / 256.0 || ei > TOL / 256.0) begin
              failures++;
              $display("FAIL symbol %0d X[%0d] = %f %fj, expected %f %fj", s, k,
                       real'(out_data[l].re) / 256.0, real'(out_data[l].im) / 256.0,
                       ref_re[s][k], ref_im[s][k]);
            end
          end
        end
        out_count++;
      end
    end
  end

  task automatic require(int count, string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("mechanism %s: %0d", what, count);
    end
  endtask

  initial begin
    for (int s = 0; s < NS; s++) begin
      for (int n = 0; n < N; n++) begin
        case (s)
          1:       bits[s][n] = 2'b11;          // constant symbol: X[0] = 64*(0.707+0.707j)
          4:       bits[s][n] = 2'b01;
          default: bits[s][n] = 2'($urandom);
        endcase
      end
      make_ref(s);
    end

    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int s = 0; s < NS; s++) begin
      for (int n = 0; n < N; n++) begin
        if (s == 3 && n == 40) begin
          in_valid <= 1'b0;
          repeat (7) @(posedge clk);
        end
        in_valid <= 1'b1;
        in_bits  <= bits[s][n];
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (80) @(posedge clk);

    checks++;
    if (out_count != NS * FRAME) begin
      failures++;
      $display("FAIL %0d output cycles, expected %0d", out_count, NS * FRAME);
    end
    for (int v = 0; v < 5; v++) require(n_level[v], $sformatf("first-stage level %0d x 1.414", v - 2));
    require(n_ccm_shift, "CCM shifted (x2) product");
    for (int i = 0; i < 4; i++) require(n_cross[i], $sformatf("shuffle %0d crossing", i));
    require(n_bank[0], "buffer bank 0 read");
    require(n_bank[1], "buffer bank 1 read");
    require(n_pause, "input pause within a symbol");
    $display("max abs error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
