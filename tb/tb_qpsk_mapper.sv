// tb_qpsk_mapper: checks all four bit pairs against the constellation
// (11 -> (1 + j)*0.707, bit 1 -> +0.707, bit 0 -> -0.707), the 1-bit codes
// (+0.707 -> 0, -0.707 -> 1), the one-cycle latency and out_valid.
module tb_qpsk_mapper;
  import fft_pkg::*;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       in_valid = 1'b0;
  logic [1:0] in_bits = '0;
  logic       out_valid;
  qpsk_code_t out_code;
  cplx_t      out_sym;

  int checks = 0;
  int failures = 0;

  qpsk_mapper dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < 12; i++) begin
      logic [1:0] b;
      b = 2'(i);
      in_bits  <= b;
      in_valid <= 1'b1;
      @(posedge clk);
      in_valid <= 1'b0;
      #1;
      check(out_valid == 1'b1, "out_valid after one cycle");
      // 0.707 * 256 = 180.99 -> 181
      check(out_sym.re == (b[1] ? 16'sd181 : -16'sd181), $sformatf("I of %b", b));
      check(out_sym.im == (b[0] ? 16'sd181 : -16'sd181), $sformatf("Q of %b", b));
      check(out_code.re == !b[1] && out_code.im == !b[0], $sformatf("code of %b", b));
      @(posedge clk);
      #1;
      check(out_valid == 1'b0, "out_valid low without input");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
