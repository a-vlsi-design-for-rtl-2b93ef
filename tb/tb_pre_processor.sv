// tb_pre_processor: checks the ADC re-formatting and the sample handshake
// of pre_processor. Random 14-bit samples are offered with random valid and
// ready; the expected 16-bit word is the ADC value times 2^13 / 2^13, i.e.
// the same real number in {1,2,13}, computed here with integer arithmetic
// on the sign-extended value.
module tb_pre_processor;
  import dpd_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid;
  adc_t in_i, in_q;
  word_t out_i, out_q;
  int checks = 0, failures = 0;

  pre_processor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_v;
    int ei, eq;
    in_valid = 0; in_ready = 0; in_i = '0; in_q = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      in_valid = 1'($urandom);
      in_ready = 1'($urandom);
      in_i = adc_t'($urandom);
      in_q = adc_t'($urandom);
      if (n % 50 == 0) begin in_i = adc_t'(-8192); in_q = adc_t'(8191); end
      exp_v = in_valid && in_ready;
      ei = int'(in_i);  // value * 2^13 in both formats
      eq = int'(in_q);
      @(posedge clk); #1;
      checks++;
      if (out_valid !== exp_v) begin
        failures++; $display("valid mismatch at %0d", n);
      end
      if (exp_v) begin
        checks++;
        if (int'(out_i) != ei || int'(out_q) != eq) begin
          failures++;
          $display("data mismatch: got %0d %0d exp %0d %0d", out_i, out_q, ei, eq);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
