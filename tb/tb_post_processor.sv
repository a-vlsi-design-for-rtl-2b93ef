// tb_post_processor: checks the {1,2,13} -> 14-bit DAC conversion: values
// in [-1, 1) pass unchanged, values outside are clipped to +8191 / -8192 and
// flagged, one clock later.
module tb_post_processor;
  import dpd_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid, sat;
  word_t in_i, in_q;
  adc_t out_i, out_q;
  int checks = 0, failures = 0, nclip = 0;

  post_processor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clipv(int v);
    return v > 8191 ? 8191 : (v < -8192 ? -8192 : v);
  endfunction

  initial begin
    int ei, eq;
    logic es;
    in_valid = 0; in_i = '0; in_q = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      in_i = word_t'(int'($urandom_range(0, 20000)) - 10000);
      in_q = word_t'(int'($urandom_range(0, 20000)) - 10000);
      if (n % 7 == 0) in_i = word_t'($urandom);
      ei = clipv(int'(in_i));
      eq = clipv(int'(in_q));
      es = (ei != int'(in_i)) || (eq != int'(in_q));
      @(posedge clk); #1;
      checks++;
      if (out_valid !== in_valid) begin failures++; $display("valid wrong"); end
      if (in_valid) begin
        checks++;
        if (int'(out_i) != ei || int'(out_q) != eq || sat !== es) begin
          failures++;
          $display("got %0d %0d %0b exp %0d %0d %0b", out_i, out_q, sat, ei, eq, es);
        end
        if (es) nclip++;
      end
    end
    checks++;
    if (nclip == 0) begin failures++; $display("no clipping seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
