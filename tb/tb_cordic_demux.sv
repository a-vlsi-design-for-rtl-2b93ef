// tb_cordic_demux: checks gain removal and routing. For each word the
// expected values are x*0.607253 (the reciprocal of the 13-step CORDIC gain,
// computed here in floating point) with the right binary point, sent to the
// PD side for vectoring words and to the post-processor side for rotation
// words, one clock later.
module tb_cordic_demux;
  import dpd_pkg::*;

  logic clk = 0, rst_n = 0;
  cordic_word_t in;
  logic pd_valid, post_valid;
  word_t pd_am, pd_pm, post_i, post_q;
  int checks = 0, failures = 0;

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  cordic_demux dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ik, xr, yr;
    cordic_word_t w;
    ik = 1.0;
    for (int i = 0; i < 13; i++) ik = ik / $sqrt(1.0 + 2.0 ** (-2.0 * i));
    in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      w.valid = ($urandom % 5) != 0;
      w.mode  = mode_e'($urandom % 2);
      w.x = word_t'(int'($urandom_range(0, 26000)) - 13000);
      w.y = word_t'(int'($urandom_range(0, 26000)) - 13000);
      w.z = word_t'($urandom);
      if (w.mode == MODE_VEC) w.x = word_t'($urandom_range(0, 26000));
      in = w;
      @(posedge clk); #1;
      checks++;
      if (pd_valid !== (w.valid && w.mode == MODE_VEC) ||
          post_valid !== (w.valid && w.mode == MODE_ROT)) begin
        failures++; $display("routing wrong at %0d", n);
      end
      xr = real'(w.x) / 8192.0 * ik;
      yr = real'(w.y) / 8192.0 * ik;
      if (pd_valid) begin
        checks++;
        if (rabs(real'(pd_am) / 16384.0 - xr) > 1.5 / 16384.0 || pd_pm !== w.z) begin
          failures++; $display("AM/PM wrong: %0d %0d vs %f", pd_am, pd_pm, xr);
        end
      end
      if (post_valid) begin
        checks++;
        if (rabs(real'(post_i) / 8192.0 - xr) > 1.0 / 8192.0 ||
            rabs(real'(post_q) / 8192.0 - yr) > 1.0 / 8192.0) begin
          failures++; $display("I/Q wrong: %0d %0d vs %f %f", post_i, post_q, xr, yr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
