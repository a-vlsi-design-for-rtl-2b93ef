// tb_cordic_mux: checks the input stage of the CORDIC pipeline:
//  - slots alternate vectoring / rotation every clock, in_ready is high in
//    the clock before each vectoring slot;
//  - a vectoring word is (I, Q, 0) pre-rotated so that x >= 0, a rotation
//    word is (AM/2 in {1,2,13}, 0, PM) with PM wrapped into [-pi, pi) and
//    pre-rotated into [-pi/2, pi/2];
//  - the pre-rotation never changes the vector the word stands for: the
//    test checks that x + jy rotated by z equals the original vector,
//    computed in floating point.
module tb_cordic_mux;
  import dpd_pkg::*;

  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic pre_valid, pd_valid, in_ready, fold_evt;
  word_t pre_i, pre_q, pd_am, pd_pm;
  cordic_word_t out;
  int checks = 0, failures = 0;

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction
  int nfold = 0;

  cordic_mux dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_ready;
    real ox, oy, gx, gy, gz, ang, mag, rz;
    logic vec;
    pre_valid = 0; pd_valid = 0; pre_i = '0; pre_q = '0; pd_am = '0; pd_pm = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    exp_ready = 1'b0;  // first slot after reset is vectoring
    for (int n = 0; n < 2000; n++) begin
      // the slot of the coming edge: vectoring when in_ready was low
      checks++;
      if (in_ready !== exp_ready) begin
        failures++; $display("in_ready wrong at %0d", n);
      end
      vec = !in_ready;
      pre_valid = 0; pd_valid = 0;
      pre_i = word_t'(int'($urandom_range(0, 8000)) - 4000);
      pre_q = word_t'(int'($urandom_range(0, 8000)) - 4000);
      pd_am = word_t'($urandom_range(0, 16000));
      pd_pm = word_t'($urandom);  // any phase, including beyond +-pi
      if (vec) pre_valid = ($urandom % 4) != 0;
      else     pd_valid  = ($urandom % 4) != 0;
      // the vector the word stands for
      if (vec) begin
        ox = real'(pre_i) / 8192.0;
        oy = real'(pre_q) / 8192.0;
      end else begin
        mag = real'(pd_am) / 16384.0;
        rz  = real'(pd_pm) / 16384.0 * PI;
        ox = mag * $cos(rz);
        oy = mag * $sin(rz);
      end
      @(posedge clk); #1;
      if (fold_evt) nfold++;
      checks++;
      if (out.valid !== (vec ? pre_valid : pd_valid) ||
          out.mode !== (vec ? MODE_VEC : MODE_ROT)) begin
        failures++; $display("valid/mode wrong at %0d", n);
      end
      gx = real'(out.x) / 8192.0;
      gy = real'(out.y) / 8192.0;
      gz = real'(out.z) / 16384.0;
      checks++;
      if (vec) begin
        // vectoring: z + angle(x,y) = angle(I,Q), with x >= 0
        ang = gz * PI + $atan2(gy, gx);
        if (gx < 0.0 || $sqrt((gx*gx + gy*gy)) - $sqrt(ox*ox + oy*oy) > 1e-6 ||
            $sqrt(ox*ox + oy*oy) - $sqrt(gx*gx + gy*gy) > 1e-6 ||
            ((ox != 0.0 || oy != 0.0) &&
             (rabs($cos(ang) * $sqrt(ox*ox+oy*oy) - ox) > 1e-4 ||
              rabs($sin(ang) * $sqrt(ox*ox+oy*oy) - oy) > 1e-4))) begin
          failures++; $display("vec fold wrong: in %f %f out %f %f %f", ox, oy, gx, gy, gz);
        end
      end else begin
        // rotation: (x + jy) e^{j z} = the original vector, |z| <= pi/2
        if (gz > 0.5 || gz < -0.5 ||
            rabs(gx * $cos(gz*PI) - gy * $sin(gz*PI) - ox) > 3e-4 ||
            rabs(gy * $cos(gz*PI) + gx * $sin(gz*PI) - oy) > 3e-4) begin
          failures++; $display("rot fold wrong: in %f %f out %f %f %f", ox, oy, gx, gy, gz);
        end
      end
      exp_ready = !exp_ready;
      @(negedge clk);
    end
    checks++;
    if (nfold == 0) begin failures++; $display("no pre-rotation seen"); end
    $display("folds=%0d", nfold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
