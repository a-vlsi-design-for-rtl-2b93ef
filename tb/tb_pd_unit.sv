// tb_pd_unit: checks the a*x+b unit in the two configurations the PD block
// uses most: a Horner step in {1,4,11} with saturation, and the final phase
// step whose addend and result are {1,1,14} and wrap. The expected value is
// computed in floating point, rounded to the output LSB (allowing one LSB
// of tie-break difference), then saturated or wrapped.
module tb_pd_unit;
  import dpd_pkg::*;

  logic clk = 0, rst_n = 0;
  logic iv, ov_s, ov_w;
  word_t a, x, b, y_s, y_w;
  int checks = 0, failures = 0;
  int nsat = 0, nwrap = 0;

  pd_unit #(.AF(11), .XF(14), .BF(11), .OF(11), .WRAP(1'b0)) u_sat (
    .clk, .rst_n, .in_valid(iv), .a, .x, .b, .out_valid(ov_s), .y(y_s));
  pd_unit #(.AF(11), .XF(14), .BF(14), .OF(14), .WRAP(1'b1)) u_wrap (
    .clk, .rst_n, .in_valid(iv), .a, .x, .b, .out_valid(ov_w), .y(y_w));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r_s, r_w;
    longint e_s, e_w, d;
    iv = 0; a = '0; x = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      iv = 1'($urandom);
      a = word_t'($urandom);
      x = word_t'($urandom_range(0, 32767));
      b = word_t'($urandom);
      if (n % 3 == 0) a = word_t'(int'($urandom_range(0, 8000)) - 4000);
      r_s = (real'(a) / 2048.0) * (real'(x) / 16384.0) + real'(b) / 2048.0;
      r_w = (real'(a) / 2048.0) * (real'(x) / 16384.0) + real'(b) / 16384.0;
      e_s = longint'($floor(r_s * 2048.0 + 0.5));
      e_w = longint'($floor(r_w * 16384.0 + 0.5));
      if (e_s > 32767) begin e_s = 32767; nsat++; end
      if (e_s < -32768) begin e_s = -32768; nsat++; end
      if (e_w > 32767 || e_w < -32768) nwrap++;
      e_w = ((e_w % 65536) + 65536) % 65536;
      if (e_w >= 32768) e_w -= 65536;
      @(posedge clk); #1;
      checks++;
      if (ov_s !== iv || ov_w !== iv) begin failures++; $display("valid wrong"); end
      d = longint'(y_s) - e_s;
      checks++;
      if (d > 1 || d < -1) begin
        failures++; $display("sat unit: got %0d exp %0d", y_s, e_s);
      end
      d = longint'(y_w) - e_w;
      if (d > 32768) d -= 65536;
      if (d < -32768) d += 65536;
      checks++;
      if (d > 1 || d < -1) begin
        failures++; $display("wrap unit: got %0d exp %0d", y_w, e_w);
      end
    end
    checks++;
    if (nsat == 0 || nwrap == 0) begin failures++; $display("no saturation or wrap seen"); end
    $display("saturations=%0d wraps=%0d", nsat, nwrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
