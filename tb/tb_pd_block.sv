// tb_pd_block: checks the pre-distortion calculation with the fifth-order
// example polynomial. For random (A_D, P_D) the expected outputs are
//   A = s * sum a_n A_D^n,  P = sum p_n A_D^n + P_D
// computed in floating point from the quantised coefficients. It also
// checks the latency (ORDER + 1 clocks, one result per clock) and, with a
// second instance of order 3 and the pad register, the PAD option.
module tb_pd_block;
  import dpd_pkg::*;
  import tb_dpd_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic iv, ov5, ov3;
  word_t am, pm, oam5, opm5, oam3, opm3, scale;
  word_t ca5 [1:5];
  word_t cp5 [1:5];
  word_t ca3 [1:3];
  word_t cp3 [1:3];
  int checks = 0, failures = 0, cyc = 0;
  real qa [5], qp [5], qa3 [3], qp3 [3], qs;

  pd_block #(.ORDER(5), .PAD(1'b0)) u5 (
    .clk, .rst_n, .in_valid(iv), .am, .pm, .coef_a(ca5), .coef_p(cp5), .scale,
    .out_valid(ov5), .out_am(oam5), .out_pm(opm5));
  pd_block #(.ORDER(3), .PAD(1'b1)) u3 (
    .clk, .rst_n, .in_valid(iv), .am, .pm, .coef_a(ca3), .coef_p(cp3), .scale,
    .out_valid(ov3), .out_am(oam3), .out_pm(opm3));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int t; real a5, p5, a3, p3; } exp_t;
  exp_t q5[$], q3[$];
  real max_ea = 0.0, max_ep = 0.0;

  function automatic real pdiff(real g, real e);
    // phase difference modulo 4 (the word wraps after two turns)
    real d = g - e;
    return rabs(d - 4.0 * $floor((d + 2.0) / 4.0));
  endfunction

  always @(posedge clk) begin
    #1;
    if (rst_n && ov5) begin
      exp_t e;
      real ga, gp;
      e = q5.pop_front();
      ga = real'(oam5) / 16384.0;
      gp = real'(opm5) / 16384.0;
      checks++;
      if (cyc - e.t != 6) begin failures++; $display("order-5 latency %0d", cyc - e.t); end
      if (rabs(ga - e.a5) > max_ea) max_ea = rabs(ga - e.a5);
      if (pdiff(gp, e.p5) > max_ep) max_ep = pdiff(gp, e.p5);
      if (rabs(ga - e.a5) > 1.5e-3 || pdiff(gp, e.p5) > 1.5e-3) begin
        failures++; $display("order 5: got %f %f exp %f %f", ga, gp, e.a5, e.p5);
      end
    end
    if (rst_n && ov3) begin
      exp_t e;
      real ga, gp;
      e = q3.pop_front();
      ga = real'(oam3) / 16384.0;
      gp = real'(opm3) / 16384.0;
      checks++;
      if (cyc - e.t != 5) begin failures++; $display("order-3 latency %0d", cyc - e.t); end
      if (rabs(ga - e.a3) > 1.5e-3 || pdiff(gp, e.p3) > 1.5e-3) begin
        failures++; $display("order 3: got %f %f exp %f %f", ga, gp, e.a3, e.p3);
      end
    end
  end

  initial begin
    exp_t e;
    real ad, p;
    for (int n = 0; n < 5; n++) begin
      ca5[n+1] = word_t'(to_fix(EX_A[n], 11));
      cp5[n+1] = word_t'(to_fix(EX_P_DEG[n] / 180.0, 11));
      qa[n] = real'(ca5[n+1]) / 2048.0;
      qp[n] = real'(cp5[n+1]) / 2048.0;
    end
    for (int n = 0; n < 3; n++) begin
      ca3[n+1] = word_t'(to_fix(0.3 * (n + 1) - 0.5, 11));
      cp3[n+1] = word_t'(to_fix(0.1 * n - 0.15, 11));
      qa3[n] = real'(ca3[n+1]) / 2048.0;
      qp3[n] = real'(cp3[n+1]) / 2048.0;
    end
    scale = word_t'(to_fix(EX_SCALE, 14));
    qs = real'(scale) / 16384.0;
    iv = 0; am = '0; pm = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      iv = ($urandom % 5) != 0;
      am = word_t'($urandom_range(0, 16384));
      pm = word_t'(int'($urandom_range(0, 32767)) - 16384);
      ad = real'(am) / 16384.0;
      p  = real'(pm) / 16384.0;
      e.t  = cyc;
      e.a5 = qs * poly(qa, ad);
      e.p5 = poly(qp, ad) + p;
      e.a3 = qs * poly(qa3, ad);
      e.p3 = poly(qp3, ad) + p;
      if (iv) begin q5.push_back(e); q3.push_back(e); end
    end
    @(negedge clk) iv = 0;
    repeat (10) @(posedge clk);
    #2;
    checks++;
    if (q5.size() != 0 || q3.size() != 0) begin failures++; $display("results missing"); end
    $display("max error: AM %e PM %e (pi units)", max_ea, max_ep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
