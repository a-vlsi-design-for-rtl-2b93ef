// tb_dpd_top: end-to-end test of the whole pre-distorter at its default
// size (13 CORDIC stages, fifth order), against a floating-point model:
//   A = |I + jQ|, P = angle(I + jQ)
//   A' = s * sum a_n A^n,  P' = sum p_n A^n + P
//   out = clip(A' cos P', A' sin P') to the 14-bit DAC range.
// The source offers a sample on every clock and the DPD takes one every two
// clocks (in_ready), so the back-pressure is exercised throughout.
// Phases:
//   1. reset configuration (identity): out must equal in, full-scale input
//   2. the fifth-order example polynomial written over the register port,
//      30,000 samples with I and Q in [-0.5, 0.5]; average and maximum
//      output error are reported
//   3. an oversized scaling factor, so that outputs clip
// Checked: every output value, first-sample latency (37 clocks), one output
// every two clocks at full rate, register read-back, and that each
// mechanism (vectoring and rotation pre-rotation, phase wrap, clipping,
// back-pressure, reconfiguration) happened at least once.
module tb_dpd_top;
  import dpd_pkg::*;
  import tb_dpd_ref_pkg::*;

  localparam int LATENCY = 37;
  localparam int N_MAIN  = 30000;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, cfg_we, clip_evt, fold_evt;
  adc_t in_i, in_q, out_i, out_q;
  logic [4:0] cfg_addr;
  word_t cfg_wdata, cfg_rdata;

  dpd_top dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model and scoreboard ----------------
  real ma [5], mp [5], ms;  // active (quantised) configuration
  typedef struct { int t; real ei, eq; int phase; } exp_t;
  exp_t q[$];
  int   phase = 0;
  int   n_out = 0, last_out = -1;
  real  err_sum = 0.0, err_max = 0.0;
  int   err_n = 0;
  // mechanism counters
  int   n_fold_vec = 0, n_fold_rot = 0, n_wrap = 0, n_clip = 0,
        n_backpressure = 0, n_reconfig = 0, n_rate_ok = 0;

  function automatic real clipr(real v);
    if (v > 8191.0 / 8192.0) return 8191.0 / 8192.0;
    if (v < -1.0) return -1.0;
    return v;
  endfunction

  always @(posedge clk) begin
    #1;
    if (rst_n && fold_evt) begin
      // slots alternate every clock: in_ready is high now exactly when the
      // word just loaded into PU_0 was a vectoring word
      if (in_ready) n_fold_vec++; else n_fold_rot++;
    end
    if (rst_n && clip_evt) n_clip++;
    if (rst_n && out_valid) begin
      exp_t e;
      real gi, gq, d;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("output without input");
      end else begin
        e = q.pop_front();
        gi = real'(out_i) / 8192.0;
        gq = real'(out_q) / 8192.0;
        if (cyc - e.t - 1 != LATENCY) begin
          failures++;
          if (failures < 10) $display("latency %0d, expected %0d", cyc - e.t - 1, LATENCY);
        end
        if (last_out >= 0 && q.size() > 0) begin
          if (cyc - last_out == 2) n_rate_ok++;
          else begin failures++; $display("output gap %0d clocks", cyc - last_out); end
        end
        last_out = cyc;
        d = rabs(gi - e.ei);
        if (rabs(gq - e.eq) > d) d = rabs(gq - e.eq);
        if (e.phase == 2) begin
          err_sum += rabs(gi - e.ei) + rabs(gq - e.eq);
          err_n += 2;
          if (d > err_max) err_max = d;
        end
        if (d > 3.0e-3) begin
          failures++;
          if (failures < 20)
            $display("phase %0d: got %f %f exp %f %f", e.phase, gi, gq, e.ei, e.eq);
        end
      end
      n_out++;
    end
  end

  // ---------------- stimulus ----------------
  task automatic cfg_write(int addr, int val);
    @(negedge clk);
    cfg_we = 1; cfg_addr = 5'(addr); cfg_wdata = word_t'(val);
    @(negedge clk);
    cfg_we = 0;
    cfg_addr = 5'(addr);
    #1;
    checks++;
    if (int'(cfg_rdata) != val) begin failures++; $display("read-back of %0d wrong", addr); end
  endtask

  task automatic configure(real a [5], real p_deg [5], real s);
    cfg_write(0, to_fix(s, 14));
    ms = real'(to_fix(s, 14)) / 16384.0;
    for (int n = 0; n < 5; n++) begin
      cfg_write(1 + n, to_fix(a[n], 11));
      cfg_write(6 + n, to_fix(p_deg[n] / 180.0, 11));
      ma[n] = real'(to_fix(a[n], 11)) / 2048.0;
      mp[n] = real'(to_fix(p_deg[n] / 180.0, 11)) / 2048.0;
    end
    n_reconfig++;
  endtask

  task automatic run(int count, real range);
    int sent = 0;
    real xi, xq, amp, ang, ad, pd;
    exp_t e;
    while (sent < count) begin
      @(negedge clk);
      in_valid = 1;
      in_i = adc_t'(to_fix(range * (2.0 * real'($urandom % 65536) / 65536.0 - 1.0), 13));
      in_q = adc_t'(to_fix(range * (2.0 * real'($urandom % 65536) / 65536.0 - 1.0), 13));
      if (!in_ready) begin
        n_backpressure++;
        continue;
      end
      xi = real'(in_i) / 8192.0;
      xq = real'(in_q) / 8192.0;
      amp = $sqrt(xi * xi + xq * xq);
      ang = $atan2(xq, xi) / PI;
      ad = ms * poly(ma, amp);
      pd = poly(mp, amp) + ang;
      if (pd >= 1.0 || pd < -1.0) n_wrap++;
      e.t = cyc;
      e.ei = clipr(ad * $cos(pd * PI));
      e.eq = clipr(ad * $sin(pd * PI));
      e.phase = phase;
      q.push_back(e);
      sent++;
      @(posedge clk);
    end
    @(negedge clk) in_valid = 0;
    // drain
    while (q.size() != 0) @(posedge clk);
    repeat (4) @(posedge clk);
    last_out = -1;
  endtask

  initial begin
    static real id_a [5] = '{1.0, 0.0, 0.0, 0.0, 0.0};
    static real id_p [5] = '{0.0, 0.0, 0.0, 0.0, 0.0};
    in_valid = 0; in_i = '0; in_q = '0; cfg_we = 0; cfg_addr = '0; cfg_wdata = '0;
    ma = id_a; mp = id_p; ms = 1.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. identity after reset
    phase = 1;
    run(400, 0.99);
    // 2. example polynomial
    phase = 2;
    configure(EX_A, EX_P_DEG, EX_SCALE);
    run(N_MAIN, 0.5);
    // 3. oversized scaling factor: outputs clip
    phase = 3;
    configure(EX_A, EX_P_DEG, 1.9);
    run(400, 0.7);

    $display("outputs=%0d  avg |err| (phase 2) = %e  max = %e", n_out, err_sum / err_n, err_max);
    $display("mechanisms: vec_fold=%0d rot_fold=%0d phase_wrap=%0d clip=%0d backpressure=%0d reconfig=%0d full_rate_outputs=%0d",
             n_fold_vec, n_fold_rot, n_wrap, n_clip, n_backpressure, n_reconfig, n_rate_ok);
    checks++;
    if (n_out != 400 + N_MAIN + 400) begin failures++; $display("output count wrong"); end
    checks++; if (n_fold_vec == 0) begin failures++; $display("no vectoring pre-rotation"); end
    checks++; if (n_fold_rot == 0) begin failures++; $display("no rotation pre-rotation"); end
    checks++; if (n_wrap == 0) begin failures++; $display("no phase wrap"); end
    checks++; if (n_clip == 0) begin failures++; $display("no clipping"); end
    checks++; if (n_backpressure == 0) begin failures++; $display("no back-pressure"); end
    checks++; if (n_reconfig == 0) begin failures++; $display("no reconfiguration"); end
    checks++; if (n_rate_ok == 0) begin failures++; $display("no full-rate output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
