// tb_cordic_processor: drives the 13-stage dual-mode CORDIC pipeline with
// a new word every clock, modes mixed at random, and compares each result
// with floating-point values:
//   vectoring (x0, y0, 0), x0 > 0 : X = K*sqrt(x0^2+y0^2), Z = atan2(y0,x0)/pi
//   rotation  (A, 0, z0), |z0| <= pi/2 : X = K*A*cos(z0), Y = K*A*sin(z0)
// with K = prod sqrt(1 + 2^-2i) computed here. It also checks that every
// word leaves exactly N_STAGES clocks after it entered.
module tb_cordic_processor;
  import dpd_pkg::*;

  localparam int N = 13;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  cordic_word_t din, dout;
  int checks = 0, failures = 0;
  int cyc = 0;

  cordic_processor #(.N_STAGES(N)) dut (.clk, .rst_n, .in(din), .out(dout));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    int   t;
    mode_e mode;
    real  ex, ey, ez;
  } exp_t;
  exp_t q[$];
  real K = 1.0;
  int nvec = 0, nrot = 0;

  // checker
  always @(posedge clk) begin
    #1;
    if (rst_n && dout.valid) begin
      exp_t e;
      real gx, gy, gz;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        e = q.pop_front();
        gx = real'(dout.x) / 8192.0;
        gy = real'(dout.y) / 8192.0;
        gz = real'(dout.z) / 16384.0;
        if (cyc - e.t != N) begin
          failures++; $display("latency %0d, expected %0d", cyc - e.t, N);
        end
        if (dout.mode != e.mode) begin
          failures++; $display("mode lost");
        end else if (e.mode == MODE_VEC) begin
          if ((gx - e.ex > 0.0015) || (e.ex - gx > 0.0015) ||
              (gz - e.ez > 0.0008) || (e.ez - gz > 0.0008)) begin
            failures++;
            $display("vec mismatch: got %f %f exp %f %f", gx, gz, e.ex, e.ez);
          end
        end else begin
          if ((gx - e.ex > 0.0015) || (e.ex - gx > 0.0015) ||
              (gy - e.ey > 0.0015) || (e.ey - gy > 0.0015)) begin
            failures++;
            $display("rot mismatch: got %f %f exp %f %f", gx, gy, e.ex, e.ey);
          end
        end
      end
    end
  end

  initial begin
    exp_t e;
    real x0, y0, a, z0;
    for (int i = 0; i < N; i++) K = K * $sqrt(1.0 + 2.0 ** (-2.0 * i));
    din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1200; n++) begin
      @(negedge clk);
      din = '0;
      din.valid = ($urandom % 8) != 0;
      if ($urandom % 2 == 0) begin
        x0 = 0.05 + 0.95 * real'($urandom % 10000) / 10000.0;
        y0 = -1.0 + 2.0 * real'($urandom % 10000) / 10000.0;
        din.mode = MODE_VEC;
        din.x = word_t'($rtoi(x0 * 8192.0));
        din.y = word_t'($rtoi(y0 * 8192.0));
        din.z = '0;
        x0 = real'(din.x) / 8192.0;
        y0 = real'(din.y) / 8192.0;
        e.ex = K * $sqrt(x0 * x0 + y0 * y0);
        e.ey = 0.0;
        e.ez = $atan2(y0, x0) / PI;
      end else begin
        a  = 1.2 * real'($urandom % 10000) / 10000.0;
        z0 = -0.5 + real'($urandom % 10000) / 10000.0;
        din.mode = MODE_ROT;
        din.x = word_t'($rtoi(a * 8192.0));
        din.y = '0;
        din.z = word_t'($rtoi(z0 * 16384.0));
        a  = real'(din.x) / 8192.0;
        z0 = real'(din.z) / 16384.0;
        e.ex = K * a * $cos(z0 * PI);
        e.ey = K * a * $sin(z0 * PI);
        e.ez = 0.0;
      end
      if (din.valid) begin
        e.t = cyc;
        e.mode = din.mode;
        q.push_back(e);
        if (din.mode == MODE_VEC) nvec++; else nrot++;
      end
    end
    @(negedge clk) din = '0;
    repeat (N + 3) @(posedge clk);
    #2;
    checks++;
    if (q.size() != 0 || nvec == 0 || nrot == 0) begin
      failures++; $display("%0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
