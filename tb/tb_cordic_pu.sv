// tb_cordic_pu: checks one CORDIC iteration against the textbook
// shift-and-add recurrence for several stage indices, in both modes, and
// checks that mode and valid travel with the word and that the unit has
// a one-clock latency.
module tb_cordic_pu;
  import dpd_pkg::*;

  localparam int NS = 4;
  localparam int STG [NS] = '{0, 1, 5, 12};
  // atan(2^-i)/pi * 2^14, rounded
  localparam int ANG [NS] = '{4096, 2418, 163, 1};

  logic clk = 0, rst_n = 0;
  cordic_word_t din [NS];
  cordic_word_t dout [NS];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NS; g++) begin : g_dut
    cordic_pu #(.STAGE(STG[g])) dut (.clk, .rst_n, .in(din[g]), .out(dout[g]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cordic_word_t w [NS];
    int ex, ey, ez, s;
    bit up;
    for (int g = 0; g < NS; g++) din[g] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      for (int g = 0; g < NS; g++) begin
        w[g].valid = 1'($urandom);
        w[g].mode  = mode_e'($urandom % 2);
        w[g].x = word_t'($urandom_range(0, 16000));
        w[g].y = word_t'(int'($urandom_range(0, 32000)) - 16000);
        w[g].z = word_t'(int'($urandom_range(0, 32000)) - 16000);
        din[g] = w[g];
      end
      @(posedge clk); #1;
      for (int g = 0; g < NS; g++) begin
        s = STG[g];
        // d = +1: rotate counter-clockwise (y grows, z shrinks)
        up = (w[g].mode == MODE_VEC) ? (w[g].y < 0) : (w[g].z >= 0);
        if (up) begin
          ex = int'(w[g].x) - (int'(w[g].y) >>> s);
          ey = int'(w[g].y) + (int'(w[g].x) >>> s);
          ez = int'(w[g].z) - ANG[g];
        end else begin
          ex = int'(w[g].x) + (int'(w[g].y) >>> s);
          ey = int'(w[g].y) - (int'(w[g].x) >>> s);
          ez = int'(w[g].z) + ANG[g];
        end
        checks++;
        if (int'(dout[g].x) != ex || int'(dout[g].y) != ey || int'(dout[g].z) != ez ||
            dout[g].mode != w[g].mode || dout[g].valid != w[g].valid) begin
          failures++;
          if (failures < 10)
            $display("stage %0d mismatch: got %0d %0d %0d exp %0d %0d %0d", s,
                     dout[g].x, dout[g].y, dout[g].z, ex, ey, ez);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
