// tb_dpd_config_regs: checks the reset values (identity pre-distortion),
// then random writes and reads against a model array indexed by address,
// including writes to unmapped addresses, which must be ignored.
module tb_dpd_config_regs;
  import dpd_pkg::*;

  localparam int M = 5;

  logic clk = 0, rst_n = 0;
  logic cfg_we;
  logic [4:0] cfg_addr;
  word_t cfg_wdata, cfg_rdata, scale;
  word_t coef_a [1:M];
  word_t coef_p [1:M];
  int checks = 0, failures = 0;
  int model [32];

  dpd_config_regs #(.ORDER(M), .AW(5)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    checks++;
    if (int'(scale) != model[0]) begin failures++; $display("scale wrong"); end
    for (int n = 1; n <= M; n++) begin
      checks++;
      if (int'(coef_a[n]) != model[n] || int'(coef_p[n]) != model[M+n]) begin
        failures++; $display("coef %0d wrong", n);
      end
    end
  endtask

  initial begin
    cfg_we = 0; cfg_addr = '0; cfg_wdata = '0;
    foreach (model[i]) model[i] = 0;
    model[0] = 16384;  // s = 1.0
    model[1] = 2048;   // a_1 = 1.0
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1 check_all();
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      cfg_addr = 5'($urandom);
      cfg_we = 1'($urandom);
      cfg_wdata = word_t'($urandom);
      #1;
      checks++;
      if (int'(cfg_rdata) != ((int'(cfg_addr) <= 2*M) ? model[cfg_addr] : 0)) begin
        failures++; $display("read of %0d wrong: %0d", cfg_addr, cfg_rdata);
      end
      if (cfg_we && int'(cfg_addr) <= 2*M) model[cfg_addr] = int'(cfg_wdata);
      @(posedge clk); #1;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
