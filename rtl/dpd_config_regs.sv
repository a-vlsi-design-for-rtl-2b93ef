// dpd_config_regs: the register bank through which the DSP software
// configures the pre-distorter: the amplitude coefficients a_1..a_M, the
// phase coefficients p_1..p_M (both {1,4,11}) and the output scaling
// factor s ({1,1,14}). Adapting the DPD to a new power amplifier or
// operating point only means rewriting these registers.
//
// Register map (16-bit words, M = ORDER):
//   0            scaling factor s
//   1 .. M       a_1 .. a_M
//   M+1 .. 2M    p_1 .. p_M
// Other addresses read 0 and ignore writes. A write takes effect on the
// clock edge where cfg_we is high; reads are combinational.
// Reset gives the identity pre-distortion (a_1 = 1, s = 1, all others 0),
// so an unconfigured DPD passes the signal through. That the coefficients
// and factor are loaded by software follows the design; the map, the
// simple write port and the reset values are this design's choices.
module dpd_config_regs
  import dpd_pkg::*;
#(
  parameter int ORDER = 5,
  parameter int AW    = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  logic [AW-1:0] cfg_addr,
  input  word_t         cfg_wdata,
  output word_t         cfg_rdata,
  output word_t         coef_a [1:ORDER],
  output word_t         coef_p [1:ORDER],
  output word_t         scale
);

  localparam word_t ONE_COEF  = word_t'(1 <<< COEF_FRAC);
  localparam word_t ONE_SCALE = word_t'(1 <<< AP_FRAC);

  initial assert (2*ORDER < 2**AW) else $error("dpd_config_regs: AW too small");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scale <= ONE_SCALE;
      for (int n = 1; n <= ORDER; n++) begin
        coef_a[n] <= (n == 1) ? ONE_COEF : '0;
        coef_p[n] <= '0;
      end
    end else if (cfg_we) begin
      if (int'(cfg_addr) == 0) scale <= cfg_wdata;
      for (int n = 1; n <= ORDER; n++) begin
        if (int'(cfg_addr) == n)         coef_a[n] <= cfg_wdata;
        if (int'(cfg_addr) == ORDER + n) coef_p[n] <= cfg_wdata;
      end
    end
  end

  always_comb begin
    cfg_rdata = '0;
    if (int'(cfg_addr) == 0) cfg_rdata = scale;
    for (int n = 1; n <= ORDER; n++) begin
      if (int'(cfg_addr) == n)         cfg_rdata = coef_a[n];
      if (int'(cfg_addr) == ORDER + n) cfg_rdata = coef_p[n];
    end
  end

endmodule
