// pd_block: the pre-distortion calculation. It evaluates, for each
// amplitude/phase pair (A_D, P_D) coming from the CORDIC vectoring pass,
//   A_DPD = s * sum_{n=1..M} a_n A_D^n
//   P_DPD =     sum_{n=1..M} p_n A_D^n + P_D
// with M = ORDER, by Horner's rule:
//   u_1 = c_M A_D + c_{M-1},  u_k = u_{k-1} A_D + c_{M-k},  k = 2..M,
// where c_0 is 0 for the amplitude chain (APD) and P_D for the phase chain
// (PPD). Each chain is M pipelined a*x+b units (pd_unit); A_D and P_D travel
// along delay registers beside them so that every unit sees the A_D of its
// own sample. A final unit multiplies A_DPD by the scaling factor s that keeps
// the output inside the DAC range; P_DPD is delayed by one clock beside it.
// With PAD = 1 one more register is added to both outputs (the top uses it
// to keep the CORDIC loop latency odd for any ORDER and stage count).
//
// Formats: A_D, s and the scaled A_DPD are {1,1,14}; coefficients and the
// Horner partial sums are {1,4,11}; phases are {1,1,14} in pi units and
// wrap. Coefficients are read live: a change takes effect for samples
// entering afterwards, and samples already inside may see a mix.
//
// Timing: latency ORDER + 1 + PAD clocks, one result per clock.
// The chains of a*x+b units, the coefficient formats and the scaling after
// the polynomial follow the design; the format of the partial sums, the
// delay-line structure and the padding register are this design's choices.
module pd_block
  import dpd_pkg::*;
#(
  parameter int ORDER = 5,
  parameter bit PAD   = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t am,
  input  word_t pm,
  input  word_t coef_a [1:ORDER],
  input  word_t coef_p [1:ORDER],
  input  word_t scale,
  output logic  out_valid,
  output word_t out_am,
  output word_t out_pm
);

  word_t apd   [ORDER+1];  // apd[k] = output of APD_k
  word_t ppd   [ORDER+1];
  logic  vld   [ORDER+1];
  word_t am_d  [ORDER+1];  // A_D delayed by k clocks
  word_t pm_d  [ORDER+1];  // P_D delayed by k clocks

  assign am_d[0] = am;
  assign pm_d[0] = pm;
  assign vld[0]  = in_valid;
  assign apd[0]  = coef_a[ORDER];
  assign ppd[0]  = coef_p[ORDER];

  for (genvar k = 1; k <= ORDER; k++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        am_d[k] <= '0;
        pm_d[k] <= '0;
      end else begin
        am_d[k] <= am_d[k-1];
        pm_d[k] <= pm_d[k-1];
      end
    end

    if (k < ORDER) begin : g_mid
      pd_unit #(.AF(COEF_FRAC), .XF(AP_FRAC), .BF(COEF_FRAC), .OF(COEF_FRAC)) u_apd (
        .clk(clk), .rst_n(rst_n), .in_valid(vld[k-1]),
        .a(apd[k-1]), .x(am_d[k-1]), .b(coef_a[ORDER-k]),
        .out_valid(vld[k]), .y(apd[k]));
      pd_unit #(.AF(COEF_FRAC), .XF(AP_FRAC), .BF(COEF_FRAC), .OF(COEF_FRAC)) u_ppd (
        .clk(clk), .rst_n(rst_n), .in_valid(vld[k-1]),
        .a(ppd[k-1]), .x(am_d[k-1]), .b(coef_p[ORDER-k]),
        .out_valid(), .y(ppd[k]));
    end else begin : g_last
      // a_0 = 0 for the amplitude, p_0 = P_D for the phase
      pd_unit #(.AF(COEF_FRAC), .XF(AP_FRAC), .BF(COEF_FRAC), .OF(COEF_FRAC)) u_apd (
        .clk(clk), .rst_n(rst_n), .in_valid(vld[k-1]),
        .a(apd[k-1]), .x(am_d[k-1]), .b(word_t'(0)),
        .out_valid(vld[k]), .y(apd[k]));
      pd_unit #(.AF(COEF_FRAC), .XF(AP_FRAC), .BF(AP_FRAC), .OF(AP_FRAC), .WRAP(1'b1)) u_ppd (
        .clk(clk), .rst_n(rst_n), .in_valid(vld[k-1]),
        .a(ppd[k-1]), .x(am_d[k-1]), .b(pm_d[k-1]),
        .out_valid(), .y(ppd[k]));
    end
  end

  // Scaling after the polynomial: A_DPD * s, result {1,1,14}.
  logic  sc_valid;
  word_t sc_am;
  word_t sc_pm;

  pd_unit #(.AF(COEF_FRAC), .XF(AP_FRAC), .BF(AP_FRAC), .OF(AP_FRAC)) u_scale (
    .clk(clk), .rst_n(rst_n), .in_valid(vld[ORDER]),
    .a(apd[ORDER]), .x(scale), .b(word_t'(0)),
    .out_valid(sc_valid), .y(sc_am));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sc_pm <= '0;
    else        sc_pm <= ppd[ORDER];
  end

  if (PAD) begin : g_pad
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid <= 1'b0;
        out_am    <= '0;
        out_pm    <= '0;
      end else begin
        out_valid <= sc_valid;
        out_am    <= sc_am;
        out_pm    <= sc_pm;
      end
    end
  end else begin : g_nopad
    assign out_valid = sc_valid;
    assign out_am    = sc_am;
    assign out_pm    = sc_pm;
  end

endmodule
