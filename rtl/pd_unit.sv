// pd_unit: one pipelined "a*x + b" unit, the building block of the
// pre-distortion (PD) polynomial evaluator. A chain of these evaluates a
// polynomial in x by Horner's rule, one step per unit.
//
// All operands are DW-bit two's-complement words with parameterised
// fraction bits: a has AF, x has XF, b has BF, the result y has OF. The
// full-precision product a*x is formed, b is aligned to it and added, and
// the sum is rounded to nearest at OF fraction bits. The result is then
// saturated to DW bits, or, with WRAP = 1, simply wrapped (used for phase,
// which is modular).
//
// Timing: one register, latency 1 clock, one result per clock.
// The unit and its place in the Horner chain follow the design; rounding
// and saturation are this design's choices.
module pd_unit
  import dpd_pkg::*;
#(
  parameter int AF   = COEF_FRAC,
  parameter int XF   = AP_FRAC,
  parameter int BF   = COEF_FRAC,
  parameter int OF   = COEF_FRAC,
  parameter bit WRAP = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t a,
  input  word_t x,
  input  word_t b,
  output logic  out_valid,
  output word_t y
);

  localparam int PF  = AF + XF;  // fraction bits of the product
  localparam int SH  = PF - OF;  // right shift to the output format
  localparam int BSH = PF - BF;  // left shift that aligns b

  word_t nxt;

  always_comb begin
    logic signed [39:0] acc;
    acc = 40'(a) * 40'(x);
    acc = acc + (40'(b) <<< BSH);
    if (SH > 0) acc = (acc + (40'sd1 <<< (SH - 1))) >>> SH;
    if (WRAP) nxt = word_t'(acc[DW-1:0]);
    else      nxt = sat_word(acc);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      y         <= nxt;
    end
  end

endmodule
