// cordic_demux: output stage of the CORDIC processor.
//
// It removes the CORDIC gain by multiplying x and y by the constant 1/K
// (0.607253, dpd_pkg::INV_K) and routes each word by its mode bit:
//   vectoring word -> PD block:       AM = x/K in {1,1,14}, PM = z
//   rotation word  -> post-processor: I = x/K, Q = y/K in {1,2,13}
// Products are rounded to nearest; AM is saturated to the {1,1,14} range.
// Routing by the mode bit follows the design, as does the removal of K
// after the iterations; doing both in one registered stage is this
// design's choice.
//
// Timing: one register, latency 1 clock; at most one of pd_valid and
// post_valid is high in a clock.
module cordic_demux
  import dpd_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  cordic_word_t in,
  output logic         pd_valid,
  output word_t        pd_am,
  output word_t        pd_pm,
  output logic         post_valid,
  output word_t        post_i,
  output word_t        post_q
);

  // v * INV_K, rounded, with result fraction IQ_FRAC + extra
  function automatic word_t scale_k(input word_t v, input int extra);
    logic signed [39:0] p;
    int sh;
    sh = AP_FRAC - extra;
    p  = 40'(v) * 40'(INV_K);
    p  = (p + (40'sd1 <<< (sh - 1))) >>> sh;
    return sat_word(p);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pd_valid   <= 1'b0;
      post_valid <= 1'b0;
      pd_am      <= '0;
      pd_pm      <= '0;
      post_i     <= '0;
      post_q     <= '0;
    end else begin
      pd_valid   <= in.valid && (in.mode == MODE_VEC);
      post_valid <= in.valid && (in.mode == MODE_ROT);
      if (in.valid && in.mode == MODE_VEC) begin
        pd_am <= scale_k(in.x, AP_FRAC - IQ_FRAC);
        pd_pm <= in.z;
      end
      if (in.valid && in.mode == MODE_ROT) begin
        post_i <= scale_k(in.x, 0);
        post_q <= scale_k(in.y, 0);
      end
    end
  end

endmodule
