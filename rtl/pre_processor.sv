// pre_processor: brings the 14-bit ADC I/Q samples into the internal
// 16-bit {1,2,13} format used by the CORDIC processor and the PD block.
//
// The ADC word is a two's-complement number with ADC_FRAC fraction bits
// (default 13, i.e. {1,0,13} covering [-1, 1)). It is sign-extended and its
// binary point is moved to bit 13, so no precision is lost for ADC_FRAC <= 13.
// A sample is taken when in_valid and in_ready are both high; in_ready comes
// from the MUX and marks the clocks after which the MUX has a vectoring slot.
// out_valid is high for exactly the one clock in which the MUX consumes the
// sample.
//
// Timing: one register, latency 1 clock.
// The 14-to-16-bit re-formatting follows the design; the placement of the
// binary point of the ADC word and the handshake are this design's choices.
module pre_processor
  import dpd_pkg::*;
#(
  parameter int ADC_FRAC = 13
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_ready,
  input  adc_t  in_i,
  input  adc_t  in_q,
  output logic  out_valid,
  output word_t out_i,
  output word_t out_q
);

  localparam int SHIFT = IQ_FRAC - ADC_FRAC;

  function automatic word_t fmt(input adc_t v);
    logic signed [DW+ADC_W-1:0] ext;
    ext = (DW+ADC_W)'(v);
    if (SHIFT >= 0) ext = ext <<< SHIFT;
    else            ext = ext >>> (-SHIFT);
    return sat_word(40'(ext));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= in_valid && in_ready;
      if (in_valid && in_ready) begin
        out_i <= fmt(in_i);
        out_q <= fmt(in_q);
      end
    end
  end

endmodule
