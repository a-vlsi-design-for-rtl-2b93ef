// post_processor: converts the internal {1,2,13} I/Q words from the CORDIC
// rotation pass into the 14-bit DAC format {1,0,13}.
//
// The two integer bits are dropped; a value outside the DAC range [-1, 1)
// is clipped to the nearest full-scale code instead of wrapping, and `sat`
// pulses with the word so that clipping can be observed. The scaling factor
// in the PD block is meant to keep the signal in range; clipping is this
// design's guard for a badly chosen factor.
//
// Timing: one register, latency 1 clock.
module post_processor
  import dpd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t in_i,
  input  word_t in_q,
  output logic  out_valid,
  output adc_t  out_i,
  output adc_t  out_q,
  output logic  sat
);

  localparam int SHIFT = IQ_FRAC - (ADC_W - 1);  // 0 for 13 fraction bits
  localparam int MAXV  = 2**(ADC_W-1) - 1;
  localparam int MINV  = -(2**(ADC_W-1));

  function automatic adc_t clip(input word_t v, output logic hit);
    int w;
    w   = int'(v) >>> SHIFT;
    hit = (w > MAXV) || (w < MINV);
    if (w > MAXV)      return adc_t'(MAXV);
    else if (w < MINV) return adc_t'(MINV);
    else               return adc_t'(w);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    logic hi, hq;
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
      sat       <= 1'b0;
    end else begin
      out_valid <= in_valid;
      sat       <= 1'b0;
      if (in_valid) begin
        out_i <= clip(in_i, hi);
        out_q <= clip(in_q, hq);
        sat   <= hi || hq;
      end
    end
  end

endmodule
