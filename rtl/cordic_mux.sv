// cordic_mux: the input stage of the shared dual-mode CORDIC pipeline.
//
// A slot toggle alternates every clock between a vectoring slot, which
// loads a new I/Q sample from the pre-processor, and a rotation slot, which
// loads a pre-distorted AM/PM pair coming back from the PD block. The word
// written into the pipeline carries its own mode bit, so each CORDIC unit
// works in the mode of the word it currently holds.
//
//   vectoring: x0 = I, y0 = Q, z0 = 0
//   rotation : x0 = AM (moved from {1,1,14} to {1,2,13}), y0 = 0, z0 = PM
//
// Circular CORDIC only converges for angles within about +-99.9 degrees, but
// I/Q samples lie in all four quadrants and the pre-distorted phase can take
// any value. This stage therefore pre-rotates by +-90 degrees (a swap and a
// negation, no arithmetic) so that the 13 iterations always converge:
//   vectoring, x < 0 : (x,y,z) <- ( y,-x, +0.5pi) if y >= 0
//                               (-y, x, -0.5pi) if y <  0
//   rotation         : z is first wrapped into [-pi, pi); then
//                      z >  0.5pi : (x,y,z) <- (-y, x, z-0.5pi)
//                      z < -0.5pi : (x,y,z) <- ( y,-x, z+0.5pi)
// The alternation and the mode bit follow the design; the pre-rotation and
// its placement here are this design's own choice.
//
// in_ready is high in the clock before a vectoring slot: a sample taken by
// the pre-processor on that edge reaches this stage on its vectoring slot.
// PD results must arrive on rotation slots; the loop latency of the design
// is odd so that they always do (checked by an assertion).
//
// Timing: one register, latency 1 clock. fold_evt pulses when a pre-rotation
// was applied (for test coverage).
module cordic_mux
  import dpd_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // from the pre-processor (vectoring)
  input  logic         pre_valid,
  input  word_t        pre_i,
  input  word_t        pre_q,
  // from the PD block (rotation)
  input  logic         pd_valid,
  input  word_t        pd_am,
  input  word_t        pd_pm,
  // to the pre-processor
  output logic         in_ready,
  // to PU_0
  output cordic_word_t out,
  output logic         fold_evt
);

  mode_e        slot_q;  // mode of the slot loaded on the next clock edge
  cordic_word_t nxt;
  logic         fold;

  always_comb begin
    word_t x0, y0, z0;
    fold = 1'b0;
    if (slot_q == MODE_VEC) begin
      x0 = pre_i;
      y0 = pre_q;
      z0 = '0;
      nxt.valid = pre_valid;
      if (x0 < 0) begin
        fold = 1'b1;
        if (y0 >= 0) begin
          nxt.x = y0;  nxt.y = -x0; nxt.z = HALF_PI;
        end else begin
          nxt.x = -y0; nxt.y = x0;  nxt.z = -HALF_PI;
        end
      end else begin
        nxt.x = x0; nxt.y = y0; nxt.z = z0;
      end
    end else begin
      x0 = pd_am >>> (AP_FRAC - IQ_FRAC);
      y0 = '0;
      // wrap the phase into [-1, 1) pi units (modulo 2 pi)
      z0 = {pd_pm[DW-2], pd_pm[DW-2:0]};
      nxt.valid = pd_valid;
      if (z0 > HALF_PI) begin
        fold = 1'b1;
        nxt.x = -y0; nxt.y = x0;  nxt.z = z0 - HALF_PI;
      end else if (z0 < -HALF_PI) begin
        fold = 1'b1;
        nxt.x = y0;  nxt.y = -x0; nxt.z = z0 + HALF_PI;
      end else begin
        nxt.x = x0; nxt.y = y0; nxt.z = z0;
      end
    end
    nxt.mode = slot_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_q   <= MODE_VEC;
      out      <= '0;
      fold_evt <= 1'b0;
    end else begin
      slot_q   <= (slot_q == MODE_VEC) ? MODE_ROT : MODE_VEC;
      out      <= nxt;
      fold_evt <= fold && nxt.valid;
    end
  end

  // The pre-processor may only present a sample on a vectoring slot and the
  // PD block only on a rotation slot; anything else would be lost.
  a_pre_on_vec_slot: assert property (@(posedge clk) disable iff (!rst_n)
    pre_valid |-> slot_q == MODE_VEC)
    else $error("cordic_mux: I/Q sample arrived on a rotation slot");
  a_pd_on_rot_slot: assert property (@(posedge clk) disable iff (!rst_n)
    pd_valid |-> slot_q == MODE_ROT)
    else $error("cordic_mux: PD result arrived on a vectoring slot");

  assign in_ready = (slot_q == MODE_ROT);

endmodule
