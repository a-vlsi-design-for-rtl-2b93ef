// cordic_pu: one processing unit (PU_i) of the pipelined circular CORDIC.
//
// It performs iteration i = STAGE of
//   x' = x - d * y * 2^-i
//   y' = y + d * x * 2^-i
//   z' = z - d * f(i),      f(i) = atan(2^-i)  (here in pi units)
// and registers the result. The direction d is chosen per word from the
// word's mode bit, so consecutive words may use different modes:
//   vectoring (drive y to 0): d = +1 when y < 0, else -1
//   rotation  (drive z to 0): d = +1 when z >= 0, else -1
// x and y are {1,2,13}; z is {1,1,14} in pi units. The shifts are
// arithmetic, as in the usual shift-and-add pipelined CORDIC.
//
// Timing: one register, latency 1 clock, one word per clock.
module cordic_pu
  import dpd_pkg::*;
#(
  parameter int STAGE = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  cordic_word_t in,
  output cordic_word_t out
);

  localparam word_t ANGLE = ATAN_TAB[STAGE];

  cordic_word_t nxt;

  always_comb begin
    logic  d_pos;
    word_t xs, ys;
    d_pos = (in.mode == MODE_VEC) ? (in.y < 0) : (in.z >= 0);
    xs    = in.x >>> STAGE;
    ys    = in.y >>> STAGE;
    nxt   = in;
    if (d_pos) begin
      nxt.x = in.x - ys;
      nxt.y = in.y + xs;
      nxt.z = in.z - ANGLE;
    end else begin
      nxt.x = in.x + ys;
      nxt.y = in.y - xs;
      nxt.z = in.z + ANGLE;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '0;
    else        out <= nxt;
  end

endmodule
