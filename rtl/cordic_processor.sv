// cordic_processor: the dual-mode pipelined CORDIC processor, a chain of
// N_STAGES processing units PU_0 .. PU_{N_STAGES-1} (13 by default).
//
// Each word carries its own mode bit, so the pipeline holds vectoring words
// (I/Q -> magnitude and angle) and rotation words (magnitude and angle ->
// I/Q) interleaved, one new word per clock. A word entering PU_0 on clock t
// leaves PU_{N-1} on clock t + N - 1; the output is the register of the last
// unit. The CORDIC gain K is not removed here; the DEMUX does that.
//
// Interface: cordic_word_t in and out (see dpd_pkg).
// Timing: latency N_STAGES clocks from `in` to `out`, throughput one word
// per clock.
module cordic_processor
  import dpd_pkg::*;
#(
  parameter int N_STAGES = 13
) (
  input  logic         clk,
  input  logic         rst_n,
  input  cordic_word_t in,
  output cordic_word_t out
);

  cordic_word_t stage [N_STAGES+1];

  assign stage[0] = in;

  for (genvar i = 0; i < N_STAGES; i++) begin : g_pu
    cordic_pu #(.STAGE(i)) u_pu (
      .clk  (clk),
      .rst_n(rst_n),
      .in   (stage[i]),
      .out  (stage[i+1])
    );
  end

  assign out = stage[N_STAGES];

endmodule
