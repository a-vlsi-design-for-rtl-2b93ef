// dpd_top: polynomial digital pre-distorter (DPD) for a power amplifier,
// built around one pipelined CORDIC processor shared by two conversions.
//
// Data path for one I/Q sample:
//   pre_processor  14-bit ADC I/Q -> {1,2,13}
//   cordic_mux     vectoring slot: (I, Q, 0) into the pipeline
//   cordic_processor (13 PUs), vectoring: -> K*A_D, P_D
//   cordic_demux   x/K; vectoring words go to the PD block
//   pd_block       A_DPD = s * poly_a(A_D),  P_DPD = poly_p(A_D) + P_D
//   cordic_mux     rotation slot: (A_DPD, 0, P_DPD) into the same pipeline
//   cordic_processor, rotation: -> K*A_DPD*(cos P_DPD, sin P_DPD)
//   cordic_demux   x/K, y/K; rotation words go to the post-processor
//   post_processor {1,2,13} -> 14-bit DAC I/Q
// The MUX alternates vectoring and rotation slots every clock, so the
// pipeline carries interleaved words of both modes and the DPD accepts and
// delivers one sample every two clocks (20 MS/s at a 40 MHz clock).
// For the rotation word to come back on a rotation slot the loop
// MUX -> CORDIC -> DEMUX -> PD -> MUX must be an odd number of registers;
// with 13 stages and order 5 it is 1 + 13 + 1 + 5 + 1 = 21, and for other
// sizes the PD block adds one pad register.
//
// Interface: ADC side in_valid/in_ready/in_i/in_q (a sample is taken when
// both valid and ready are high; in_ready is high every other clock). DAC
// side out_valid/out_i/out_q, one clock per sample. Configuration side
// cfg_* is a simple register write/read port for the DSP (map in
// dpd_config_regs). clip_evt and fold_evt are status pulses: an output was
// clipped to the DAC range; a word was pre-rotated by 90 degrees.
//
// Timing: a sample taken on clock edge t appears on out_* after edge
// t + N_STAGES*2 + ORDER + 6 + PAD (37 clocks with the defaults).
module dpd_top
  import dpd_pkg::*;
#(
  parameter int ORDER    = 5,
  parameter int N_STAGES = 13
) (
  input  logic        clk,
  input  logic        rst_n,
  // ADC side
  input  logic        in_valid,
  output logic        in_ready,
  input  adc_t        in_i,
  input  adc_t        in_q,
  // DAC side
  output logic        out_valid,
  output adc_t        out_i,
  output adc_t        out_q,
  // configuration from the DSP
  input  logic        cfg_we,
  input  logic [4:0]  cfg_addr,
  input  word_t       cfg_wdata,
  output word_t       cfg_rdata,
  // status
  output logic        clip_evt,
  output logic        fold_evt
);

  localparam bit PAD = ((N_STAGES + ORDER) % 2) != 0;

  // configuration
  word_t coef_a [1:ORDER];
  word_t coef_p [1:ORDER];
  word_t scale;

  dpd_config_regs #(.ORDER(ORDER), .AW(5)) u_cfg (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .coef_a, .coef_p, .scale);

  // pre-processor
  logic  pre_valid;
  word_t pre_i, pre_q;

  pre_processor u_pre (
    .clk, .rst_n, .in_valid, .in_ready, .in_i, .in_q,
    .out_valid(pre_valid), .out_i(pre_i), .out_q(pre_q));

  // MUX, CORDIC, DEMUX
  logic         pd_in_valid, pd_out_valid, post_valid;
  word_t        pd_in_am, pd_in_pm, pd_out_am, pd_out_pm, post_i, post_q;
  cordic_word_t cw_in, cw_out;

  cordic_mux u_mux (
    .clk, .rst_n,
    .pre_valid, .pre_i, .pre_q,
    .pd_valid(pd_out_valid), .pd_am(pd_out_am), .pd_pm(pd_out_pm),
    .in_ready, .out(cw_in), .fold_evt);

  cordic_processor #(.N_STAGES(N_STAGES)) u_cordic (
    .clk, .rst_n, .in(cw_in), .out(cw_out));

  cordic_demux u_demux (
    .clk, .rst_n, .in(cw_out),
    .pd_valid(pd_in_valid), .pd_am(pd_in_am), .pd_pm(pd_in_pm),
    .post_valid, .post_i, .post_q);

  // PD block
  pd_block #(.ORDER(ORDER), .PAD(PAD)) u_pd (
    .clk, .rst_n, .in_valid(pd_in_valid), .am(pd_in_am), .pm(pd_in_pm),
    .coef_a, .coef_p, .scale,
    .out_valid(pd_out_valid), .out_am(pd_out_am), .out_pm(pd_out_pm));

  // post-processor
  post_processor u_post (
    .clk, .rst_n, .in_valid(post_valid), .in_i(post_i), .in_q(post_q),
    .out_valid, .out_i, .out_q, .sat(clip_evt));

endmodule
