// rev_seq_top: the library of reversible sequential elements, side by side.
//
// Six independent elements share only the time-step clock tick and the reset:
//   dl_*   reversible D latch   (Fredkin + Feynman)
//   tl_*   reversible T latch   (3-bit Toffoli + Feynman)
//   jl_*   reversible JK latch  (three generalized Toffoli gates + Feynman)
//   dff_*  reversible D flip-flop  (D latch, NOT, D latch)
//   tff_*  reversible T flip-flop  (T latch, NOT, D latch)
//   jkff_* reversible JK flip-flop (JK latch, NOT, D latch)
// Every element brings out its clock level input <p>_clk, its data inputs,
// all of its garbage outputs (<p>_*_g) and its output <p>_q, so nothing of a
// reversible element is hidden: the number of outputs equals the number of
// inputs plus the constant-0 ancilla lines, as reversibility requires.
//
// Timing: tick is the step clock of every feedback register (one rising edge
// per truth-table step n -> n+1); rst_n clears all stored states to 0
// asynchronously. Both are this model's own additions. Latches are transparent
// while their clk is 1; flip-flops change q only after their clk falls.
//
// Origin: the six elements are the published designs; placing them side by
// side in one top with a shared tick and reset is this model's choice.
module rev_seq_top (
  input  logic tick,
  input  logic rst_n,
  // D latch
  input  logic dl_clk,
  input  logic dl_d,
  output logic dl_clk_g,
  output logic dl_d_g,
  output logic dl_q,
  // T latch
  input  logic tl_clk,
  input  logic tl_t,
  output logic tl_clk_g,
  output logic tl_t_g,
  output logic tl_q,
  // JK latch
  input  logic jl_clk,
  input  logic jl_j,
  input  logic jl_k,
  output logic jl_clk_g,
  output logic jl_j_g,
  output logic jl_k_g,
  output logic jl_q,
  // D flip-flop
  input  logic dff_clk,
  input  logic dff_d,
  output logic dff_clk_g,
  output logic dff_dm_g,
  output logic dff_ds_g,
  output logic dff_q,
  // T flip-flop
  input  logic tff_clk,
  input  logic tff_t,
  output logic tff_clk_g,
  output logic tff_t_g,
  output logic tff_ds_g,
  output logic tff_q,
  // JK flip-flop
  input  logic jkff_clk,
  input  logic jkff_j,
  input  logic jkff_k,
  output logic jkff_clk_g,
  output logic jkff_j_g,
  output logic jkff_k_g,
  output logic jkff_ds_g,
  output logic jkff_q
);
  rev_d_latch u_d_latch (
    .tick, .rst_n, .clk(dl_clk), .d(dl_d),
    .clk_g(dl_clk_g), .d_g(dl_d_g), .q(dl_q)
  );

  rev_t_latch u_t_latch (
    .tick, .rst_n, .clk(tl_clk), .t(tl_t),
    .clk_g(tl_clk_g), .t_g(tl_t_g), .q(tl_q)
  );

  rev_jk_latch u_jk_latch (
    .tick, .rst_n, .clk(jl_clk), .j(jl_j), .k(jl_k),
    .clk_g(jl_clk_g), .j_g(jl_j_g), .k_g(jl_k_g), .q(jl_q)
  );

  rev_d_ff u_d_ff (
    .tick, .rst_n, .clk(dff_clk), .d(dff_d),
    .clk_g(dff_clk_g), .dm_g(dff_dm_g), .ds_g(dff_ds_g), .q(dff_q)
  );

  rev_t_ff u_t_ff (
    .tick, .rst_n, .clk(tff_clk), .t(tff_t),
    .clk_g(tff_clk_g), .t_g(tff_t_g), .ds_g(tff_ds_g), .q(tff_q)
  );

  rev_jk_ff u_jk_ff (
    .tick, .rst_n, .clk(jkff_clk), .j(jkff_j), .k(jkff_k),
    .clk_g(jkff_clk_g), .j_g(jkff_j_g), .k_g(jkff_k_g), .ds_g(jkff_ds_g), .q(jkff_q)
  );
endmodule
