// flattop_pe: one FlatTop processing element.
//
// A PE updates one 2x2 block of the Billiard Ball Model cellular automaton.
// Its four inputs come from the four neighbouring PEs and its four outputs go
// back to them: the cell between this PE and the PE above is updated by this
// PE as its A cell and by the PE above as its C cell, and so on round the
// block, so neighbouring PEs take turns updating each shared cell.
//
// The PE is the three-stage pipeline of the schematic:
//   stage 1 (phase 1)  inverts the inputs and computes S-bar,
//   stage 2 (phase 2)  applies the billiard-ball rule,
//   stage 3 (phase 3)  swaps opposite cells in shift mode.
// In normal mode the outputs are the new block; in shift mode (sh high) each
// input leaves on the opposite side unchanged, so the array forms one long
// shift register for loading and reading its contents.
//
// Timing: the inputs and sh are sampled in the phase-1 tick of a cycle and
// the result appears on q after the phase-3 tick of the same cycle, where it
// stays for one whole cycle. One block update per three-tick cycle.
// shift_o/shift_n_o are sh delayed through the three stages, as the
// schematic's shiftOut pair.
//
// Interface: en[0..2] are the three phase enables from scrl_phase_gen.
module flattop_pe
  import flattop_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] en,
  input  quad_t      d,        // {ai, bi, ci, di}
  input  logic       sh,       // shiftIn
  output quad_t      q,        // {ao, bo, co, do}
  output logic       shift_o,  // shiftOut
  output logic       shift_n_o // shiftOut-bar
);

  quad_t s1_d_n, s2_y_n;
  logic  s1_s_n, s1_sh_n;
  logic  s2_s_n, s2_sh, s2_sh_n;

  pe_stage1 u_stage1 (
    .clk, .rst_n, .en(en[0]),
    .d, .sh,
    .d_n(s1_d_n), .s_n(s1_s_n), .sh_n(s1_sh_n)
  );

  pe_stage2 u_stage2 (
    .clk, .rst_n, .en(en[1]),
    .x_n(s1_d_n), .s_n(s1_s_n), .sh_n(s1_sh_n),
    .y_n(s2_y_n), .s_n_o(s2_s_n), .sh_o(s2_sh), .sh_n_o(s2_sh_n)
  );

  pe_stage3 u_stage3 (
    .clk, .rst_n, .en(en[2]),
    .y_n(s2_y_n), .sh(s2_sh), .sh_n(s2_sh_n),
    .q, .sh_o(shift_o), .sh_n_o(shift_n_o)
  );

  // S-bar reaches stage 3 only for the reverse half of the circuit; in
  // shift mode it must be low (S forced on).
  a_static_in_shift: assert property (@(posedge clk) disable iff (!rst_n)
                                      en[2] && s2_sh |-> !s2_s_n);

endmodule
