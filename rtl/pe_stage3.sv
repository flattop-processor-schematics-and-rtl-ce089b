// pe_stage3: third SCRL stage of a FlatTop PE, the shift-mode selector.
//
// Four copies of one gate, each choosing for its output either the stage-2
// value of the same cell (normal mode) or the stage-2 value of the opposite
// cell (shift mode):
//
//     Aout = not sh . A  +  sh . C
//
// Since stage 2 leaves the block unchanged in shift mode, every input bit then
// leaves on the opposite side of the PE, and the array as a whole behaves as
// one long shift register. The gate takes the inverted stage-2 values and sh
// in both polarities, as in the schematic; the two shift rails must be
// complements of each other, which an assertion checks. The stage also passes
// the shift signal on (shiftOut and its inverse).
//
// The S-bar wire that stage 2 hands to stage 3 in the schematic is used only
// by the reverse (un-computing) half of the circuit, which a clocked model
// does not need, so this module has no port for it.
//
// The register loads when en is high (phase 3); q holds the PE's outputs for
// the whole of the following cycle.
module pe_stage3
  import flattop_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  quad_t y_n,
  input  logic  sh,
  input  logic  sh_n,
  output quad_t q,
  output logic  sh_o,
  output logic  sh_n_o
);

  quad_t y;
  quad_t q_next;

  always_comb begin
    y      = ~y_n;
    q_next = sh ? opposite(y) : y;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q      <= '0;
      sh_o   <= 1'b0;
      sh_n_o <= 1'b1;
    end else if (en) begin
      q      <= q_next;
      sh_o   <= sh;
      sh_n_o <= sh_n;
    end
  end

  a_dual_rail: assert property (@(posedge clk) disable iff (!rst_n) en |-> (sh != sh_n));

endmodule
