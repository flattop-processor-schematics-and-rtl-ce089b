// pe_stage2: second SCRL stage of a FlatTop PE, the BBMCA block rule.
//
// The stage first regenerates A, B, C, D, S and shift from the inverses that
// stage 1 latched (the "fast" inverters of the circuit), then four copies of
// one complex gate compute the inverse of each new cell value. For cell A:
//
//     not Aout = not( S.A + not S . not A . (C + B.D) )
//
// read from the gate's pull-down network (S in series with A, in parallel
// with S-bar, A-bar and the network C || (B in series with D)). The other
// three copies get the same gate with the pins rotated one place round the
// block (B sees C, D, A in the places of B, C, D; and so on). Worked out, this
// is the billiard-ball rule: with S high the block is unchanged; otherwise a
// single ball moves to the opposite cell and two balls on one diagonal move
// to the other diagonal. The rotated pin assignment is this design's reading
// of "differing as to which inputs are fed to the A, B, C, D pins".
//
// S-bar is passed on to stage 3 as in the schematic, together with shift in
// both polarities. The register loads when en is high (phase 2).
//
// Interface: inputs are stage 1's outputs; y_n is the inverted next state.
module pe_stage2
  import flattop_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  quad_t x_n,
  input  logic  s_n,
  input  logic  sh_n,
  output quad_t y_n,
  output logic  s_n_o,
  output logic  sh_o,
  output logic  sh_n_o
);

  // One copy of the stage-2 gate. cur is the cell being computed, opp the
  // cell opposite it, side1 and side2 the two cells beside it.
  function automatic logic cell_gate_n(logic s, logic cur, logic side1, logic opp, logic side2);
    return ~((s & cur) | (~s & ~cur & (opp | (side1 & side2))));
  endfunction

  quad_t x;
  logic  s;
  quad_t y_n_next;

  always_comb begin
    x = ~x_n;
    s = ~s_n;
    y_n_next.a = cell_gate_n(s, x.a, x.b, x.c, x.d);
    y_n_next.b = cell_gate_n(s, x.b, x.c, x.d, x.a);
    y_n_next.c = cell_gate_n(s, x.c, x.d, x.a, x.b);
    y_n_next.d = cell_gate_n(s, x.d, x.a, x.b, x.c);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_n    <= '1;
      s_n_o  <= 1'b1;
      sh_o   <= 1'b0;
      sh_n_o <= 1'b1;
    end else if (en) begin
      y_n    <= y_n_next;
      s_n_o  <= s_n;
      sh_o   <= ~sh_n;
      sh_n_o <= sh_n;
    end
  end

endmodule
