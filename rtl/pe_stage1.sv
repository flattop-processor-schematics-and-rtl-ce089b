// pe_stage1: first SCRL stage of a FlatTop PE.
//
// Latches the inverses of the four block inputs A, B, C, D and of the shift
// signal, together with S-bar, the inverse of the "static" signal that
// stage 2 uses:
//
//     S-bar = not( sh + (A + C)(B + D) )
//
// S is high when the block holds at least one bit on each diagonal (two
// neighbouring balls, three or four balls: the block does not change) and is
// forced high in shift mode, so that stage 2 passes the block through
// unchanged while the array is used as a shift register. The equation is read
// from the transistor network of the stage-1 gate: a shift p-FET in series
// with the two p-FET pairs (A,C) and (B,D), and the matching n-FET pull-down.
//
// The circuit is an inverting SCRL stage; this model keeps its polarities
// (all outputs are inverted) and turns the rails into a register that loads
// when en is high (phase 1). Reset, which the circuit does not have, clears
// the register to the encoding of an empty block in normal mode.
//
// Interface: d = {A,B,C,D} from the four neighbours, sh = shift mode.
// Outputs are valid from the tick after en until the next en.
module pe_stage1
  import flattop_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  quad_t d,
  input  logic  sh,
  output quad_t d_n,   // inverted inputs
  output logic  s_n,   // inverted static signal
  output logic  sh_n   // inverted shift signal
);

  logic s_n_next;

  always_comb s_n_next = ~(sh | ((d.a | d.c) & (d.b | d.d)));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_n  <= '1;
      s_n  <= 1'b1;
      sh_n <= 1'b1;
    end else if (en) begin
      d_n  <= ~d;
      s_n  <= s_n_next;
      sh_n <= ~sh;
    end
  end

endmodule
