// edge_cell: chip-edge connection between two boundary cells and a pin pair.
//
// Along the array edge, neighbouring boundary PEs are paired. Where there is
// no pin, a pair is simply wired into a loop: the outgoing bit of each PE
// becomes the incoming bit of the other. Where the chip has a pin pair, an
// edge cell sits in the loop instead and lets the CA continue on the
// neighbouring chip during normal operation.
//
// The function of the edge cell is given only in outline, so its behaviour is
// this design's own, chosen as the smallest change to the loop:
//   * the bit leaving the "left" PE goes out on dout;
//   * in normal mode the bit on din enters the "right" PE in its place;
//   * the bit leaving the "right" PE always returns to the "left" PE;
//   * in shift mode the cell closes the loop completely (ai_r = ao_l), so
//     the shift-register chain through the whole array stays unbroken.
// Two neighbouring chips' edge cells, dout of one wired to din of the other,
// thus join their boundary loops into one path across the chip boundary.
//
// The shift signal arrives in both polarities (shiftInPin and its inverse);
// an assertion checks that they are complements. Purely combinational: the
// PE stage 1 that reads ai_l/ai_r samples them in phase 1.
module edge_cell (
  input  logic ao_l,     // Aoleft:  bit leaving the left PE
  input  logic ao_r,     // Aoright: bit leaving the right PE
  output logic ai_l,     // Aileft:  bit entering the left PE
  output logic ai_r,     // Airight: bit entering the right PE
  input  logic din,      // Din pin
  output logic dout,     // Dout pin
  input  logic sh,       // shiftInPin
  input  logic sh_n      // shiftInPin-bar
);

  always_comb begin
    dout = ao_l;
    ai_l = ao_r;
    ai_r = (sh & ao_l) | (sh_n & din);
  end

  always_comb begin
    a_dual_rail: assert #0 (sh != sh_n)
      else $error("edge_cell: shift rails not complementary");
  end

endmodule
