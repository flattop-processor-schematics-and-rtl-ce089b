// flattop_pkg: types and constants shared by the FlatTop processing-element
// array.
//
// A FlatTop processing element (PE) updates one 2x2 block of the Billiard Ball
// Model cellular automaton (BBMCA). The four cells of the block are called
// A, B, C and D going round the block, so that A is opposite C and B is
// opposite D. In the array the block is drawn rotated by 45 degrees, so A faces
// the PE above, B the PE to the right, C the PE below and D the PE to the left.
// quad_t carries one bit per cell. Packing the four bits into a struct is a
// choice of this RTL; the schematics draw them as four separate wires.
//
// The PE is a three-stage pipeline. In the original circuit each stage is
// driven by its own set of swinging supply rails, the three sets a third of a
// cycle apart. Here the three phases are three enables of one clock,
// enumerated by phase_e.
package flattop_pkg;

  typedef struct packed {
    logic a;  // cell facing the PE above
    logic b;  // cell facing the PE to the right
    logic c;  // cell facing the PE below
    logic d;  // cell facing the PE to the left
  } quad_t;

  typedef enum logic [1:0] {
    PH1 = 2'd0,  // stage 1 latches
    PH2 = 2'd1,  // stage 2 latches
    PH3 = 2'd2   // stage 3 latches
  } phase_e;


  // Cell opposite to each cell of a block: A<->C, B<->D.
  function automatic quad_t opposite(quad_t q);
    return '{a: q.c, b: q.d, c: q.a, d: q.b};
  endfunction

endpackage
