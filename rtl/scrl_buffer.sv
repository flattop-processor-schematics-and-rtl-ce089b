// scrl_buffer: phase-clocked dual-rail buffer at the array boundary.
//
// The array's shift-register data input, its data output and the global
// shift signal each pass through an SCRL buffer stage driven by one set of
// phase rails before they reach the PEs or the pins. Logically such a stage
// holds its input for one cycle and drives it in both polarities. This
// module is that: a register that loads when en is high and drives q and
// q_n. The phase each instance uses follows the rail names printed next to
// the buffers (phase 3 for the inputs, so that PE stage 1 reads them in
// phase 1; phase 1 for the output, right after stage 3 has produced it).
// The circuit of the buffer itself is not given; this is the simplest
// stage that fits.
//
// Interface: d in, q/q_n out, valid from the tick after en until the next
// en. Reset clears q to RESET_VALUE.
module scrl_buffer #(
  parameter bit RESET_VALUE = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic d,
  output logic q,
  output logic q_n
);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= RESET_VALUE;
    else if (en) q <= d;
  end

  always_comb q_n = ~q;

endmodule
