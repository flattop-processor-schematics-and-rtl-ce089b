// scrl_phase_gen: three-phase stage enables for the FlatTop pipeline.
//
// Each FlatTop stage is driven by its own set of clock-power rails, whose
// phases are a third of a cycle apart, so stage 1, stage 2 and stage 3 of
// every PE evaluate one after the other within a cycle. This block gives the
// logical equivalent for a single-clock design: a modulo-3 phase counter and
// one enable per phase. One FlatTop cycle is three clock ticks; en[0] is high
// in the first tick, en[1] in the second and en[2] in the third. After reset
// the first tick is phase 1.
//
// The adiabatic rail drivers themselves are analog and are not modelled; the
// counter is this design's substitute for them.
//
// Interface: clk, rst_n (active-low, synchronous); phase (current phase),
// en[2:0] one-hot stage enables, cycle_end (high in the last tick of a cycle).
module scrl_phase_gen
  import flattop_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  output phase_e     phase,
  output logic [2:0] en,
  output logic       cycle_end
);

  always_ff @(posedge clk) begin
    if (!rst_n)          phase <= PH1;
    else begin
      unique case (phase)
        PH1:     phase <= PH2;
        PH2:     phase <= PH3;
        default: phase <= PH1;
      endcase
    end
  end

  always_comb begin
    unique case (phase)
      PH1:     en = 3'b001;
      PH2:     en = 3'b010;
      PH3:     en = 3'b100;
      default: en = 3'b000;
    endcase
    cycle_end = (phase == PH3);
  end

  // Exactly one stage evaluates at a time.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(en));

endmodule
