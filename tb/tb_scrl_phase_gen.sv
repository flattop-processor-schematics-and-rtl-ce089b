// tb_scrl_phase_gen: checks that the three stage enables come one at a time,
// in the order phase 1, 2, 3, starting with phase 1 after reset, and that
// cycle_end marks phase 3 (a cycle of exactly three ticks).
module tb_scrl_phase_gen;
  import flattop_pkg::*;

  logic clk = 0, rst_n = 0;
  phase_e phase;
  logic [2:0] en;
  logic cycle_end;
  int checks = 0, failures = 0;

  scrl_phase_gen dut (.clk, .rst_n, .phase, .en, .cycle_end);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] expect_en;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      expect_en = 3'b001 << (t % 3);
      checks++;
      if (en !== expect_en || cycle_end !== (t % 3 == 2)) begin
        failures++;
        $display("tick %0d: en=%b cycle_end=%b, expected en=%b", t, en, cycle_end, expect_en);
      end
      @(posedge clk); #1;
    end
    // a reset in mid-cycle restarts at phase 1
    @(posedge clk); #1;
    rst_n = 0; @(posedge clk); #1; rst_n = 1;
    checks++;
    if (en !== 3'b001) begin failures++; $display("no phase 1 after reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
