// tb_flattop_pe: drives one PE through the three phases of each cycle with a
// new block every cycle: all 16 blocks in normal mode, then all 16 in shift
// mode, then 200 random ones. The result must be the billiard-ball rule (or
// the opposite-cell swap in shift mode), must appear exactly after the
// phase-3 tick of the cycle that sampled the block (one cycle latency, one
// block per cycle), and must not move during phases 1 and 2. shift_o must
// follow the shift input through the same three stages.
module tb_flattop_pe;
  import flattop_pkg::*;
  import bbm_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [2:0] en = 3'b000;
  quad_t d = '0, q;
  logic sh = 0, shift_o, shift_n_o;
  int checks = 0, failures = 0;

  flattop_pe dut (.clk, .rst_n, .en, .d, .sh, .q, .shift_o, .shift_n_o);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_cycle(input bit [3:0] blk, input bit mode);
    quad_t q_prev;
    bit [3:0] expect_blk;
    d = quad_t'(blk); sh = mode;
    q_prev = q;
    en = 3'b001; @(posedge clk); #1;
    d = ~d; sh = ~sh;              // inputs only matter in phase 1
    checks++;
    if (q !== q_prev) begin failures++; $display("q moved in phase 1"); end
    en = 3'b010; @(posedge clk); #1;
    checks++;
    if (q !== q_prev) begin failures++; $display("q moved in phase 2"); end
    en = 3'b100; @(posedge clk); #1;
    expect_blk = pe_ref(blk, mode);
    checks++;
    if (q !== quad_t'(expect_blk) || shift_o !== mode || shift_n_o !== ~mode) begin
      failures++;
      $display("blk=%b sh=%b: q=%b expected %b shift_o=%b", blk, mode, q, expect_blk, shift_o);
    end
  endtask

  initial begin
    @(posedge clk); #1 rst_n = 1;
    for (int v = 0; v < 16; v++) run_cycle(v[3:0], 1'b0);
    for (int v = 0; v < 16; v++) run_cycle(v[3:0], 1'b1);
    for (int i = 0; i < 200; i++) run_cycle(4'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
