// tb_pe_stage3: every block value in both modes. After a tick with en high,
// q must be the block (normal mode) or the block with opposite cells swapped
// (shift mode); the shift pair must pass through. With en low q must hold.
module tb_pe_stage3;
  import flattop_pkg::*;
  import bbm_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, sh = 0, sh_n = 1, sh_o, sh_n_o;
  quad_t y_n = '1, q;
  int checks = 0, failures = 0;

  pe_stage3 dut (.clk, .rst_n, .en, .y_n, .sh, .sh_n, .q, .sh_o, .sh_n_o);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [3:0] blk, expect_blk;
    @(posedge clk); #1 rst_n = 1;
    for (int v = 0; v < 32; v++) begin
      blk = v[3:0];
      y_n = quad_t'(~blk); sh = v[4]; sh_n = ~sh; en = 1;
      @(posedge clk); #1;
      expect_blk = sh ? swap_opposite(blk) : blk;
      checks++;
      if (q !== quad_t'(expect_blk) || sh_o !== sh || sh_n_o !== ~sh) begin
        failures++;
        $display("blk=%b sh=%b: q=%b expected %b", blk, sh, q, expect_blk);
      end
      en = 0; y_n = ~y_n; sh = ~sh; sh_n = ~sh;
      @(posedge clk); #1;
      checks++;
      if (q !== quad_t'(expect_blk)) begin failures++; $display("changed with en low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
