// tb_pe_stage2: every block value, in normal and shift mode, with S-bar as
// stage 1 would present it. After a tick with en high the inverted output
// must be the inverse of the billiard-ball rule (normal mode) or of the
// unchanged block (shift mode), and the shift signal must pass in both
// polarities. With en low nothing may change.
module tb_pe_stage2;
  import flattop_pkg::*;
  import bbm_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  quad_t x_n = '1, y_n;
  logic s_n = 1, sh_n = 1, s_n_o, sh_o, sh_n_o;
  int checks = 0, failures = 0;

  pe_stage2 dut (.clk, .rst_n, .en, .x_n, .s_n, .sh_n, .y_n, .s_n_o, .sh_o, .sh_n_o);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [3:0] blk, expect_blk;
    bit sh, s;
    @(posedge clk); #1 rst_n = 1;
    for (int v = 0; v < 32; v++) begin
      blk = v[3:0]; sh = v[4];
      s = sh || (kind_of(blk) == K_STATIC);
      x_n = quad_t'(~blk); s_n = ~s; sh_n = ~sh; en = 1;
      @(posedge clk); #1;
      expect_blk = sh ? blk : bbm_rule(blk);
      checks++;
      if (y_n !== quad_t'(~expect_blk) || s_n_o !== ~s || sh_o !== sh || sh_n_o !== ~sh) begin
        failures++;
        $display("blk=%b sh=%b: y=%b expected %b", blk, sh, ~y_n, expect_blk);
      end
      en = 0; x_n = ~x_n;
      @(posedge clk); #1;
      checks++;
      if (y_n !== quad_t'(~expect_blk)) begin failures++; $display("changed with en low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
