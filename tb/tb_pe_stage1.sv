// tb_pe_stage1: all 32 combinations of the four inputs and shift. After a
// tick with en high the stage must hold the inverted inputs, the inverted
// shift and S-bar, where S is high in shift mode or when the block has a
// ball on each of its two diagonals. With en low nothing may change.
module tb_pe_stage1;
  import flattop_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, sh = 0;
  quad_t d = '0, d_n;
  logic s_n, sh_n;
  int checks = 0, failures = 0;

  pe_stage1 dut (.clk, .rst_n, .en, .d, .sh, .d_n, .s_n, .sh_n);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_s;
    logic [5:0] held;
    @(posedge clk); #1 rst_n = 1;
    for (int v = 0; v < 32; v++) begin
      d = quad_t'(v[3:0]); sh = v[4]; en = 1;
      @(posedge clk); #1;
      exp_s = 1'b1;
      // independent form: the block is static unless all balls sit on one diagonal
      if (!sh) exp_s = !(v[3:0] inside {4'b0000, 4'b1000, 4'b0010, 4'b1010,
                                        4'b0100, 4'b0001, 4'b0101});
      checks++;
      if (d_n !== ~d || sh_n !== ~sh || s_n !== ~exp_s) begin
        failures++;
        $display("v=%0d: d_n=%b sh_n=%b s_n=%b, expected S=%b", v, d_n, sh_n, s_n, exp_s);
      end
      // hold with en low
      held = {d_n, s_n, sh_n};
      en = 0; d = ~d; sh = ~sh;
      @(posedge clk); #1;
      checks++;
      if ({d_n, s_n, sh_n} !== held) begin failures++; $display("v=%0d: changed with en low", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
