// tb_scrl_buffer: random data and enables; q must take d on a tick with en
// high, hold otherwise, and q_n must always be its complement.
module tb_scrl_buffer;
  logic clk = 0, rst_n = 0, en = 0, d = 0, q, q_n;
  logic model;
  int checks = 0, failures = 0;

  scrl_buffer #(.RESET_VALUE(1'b1)) dut (.clk, .rst_n, .en, .d, .q, .q_n);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    checks++;
    if (q !== 1'b1) begin failures++; $display("reset value wrong"); end
    rst_n = 1;
    model = 1'b1;
    for (int i = 0; i < 500; i++) begin
      en = ($urandom % 3) == 0;
      d  = ($urandom % 2) == 1;
      @(posedge clk);
      if (en) model = d;
      #1;
      checks++;
      if (q !== model || q_n !== ~model) begin
        failures++;
        $display("step %0d: q=%b q_n=%b expected %b", i, q, q_n, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
