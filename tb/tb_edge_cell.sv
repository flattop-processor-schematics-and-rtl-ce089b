// tb_edge_cell: all 16 input combinations. In shift mode the cell must act as
// a closed loop between its two PEs; in normal mode the left PE's bit leaves
// on dout, din enters the right PE, and the right PE's bit returns left.
module tb_edge_cell;
  logic ao_l, ao_r, ai_l, ai_r, din, dout, sh, sh_n;
  int checks = 0, failures = 0;

  edge_cell dut (.ao_l, .ao_r, .ai_l, .ai_r, .din, .dout, .sh, .sh_n);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e_ai_l, e_ai_r;
    for (int v = 0; v < 16; v++) begin
      {sh, ao_l, ao_r, din} = v[3:0];
      sh_n = ~sh;
      #1;
      if (sh) begin
        e_ai_l = ao_r;  // loop
        e_ai_r = ao_l;
      end else begin
        e_ai_l = ao_r;  // return path
        e_ai_r = din;   // from the other chip
      end
      checks++;
      if (ai_l !== e_ai_l || ai_r !== e_ai_r || dout !== ao_l) begin
        failures++;
        $display("sh=%b ao_l=%b ao_r=%b din=%b: ai_l=%b ai_r=%b dout=%b", sh, ao_l, ao_r, din, ai_l, ai_r, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
