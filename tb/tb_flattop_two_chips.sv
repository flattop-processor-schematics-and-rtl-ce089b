// tb_flattop_two_chips: two FlatTop chips joined through their pins, as in a
// multi-chip system: every Dout of chip X drives the Din with the same number
// on chip Y and the other way round. Both chips are 8 x 8 to keep the run
// short. The chips are loaded through their shift ports with independent
// random patterns and then run 300 generations in normal mode.
//
// Billiard balls are neither made nor destroyed by the block rule, and the
// pins only move them from one chip to the other, so the total number of
// balls on the two chips may change only through the shift-register port of
// each chip (the top cell of PE (0,0), which in normal mode sends its ball out
// of shift_data_out and takes shift_data_in's buffered bit). The test checks
// this balance every generation and counts the balls crossing in each
// direction, failing if none ever does.
module tb_flattop_two_chips;
  localparam int R = 8, C = 8, N = 4 * R * C, NP = 8;

  logic clk = 0, rst_n = 0, shift = 0;
  logic sdi_x = 0, sdi_y = 0, sdo_x, sdo_y;
  logic [NP-1:0] x_to_y, y_to_x;
  logic ce_x, ce_y, so_x, so_y, son_x, son_y;

  flattop_array #(.ROWS(R), .COLS(C)) chip_x (
    .clk, .rst_n, .shift, .shift_data_in(sdi_x), .shift_data_out(sdo_x),
    .din(y_to_x), .dout(x_to_y), .cycle_end(ce_x), .shift_out(so_x), .shift_out_n(son_x)
  );
  flattop_array #(.ROWS(R), .COLS(C)) chip_y (
    .clk, .rst_n, .shift, .shift_data_in(sdi_y), .shift_data_out(sdo_y),
    .din(x_to_y), .dout(y_to_x), .cycle_end(ce_y), .shift_out(so_y), .shift_out_n(son_y)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (3 * (N + 1000)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int balls_x();
    int n = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) n += $countones(chip_x.q[r][c]);
    return n;
  endfunction

  function automatic int balls_y();
    int n = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) n += $countones(chip_y.q[r][c]);
    return n;
  endfunction

  task automatic cycle();
    repeat (3) @(posedge clk);
    #1;
  endtask

  initial begin
    int total_before, total_after, leak, enter, cross_xy, cross_yx;
    cross_xy = 0; cross_yx = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // load both chips
    shift = 1;
    for (int i = 0; i < N + 1; i++) begin
      sdi_x = ($urandom % 4) == 0;
      sdi_y = ($urandom % 5) == 0;
      cycle();
    end
    sdi_x = 0; sdi_y = 0;
    shift = 0;
    cycle();  // the last shift-mode generation, while shift is being captured

    checks++;
    if (balls_x() == 0 || balls_y() == 0) begin failures++; $display("a chip loaded empty"); end

    for (int g = 0; g < 300; g++) begin
      total_before = balls_x() + balls_y();
      leak  = 32'(chip_x.q[0][0].a) + 32'(chip_y.q[0][0].a);
      enter = 32'(chip_x.sdi) + 32'(chip_y.sdi);
      cross_xy += $countones(x_to_y);
      cross_yx += $countones(y_to_x);
      cycle();
      total_after = balls_x() + balls_y();
      checks++;
      if (total_after != total_before - leak + enter) begin
        failures++;
        $display("generation %0d: %0d balls, expected %0d", g, total_after, total_before - leak + enter);
      end
    end
    $display("balls crossing: X to Y %0d, Y to X %0d", cross_xy, cross_yx);
    checks++;
    if (cross_xy == 0 || cross_yx == 0) begin failures++; $display("no traffic between the chips"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
