// flattop_array: a FlatTop chip, an array of billiard-ball CA processing
// elements.
//
// FlatTop is a parallel processor for the Billiard Ball Model cellular
// automaton (BBMCA), a reversible CA that can emulate any reversible
// computation. The chip is a ROWS x COLS grid of PEs (20 x 20 by default).
// Each PE updates one 2x2 block of CA cells; the CA lattice is turned 45
// degrees to the grid, so each CA cell lies between two neighbouring PEs and
// is updated by them in turn. Every PE sends its new A, B, C, D cells to the
// PE above, right, below and left, which take them as their C, D, A, B inputs.
//
// Edges. Along each edge the boundary PEs are paired:
//   left edge   rows (0,1), (2,3), ...   bottom edge  cols (0,1), (2,3), ...
//   right edge  rows (1,2), (3,4), ...   top edge     cols (1,2), (3,4), ...
// Every other pair, starting with the first, has an edge_cell with a pin
// pair Din/Dout; the other pairs are closed loops. The three leftover
// boundary cells are the top of PE (0,0), which carries the shift-register
// input and output; the top and right of PE (0,COLS-1), looped into each
// other at the corner; and the right of PE (ROWS-1,COLS-1), looped back into
// itself. For 20 x 20 this gives 5 edge cells per side, din/dout[19:0],
// numbered counter-clockwise: left side top to bottom 0..4, bottom side left
// to right 5..9, right side bottom to top 10..14, top side right to left
// 15..19. The pairing, the corner loops and the numbers of the two
// top-left pins follow the array schematics; the self-loop at the bottom
// right, the numbering of the other pins and the orientation of the edge
// cells on the other three sides are this design's completion of them.
//
// Shift mode. When shift is high every PE passes each bit straight to the
// opposite side and edge cells behave as loops, so the whole array becomes
// one shift register of 4*ROWS*COLS bits (1600 by default) from
// shift_data_in (entering PE (0,0) from above) to shift_data_out (leaving
// PE (0,0) upwards). Loading the array takes 4*ROWS*COLS cycles.
//
// Timing. One CA generation per FlatTop cycle of three clock ticks (phase 1,
// 2, 3 from scrl_phase_gen; cycle_end marks phase 3). shift and
// shift_data_in are captured at the end of a cycle (phase 3) and used in the
// next. din must be stable from the start of a cycle through its phase-1
// tick; dout changes after phase 3 and holds for a cycle. shift_data_out is
// captured in phase 1 and so lags the array by one cycle.
// shift_out/shift_out_n give the shift signal as it leaves the pipeline of
// PE (0,0), three phases after it entered.
module flattop_array
  import flattop_pkg::*;
#(
  parameter int unsigned ROWS = 20,
  parameter int unsigned COLS = 20,
  // pins per side
  localparam int unsigned NL = (ROWS / 2 + 1) / 2,
  localparam int unsigned NB = (COLS / 2 + 1) / 2,
  localparam int unsigned NR = (ROWS / 2) / 2,
  localparam int unsigned NT = (COLS / 2) / 2,
  localparam int unsigned NPINS = NL + NB + NR + NT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift,
  input  logic             shift_data_in,
  output logic             shift_data_out,
  input  logic [NPINS-1:0] din,
  output logic [NPINS-1:0] dout,
  output logic             cycle_end,
  output logic             shift_out,
  output logic             shift_out_n
);

  if (ROWS < 4 || COLS < 4 || ROWS % 2 != 0 || COLS % 2 != 0) begin : g_bad_size
    $error("flattop_array: ROWS and COLS must be even and at least 4");
  end

  logic [2:0] en;
  phase_e     phase;
  logic       sh, sh_n;
  logic       sdi, sdi_n, sdo_n;

  scrl_phase_gen u_phase (.clk, .rst_n, .phase, .en, .cycle_end);

  // Boundary buffers: global shift driver and shift-register data input
  // load in phase 3, the data output in phase 1.
  scrl_buffer u_shift_drv (.clk, .rst_n, .en(en[2]), .d(shift),         .q(sh),  .q_n(sh_n));
  scrl_buffer u_sdi_buf   (.clk, .rst_n, .en(en[2]), .d(shift_data_in), .q(sdi), .q_n(sdi_n));

  quad_t q     [ROWS][COLS];
  logic  in_a  [ROWS][COLS];
  logic  in_b  [ROWS][COLS];
  logic  in_c  [ROWS][COLS];
  logic  in_d  [ROWS][COLS];
  logic  pe_sh   [ROWS][COLS];
  logic  pe_sh_n [ROWS][COLS];

  scrl_buffer u_sdo_buf (.clk, .rst_n, .en(en[0]), .d(q[0][0].a), .q(shift_data_out), .q_n(sdo_n));

  // ---------------------------------------------------------------- PEs
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      flattop_pe u_pe (
        .clk, .rst_n, .en,
        .d('{a: in_a[r][c], b: in_b[r][c], c: in_c[r][c], d: in_d[r][c]}),
        .sh,
        .q(q[r][c]),
        .shift_o(pe_sh[r][c]),
        .shift_n_o(pe_sh_n[r][c])
      );
      // interior links
      if (r > 0)        begin : g_up    assign in_a[r][c] = q[r-1][c].c; end
      if (r < ROWS - 1) begin : g_down  assign in_c[r][c] = q[r+1][c].a; end
      if (c > 0)        begin : g_left  assign in_d[r][c] = q[r][c-1].b; end
      if (c < COLS - 1) begin : g_right assign in_b[r][c] = q[r][c+1].d; end
    end
  end

  assign shift_out   = pe_sh[0][0];
  assign shift_out_n = pe_sh_n[0][0];

  // -------------------------------------------------------------- corners
  assign in_a[0][0]           = sdi;                   // shift-register input
  assign in_a[0][COLS-1]      = q[0][COLS-1].b;        // top <- right
  assign in_b[0][COLS-1]      = q[0][COLS-1].a;        // right <- top
  assign in_b[ROWS-1][COLS-1] = q[ROWS-1][COLS-1].b;   // right self-loop

  // ------------------------------------------------------------ left edge
  // pair k: rows 2k+1 ("left" of the edge cell) and 2k ("right")
  for (genvar k = 0; k < ROWS / 2; k++) begin : g_edge_l
    localparam int unsigned RL = 2 * k + 1, RR = 2 * k;
    if (k % 2 == 0) begin : g_pin
      edge_cell u_edge (
        .ao_l(q[RL][0].d), .ao_r(q[RR][0].d),
        .ai_l(in_d[RL][0]), .ai_r(in_d[RR][0]),
        .din(din[k/2]), .dout(dout[k/2]), .sh, .sh_n
      );
    end else begin : g_loop
      assign in_d[RL][0] = q[RR][0].d;
      assign in_d[RR][0] = q[RL][0].d;
    end
  end

  // ---------------------------------------------------------- bottom edge
  // pair k: cols 2k+1 ("left") and 2k ("right")
  for (genvar k = 0; k < COLS / 2; k++) begin : g_edge_b
    localparam int unsigned CL = 2 * k + 1, CR = 2 * k;
    if (k % 2 == 0) begin : g_pin
      edge_cell u_edge (
        .ao_l(q[ROWS-1][CL].c), .ao_r(q[ROWS-1][CR].c),
        .ai_l(in_c[ROWS-1][CL]), .ai_r(in_c[ROWS-1][CR]),
        .din(din[NL + k/2]), .dout(dout[NL + k/2]), .sh, .sh_n
      );
    end else begin : g_loop
      assign in_c[ROWS-1][CL] = q[ROWS-1][CR].c;
      assign in_c[ROWS-1][CR] = q[ROWS-1][CL].c;
    end
  end

  // ----------------------------------------------------------- right edge
  // pair k: rows 2k+1 ("left") and 2k+2 ("right")
  for (genvar k = 0; k < ROWS / 2 - 1; k++) begin : g_edge_r
    localparam int unsigned RL = 2 * k + 1, RR = 2 * k + 2;
    if (k % 2 == 0) begin : g_pin
      localparam int unsigned P = NL + NB + (NR - 1 - k/2);
      edge_cell u_edge (
        .ao_l(q[RL][COLS-1].b), .ao_r(q[RR][COLS-1].b),
        .ai_l(in_b[RL][COLS-1]), .ai_r(in_b[RR][COLS-1]),
        .din(din[P]), .dout(dout[P]), .sh, .sh_n
      );
    end else begin : g_loop
      assign in_b[RL][COLS-1] = q[RR][COLS-1].b;
      assign in_b[RR][COLS-1] = q[RL][COLS-1].b;
    end
  end

  // ------------------------------------------------------------- top edge
  // pair k: cols 2k+1 ("left") and 2k+2 ("right")
  for (genvar k = 0; k < COLS / 2 - 1; k++) begin : g_edge_t
    localparam int unsigned CL = 2 * k + 1, CR = 2 * k + 2;
    if (k % 2 == 0) begin : g_pin
      localparam int unsigned P = NL + NB + NR + (NT - 1 - k/2);
      edge_cell u_edge (
        .ao_l(q[0][CL].a), .ao_r(q[0][CR].a),
        .ai_l(in_a[0][CL]), .ai_r(in_a[0][CR]),
        .din(din[P]), .dout(dout[P]), .sh, .sh_n
      );
    end else begin : g_loop
      assign in_a[0][CL] = q[0][CR].a;
      assign in_a[0][CR] = q[0][CL].a;
    end
  end

endmodule
