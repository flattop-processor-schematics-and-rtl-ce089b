// tb_flattop_array: end-to-end test of a full 20 x 20 FlatTop array at its
// default parameters.
//
// The testbench keeps its own cycle-level model of the array: one 4-bit
// block output per PE, a table of how every boundary input is fed (loops,
// edge-cell pins, the shift-register input and the corner links, built here
// side by side rather than from the RTL), the billiard-ball rule from
// bbm_ref_pkg, and the one-cycle buffers on shift, shift_data_in and
// shift_data_out. It runs:
//   1. shift mode, loading 4*20*20 random bits;
//   2. shift mode for another 4*20*20+2 cycles, checking that each bit comes
//      out of shift_data_out exactly 4*ROWS*COLS+1 cycles n_after it went in
//      (one chain through every PE output);
//   3. normal mode for 200 generations with random bits on the pins,
//      checking each cycle that the number of balls is conserved apart from
//      what the pins and the shift port carry in and out;
//   4. shift mode again, reading the array out.
// Every cycle the whole array state, dout and shift_data_out are compared
// with the model. The test counts how often each mechanism happened (ball
// moves, collisions, static blocks, balls leaving and entering through the
// pins, balls crossing edge loops and the corner link, mode switches) and
// counts a failure for any that never did.
module tb_flattop_array;
  import flattop_pkg::*;
  import bbm_ref_pkg::*;

  localparam int R  = 20;
  localparam int C  = 20;
  localparam int N  = 4 * R * C;
  localparam int NP = 20;

  logic clk = 0, rst_n = 0;
  logic shift = 0, shift_data_in = 0, shift_data_out;
  logic [NP-1:0] din = '0, dout;
  logic cycle_end, shift_out, shift_out_n;

  flattop_array dut (
    .clk, .rst_n, .shift, .shift_data_in, .shift_data_out,
    .din, .dout, .cycle_end, .shift_out, .shift_out_n
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  initial begin : watchdog
    repeat (3 * (4 * N + 1000)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- the model
  typedef enum int {SRC_PE, SRC_PIN, SRC_SDI} src_e;
  typedef struct {
    src_e kind;
    int   r, c, dir;   // PE output feeding it (for SRC_PIN: in shift mode)
    int   pin;
    bit   loop;        // a plain edge loop or corner link
    bit   set;
  } link_t;

  bit [3:0] m [R][C];
  bit       m_sh, m_sdi, m_sdo;
  link_t    bnd [R][C][4];   // boundary inputs: [row][col][dir a,b,c,d]
  int       pin_r [NP], pin_c [NP], pin_dir [NP];

  // mechanism counters
  int n_move, n_collide, n_static, n_pin_out, n_pin_in, n_loop, n_corner;
  int n_to_normal, n_to_shift, n_shift_cycles;

  function automatic int bitpos(int dir);  // a is bit 3, d is bit 0
    return 3 - dir;
  endfunction

  function automatic void link(int r, int c, int dir, src_e kind, int sr, int sc, int pin, bit lp);
    if (bnd[r][c][dir].set) $fatal(1, "boundary input %0d,%0d,%0d set twice", r, c, dir);
    bnd[r][c][dir] = '{kind: kind, r: sr, c: sc, dir: dir, pin: pin, loop: lp, set: 1'b1};
  endfunction

  // A pair of boundary PEs on one side, either looped or joined by an edge
  // cell. "lft" is the PE whose bit leaves on the pin, "rgt" the one that
  // takes the pin's bit.
  function automatic void pair(int dir, int lr, int lc, int rr, int rc, bit with_pin, ref int p);
    if (with_pin) begin
      link(lr, lc, dir, SRC_PE, rr, rc, -1, 1'b0);
      link(rr, rc, dir, SRC_PIN, lr, lc, p, 1'b0);
      pin_r[p] = lr; pin_c[p] = lc; pin_dir[p] = dir;
      p++;
    end else begin
      link(lr, lc, dir, SRC_PE, rr, rc, -1, 1'b1);
      link(rr, rc, dir, SRC_PE, lr, lc, -1, 1'b1);
    end
  endfunction

  function automatic void build_boundary();
    int p = 0;
    // left side, top to bottom: rows (0,1),(2,3),...; pins on every other pair
    for (int k = 0; k < R / 2; k++) pair(3, 2*k+1, 0, 2*k, 0, k % 2 == 0, p);
    // bottom side, left to right: cols (0,1),(2,3),...
    for (int k = 0; k < C / 2; k++) pair(2, R-1, 2*k+1, R-1, 2*k, k % 2 == 0, p);
    // right side, bottom to top: rows (1,2),(3,4),...
    for (int k = R / 2 - 2; k >= 0; k--) pair(1, 2*k+1, C-1, 2*k+2, C-1, k % 2 == 0, p);
    // top side, right to left: cols (1,2),(3,4),...
    for (int k = C / 2 - 2; k >= 0; k--) pair(0, 0, 2*k+1, 0, 2*k+2, k % 2 == 0, p);
    // corners
    link(0, 0, 0, SRC_SDI, 0, 0, -1, 1'b0);
    link(0, C-1, 0, SRC_PE, 0, C-1, -1, 1'b1);  // top  <- own right output
    bnd[0][C-1][0].dir = 1;
    link(0, C-1, 1, SRC_PE, 0, C-1, -1, 1'b1);  // right <- own top output
    bnd[0][C-1][1].dir = 0;
    link(R-1, C-1, 1, SRC_PE, R-1, C-1, -1, 1'b1);
    if (p != NP) $fatal(1, "pin count %0d", p);
  endfunction

  function automatic bit pe_out(int r, int c, int dir);
    return m[r][c][bitpos(dir)];
  endfunction

  function automatic bit input_of(int r, int c, int dir, bit [NP-1:0] dv);
    int nr = r, nc = c;
    case (dir)
      0: nr = r - 1;
      1: nc = c + 1;
      2: nr = r + 1;
      default: nc = c - 1;
    endcase
    if (nr >= 0 && nr < R && nc >= 0 && nc < C) return pe_out(nr, nc, (dir + 2) % 4);
    case (bnd[r][c][dir].kind)
      SRC_SDI: return m_sdi;
      SRC_PIN: return m_sh ? pe_out(bnd[r][c][dir].r, bnd[r][c][dir].c, bnd[r][c][dir].dir)
                           : dv[bnd[r][c][dir].pin];
      default: return pe_out(bnd[r][c][dir].r, bnd[r][c][dir].c, bnd[r][c][dir].dir);
    endcase
  endfunction

  function automatic void model_cycle(bit sh_v, bit sdi_v, bit [NP-1:0] dv);
    bit [3:0] nm [R][C];
    bit [3:0] blk;
    kind_e kind;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        for (int dir = 0; dir < 4; dir++) begin
          blk[bitpos(dir)] = input_of(r, c, dir, dv);
          if (!m_sh && bnd[r][c][dir].set && bnd[r][c][dir].loop && blk[bitpos(dir)]) begin
            if (r == 0 && c == C - 1 && dir < 2) n_corner++;
            else n_loop++;
          end
          if (!m_sh && bnd[r][c][dir].set && bnd[r][c][dir].kind == SRC_PIN && blk[bitpos(dir)])
            n_pin_in++;
        end
        if (!m_sh) begin
          kind = kind_of(blk);
          if (kind == K_MOVE)         n_move++;
          else if (kind == K_COLLIDE) n_collide++;
          else if (kind == K_STATIC)  n_static++;
        end
        nm[r][c] = pe_ref(blk, m_sh);
      end
    if (m_sh) n_shift_cycles++;
    if (m_sh && !sh_v) n_to_normal++;
    if (!m_sh && sh_v) n_to_shift++;
    m_sdo = pe_out(0, 0, 0);
    m = nm;
    m_sh = sh_v;
    m_sdi = sdi_v;
  endfunction

  function automatic bit [NP-1:0] model_dout();
    bit [NP-1:0] v;
    for (int p = 0; p < NP; p++) v[p] = pe_out(pin_r[p], pin_c[p], pin_dir[p]);
    return v;
  endfunction

  // --------------------------------------------------------- DUT helpers
  function automatic int dut_balls();
    int n = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) n += $countones(dut.q[r][c]);
    return n;
  endfunction

  function automatic bit state_matches();
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        if (dut.q[r][c] !== quad_t'(m[r][c])) begin
          $display("cycle %0d: PE(%0d,%0d) q=%b model %b", cyc, r, c, dut.q[r][c], m[r][c]);
          return 1'b0;
        end
    return 1'b1;
  endfunction

  // One FlatTop cycle: inputs are held from n_before phase 1 to n_after phase 3.
  task automatic run_cycle(input bit sh_v, input bit sdi_v, input bit [NP-1:0] dv);
    shift = sh_v; shift_data_in = sdi_v; din = dv;
    model_cycle(sh_v, sdi_v, dv);
    checks++;
    if (dut.en !== 3'b001) begin failures++; $display("cycle %0d: not at phase 1", cyc); end
    repeat (3) @(posedge clk);
    #1;
    cyc++;
    checks++;
    if (!state_matches()) failures++;
    checks++;
    if (dout !== model_dout() || shift_data_out !== m_sdo || cycle_end !== 1'b0) begin
      failures++;
      $display("cycle %0d: dout=%h model %h, sdo=%b model %b", cyc, dout, model_dout(), shift_data_out, m_sdo);
    end
    if (!m_sh) n_pin_out += $countones(dout);
  endtask

  function automatic bit sparse_bit();
    return ($urandom % 4) == 0;
  endfunction

  function automatic bit [NP-1:0] sparse_pins();
    bit [NP-1:0] v;
    for (int p = 0; p < NP; p++) v[p] = sparse_bit();
    return v;
  endfunction

  bit fed [$];

  initial begin
    int n_before, n_after, lost, gained;
    bit [NP-1:0] dv;
    build_boundary();
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) m[r][c] = '0;
    m_sh = 0; m_sdi = 0; m_sdo = 0;

    checks++;
    if ($bits(dout) != NP) begin failures++; $display("dout has %0d pins", $bits(dout)); end

    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (!state_matches() || dout !== '0) begin failures++; $display("state not clear n_after reset"); end

    // 1 + 2: shift a random stream through the whole chain
    for (int i = 0; i < 2 * N + 2; i++) begin
      bit b;
      b = sparse_bit();
      fed.push_back(b);
      run_cycle(1'b1, b, '0);
      // bit fed in cycle j is seen n_after cycle j + N + 1
      if (i >= N + 1) begin
        checks++;
        if (shift_data_out !== fed[i - N - 1]) begin
          failures++;
          $display("chain: cycle %0d shift_data_out=%b, fed %0d cycles ago=%b", i, shift_data_out, N + 1, fed[i - N - 1]);
        end
      end
    end
    checks++;
    if (shift_out !== 1'b1 || shift_out_n !== 1'b0) begin failures++; $display("shift_out wrong in shift mode"); end

    // 3: normal mode
    for (int g = 0; g < 200; g++) begin
      n_before = dut_balls();
      lost   = $countones(dout) + 32'(dut.q[0][0].a);
      gained = 32'(dut.sdi) + 0;
      dv = sparse_pins();
      run_cycle(1'b0, 1'b0, dv);
      // the first cycle n_after the switch is still a shift cycle
      if (g > 0) begin
        gained += $countones(dv);
        n_after = dut_balls();
        checks++;
        if (n_after != n_before - lost + gained) begin
          failures++;
          $display("generation %0d: %0d balls, expected %0d", g, n_after, n_before - lost + gained);
        end
      end
    end
    checks++;
    if (shift_out !== 1'b0 || shift_out_n !== 1'b1) begin failures++; $display("shift_out wrong in normal mode"); end

    // 4: read out
    for (int i = 0; i < N + 2; i++) run_cycle(1'b1, 1'b0, '0);

    $display("mechanisms: moves=%0d collisions=%0d static=%0d pin_out=%0d pin_in=%0d loop=%0d corner=%0d to_normal=%0d to_shift=%0d shift_cycles=%0d",
             n_move, n_collide, n_static, n_pin_out, n_pin_in, n_loop, n_corner, n_to_normal, n_to_shift, n_shift_cycles);
    checks++;
    if (n_move == 0 || n_collide == 0 || n_static == 0 || n_pin_out == 0 || n_pin_in == 0 ||
        n_loop == 0 || n_corner == 0 || n_to_normal == 0 || n_to_shift == 0 || n_shift_cycles == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
