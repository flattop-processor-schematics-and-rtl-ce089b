// bbm_ref_pkg: reference model of the billiard-ball block rule for the
// testbenches, written from the rule's description rather than from the
// gate equations. A block is 4 bits {A,B,C,D}; A is opposite C and B is
// opposite D.
//   - exactly one ball:          it moves to the opposite cell;
//   - two balls on one diagonal: they turn to the other diagonal;
//   - anything else:             the block is unchanged.
// In shift mode every cell's content moves to the opposite cell.
package bbm_ref_pkg;

  function automatic bit [3:0] swap_opposite(bit [3:0] blk);
    return {blk[1], blk[0], blk[3], blk[2]};
  endfunction

  function automatic bit [3:0] bbm_rule(bit [3:0] blk);
    case (blk)
      4'b1000, 4'b0100, 4'b0010, 4'b0001: return swap_opposite(blk);
      4'b1010: return 4'b0101;
      4'b0101: return 4'b1010;
      default: return blk;
    endcase
  endfunction

  function automatic bit [3:0] pe_ref(bit [3:0] blk, bit sh);
    return sh ? swap_opposite(blk) : bbm_rule(blk);
  endfunction

  // Classification used to count which mechanisms a test exercised.
  typedef enum int {K_EMPTY, K_MOVE, K_COLLIDE, K_STATIC} kind_e;

  function automatic kind_e kind_of(bit [3:0] blk);
    if (blk == 4'b0000) return K_EMPTY;
    if ($countones(blk) == 1) return K_MOVE;
    if (blk == 4'b1010 || blk == 4'b0101) return K_COLLIDE;
    return K_STATIC;
  endfunction

endpackage
