// lp_bist_pkg -- shared constants and elaboration-time helpers of the
// low-power logic BIST engine.
//
// * prim_poly_taps(w): feedback mask of a primitive polynomial of degree w
//   (4..32), bit t-1 set for every tap t of the polynomial.  The PRPG and the
//   MISR use it.  Polynomials come from the well-known maximal-length LFSR tap
//   table; the design itself does not prescribe any polynomial.
// * ps_tap(j, k, n): index of the k-th (k = 0..2) hold latch XORed into
//   phase-shifter output j when there are n latches.  Output j uses latches
//   j, j + n/3 and j + 2n/3 + 1 (mod n), three different latches for n >= 6.
//   Three inputs per output follow the design; the tap offsets are a choice.
// * weight_tap(k, off, n): PRPG stage feeding input k of a weighted-logic
//   block: stages off, off + n/4, off + n/2, off + 3n/4, so that the AND terms
//   of one cycle share no source bit with those of the next cycle.
package lp_bist_pkg;

  // Width of the switching, hold and toggle codes (four AND gates).
  localparam int unsigned CODE_W = 4;

  typedef logic [CODE_W-1:0] code_t;

  // Low-power programming: switching code, hold code, toggle code.
  typedef struct packed {
    code_t switching;
    code_t hold;
    code_t toggle;
  } lp_cfg_t;

  function automatic logic [31:0] prim_poly_taps(input int unsigned w);
    logic [31:0] m;
    m = '0;
    case (w)
      4:  m = (32'd1 << 3)  | (32'd1 << 2);
      5:  m = (32'd1 << 4)  | (32'd1 << 2);
      6:  m = (32'd1 << 5)  | (32'd1 << 4);
      7:  m = (32'd1 << 6)  | (32'd1 << 5);
      8:  m = (32'd1 << 7)  | (32'd1 << 5) | (32'd1 << 4) | (32'd1 << 3);
      9:  m = (32'd1 << 8)  | (32'd1 << 4);
      10: m = (32'd1 << 9)  | (32'd1 << 6);
      11: m = (32'd1 << 10) | (32'd1 << 8);
      12: m = (32'd1 << 11) | (32'd1 << 5) | (32'd1 << 3) | (32'd1 << 0);
      13: m = (32'd1 << 12) | (32'd1 << 3) | (32'd1 << 2) | (32'd1 << 0);
      14: m = (32'd1 << 13) | (32'd1 << 4) | (32'd1 << 2) | (32'd1 << 0);
      15: m = (32'd1 << 14) | (32'd1 << 13);
      16: m = (32'd1 << 15) | (32'd1 << 14) | (32'd1 << 12) | (32'd1 << 3);
      17: m = (32'd1 << 16) | (32'd1 << 13);
      18: m = (32'd1 << 17) | (32'd1 << 10);
      19: m = (32'd1 << 18) | (32'd1 << 5) | (32'd1 << 1) | (32'd1 << 0);
      20: m = (32'd1 << 19) | (32'd1 << 16);
      21: m = (32'd1 << 20) | (32'd1 << 18);
      22: m = (32'd1 << 21) | (32'd1 << 20);
      23: m = (32'd1 << 22) | (32'd1 << 17);
      24: m = (32'd1 << 23) | (32'd1 << 22) | (32'd1 << 21) | (32'd1 << 16);
      25: m = (32'd1 << 24) | (32'd1 << 21);
      26: m = (32'd1 << 25) | (32'd1 << 5) | (32'd1 << 1) | (32'd1 << 0);
      27: m = (32'd1 << 26) | (32'd1 << 4) | (32'd1 << 1) | (32'd1 << 0);
      28: m = (32'd1 << 27) | (32'd1 << 24);
      29: m = (32'd1 << 28) | (32'd1 << 26);
      30: m = (32'd1 << 29) | (32'd1 << 5) | (32'd1 << 3) | (32'd1 << 0);
      31: m = (32'd1 << 30) | (32'd1 << 27);
      32: m = (32'd1 << 31) | (32'd1 << 21) | (32'd1 << 1) | (32'd1 << 0);
      default: m = '0;
    endcase
    return m;
  endfunction

  function automatic int unsigned ps_tap(input int unsigned j, input int unsigned k,
                                         input int unsigned n);
    case (k)
      0:       return j % n;
      1:       return (j + n / 3) % n;
      default: return (j + (2 * n) / 3 + 1) % n;
    endcase
  endfunction

  function automatic int unsigned weight_tap(input int unsigned k, input int unsigned off,
                                             input int unsigned n);
    return (off + k * (n / 4)) % n;
  endfunction

endpackage
