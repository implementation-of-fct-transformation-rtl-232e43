// fct_ref_pkg: reference model of the JPEG-XR Forward Core Transform used by the
// testbenches. Each sub-transform is written operation by operation in the order
// the standard's lifting sequences give (not in the regrouped, pipelined form of
// the RTL), on 64-bit signed integers, so it serves as an independent check.
// ">>>" on a signed longint is floor division by a power of two.
package fct_ref_pkg;

  typedef longint q4_t [4];
  typedef longint blk_t [16];

  localparam int unsigned RS1 [4][4] = '{'{0,3,12,15}, '{1,2,13,14}, '{4,7,8,11}, '{5,6,9,10}};
  localparam int unsigned RS2 [4][4] = '{'{0,1,4,5}, '{2,3,6,7}, '{8,12,9,13}, '{10,11,14,15}};

  function automatic q4_t ref_t2x2h(q4_t v, longint rnd);
    longint t1, t2;
    v[0] += v[3];
    v[1] -= v[2];
    t1 = (v[0] - v[1] + rnd) >>> 1;
    t2 = v[2];
    v[2] = t1 - v[3];
    v[3] = t1 - t2;
    v[0] -= v[3];
    v[1] += v[2];
    return v;
  endfunction

  function automatic q4_t ref_todd(q4_t v);
    v[1] -= v[2];
    v[0] += v[3];
    v[2] += (v[1] + 1) >>> 1;
    v[3] = ((v[0] + 1) >>> 1) - v[3];
    v[1] -= (3 * v[0] + 4) >>> 3;
    v[0] += (3 * v[1] + 4) >>> 3;
    v[3] -= (3 * v[2] + 4) >>> 3;
    v[2] += (3 * v[3] + 4) >>> 3;
    v[3] += v[1] >>> 1;
    v[2] -= (v[0] + 1) >>> 1;
    v[1] -= v[3];
    v[0] += v[2];
    return v;
  endfunction

  function automatic q4_t ref_toddodd(q4_t v);
    longint t1, t2;
    v[1] = -v[1];
    v[2] = -v[2];
    v[3] += v[0];
    v[2] -= v[1];
    t1 = v[3] >>> 1;
    v[0] -= t1;
    t2 = v[2] >>> 1;
    v[1] += t2;
    v[0] += (v[1] * 3 + 4) >>> 3;
    v[1] -= (v[0] * 3 + 3) >>> 2;
    v[0] += (v[1] * 3 + 3) >>> 3;
    v[1] -= t2;
    v[0] += t1;
    v[2] += v[1];
    v[3] -= v[0];
    return v;
  endfunction

  function automatic blk_t ref_stage1(blk_t b);
    blk_t r;
    q4_t  v;
    for (int q = 0; q < 4; q++) begin
      for (int k = 0; k < 4; k++) v[k] = b[RS1[q][k]];
      v = ref_t2x2h(v, 0);
      for (int k = 0; k < 4; k++) r[RS1[q][k]] = v[k];
    end
    return r;
  endfunction

  function automatic blk_t ref_stage2(blk_t b);
    blk_t r;
    q4_t  v;
    for (int q = 0; q < 4; q++) begin
      for (int k = 0; k < 4; k++) v[k] = b[RS2[q][k]];
      case (q)
        0:       v = ref_t2x2h(v, 1);
        1, 2:    v = ref_todd(v);
        default: v = ref_toddodd(v);
      endcase
      for (int k = 0; k < 4; k++) r[RS2[q][k]] = v[k];
    end
    return r;
  endfunction

  // Random W-bit signed value; one time in four an extreme of the range.
  function automatic longint rand_val(int unsigned w);
    longint lo, hi;
    lo = -(64'sd1 <<< (w - 1));
    hi = (64'sd1 <<< (w - 1)) - 1;
    case ($urandom_range(7))
      0:       return lo;
      1:       return hi;
      default: return lo + longint'({$urandom, $urandom} % 64'(hi - lo + 1));
    endcase
  endfunction

endpackage
