// ehw_ref_pkg: reference model of the image operator, used by the
// testbenches to work out expected pixels independently of the RTL.
//
// ref_func evaluates one function code with integer arithmetic.
// ref_vrc evaluates the whole array for one 3x3 neighbourhood: stage 0 is the
// nine pixels, stage c (c = 1..cols) has `rows` values, and the output PE is
// the last stage. A PE at stage c picks operand number s from the list
// (stage c-1 values, then stage c-2 values) at position s mod (list length).
// rand_cfg draws a configuration; it can be asked to use every function code.
package ehw_ref_pkg;
  import ehw_pkg::*;

  function automatic int ref_func(int x, int y, int f);
    case (f)
      0:  return x / 2;
      1:  return x / 4;
      2:  return 255 - x;
      3:  return x & y;
      4:  return x | y;
      5:  return x ^ y;
      6:  return (x + y) % 256;
      7:  return (x + y) / 2;
      8:  return (x + y + 1) / 2;
      9:  return x % 16;
      10: return x - (x % 16);
      11: return (x - (x % 16)) + 15;
      12: return 240 + (x % 16);
      13: return (x % 16) + (y - (y % 16));
      14: return (x % 16) + (y - (y % 16));
      15: return 0;
      default: return -1;
    endcase
  endfunction

  // win: nine pixels, row-major. cfg: triplets, PE (c,r) at c*rows + r.
  function automatic int ref_vrc(int win[9], triplet_t cfg[], int rows, int cols);
    int st[32][16];   // st[stage][i]
    int n[32];        // number of values in each stage
    int cand[32];
    int nc;
    for (int i = 0; i < 9; i++) st[0][i] = win[i];
    n[0] = 9;
    for (int c = 1; c <= cols + 1; c++) begin
      nc = 0;
      for (int i = 0; i < n[c-1]; i++) cand[nc++] = st[c-1][i];
      if (c >= 2) for (int i = 0; i < n[c-2]; i++) cand[nc++] = st[c-2][i];
      n[c] = (c == cols + 1) ? 1 : rows;
      for (int r = 0; r < n[c]; r++) begin
        triplet_t t;
        int x, y;
        t = cfg[(c-1)*rows + r];
        x = cand[int'(t.cfg1) % nc];
        y = cand[int'(t.cfg2) % nc];
        st[c][r] = ref_func(x, y, int'(t.cfg3));
      end
    end
    return st[cols+1][0];
  endfunction

  function automatic void rand_cfg(ref triplet_t cfg[], input int npe, input bit all_funcs);
    cfg = new[npe];
    foreach (cfg[i]) begin
      cfg[i].cfg1 = 4'($urandom_range(0, 15));
      cfg[i].cfg2 = 4'($urandom_range(0, 15));
      cfg[i].cfg3 = func_e'(all_funcs ? (i % 16) : $urandom_range(0, 15));
    end
  endfunction

endpackage
