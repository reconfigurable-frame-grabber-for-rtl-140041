// rcfg_ref_pkg: reference model of the pre-processing operations, for testbenches.
//
// ref_feat works out a channel's feature from a 3x3 window with plain integer
// arithmetic, written separately from the RTL: c is the centre a5, n the selected
// neighbour, and the result saturates at 2^outw - 1.
package rcfg_ref_pkg;

  function automatic int ref_feat(input int w[9], input int op, input int nbr, input int sh,
                                  input int k[9], input int outw);
    int c, n, r, s;
    c = w[4];
    n = (nbr < 9) ? w[nbr] : w[4];
    s = 0;
    for (int i = 0; i < 9; i++) s += k[i] * w[i];
    case (op)
      0: r = c / (1 << sh);
      1: r = (c + n) / (1 << sh);
      2: r = (c - n + 255) / (1 << sh);
      3: r = ((c > n) ? c - n : n - c) / (1 << sh);
      4: r = (c / (1 << sh)) * (1 << (8 - sh)) + n / (1 << sh);
      5: r = ((s < 0) ? -s : s) / (1 << sh);
      default: r = 0;
    endcase
    if (r > (1 << outw) - 1) r = (1 << outw) - 1;
    return r;
  endfunction

endpackage
