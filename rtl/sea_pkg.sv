// sea_pkg: types and constants shared by the SEA(n,b) loop core.
//
// key_op_t tells the key round what to do in a cycle: keep the key, run
// one key round FK, run FK and then exchange the two key halves, or only
// exchange them. The exchange ("switch") is part of the SEA key schedule,
// which swaps KL and KR once in the middle of a block and once at its end.
//
// default_nr() derives the number of rounds from n and b with the rule of
// the SEA specification, 3n/4 + 2(nb + floor(b/2)) with nb = n/(2b), and
// raises the result to the next odd number because the cipher needs an odd
// round count. Rounding up to odd is this design's choice.
package sea_pkg;

  typedef enum logic [1:0] {
    KEY_HOLD    = 2'd0,
    KEY_FK      = 2'd1,
    KEY_FK_SWAP = 2'd2,
    KEY_SWAP    = 2'd3
  } key_op_t;

  function automatic int default_nr(int n, int b);
    int nb;
    int nr;
    nb = n / (2 * b);
    nr = (3 * n) / 4 + 2 * (nb + b / 2);
    if (nr % 2 == 0) nr = nr + 1;
    return nr;
  endfunction

endpackage
