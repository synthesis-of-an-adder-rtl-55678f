// awc_pair_tree -- multi-operand XOR (or XNOR) reduction by the pairing algorithm.
//
// Neighbouring terms are combined in pairs, then the pair results in pairs again, and
// so on: N terms take ceil(log2 N) levels of two-input gates, the "pyramid" that gives
// the adder its logarithmic depth (for N = 8: e1+e2, e3+e4, ... then four-term sums,
// then the eight-term sum). With an odd count at some level, the last term passes to
// the next level without a gate.
//
// Interface: terms[N-1:0] in, y out. Purely combinational.
// INVERT = 0 uses XOR gates ("=1"); INVERT = 1 uses XNOR gates ("=0", the XAND
// operation). An XNOR tree of complemented terms returns the complement of the XOR of
// the true terms, which is how the OR/XAND digit works.
module awc_pair_tree #(
  parameter int unsigned N      = 4,
  parameter bit          INVERT = 1'b0
) (
  input  logic [N-1:0] terms,
  output logic         y
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;

  // Number of values present at a level.
  function automatic int unsigned count_at(int unsigned level);
    int unsigned c;
    c = N;
    for (int unsigned k = 0; k < level; k++) c = (c + 1) / 2;
    return c;
  endfunction

  // lvl[k] holds the count_at(k) values of level k in its low bits.
  logic [N-1:0] lvl [LEVELS+1];

  assign lvl[0] = terms;

  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    localparam int unsigned CIN  = count_at(k);
    localparam int unsigned COUT = count_at(k + 1);
    for (genvar m = 0; m < COUT; m++) begin : g_pair
      if (2*m + 1 < CIN) begin : g_gate
        assign lvl[k+1][m] = INVERT ? ~(lvl[k][2*m] ^ lvl[k][2*m+1])
                                    :  (lvl[k][2*m] ^ lvl[k][2*m+1]);
      end else begin : g_pass
        assign lvl[k+1][m] = lvl[k][2*m];
      end
    end
    if (COUT < N) begin : g_fill
      assign lvl[k+1][N-1:COUT] = '0;
    end
  end

  assign y = lvl[LEVELS][0];

endmodule
