// booth_ref_pkg: reference numbers for the multiplier testbenches.
//
// ref_iterations() counts, bit by bit, the add/sub operations the original
// Booth algorithm needs for an N-bit two's complement multiplier, with or
// without the look-ahead rule (an isolated bit costs one operation and
// skips the next boundary), and adds one iteration when bit 0 is 0 (the
// first iteration then has no operation).
package booth_ref_pkg;
  function automatic int ref_iterations(longint unsigned y, int n, bit lookahead);
    int ops = 0;
    int i = 0;
    bit prev = 0;
    bit yb [0:64];
    for (int j = 0; j <= n; j++) yb[j] = (j < n) ? y[j] : y[n-1];
    while (i < n) begin
      if (yb[i] != prev) begin
        ops++;
        if (lookahead && yb[i+1] != yb[i]) i += 2;
        else begin prev = yb[i]; i += 1; end
      end else i += 1;
    end
    return ops + ((yb[0] == 0) ? 1 : 0);
  endfunction
endpackage
