// dadda_pkg: constants and helpers shared by the Dadda multiplier modules.
//
// Dadda reduction lowers the tallest column of the partial-product matrix
// through a fixed sequence of target heights d1 = 2, d(j+1) = floor(1.5*dj):
// 2, 3, 4, 6, 9, 13, 19, 28, ... The first target for an N x N multiplier is
// the largest member of that sequence that is below N (6 for N = 8). The
// sequence itself is the standard Dadda rule; the 8x8 targets 6, 4, 3, 2 are
// the ones the design's reduction tree uses.
package dadda_pkg;

  // Largest Dadda height that is strictly below n (n >= 3).
  function automatic int unsigned dadda_first_height(input int unsigned n);
    int unsigned d;
    d = 2;
    while ((d * 3) / 2 < n) d = (d * 3) / 2;
    return d;
  endfunction

  // Number of reduction stages needed to bring height n down to 2.
  function automatic int unsigned dadda_stages(input int unsigned n);
    int unsigned d, k;
    d = 2;
    k = 0;
    while (d < n) begin
      d = (d * 3) / 2;
      k++;
    end
    return k;
  endfunction

endpackage
