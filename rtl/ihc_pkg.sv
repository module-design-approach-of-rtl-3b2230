// ihc_pkg: sizes shared by the Hamming code blocks.
//
// Two code families are built here.
//  * Improved Hamming code: the data word is sent unchanged in the low bits and
//    all check bits are appended above it. Data bit d[k-1] is given the position
//    number k (1..DATA_W); position parity P[i] is the even parity of every data
//    bit whose position number has bit i set. One more bit, the group parity,
//    makes the position parity bits even on their own, and an optional overall
//    parity bit makes the whole code word even (this adds double error detection).
//  * Classic Hamming code with an overall parity bit: check bits sit at the
//    power-of-two positions of the code word; their number r is the smallest with
//    2^r >= D + r + 1.
//
// The improved-code layout and the check bit count formula follow the source
// paper; the position-parity count for widths other than its examples is
// this design's generalisation.
package ihc_pkg;

  // Number of position parity bits of the improved code: enough to number
  // data positions 1..data_w.
  function automatic int unsigned pos_par_w(int unsigned data_w);
    return $clog2(data_w + 1);
  endfunction

  // Code word width of the improved code: data, position parities, group parity
  // and, when extended, the overall parity bit.
  function automatic int unsigned ihc_cw_w(int unsigned data_w, bit extended);
    return data_w + pos_par_w(data_w) + 1 + (extended ? 1 : 0);
  endfunction

  // Number of check bits of the classic Hamming code: smallest r with
  // 2^r >= D + r + 1.
  function automatic int unsigned hc_par_w(int unsigned data_w);
    for (int unsigned r = 1; r < 31; r++)
      if ((1 << r) >= data_w + r + 1) return r;
    return 31;
  endfunction

endpackage
