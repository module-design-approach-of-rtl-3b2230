// ihc_parity_gen: position parity generator of the improved Hamming code.
//
// Data bit data[k-1] has position number k (1..DATA_W). Output bit pos_par[i]
// is the even parity (XOR) of all data bits whose position number has bit i
// set, so for 10 data bits P[0] covers positions 1,3,5,7,9, P[1] covers
// 2,3,6,7,10, P[2] covers 4,5,6,7 and P[3] covers 8,9,10. Flipping the data bit
// at position k therefore flips exactly the parity bits that spell k in binary.
// Purely combinational; the encoder uses it to make the check bits and the
// parity checker to recompute them from a received word.
//
// The coverage sets for 10 data bits are the paper's; the general rule for
// other widths is this design's.
module ihc_parity_gen #(
  parameter int unsigned DATA_W = 10,
  localparam int unsigned RP    = ihc_pkg::pos_par_w(DATA_W)
) (
  input  logic [DATA_W-1:0] data,
  output logic [RP-1:0]     pos_par
);

  always_comb begin
    pos_par = '0;
    for (int unsigned k = 1; k <= DATA_W; k++)
      for (int unsigned i = 0; i < RP; i++)
        if (((k >> i) & 1) != 0) pos_par[i] = pos_par[i] ^ data[k-1];
  end

endmodule
