// ecc_enc: classic Hamming encoder with an overall parity bit (SEC-DED).
//
// The D data bits are spread over the non-power-of-two positions 3,5,6,7,9,...
// of a code word numbered from 1 (d_i[0] at position 3, d_i[1] at 5, and so
// on); check bit p_o[j] sits at position 2^j and makes even the parity of all
// positions with bit j set. The number of check bits r is the smallest with
// 2^r >= D + r + 1, so 8 data bits give r = 4 and a 12-bit word cw. The output
// q_o = {cw, p0_o} appends the overall parity p0_o, which makes all 13 bits
// even; bit n of q_o is thus code word position n. Example: d_i = 8'b10000010
// gives p_o = 4'b1001, p0_o = 0, q_o = 13'b1000100100010.
// Purely combinational.
//
// Port names, signal names and the example values follow the encoder
// waveform printed in the paper; the generic loops are this design's own.
module ecc_enc #(
  parameter int unsigned DATA_W = 8,
  localparam int unsigned PAR_W = ihc_pkg::hc_par_w(DATA_W),
  localparam int unsigned CW_W  = DATA_W + PAR_W
) (
  input  logic [DATA_W-1:0] d_i,
  output logic [CW_W:0]     q_o,
  output logic [PAR_W-1:0]  p_o,
  output logic              p0_o
);

  logic [CW_W:1] cw_w_dbits;   // data bits in place, check bits zero
  logic [CW_W:1] cw;           // complete code word, positions 1..CW_W

  always_comb begin
    int unsigned n;
    cw_w_dbits = '0;
    n = 0;
    for (int unsigned pos = 1; pos <= CW_W; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        cw_w_dbits[pos] = d_i[n];
        n++;
      end
    end
  end

  always_comb begin
    p_o = '0;
    for (int unsigned j = 0; j < PAR_W; j++)
      for (int unsigned pos = 1; pos <= CW_W; pos++)
        if (((pos >> j) & 1) != 0) p_o[j] = p_o[j] ^ cw_w_dbits[pos];
  end

  always_comb begin
    cw = cw_w_dbits;
    for (int unsigned j = 0; j < PAR_W; j++)
      cw[1 << j] = p_o[j];
  end

  assign p0_o = ^cw;
  assign q_o  = {cw, p0_o};

endmodule
