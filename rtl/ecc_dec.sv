// ecc_dec: classic Hamming decoder with an overall parity bit (SEC-DED).
//
// Input d_i is a word laid out as ecc_enc's q_o: bit 0 the overall parity,
// bits 1..CW_W the code word positions. Stage 1 computes the syndrome (the
// XOR of the position numbers of all set bits, zero for a valid word) and the
// overall parity, and registers them with the word while clkena_i is high.
// From those registers:
//   sb_err_o  overall parity odd: one bit flipped (or an odd number)
//   db_err_o  uncorrectable: parity even with a non-zero syndrome (two bits
//             flipped), or a syndrome that points past the code word
//   sb_fix_o  a code word bit was inverted (single error, syndrome 1..CW_W);
//             a flip of the overall parity bit alone gives sb_err_o only
//   q_o       the data bits of the corrected word
//   syndrome_o {syndrome, overall parity}; all zero for an error-free word
// Timing: one cycle from d_i to the outputs (registered when clkena_i is high
// at a rising edge of clk_i). rst_ni is asynchronous and active low.
//
// Port names, register names and the example values follow the decoder
// waveform printed in the paper; the register timing, the flag definitions
// and the syndrome_o bit order are this design's own. The paper's waveform
// shows the overall parity bit inverted in the corrected word of a clean
// input; here a clean word is left as it is (the data output is the same).
module ecc_dec #(
  parameter int unsigned DATA_W = 8,
  localparam int unsigned PAR_W = ihc_pkg::hc_par_w(DATA_W),
  localparam int unsigned CW_W  = DATA_W + PAR_W
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              clkena_i,
  input  logic [CW_W:0]     d_i,
  output logic [DATA_W-1:0] q_o,
  output logic [PAR_W:0]    syndrome_o,
  output logic              sb_err_o,
  output logic              db_err_o,
  output logic              sb_fix_o
);

  logic [PAR_W-1:0] syndrome;
  logic             parity;
  logic [CW_W:0]    d_reg;
  logic [PAR_W-1:0] syndrome_reg;
  logic             parity_reg;
  logic [CW_W:0]    cw_fixed;
  logic [DATA_W-1:0] q;
  logic             sb_err;
  logic             db_err;
  logic             sb_fix;

  always_comb begin
    syndrome = '0;
    for (int unsigned pos = 1; pos <= CW_W; pos++)
      if (d_i[pos]) syndrome = syndrome ^ PAR_W'(pos);
  end

  assign parity = ^d_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      d_reg        <= '0;
      syndrome_reg <= '0;
      parity_reg   <= 1'b0;
    end else if (clkena_i) begin
      d_reg        <= d_i;
      syndrome_reg <= syndrome;
      parity_reg   <= parity;
    end
  end

  assign sb_err = parity_reg;
  assign sb_fix = parity_reg && syndrome_reg != '0 && 32'(syndrome_reg) <= CW_W;
  assign db_err = (!parity_reg && syndrome_reg != '0) ||
                  (parity_reg && 32'(syndrome_reg) > CW_W);

  always_comb begin
    cw_fixed = d_reg;
    if (sb_fix)
      for (int unsigned pos = 1; pos <= CW_W; pos++)
        if (32'(syndrome_reg) == pos) cw_fixed[pos] = ~d_reg[pos];
  end

  always_comb begin
    int unsigned n;
    q = '0;
    n = 0;
    for (int unsigned pos = 1; pos <= CW_W; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        q[n] = cw_fixed[pos];
        n++;
      end
    end
  end

  assign q_o        = q;
  assign syndrome_o = {syndrome_reg, parity_reg};
  assign sb_err_o   = sb_err;
  assign db_err_o   = db_err;
  assign sb_fix_o   = sb_fix;

endmodule
