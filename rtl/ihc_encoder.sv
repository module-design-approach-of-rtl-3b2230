// ihc_encoder: improved Hamming code encoder with a registered output.
//
// The data word is kept unchanged in the low DATA_W bits of the code word and
// the check bits are appended above it, so the sender never has to intersperse
// them and the receiver never has to pick them out:
//   enc_out = { [P_all], P_grp, P[RP-1:0], data }
// P[RP-1:0] are the position parities (see ihc_parity_gen), P_grp makes the
// position parities even, and P_all (only when EXTENDED) makes the whole word
// even. With the defaults (10 data bits, extended) the word is 16 bits:
// P[3:0] in bits 13:10, P_grp (P[4]) in bit 14 and P_all (P[5]) in bit 15;
// data 10'b1100110011 gives 16'b0000111100110011.
// With DATA_W = 7 and no overall parity the word is the 11-bit word of the
// link in ihc_system.
//
// Timing: when den is high at a rising clock edge the code word of enc_in is
// registered and enc_valid is high for the next cycle; enc_out holds its value
// otherwise. rst is synchronous and active high.
//
// The bit layout and parity equations follow the paper's 10-bit worked
// example; the register stage and the den/enc_valid handshake are this
// design's own.
module ihc_encoder #(
  parameter int unsigned DATA_W   = 10,
  parameter bit          EXTENDED = 1'b1,
  localparam int unsigned RP      = ihc_pkg::pos_par_w(DATA_W),
  localparam int unsigned CW_W    = ihc_pkg::ihc_cw_w(DATA_W, EXTENDED)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              den,
  input  logic [DATA_W-1:0] enc_in,
  output logic [CW_W-1:0]   enc_out,
  output logic              enc_valid
);

  logic [RP-1:0]   pos_par;
  logic            grp_par;
  logic [CW_W-1:0] cw;

  ihc_parity_gen #(.DATA_W(DATA_W)) u_parity_gen (
    .data    (enc_in),
    .pos_par (pos_par)
  );

  assign grp_par = ^pos_par;

  always_comb begin
    cw = '0;
    cw[DATA_W-1:0]         = enc_in;
    cw[DATA_W +: RP]       = pos_par;
    cw[DATA_W + RP]        = grp_par;
    if (EXTENDED)
      cw[CW_W-1] = ^cw[DATA_W + RP:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      enc_out   <= '0;
      enc_valid <= 1'b0;
    end else begin
      enc_valid <= den;
      if (den) enc_out <= cw;
    end
  end

endmodule
