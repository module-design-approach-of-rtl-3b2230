// hamming_top: the Hamming code designs side by side.
//
//  * sys_*  : the five-stage improved Hamming code link (ihc_system): a 56-bit
//             message is sent as eight 7-bit words in 11-bit code words through
//             a noise box that flips one random bit per word, and is rebuilt
//             corrected at the receiver.
//  * c16_*  : the 16-bit improved Hamming code of the 10-bit worked example
//             (ihc_encoder -> channel -> ihc_decoder). The channel inverts the
//             code word bits set in c16_err_mask, so single and double errors
//             can be applied at will. Encoder and decoder each take one cycle.
//  * e13_*  : the (13,8) classic Hamming SEC-DED pair (ecc_enc -> channel ->
//             ecc_dec); the channel inverts the bits set in e13_err_mask. The
//             encoder is combinational, the decoder takes one cycle.
// clk and rst (synchronous, active high) serve all three; ecc_dec gets the
// inverted rst as its asynchronous active-low reset.
//
// The three codes appear separately in the paper; the error-mask channels
// of the two codec pairs are this design's own test access.
module hamming_top (
  input  logic        clk,
  input  logic        rst,
  // five-stage link
  input  logic        sys_send,
  input  logic [55:0] sys_datain,
  input  logic        sys_noise_en,
  output logic [55:0] sys_dataout,
  output logic        sys_receive,
  output logic        sys_busy,
  output logic        sys_word_valid,
  output logic [3:0]  sys_word_status,
  output logic        sys_word_corrected,
  output logic        sys_word_uncorrectable,
  // 16-bit improved code
  input  logic        c16_valid,
  input  logic [9:0]  c16_data,
  input  logic [15:0] c16_err_mask,
  output logic [15:0] c16_codeword,
  output logic        c16_valid_out,
  output logic [9:0]  c16_data_out,
  output logic [5:0]  c16_status,
  output logic        c16_corrected,
  output logic        c16_uncorrectable,
  // (13,8) classic code
  input  logic        e13_clkena,
  input  logic [7:0]  e13_data,
  input  logic [12:0] e13_err_mask,
  output logic [12:0] e13_codeword,
  output logic [7:0]  e13_q,
  output logic [4:0]  e13_syndrome,
  output logic        e13_sb_err,
  output logic        e13_db_err,
  output logic        e13_sb_fix
);

  ihc_system u_system (
    .clk                (clk),
    .rst                (rst),
    .send               (sys_send),
    .datain             (sys_datain),
    .noise_en           (sys_noise_en),
    .dataout            (sys_dataout),
    .receive            (sys_receive),
    .busy               (sys_busy),
    .word_valid         (sys_word_valid),
    .word_status        (sys_word_status),
    .word_corrected     (sys_word_corrected),
    .word_uncorrectable (sys_word_uncorrectable)
  );

  logic c16_enc_valid;

  ihc_encoder u_c16_encoder (
    .clk       (clk),
    .rst       (rst),
    .den       (c16_valid),
    .enc_in    (c16_data),
    .enc_out   (c16_codeword),
    .enc_valid (c16_enc_valid)
  );

  ihc_decoder u_c16_decoder (
    .clk           (clk),
    .rst           (rst),
    .dec_in_valid  (c16_enc_valid),
    .dec_in        (c16_codeword ^ c16_err_mask),
    .dec_out       (c16_data_out),
    .dec_valid     (c16_valid_out),
    .status        (c16_status),
    .corrected     (c16_corrected),
    .uncorrectable (c16_uncorrectable)
  );

  logic [3:0] e13_p;
  logic       e13_p0;

  ecc_enc u_e13_enc (
    .d_i  (e13_data),
    .q_o  (e13_codeword),
    .p_o  (e13_p),
    .p0_o (e13_p0)
  );

  ecc_dec u_e13_dec (
    .clk_i      (clk),
    .rst_ni     (!rst),
    .clkena_i   (e13_clkena),
    .d_i        (e13_codeword ^ e13_err_mask),
    .q_o        (e13_q),
    .syndrome_o (e13_syndrome),
    .sb_err_o   (e13_sb_err),
    .db_err_o   (e13_db_err),
    .sb_fix_o   (e13_sb_fix)
  );

endmodule
