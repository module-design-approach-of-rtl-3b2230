// ihc_system: the five-stage improved Hamming code link.
//
// Transmitter -> encoder -> noise box -> decoder -> receiver, all on one clock
// and one synchronous active-high reset. A MSG_W-bit message given with send
// is cut into DATA_W-bit words; each word is coded into an improved Hamming
// code word (data unchanged, check bits appended), the noise box inverts one
// random bit of each code word while noise_en is high, the decoder locates and
// repairs it, and the receiver reassembles the message. With the defaults a
// 56-bit message travels as eight 7-bit words in 11-bit code words (7 data,
// 3 position parities, 1 group parity), a code that corrects one flipped bit
// per word.
//
// Timing: word i (0..NWORDS-1) leaves the transmitter in cycle i+1 after send
// and reaches the receiver three cycles later; receive pulses NWORDS+4 cycles
// after send (12 with the defaults). word_valid, word_corrected and
// word_uncorrectable report each decoded word as it enters the receiver.
//
// The five stages, their order and port widths follow the paper's block
// diagram; the 11-bit code for 7 data bits (3 position parities plus a group
// parity) is this design's reading of it, and the valid bits that travel
// with each word are this design's own.
module ihc_system #(
  parameter int unsigned MSG_W    = 56,
  parameter int unsigned DATA_W   = 7,
  parameter bit          EXTENDED = 1'b0,
  localparam int unsigned CW_W    = ihc_pkg::ihc_cw_w(DATA_W, EXTENDED),
  localparam int unsigned ST_W    = CW_W - DATA_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             send,
  input  logic [MSG_W-1:0] datain,
  input  logic             noise_en,
  output logic [MSG_W-1:0] dataout,
  output logic             receive,
  output logic             busy,
  output logic             word_valid,
  output logic [ST_W-1:0]  word_status,
  output logic             word_corrected,
  output logic             word_uncorrectable
);

  logic [DATA_W-1:0] tx_data;
  logic              tx_den;
  logic [CW_W-1:0]   enc_cw;
  logic              enc_valid;
  logic [CW_W-1:0]   ch_cw;
  logic              ch_valid;
  logic [DATA_W-1:0] dec_data;
  logic              dec_valid;

  hc_transmitter #(.MSG_W(MSG_W), .DATA_W(DATA_W)) u_transmitter (
    .clk     (clk),
    .rst     (rst),
    .send    (send),
    .datain  (datain),
    .dataout (tx_data),
    .den     (tx_den),
    .busy    (busy)
  );

  ihc_encoder #(.DATA_W(DATA_W), .EXTENDED(EXTENDED)) u_encoder (
    .clk       (clk),
    .rst       (rst),
    .den       (tx_den),
    .enc_in    (tx_data),
    .enc_out   (enc_cw),
    .enc_valid (enc_valid)
  );

  hc_noise_box #(.CW_W(CW_W)) u_noise_box (
    .clk          (clk),
    .rst          (rst),
    .noise_en     (noise_en),
    .orgin_valid  (enc_valid),
    .orgin        (enc_cw),
    .errout       (ch_cw),
    .errout_valid (ch_valid),
    .err_pos      (),
    .err_flip     ()
  );

  ihc_decoder #(.DATA_W(DATA_W), .EXTENDED(EXTENDED)) u_decoder (
    .clk           (clk),
    .rst           (rst),
    .dec_in_valid  (ch_valid),
    .dec_in        (ch_cw),
    .dec_out       (dec_data),
    .dec_valid     (dec_valid),
    .status        (word_status),
    .corrected     (word_corrected),
    .uncorrectable (word_uncorrectable)
  );

  hc_receiver #(.MSG_W(MSG_W), .DATA_W(DATA_W)) u_receiver (
    .clk       (clk),
    .rst       (rst),
    .din_valid (dec_valid),
    .datain    (dec_data),
    .dataout   (dataout),
    .receive   (receive)
  );

  assign word_valid = dec_valid;

endmodule
