// ihc_decoder: improved Hamming code decoder with a registered output.
//
// The received word is checked and corrected by ihc_parity_check; the check
// bits are dropped simply by taking the low DATA_W bits, since the improved
// code keeps the data word in place. Besides the corrected data word the
// decoder gives the parity check status and two flags: corrected (one flipped
// bit was found and, if it was a data bit, inverted) and uncorrectable (the
// status of no single error; with the overall parity bit, every double error).
//
// Timing: when dec_in_valid is high at a rising clock edge the decoded result
// is registered and dec_valid is high for the next cycle; outputs hold their
// value otherwise. rst is synchronous and active high.
//
// Checking against recomputed parities and dropping the appended bits
// follow the paper; the register stage and the flag outputs are this
// design's own.
module ihc_decoder #(
  parameter int unsigned DATA_W   = 10,
  parameter bit          EXTENDED = 1'b1,
  localparam int unsigned CW_W    = ihc_pkg::ihc_cw_w(DATA_W, EXTENDED),
  localparam int unsigned ST_W    = CW_W - DATA_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              dec_in_valid,
  input  logic [CW_W-1:0]   dec_in,
  output logic [DATA_W-1:0] dec_out,
  output logic              dec_valid,
  output logic [ST_W-1:0]   status,
  output logic              corrected,
  output logic              uncorrectable
);

  logic [ST_W-1:0]   st_c;
  logic [DATA_W-1:0] data_c;
  logic              det_c;
  logic              corr_c;
  logic              unc_c;

  ihc_parity_check #(.DATA_W(DATA_W), .EXTENDED(EXTENDED)) u_parity_check (
    .cw_in         (dec_in),
    .status        (st_c),
    .data_out      (data_c),
    .err_detected  (det_c),
    .corrected     (corr_c),
    .uncorrectable (unc_c)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      dec_out       <= '0;
      dec_valid     <= 1'b0;
      status        <= '0;
      corrected     <= 1'b0;
      uncorrectable <= 1'b0;
    end else begin
      dec_valid <= dec_in_valid;
      if (dec_in_valid) begin
        dec_out       <= data_c;
        status        <= st_c;
        corrected     <= corr_c;
        uncorrectable <= unc_c;
      end
    end
  end

endmodule
