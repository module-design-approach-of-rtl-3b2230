// ihc_parity_check: parity check and correction of an improved Hamming code word.
//
// The check bits are recomputed from the received data and compared with the
// received check bits. The comparison result, status, is laid out like the
// check bits, { [S_all], S_grp, S[RP-1:0] }:
//   S[RP-1:0] = recomputed position parities XOR received P[RP-1:0]
//   S_grp     = even-parity check over the received P[RP-1:0] and P_grp
//   S_all     = even-parity check over the whole word (only when EXTENDED)
// A single flipped data bit at position k gives S = k, S_grp = 0 (and S_all = 1);
// a flipped check bit gives S_grp = 1 or, for P_all, only S_all = 1. For the
// 16-bit default code, a flip of bit 2 gives status 6'b100011 and a flip of
// bit 9 gives 6'b101010. A data bit error is corrected by inverting
// data[S-1]. Any status that no single error can produce sets uncorrectable;
// with EXTENDED this covers every double error (S_all = 0, status non-zero).
// Without EXTENDED the code corrects single errors only; double errors may be
// miscorrected. Purely combinational.
//
// The status values of the paper's worked example are reproduced; the
// exact check equations for the group and overall bits and the
// uncorrectable flag are this design's reading of it.
module ihc_parity_check #(
  parameter int unsigned DATA_W   = 10,
  parameter bit          EXTENDED = 1'b1,
  localparam int unsigned RP      = ihc_pkg::pos_par_w(DATA_W),
  localparam int unsigned CW_W    = ihc_pkg::ihc_cw_w(DATA_W, EXTENDED),
  localparam int unsigned ST_W    = CW_W - DATA_W
) (
  input  logic [CW_W-1:0]   cw_in,
  output logic [ST_W-1:0]   status,
  output logic [DATA_W-1:0] data_out,
  output logic              err_detected,
  output logic              corrected,
  output logic              uncorrectable
);

  logic [DATA_W-1:0] data_rx;
  logic [RP-1:0]     par_rx;
  logic [RP-1:0]     par_calc;
  logic [RP-1:0]     syn;
  logic              s_grp;
  logic              s_all;
  logic              single;        // status is that of exactly one flipped bit
  logic              data_err;      // that bit is a data bit
  logic              syn_onehot0;   // syn has at most one bit set

  assign data_rx = cw_in[DATA_W-1:0];
  assign par_rx  = cw_in[DATA_W +: RP];

  ihc_parity_gen #(.DATA_W(DATA_W)) u_parity_gen (
    .data    (data_rx),
    .pos_par (par_calc)
  );

  assign syn         = par_calc ^ par_rx;
  assign s_grp       = ^cw_in[DATA_W + RP:DATA_W];
  assign s_all       = EXTENDED ? ^cw_in : 1'b0;
  assign syn_onehot0 = (syn & (syn - 1'b1)) == '0;

  always_comb begin
    status = '0;
    status[RP-1:0] = syn;
    status[RP]     = s_grp;
    if (EXTENDED) status[ST_W-1] = s_all;
  end

  always_comb begin
    data_err = 1'b0;
    single   = 1'b0;
    if (!s_grp && syn != '0) begin
      // data bit at position syn
      data_err = (32'(syn) <= DATA_W);
      single   = data_err;
    end else if (s_grp) begin
      // a position parity bit (syn one-hot) or the group parity (syn zero)
      single = syn_onehot0;
    end else begin
      // syn and s_grp zero: no error, or only the overall parity bit flipped
      single = EXTENDED && s_all;
    end
    if (EXTENDED && !s_all) begin
      // an even number of flips can never be a single error
      single   = 1'b0;
      data_err = 1'b0;
    end
  end

  assign err_detected  = status != '0;
  assign corrected     = single;
  assign uncorrectable = err_detected && !single;

  always_comb begin
    data_out = data_rx;
    if (data_err && single)
      for (int unsigned k = 1; k <= DATA_W; k++)
        if (32'(syn) == k) data_out[k-1] = ~data_rx[k-1];
  end

endmodule
