// hc_noise_box: error injector standing in for a noisy channel.
//
// Each valid code word on orgin is passed to errout with exactly one bit
// inverted when noise_en is high, and unchanged otherwise. The bit is chosen
// by the pseudo-random sequence generator: err_pos = (sequence value) mod CW_W.
// The generator steps once per valid word. Timing: one register stage; errout,
// err_pos and errout_valid appear the cycle after orgin_valid. err_flip tells
// whether a bit was inverted. rst is synchronous, active high.
//
// Flipping one randomly placed bit per word follows the paper; noise_en,
// err_pos, err_flip and the register stage are this design's own.
module hc_noise_box #(
  parameter int unsigned CW_W = 11,
  parameter logic [15:0] SEED = 16'hACE1,
  localparam int unsigned POS_W = $clog2(CW_W)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             noise_en,
  input  logic             orgin_valid,
  input  logic [CW_W-1:0]  orgin,
  output logic [CW_W-1:0]  errout,
  output logic             errout_valid,
  output logic [POS_W-1:0] err_pos,
  output logic             err_flip
);

  logic [15:0]     rnd;
  logic [POS_W-1:0] pos;

  hc_random_seq_gen #(.SEED(SEED)) u_rng (
    .clk   (clk),
    .rst   (rst),
    .step  (orgin_valid),
    .value (rnd)
  );

  assign pos = POS_W'(rnd % 16'(CW_W));

  always_ff @(posedge clk) begin
    if (rst) begin
      errout       <= '0;
      errout_valid <= 1'b0;
      err_pos      <= '0;
      err_flip     <= 1'b0;
    end else begin
      errout_valid <= orgin_valid;
      if (orgin_valid) begin
        errout   <= noise_en ? (orgin ^ (CW_W'(1) << pos)) : orgin;
        err_pos  <= pos;
        err_flip <= noise_en;
      end
    end
  end

endmodule
