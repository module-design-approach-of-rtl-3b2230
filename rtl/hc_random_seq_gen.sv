// hc_random_seq_gen: pseudo-random sequence generator of the noise box.
//
// A 16-bit Galois linear feedback shift register with the maximal-length
// polynomial x^16 + x^14 + x^13 + x^11 + 1 (period 65535). It steps once per
// clock while step is high and restarts from SEED on rst (synchronous, active
// high). SEED must be non-zero.
//
// The paper only names a random sequence generator; the LFSR and its
// polynomial are this design's choice.
module hc_random_seq_gen #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        step,
  output logic [15:0] value
);

  localparam logic [15:0] TAPS = 16'hB400;

  always_ff @(posedge clk) begin
    if (rst)
      value <= SEED;
    else if (step)
      value <= (value >> 1) ^ (value[0] ? TAPS : 16'h0000);
  end

endmodule
