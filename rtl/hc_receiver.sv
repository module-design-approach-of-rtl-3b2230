// hc_receiver: reassembles decoded data words into the message.
//
// Each valid DATA_W-bit word on datain is shifted into the receive buffer from
// the top, so the first word of a message ends up in the least significant
// bits, matching the word order of hc_transmitter. After MSG_W/DATA_W words the
// whole message is copied to dataout and receive is high for one cycle (the
// cycle after the last word). dataout holds the last message until the next
// one is complete. rst is synchronous, active high, and empties the buffer.
//
// The 7-bit input, 56-bit output and Receive pin follow the paper's block
// diagram; word order and the one-cycle receive pulse are this design's own.
module hc_receiver #(
  parameter int unsigned MSG_W  = 56,
  parameter int unsigned DATA_W = 7,
  localparam int unsigned NWORDS = MSG_W / DATA_W,
  localparam int unsigned CNT_W  = $clog2(NWORDS + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              din_valid,
  input  logic [DATA_W-1:0] datain,
  output logic [MSG_W-1:0]  dataout,
  output logic              receive
);

  logic [MSG_W-1:0] rx_buf;
  logic [MSG_W-1:0] rx_next;
  logic [CNT_W-1:0] count;    // words held in the buffer

  assign rx_next = {datain, rx_buf[MSG_W-1:DATA_W]};

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_buf  <= '0;
      count   <= '0;
      dataout <= '0;
      receive <= 1'b0;
    end else begin
      receive <= 1'b0;
      if (din_valid) begin
        rx_buf <= rx_next;
        if (count == CNT_W'(NWORDS - 1)) begin
          count   <= '0;
          dataout <= rx_next;
          receive <= 1'b1;
        end else begin
          count <= count + 1'b1;
        end
      end
    end
  end

  initial assert (MSG_W % DATA_W == 0)
    else $error("hc_receiver: MSG_W must be a multiple of DATA_W");

endmodule
