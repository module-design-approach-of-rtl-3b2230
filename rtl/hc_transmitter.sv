// hc_transmitter: splits a long message into data words for the encoder.
//
// When send is high while the transmitter is idle, the MSG_W-bit message on
// datain is captured in the transmit buffer. Over the next MSG_W/DATA_W cycles
// the buffer is sent one DATA_W-bit word per cycle on dataout, least
// significant word first, with den (data enable) high for each word. busy is
// high from the cycle after send until the last word has been sent; send is
// ignored while busy. With the defaults a 56-bit message leaves as eight 7-bit
// words, words 0..7 in cycles 1..8 after send. rst is synchronous, active high.
//
// The 56-bit input, 7-bit output, Send and Den pins follow the paper's
// block diagram; word order and timing are this design's own.
module hc_transmitter #(
  parameter int unsigned MSG_W  = 56,
  parameter int unsigned DATA_W = 7,
  localparam int unsigned NWORDS = MSG_W / DATA_W,
  localparam int unsigned CNT_W  = $clog2(NWORDS + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              send,
  input  logic [MSG_W-1:0]  datain,
  output logic [DATA_W-1:0] dataout,
  output logic              den,
  output logic              busy
);

  typedef enum logic {TX_IDLE, TX_SEND} tx_state_e;

  tx_state_e        state;
  logic [MSG_W-1:0] tx_buf;
  logic [CNT_W-1:0] left;     // words still to send

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= TX_IDLE;
      tx_buf  <= '0;
      left    <= '0;
      dataout <= '0;
      den     <= 1'b0;
    end else begin
      den <= 1'b0;
      unique case (state)
        TX_IDLE: begin
          if (send) begin
            tx_buf <= datain;
            left   <= CNT_W'(NWORDS);
            state  <= TX_SEND;
          end
        end
        TX_SEND: begin
          dataout <= tx_buf[DATA_W-1:0];
          den     <= 1'b1;
          tx_buf  <= tx_buf >> DATA_W;
          left    <= left - 1'b1;
          if (left == CNT_W'(1)) state <= TX_IDLE;
        end
        default: state <= TX_IDLE;
      endcase
    end
  end

  assign busy = (state == TX_SEND);

  initial assert (MSG_W % DATA_W == 0)
    else $error("hc_transmitter: MSG_W must be a multiple of DATA_W");

endmodule
