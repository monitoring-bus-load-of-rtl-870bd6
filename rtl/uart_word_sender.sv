// uart_word_sender: sends a 32-bit word over the byte-wide UART transmitter.
//
// IDLE: `done` is high; a `data_ready` strobe stores `data_in` and starts at
//       byte 0.
// WAIT: as soon as the transmitter is not busy, the next byte is put on
//       `byte_out` (bits 31:24 first, then 23:16, 15:8, 7:0) and the machine
//       moves to WRITE; after the fourth byte it returns to IDLE instead.
// WRITE: `send` is high for this one clock, the byte counter advances and the
//       machine returns to WAIT.
// This three-state machine and the most-significant-byte-first order follow
// the design description.
//
// Timing: a word takes four UART bytes plus three clocks of overhead per
// byte; `done` rises again once the fourth byte's transmission has finished.
module uart_word_sender (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        data_ready,
  input  logic [31:0] data_in,
  input  logic        tx_busy,
  output logic        send,
  output logic [7:0]  byte_out,
  output logic        done
);

  typedef enum logic [1:0] {W_IDLE, W_WAIT, W_WRITE} ws_state_t;

  ws_state_t   state;
  logic [31:0] data_store;
  logic [2:0]  byte_pos;

  assign send = (state == W_WRITE);
  assign done = (state == W_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= W_IDLE;
      data_store <= '0;
      byte_pos   <= '0;
      byte_out   <= '0;
    end else begin
      unique case (state)
        W_IDLE: if (data_ready) begin
          data_store <= data_in;
          byte_pos   <= '0;
          state      <= W_WAIT;
        end
        W_WAIT: if (!tx_busy) begin
          if (byte_pos == 3'd4) begin
            state <= W_IDLE;
          end else begin
            byte_out <= data_store[31 - 8 * int'(byte_pos[1:0]) -: 8];
            state    <= W_WRITE;
          end
        end
        W_WRITE: begin
          byte_pos <= byte_pos + 1'b1;
          state    <= W_WAIT;
        end
        default: state <= W_IDLE;
      endcase
    end
  end

  // The transmitter must be free whenever a byte is handed to it.
  a_send_when_free: assert property (@(posedge clk) disable iff (!rst_n) send |-> !tx_busy);

endmodule
