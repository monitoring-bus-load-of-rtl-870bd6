// uart_tx: asynchronous serial transmitter, 8 data bits, no parity, 2 stop bits.
//
// A one-clock `start` while idle loads `data` and sends a start bit (0), the
// eight data bits least significant first and two stop bits (1). Every bit
// lasts round(CLK_HZ/BAUD) clocks, 434 clocks for 115200 baud at 50 MHz. The
// frame format and the baud rate follow the design description; the baud
// counter, restarted with every byte, is this design's own.
//
// Interface: `txd` is registered and idles high. `busy` is high from the clock
// after `start` until the second stop bit has ended; `start` while busy is
// ignored. One byte takes 11 bit times, 4774 clocks with the defaults.
module uart_tx #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,
  output logic       txd,
  output logic       busy
);

  localparam int unsigned DIV   = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned CNT_W = $clog2(DIV);

  typedef enum logic [2:0] {T_IDLE, T_START, T_DATA, T_STOP1, T_STOP2} tx_state_t;

  tx_state_t        state;
  logic [CNT_W-1:0] cnt;
  logic [2:0]       bit_idx;
  logic [7:0]       shreg;

  assign busy = (state != T_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= T_IDLE;
      cnt     <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      txd     <= 1'b1;
    end else if (state == T_IDLE) begin
      txd <= 1'b1;
      if (start) begin
        shreg   <= data;
        cnt     <= '0;
        bit_idx <= '0;
        txd     <= 1'b0;
        state   <= T_START;
      end
    end else if (cnt != CNT_W'(DIV - 1)) begin
      cnt <= cnt + 1'b1;
    end else begin
      cnt <= '0;
      unique case (state)
        T_START: begin
          txd   <= shreg[0];
          state <= T_DATA;
        end
        T_DATA: begin
          if (bit_idx == 3'd7) begin
            txd   <= 1'b1;
            state <= T_STOP1;
          end else begin
            txd     <= shreg[1];
            shreg   <= shreg >> 1;
            bit_idx <= bit_idx + 1'b1;
          end
        end
        T_STOP1: state <= T_STOP2;
        default: state <= T_IDLE;
      endcase
    end
  end

endmodule
