// can_rx: receive-only CAN driver for the bus load monitor.
//
// The bus wire is brought into the clock domain by two flip-flops. A bit-time
// counter produces one sample strobe every CLKS_PER_BIT clocks; every edge on
// the wire (either direction) restarts it so that the next sample is taken
// SAMPLE_POINT clocks after the edge, between phase segments 1 and 2 of the
// CAN bit. With a 50 MHz clock the defaults are 48 clocks per bit and a
// sample 31 clocks after an edge, the values of the design description.
//
// A frame is assembled by a four-state machine:
//   IDLE  waits for a dominant (0) start-of-frame bit,
//   MSG   stores every bit that is not a stuff bit into `msg`, filling it from
//         bit 127 downwards; after five equal bits inside the stuffed area
//         (start of frame up to the last CRC bit) the next bit is dropped,
//   EOM   presents the frame and its length and pulses `msg_valid`,
//   IFS   waits for three recessive intermission bits, then goes to IDLE.
// The stuffed area and the frame end follow from the IDE bit (position 13),
// the RTR bit and the DLC: a standard frame is 44 + 8*DLC bits long with
// 34 + 8*DLC stuffed bits, an extended frame 64 + 8*DLC with 54 + 8*DLC
// (DLC above 8 counts as 8). The length counts the end-of-frame bits but no
// stuff bits, which is the figure the load calculation adds up.
//
// Choices beyond the description: remote frames (RTR recessive) carry no data
// field, as the CAN standard says; CRC, form and stuff errors are not checked,
// so error frames are not recognised; the identifier is read most significant
// bit first, as on a real bus.
//
// Interface: `rx` is the bus wire (dominant = 0). `msg` bit 127 is the
// start-of-frame bit, bits 126:116 the base identifier. `msg` and `msg_len`
// stay valid until the next frame completes.
// Timing: `msg_valid` is high for one clock, one clock after the sample of the
// frame's last end-of-frame bit.
module can_rx
  import can_mon_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 48,
  parameter int unsigned SAMPLE_POINT = 31
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     rx,
  output can_msg_t msg,
  output msg_len_t msg_len,
  output logic     msg_valid
);

  localparam int unsigned BT_W = $clog2(CLKS_PER_BIT);

  typedef enum logic [1:0] {S_IDLE, S_MSG, S_EOM, S_IFS} state_t;

  // ---------------------------------------------------------------- bit timing
  logic            rx_meta, rx_s, rx_d;
  logic [BT_W-1:0] bt_cnt;
  logic            sample;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_meta <= 1'b1;
      rx_s    <= 1'b1;
      rx_d    <= 1'b1;
    end else begin
      rx_meta <= rx;
      rx_s    <= rx_meta;
      rx_d    <= rx_s;
    end
  end

  // On an edge the counter restarts at 1 (the edge clock is count 0); a sample
  // is taken when it reaches SAMPLE_POINT and it wraps after CLKS_PER_BIT.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bt_cnt <= '0;
    end else if (rx_s != rx_d) begin
      bt_cnt <= BT_W'(1);
    end else if (bt_cnt == BT_W'(CLKS_PER_BIT - 1)) begin
      bt_cnt <= '0;
    end else begin
      bt_cnt <= bt_cnt + 1'b1;
    end
  end

  assign sample = (rx_s == rx_d) && (bt_cnt == BT_W'(SAMPLE_POINT));

  // ---------------------------------------------------------------- framing
  state_t   state;
  can_msg_t buf_q;
  msg_len_t nbits;      // bits stored so far
  logic     run_bit;    // polarity of the current run of equal bits
  logic [2:0] run_len;  // length of that run, 1..5
  logic     stuff_next; // next bit is a stuff bit
  logic [1:0] ifs_cnt;

  // Frame geometry decoded from the bits stored so far. Before the DLC has
  // arrived the partial values still give a stuffed area longer than the bits
  // received, so stuffing is applied from the start of frame.
  logic       ext, rtr;
  logic [3:0] dlc;
  logic [3:0] n_bytes;
  msg_len_t   frame_len, stuff_len;

  always_comb begin
    ext = buf_q[MSG_W-1-13];
    rtr = ext ? buf_q[MSG_W-1-32] : buf_q[MSG_W-1-12];
    dlc = ext ? buf_q[MSG_W-1-35 -: 4] : buf_q[MSG_W-1-15 -: 4];
    n_bytes = rtr ? 4'd0 : ((dlc > 4'd8) ? 4'd8 : dlc);
    frame_len = ext ? msg_len_t'(64 + 8 * n_bytes) : msg_len_t'(44 + 8 * n_bytes);
    stuff_len = ext ? msg_len_t'(54 + 8 * n_bytes) : msg_len_t'(34 + 8 * n_bytes);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      buf_q      <= '1;
      nbits      <= '0;
      run_bit    <= 1'b1;
      run_len    <= 3'd0;
      stuff_next <= 1'b0;
      ifs_cnt    <= 2'd0;
      msg        <= '0;
      msg_len    <= '0;
      msg_valid  <= 1'b0;
    end else begin
      msg_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (sample && !rx_s) begin
          // start of frame: clear the buffer, store the dominant SOF bit
          buf_q      <= '0;
          nbits      <= msg_len_t'(1);
          run_bit    <= 1'b0;
          run_len    <= 3'd1;
          stuff_next <= 1'b0;
          state      <= S_MSG;
        end
        S_MSG: if (sample) begin
          if (stuff_next) begin
            // discarded, but it starts the next run of equal bits
            stuff_next <= 1'b0;
            run_bit    <= rx_s;
            run_len    <= 3'd1;
          end else begin
            buf_q[MSG_W-1-int'(nbits)] <= rx_s;
            nbits                <= nbits + 1'b1;
            if (rx_s == run_bit) begin
              run_len    <= run_len + 1'b1;
              stuff_next <= (run_len == 3'd4) && (nbits < stuff_len);
            end else begin
              run_bit    <= rx_s;
              run_len    <= 3'd1;
            end
            if (nbits + 1'b1 == frame_len) state <= S_EOM;
          end
        end
        S_EOM: begin
          msg       <= buf_q;
          msg_len   <= frame_len;
          msg_valid <= 1'b1;
          ifs_cnt   <= 2'd0;
          state     <= S_IFS;
        end
        S_IFS: if (sample) begin
          if (!rx_s) begin
            ifs_cnt <= 2'd0;
          end else if (ifs_cnt == 2'd2) begin
            state <= S_IDLE;
          end else begin
            ifs_cnt <= ifs_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
