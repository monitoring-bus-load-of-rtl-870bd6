// uart_protocol: the load report sent to the PC after every sample.
//
// When `data_ready` signals a new freeze, the sequencer restarts at step 0
// and sends, one 32-bit word per step through the word sender:
//   step 0       start word 0x0010_0001 (2^20 + 1, larger than any count)
//   steps 1..32  {id, 3'b000, load_freeze[id]} for id = step - 1
//   step 33      {32, 3'b000, overall_freeze}
// after which it idles until the next freeze. Each step is a WAIT state that
// offers the word until the word sender is idle, then a one-clock SEND state
// that strobes `word_send` and moves to the next step. The report and its
// framing follow the design description.
//
// Timing: 34 words of 4 bytes at 11 bits each, about 13 ms at 115200 baud.
// The frozen values must stay stable for that long; they change only at the
// next freeze, a full sample period later.
module uart_protocol
  import can_mon_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        data_ready,
  input  load_t       load_freeze [NUM_MODULES],
  input  load_t       overall_freeze,
  input  logic        word_done,
  output logic        word_send,
  output logic [31:0] word
);

  localparam int unsigned LAST_STEP = NUM_MODULES + 2;  // 34: report complete
  localparam int unsigned STEP_W    = $clog2(LAST_STEP + 1);

  typedef enum logic [1:0] {P_IDLE, P_WAIT, P_SEND} p_state_t;

  p_state_t          state;
  logic [STEP_W-1:0] step;

  always_comb begin
    if (step == '0)
      word = UART_START_WORD;
    else if (step <= STEP_W'(NUM_MODULES))
      word = report_word(UART_ID_W'(step - 1'b1), load_freeze[MOD_IDX_W'(step - 1'b1)]);
    else
      word = report_word(OVERALL_ID, overall_freeze);
  end

  assign word_send = (state == P_SEND);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= P_IDLE;
      step  <= '0;
    end else if (data_ready) begin
      state <= P_WAIT;
      step  <= '0;
    end else begin
      unique case (state)
        P_IDLE: ;
        P_WAIT: begin
          if (step == STEP_W'(LAST_STEP)) state <= P_IDLE;
          else if (word_done)             state <= P_SEND;
        end
        P_SEND: begin
          step  <= step + 1'b1;
          state <= P_WAIT;
        end
        default: state <= P_IDLE;
      endcase
    end
  end

endmodule
