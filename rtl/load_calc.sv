// load_calc: per-module and overall bus load counters.
//
// Every complete frame from the CAN driver adds its length in bits to the
// overall counter and to the counter of the module that sent it. The module
// number is the frame's identifier: the 11-bit base identifier for a standard
// frame, the 29-bit base+extended identifier for an extended frame (IDE bit
// set), so extended identifier 0 and standard identifier 0 are the same
// module. Identifiers of NUM_MODULES and above count towards the overall load
// only.
//
// On each sample tick the counters are copied into the freeze registers that
// the output side reads (all modules, the overall count, and the module
// selected by `module_sel` together with its number) and are cleared. The four
// cases of the design description are handled in one clock:
//   no frame, no tick : idle
//   no frame, tick    : sample (freeze, clear)
//   frame, no tick    : update (add the frame length)
//   frame, tick       : update, then sample - the frame is in the frozen values
//                       and the new period starts from zero.
// `data_ready` pulses one clock after a freeze, when the frozen values are
// valid. Counters saturate at their maximum, a choice of this design.
module load_calc
  import can_mon_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  can_msg_t             msg,
  input  msg_len_t             msg_len,
  input  logic                 msg_valid,
  input  logic                 sample_tick,
  input  logic [MOD_IDX_W-1:0] module_sel,
  output load_t                load_freeze [NUM_MODULES],
  output load_t                overall_freeze,
  output load_t                module_freeze,
  output logic [MOD_IDX_W-1:0] module_sel_freeze,
  output logic                 data_ready
);

  typedef enum logic [1:0] {C_IDLE, C_SAMPLE, C_UPDATE, C_SAMPLE_UPDATE} calc_case_t;

  load_t load [NUM_MODULES];
  load_t overall_load;

  // identifier of the frame
  logic        ext;
  logic [28:0] load_id;
  calc_case_t  calc_case;

  always_comb begin
    ext = msg[MSG_W-1-13];
    if (ext) load_id = {msg[MSG_W-2 -: 11], msg[MSG_W-15 -: 18]};
    else     load_id = {18'd0, msg[MSG_W-2 -: 11]};
    unique case ({msg_valid, sample_tick})
      2'b00:   calc_case = C_IDLE;
      2'b01:   calc_case = C_SAMPLE;
      2'b10:   calc_case = C_UPDATE;
      default: calc_case = C_SAMPLE_UPDATE;
    endcase
  end

  function automatic load_t sat_add(input load_t a, input msg_len_t b);
    logic [LOAD_W:0] s;
    s = {1'b0, a} + (LOAD_W + 1)'(b);
    return s[LOAD_W] ? '1 : s[LOAD_W-1:0];
  endfunction

  // counter values after the update step of this clock
  load_t load_upd [NUM_MODULES];
  load_t overall_upd;

  always_comb begin
    overall_upd = overall_load;
    for (int i = 0; i < NUM_MODULES; i++) load_upd[i] = load[i];
    if (calc_case == C_UPDATE || calc_case == C_SAMPLE_UPDATE) begin
      overall_upd = sat_add(overall_load, msg_len);
      for (int i = 0; i < NUM_MODULES; i++)
        if (load_id == 29'(i)) load_upd[i] = sat_add(load[i], msg_len);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      overall_load      <= '0;
      overall_freeze    <= '0;
      module_freeze     <= '0;
      module_sel_freeze <= '0;
      data_ready        <= 1'b0;
      for (int i = 0; i < NUM_MODULES; i++) begin
        load[i]        <= '0;
        load_freeze[i] <= '0;
      end
    end else begin
      data_ready <= 1'b0;
      if (calc_case == C_SAMPLE || calc_case == C_SAMPLE_UPDATE) begin
        overall_freeze    <= overall_upd;
        module_freeze     <= load_upd[module_sel];
        module_sel_freeze <= module_sel;
        data_ready        <= 1'b1;
        overall_load      <= '0;
        for (int i = 0; i < NUM_MODULES; i++) begin
          load_freeze[i] <= load_upd[i];
          load[i]        <= '0;
        end
      end else begin
        overall_load <= overall_upd;
        for (int i = 0; i < NUM_MODULES; i++) load[i] <= load_upd[i];
      end
    end
  end

endmodule
