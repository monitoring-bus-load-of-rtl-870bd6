// can_mon_pkg: constants and types shared by the CAN bus load monitor.
//
// The monitor counts, per CAN identifier and for the whole bus, how many bits
// the frames on a 1 Mbit/s CAN bus occupy during each one-second sample
// period. A count of 2^20 bits is taken as 100 % load, so every counter needs
// 21 bits. The UART report packs an 8-bit identifier, three zero bits and a
// 21-bit count into one 32-bit word, and opens each report with the word
// 0x0010_0001 (2^20 + 1), a value no counter can hold.
//
// The numbers below follow the design description: 32 monitored modules,
// 21-bit counters, a 128-bit destuffed message buffer, the start word and the
// IEEE754 divisor 0x4623D70A (= 2^20 / 100 = 10485.76) that turns a bit count
// into percent. The 8-bit identifier field width is derived from the word
// layout.
package can_mon_pkg;

  parameter int unsigned NUM_MODULES = 32;  // monitored identifiers 0..31
  parameter int unsigned MOD_IDX_W   = $clog2(NUM_MODULES);
  parameter int unsigned LOAD_W      = 21;  // bits per sample period, up to 2^20
  parameter int unsigned MSG_W       = 128; // longest extended data frame
  parameter int unsigned MSG_LEN_W   = 8;   // 44..128
  parameter int unsigned UART_ID_W   = 8;   // 32 - 3 - LOAD_W

  // Report framing on the UART
  parameter logic [31:0] UART_START_WORD = 32'h0010_0001;
  parameter logic [UART_ID_W-1:0] OVERALL_ID = UART_ID_W'(NUM_MODULES);

  // 2^20 bit/s divided by 100, IEEE754 single precision
  parameter logic [31:0] PERCENT_DIVISOR = 32'h4623_D70A;

  typedef logic [LOAD_W-1:0]    load_t;
  typedef logic [MSG_W-1:0]     can_msg_t;
  typedef logic [MSG_LEN_W-1:0] msg_len_t;
  typedef logic [127:0]         lcd_line_t;  // 16 ASCII characters, first in 127:120
  typedef logic [55:0]          num_field_t; // 7 ASCII characters

  // Build one report word: {id, 3'b000, load}
  function automatic logic [31:0] report_word(input logic [UART_ID_W-1:0] id, input load_t load);
    return {id, 3'b000, load};
  endfunction

endpackage
