// selftest: LCD self-test sequence.
//
// Each sample tick advances a step counter and shows the screen of the step
// that was current: steps 0-15 are four instruction screens, each held for
// four ticks (title, CAN wire pin, ground pin, UART pins), steps 16-25 fill
// both lines with the digits 0 to 9, one digit per tick, which exercises
// every character position. After step 25 `finished` is set and the last
// screen stays. The sequence and its timing follow the design description;
// the wording of the instruction screens is this design's own.
//
// Interface: `line1`/`line2` are 16 ASCII characters, first in bits 127:120,
// all blanks after reset. Timing: a new screen appears the clock after a tick.
module selftest
  import can_mon_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      tick,
  output lcd_line_t line1,
  output lcd_line_t line2,
  output logic      finished
);

  localparam int unsigned LAST_STEP = 25;

  logic [4:0] step;

  function automatic lcd_line_t screen_line(input logic [4:0] s, input logic second);
    lcd_line_t l;
    if (s < 5'd16) begin
      unique case (s[3:2])
        2'd0:    l = second ? "   self-test    " : "CAN bus monitor ";
        2'd1:    l = second ? "pin 2 (blue)    " : "CAN wire: GPIO1 ";
        2'd2:    l = second ? "test running    " : "GND: GPIO1 pin12";
        default: l = second ? "pins 2-12 (even)" : "UART: GPIO0     ";
      endcase
    end else begin
      l = {16{8'h30 + 8'(s - 5'd16)}};
    end
    return l;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step     <= '0;
      finished <= 1'b0;
      line1    <= {16{8'h20}};
      line2    <= {16{8'h20}};
    end else if (tick && !finished) begin
      line1 <= screen_line(step, 1'b0);
      line2 <= screen_line(step, 1'b1);
      step  <= step + 1'b1;
      if (step == 5'(LAST_STEP)) finished <= 1'b1;
    end
  end

endmodule
