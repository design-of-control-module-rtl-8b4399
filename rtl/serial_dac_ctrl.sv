// serial_dac_ctrl: FPGA control module for a TLC5615 10-bit serial DAC.
//
// The module turns two 10-bit codes into the three-wire serial stream of the
// TLC5615 (CS, SCLK, DIN) and sends them in turn, forever, so the DAC output
// alternates between two voltages. A divide-by-four clock divider (clk_div4)
// sets the step rate; a nine-state machine (dac_ctrl_fsm) loads a 12-bit
// frame (code MSB first, two zero bits), lowers CS, clocks the 12 bits out,
// raises CS so the DAC latches the code, waits, and loads the other code.
//
// Interface: clk is the system clock; rst_n is an asynchronous active-low
// reset (the original design's Reset, which runs the controller while high).
// code_high is sent first after reset, then code_low, and so on. clkdiv4 is
// the divided clock, brought out as in the original simulation.
//
// Timing with the defaults: one step is 4 clk cycles, one bit 4 steps
// (SCLK = clk/16), one frame 59 steps = 236 clk cycles. The divider ratio,
// frame length, wait count and code alternation follow the original design;
// keeping everything in the clk domain with a step enable is this design's
// choice.
module serial_dac_ctrl
  import dac_ctrl_pkg::*;
#(
  parameter int unsigned DIV       = 4,  // system clocks per step
  parameter int unsigned WAIT_LAST = 7   // wait counter end value (3 bits)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  code_t  code_high,
  input  code_t  code_low,
  output logic   clkdiv4,
  output logic   dac_ncs,
  output logic   dac_sclk,
  output logic   dac_din,
  output state_t state,
  output logic   frame_done
);

  logic tick;

  clk_div4 #(.DIV(DIV)) u_div (
    .clk     (clk),
    .rst_n   (rst_n),
    .clkdiv4 (clkdiv4),
    .tick    (tick)
  );

  dac_ctrl_fsm #(.WAIT_LAST(WAIT_LAST)) u_fsm (
    .clk        (clk),
    .rst_n      (rst_n),
    .en         (tick),
    .code_high  (code_high),
    .code_low   (code_low),
    .dac_ncs    (dac_ncs),
    .dac_sclk   (dac_sclk),
    .dac_din    (dac_din),
    .state      (state),
    .frame_done (frame_done)
  );

endmodule
