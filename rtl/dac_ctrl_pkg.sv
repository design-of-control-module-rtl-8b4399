// dac_ctrl_pkg: types and sizes shared by the TLC5615 serial DAC controller.
//
// The controller is a nine-state machine. The state names are the ones of
// the original design (Idle, Load, Csdac, Txd0, Txd1, Shift, Txd2, Spiend1,
// Spiend2). The binary encoding of the states is this design's own choice.
// A frame is 12 bits: the 10-bit DAC code, MSB first, followed by two zero
// fill bits, which is the non-daisy-chained input format of the TLC5615.
package dac_ctrl_pkg;

  localparam int unsigned CODE_BITS  = 10;  // TLC5615 resolution
  localparam int unsigned FILL_BITS  = 2;   // zero bits after the LSB
  localparam int unsigned FRAME_BITS = CODE_BITS + FILL_BITS;  // 12

  typedef logic [CODE_BITS-1:0]  code_t;
  typedef logic [FRAME_BITS-1:0] frame_t;

  typedef enum logic [3:0] {
    ST_IDLE    = 4'd0,
    ST_LOAD    = 4'd1,
    ST_CSDAC   = 4'd2,
    ST_TXD0    = 4'd3,
    ST_TXD1    = 4'd4,
    ST_SHIFT   = 4'd5,
    ST_TXD2    = 4'd6,
    ST_SPIEND1 = 4'd7,
    ST_SPIEND2 = 4'd8
  } state_t;

  // Pack a 10-bit code into the 12-bit frame sent to the DAC.
  function automatic frame_t make_frame(code_t code);
    return {code, {FILL_BITS{1'b0}}};
  endfunction

endpackage
