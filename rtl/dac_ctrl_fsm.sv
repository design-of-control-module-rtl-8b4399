// dac_ctrl_fsm: state machine that drives a TLC5615 10-bit serial DAC.
//
// The machine repeatedly sends one 12-bit frame (10-bit code, MSB first, then
// two zero bits) and alternates between two codes, code_high and code_low, so
// the DAC output toggles between two levels. It steps once per enable pulse
// (en, one per period of the divided clock clkdiv4) through nine states:
//
//   Idle    -> Load     after reset
//   Load    -> Csdac    frame <- code_high or code_low, bit count <- 0
//   Csdac   -> Txd0     chip select goes low
//   Txd0    -> Txd1     bit count + 1
//   Txd1    -> Shift    SCLK high: the DAC samples DIN (MSB of the frame)
//   Shift   -> Txd2     frame shifted left by one, zero in at the LSB
//   Txd2    -> Spiend1  when 12 bits have been sent, else back to Txd0
//   Spiend1 -> Spiend2  chip select high: the DAC latches the code; wait on
//   Spiend2 -> Load     when the wait counter reaches WAIT_LAST; the other
//                       code is selected for the next frame
//
// The state sequence, the bit count of 12, the left shift, the 3-bit wait
// counter ending at 7 and the alternation of two codes follow the original
// design. Its output decoding and wait counter were not given and are this
// design's own: chip select (dac_ncs) is low in Csdac, Txd0, Txd1, Shift and
// Txd2; SCLK (dac_sclk) is high in Txd1 and Shift, so each bit takes four
// steps with SCLK high for two; the wait counter is cleared while wait_on is
// low and counts up by one per step while it is high. dac_din is the MSB of
// the frame register. A reset (rst_n low, asynchronous) sends every state
// back to Idle, with chip select high and SCLK low.
//
// Timing: one frame takes 1 (Load) + 1 (Csdac) + 4*12 + 1 (Spiend1) +
// (WAIT_LAST+1) (Spiend2) steps = 59 steps with the defaults. SCLK rises two
// steps after chip select falls, DIN changes only while SCLK falls, and chip
// select rises one step after the last SCLK falling edge, so all chip select
// changes happen while SCLK is low, as the TLC5615 requires.
module dac_ctrl_fsm
  import dac_ctrl_pkg::*;
#(
  parameter int unsigned WAIT_LAST = 7  // last value of the wait counter
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,          // one pulse per step (clkdiv4 rising edge)
  input  code_t  code_high,   // code sent in even frames (first frame)
  input  code_t  code_low,    // code sent in odd frames
  output logic   dac_ncs,     // TLC5615 CS, active low
  output logic   dac_sclk,    // TLC5615 SCLK
  output logic   dac_din,     // TLC5615 DIN
  output state_t state,       // current state, for observation
  output logic   frame_done   // one clk cycle at the step that raises CS
);

  localparam int unsigned WW = (WAIT_LAST > 1) ? $clog2(WAIT_LAST + 1) : 1;
  localparam int unsigned BW = $clog2(FRAME_BITS + 1);

  state_t          state_n;
  frame_t          shift_reg;
  logic [BW-1:0]   bit_cnt;
  logic [WW-1:0]   wait_cnt;
  logic            wait_on;
  logic            load_high;

  // next state
  always_comb begin
    state_n = state;
    unique case (state)
      ST_IDLE:    state_n = ST_LOAD;
      ST_LOAD:    state_n = ST_CSDAC;
      ST_CSDAC:   state_n = ST_TXD0;
      ST_TXD0:    state_n = ST_TXD1;
      ST_TXD1:    state_n = ST_SHIFT;
      ST_SHIFT:   state_n = ST_TXD2;
      ST_TXD2:    state_n = (bit_cnt == BW'(FRAME_BITS)) ? ST_SPIEND1 : ST_TXD0;
      ST_SPIEND1: state_n = ST_SPIEND2;
      ST_SPIEND2: state_n = (wait_cnt == WW'(WAIT_LAST)) ? ST_LOAD : ST_SPIEND2;
      default:    state_n = ST_IDLE;
    endcase
  end

  // state register and datapath
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      shift_reg <= '0;
      bit_cnt   <= '0;
      load_high <= 1'b1;
      wait_on   <= 1'b0;
    end else if (en) begin
      state <= state_n;
      unique case (state)
        ST_LOAD: begin
          bit_cnt   <= '0;
          shift_reg <= make_frame(load_high ? code_high : code_low);
        end
        ST_TXD0:    bit_cnt   <= bit_cnt + 1'b1;
        ST_SHIFT:   shift_reg <= {shift_reg[FRAME_BITS-2:0], 1'b0};
        ST_SPIEND1: wait_on   <= 1'b1;
        ST_SPIEND2: if (wait_cnt == WW'(WAIT_LAST)) begin
          wait_on   <= 1'b0;
          load_high <= ~load_high;
        end
        default: ;
      endcase
    end
  end

  // wait counter: runs while wait_on is set
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        wait_cnt <= '0;
    else if (en) begin
      if (!wait_on)    wait_cnt <= '0;
      else             wait_cnt <= wait_cnt + 1'b1;
    end
  end

  // registered pin outputs, decoded from the next state so they change
  // together with the state register and never glitch
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_ncs  <= 1'b1;
      dac_sclk <= 1'b0;
    end else if (en) begin
      dac_ncs  <= !(state_n inside {ST_CSDAC, ST_TXD0, ST_TXD1, ST_SHIFT, ST_TXD2});
      dac_sclk <=   state_n inside {ST_TXD1, ST_SHIFT};
    end
  end

  assign dac_din    = shift_reg[FRAME_BITS-1];
  assign frame_done = en && (state == ST_SPIEND1);

  // out of reset: gates the pin-timing assertions below
  logic running;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) running <= 1'b0;
    else        running <= 1'b1;
  end

  // CS may only change while SCLK is low
  a_cs_sclk_low: assert property (@(posedge clk) disable iff (!running)
    $changed(dac_ncs) |-> !dac_sclk && !$past(dac_sclk));
  // DIN must not change while SCLK is high
  a_din_stable: assert property (@(posedge clk) disable iff (!running)
    dac_sclk && $past(dac_sclk) |-> $stable(dac_din));

endmodule
