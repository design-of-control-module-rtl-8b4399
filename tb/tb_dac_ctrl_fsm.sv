// tb_dac_ctrl_fsm: self-checking test of the TLC5615 control state machine.
//
// The step enable is driven with random gaps. A monitor written from the
// TLC5615 serial protocol (not from the RTL) decodes the pins: it collects
// DIN at every SCLK rising edge while CS is low and, at each CS rising edge,
// compares the 12 collected bits with the expected frame (code_high and
// code_low in turn, each followed by two zeros). It also checks the step
// counts: 2 steps from reset to CS low, CS low for 49 steps, one frame
// every 59 steps, SCLK high and low for 2 steps each, and that every state
// change is one of the transitions of the state diagram. A reset in the
// middle of a frame must return the machine to Idle with CS high, and the
// next frame must start again with code_high.
module tb_dac_ctrl_fsm;
  import dac_ctrl_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  code_t  code_high, code_low;
  logic   dac_ncs, dac_sclk, dac_din, frame_done;
  state_t state;
  int     checks = 0, failures = 0;

  dac_ctrl_fsm dut (
    .clk, .rst_n, .en, .code_high, .code_low,
    .dac_ncs, .dac_sclk, .dac_din, .state, .frame_done
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // legal transitions of the nine-state diagram
  function automatic bit legal(state_t a, state_t b);
    case (a)
      ST_IDLE:    return b == ST_LOAD;
      ST_LOAD:    return b == ST_CSDAC;
      ST_CSDAC:   return b == ST_TXD0;
      ST_TXD0:    return b == ST_TXD1;
      ST_TXD1:    return b == ST_SHIFT;
      ST_SHIFT:   return b == ST_TXD2;
      ST_TXD2:    return b == ST_TXD0 || b == ST_SPIEND1;
      ST_SPIEND1: return b == ST_SPIEND2;
      ST_SPIEND2: return b == ST_SPIEND2 || b == ST_LOAD;
      default:    return 1'b0;
    endcase
  endfunction

  // ---- protocol monitor, sampled on the falling clk edge ----
  int      step;             // enable pulses since reset release
  int      fall_step, rise_step, sclk_edge_step;
  int      nbits, frames, done_pulses;
  logic [FRAME_BITS-1:0] got;
  logic    expect_high;      // next frame should carry code_high
  code_t   sent_high, sent_low;   // codes in force when the frame was loaded
  logic    p_ncs, p_sclk, p_en;
  state_t  p_state;
  bit      first_frame;

  initial begin
    step = 0; frames = 0; done_pulses = 0; nbits = 0; got = '0;
    expect_high = 1'b1; first_frame = 1'b1;
    p_ncs = 1'b1; p_sclk = 1'b0; p_en = 1'b0; p_state = ST_IDLE;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (p_en) step++;
      if (state != p_state) check(legal(p_state, state), "legal transition");
      if (state != p_state) check(p_en, "state changes only on enable");
      if (frame_done) done_pulses++;
      // CS falling
      if (p_ncs && !dac_ncs) begin
        if (first_frame) check(step == 2, $sformatf("2 steps from reset to CS low (%0d)", step));
        else             check(step - fall_step == 59, "frame period 59 steps");
        fall_step = step; nbits = 0; first_frame = 1'b0;
        sclk_edge_step = step;
        check(!dac_sclk, "SCLK low at CS fall");
        // the frame was loaded in the step that just ended
        sent_high = code_high; sent_low = code_low;
      end
      // SCLK edges
      if (!p_sclk && dac_sclk) begin
        check(!dac_ncs, "SCLK rises only with CS low");
        check(step - sclk_edge_step == 2, "SCLK low for 2 steps");
        sclk_edge_step = step;
        got = {got[FRAME_BITS-2:0], dac_din};
        nbits++;
      end
      if (p_sclk && !dac_sclk) begin
        check(step - sclk_edge_step == 2, "SCLK high for 2 steps");
        sclk_edge_step = step;
      end
      // CS rising: the DAC would latch here
      if (!p_ncs && dac_ncs) begin
        check(!dac_sclk && !p_sclk, "SCLK low at CS rise");
        check(step - fall_step == 49, "CS low for 49 steps");
        check(nbits == FRAME_BITS, "12 bits per frame");
        check(got == {(expect_high ? sent_high : sent_low), 2'b00}, "frame contents");
        expect_high = !expect_high;
        frames++;
      end
    end
    p_ncs = dac_ncs; p_sclk = dac_sclk; p_en = en; p_state = state;
  end

  // DIN must not change while SCLK is high
  logic p_din, p_sclk_d;
  always @(negedge clk) begin
    if (rst_n && dac_sclk && p_sclk_d) check(dac_din == p_din, "DIN stable while SCLK high");
    p_din = dac_din;
  end
  always @(negedge clk) p_sclk_d <= dac_sclk;

  // random enable, codes change only while CS is high and not in Load
  always @(posedge clk) en <= ($urandom_range(0, 2) == 0);

  initial begin
    code_high = 10'h3A5;
    code_low  = 10'h05A;
    #1 rst_n = 1'b0;            // a real edge, so the asynchronous reset acts
    repeat (3) @(negedge clk);
    check(dac_ncs && !dac_sclk && state == ST_IDLE, "reset values");
    #2 rst_n = 1'b1;
    wait (frames == 3);
    // change the codes between frames (loaded at the next Load step)
    @(negedge clk);
    code_high = 10'h200;
    code_low  = 10'h1FF;
    wait (frames == 6);
    // reset in the middle of a frame
    wait (!dac_ncs);
    repeat (60) @(negedge clk);
    rst_n = 1'b0;
    #1;
    check(state == ST_IDLE && dac_ncs && !dac_sclk, "reset mid-frame returns to Idle");
    repeat (3) @(negedge clk);
    first_frame = 1'b1; step = 0; expect_high = 1'b1; nbits = 0;
    p_ncs = 1'b1; p_sclk = 1'b0; p_en = 1'b0; p_state = ST_IDLE;
    #2 rst_n = 1'b1;
    wait (frames == 8);
    repeat (20) @(negedge clk);   // frame_done follows the CS rise by a step
    check(done_pulses == frames, $sformatf("one frame_done per frame (%0d %0d)", done_pulses, frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
