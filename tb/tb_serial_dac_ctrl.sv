// tb_serial_dac_ctrl: end-to-end test of the TLC5615 control module with
// all parameters at their defaults, driving a behavioural model of the DAC.
//
// The DAC model shifts DIN in on SCLK rising edges while CS is low and
// latches the code on the CS rising edge, so the test checks what the chip
// would really convert. Checked: the DAC register takes code_high and
// code_low in turn; each frame has exactly 12 SCLK edges and ends in two
// zero fill bits; no CS edge happens while SCLK is high; clkdiv4 has a
// period of 4 clk cycles; SCLK has a period of 16 clk cycles; one frame
// (CS rise to CS rise) takes 236 clk cycles; the machine waits 8 steps in
// Spiend2. Each mechanism of the design (frame transfer, bit loop, shift,
// wait, alternation of the two codes, code change between frames, reset in
// mid-frame) is counted and must happen at least once.
module tb_serial_dac_ctrl;
  import dac_ctrl_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b1;
  code_t  code_high, code_low;
  logic   clkdiv4, dac_ncs, dac_sclk, dac_din, frame_done;
  state_t state;
  int     checks = 0, failures = 0;

  serial_dac_ctrl dut (
    .clk, .rst_n, .code_high, .code_low,
    .clkdiv4, .dac_ncs, .dac_sclk, .dac_din, .state, .frame_done
  );

  logic       dout;
  logic [9:0] dac_reg;
  logic [1:0] fill_bits;
  int         last_bits, latches, cs_violations;

  tlc5615_model u_dac (
    .cs_n(dac_ncs), .sclk(dac_sclk), .din(dac_din), .dout,
    .dac_reg, .fill_bits, .last_bits, .latches, .cs_violations
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // mechanism counters
  int lat0 = 0, viol0 = 0;
  int n_frames = 0, n_bitloop = 0, n_shift = 0, n_wait = 0;
  int n_high = 0, n_low = 0, n_code_change = 0, n_midreset = 0;

  // clk cycle counter and edge bookkeeping (sampled on falling clk edges)
  longint cyc = 0;
  longint t_div = -1, t_sclk = -1, t_csrise = -1;
  int     spiend2_steps = 0;
  logic   p_div = 1'b0, p_sclk = 1'b0, p_ncs = 1'b1;
  state_t p_state = ST_IDLE;
  logic   expect_high = 1'b1;
  code_t  exp_code;
  code_t  ref_high, ref_low;     // codes in force at the last Load

  always @(negedge clk) begin
    cyc++;
    if (rst_n) begin
      if (clkdiv4 && !p_div) begin
        if (t_div >= 0) check(cyc - t_div == 4, "clkdiv4 period 4 clk");
        t_div = cyc;
      end
      if (dac_sclk && !p_sclk) begin
        if (t_sclk >= 0 && !p_ncs) check(cyc - t_sclk == 16, "SCLK period 16 clk");
        t_sclk = cyc;
      end
      if (state == ST_LOAD && p_state != ST_LOAD) begin
        ref_high = code_high; ref_low = code_low;
      end
      if (p_state == ST_TXD2 && state == ST_TXD0) n_bitloop++;
      if (p_state == ST_SHIFT && state == ST_TXD2) n_shift++;
      if (state == ST_SPIEND2 && clkdiv4 && !p_div) spiend2_steps++;
      if (p_state == ST_SPIEND2 && state == ST_LOAD) begin
        check(spiend2_steps == 8, $sformatf("8 steps in Spiend2 (%0d)", spiend2_steps));
        n_wait++;
      end
      if (state == ST_SPIEND1) spiend2_steps = 0;
      if (!dac_ncs && p_ncs) t_sclk = -1;
      if (dac_ncs && !p_ncs) begin
        if (t_csrise >= 0) check(cyc - t_csrise == 236, "frame period 236 clk");
        t_csrise = cyc;
      end
    end
    p_div = clkdiv4; p_sclk = dac_sclk; p_ncs = dac_ncs; p_state = state;
  end

  // what the DAC latched, checked right after every CS rising edge
  always @(posedge dac_ncs) begin
    #1;
    if (rst_n) begin
      exp_code = expect_high ? ref_high : ref_low;
      check(dac_reg == exp_code,
            $sformatf("DAC register %h, expected %h", dac_reg, exp_code));
      check(last_bits == FRAME_BITS, "12 SCLK edges per frame");
      check(fill_bits == 2'b00, "two zero fill bits");
      if (expect_high) n_high++; else n_low++;
      expect_high = !expect_high;
      n_frames++;
    end
  end

  initial begin
    code_high = 10'h3FF;
    code_low  = 10'h000;
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    check(dac_ncs && !dac_sclk && state == ST_IDLE && !clkdiv4, "reset values");
    lat0 = latches;             // CS edges before the first reset are not frames
    viol0 = cs_violations;
    #2 rst_n = 1'b1;
    wait (n_frames == 4);
    // new codes while CS is high; the next Load picks them up
    @(negedge clk);
    code_high = 10'h2AA;
    code_low  = 10'h155;
    n_code_change++;
    wait (n_frames == 8);
    // reset in the middle of a frame
    wait (!dac_ncs);
    repeat (100) @(negedge clk);
    rst_n = 1'b0;
    n_midreset++;
    #1 check(state == ST_IDLE && dac_ncs && !dac_sclk, "mid-frame reset returns to Idle");
    repeat (3) @(negedge clk);
    expect_high = 1'b1;
    t_div = -1; t_sclk = -1; t_csrise = -1;
    p_div = 1'b0; p_sclk = 1'b0; p_ncs = 1'b1; p_state = ST_IDLE;
    #2 rst_n = 1'b1;
    wait (n_frames == 12);
    repeat (10) @(negedge clk);
    check(cs_violations == viol0, "no CS edge while SCLK high");
    check(latches - lat0 == n_frames + 1, "mid-frame reset raised CS once more");
    check(n_frames  > 0, "frames transferred");
    check(n_bitloop > 0, "Txd2 -> Txd0 bit loop");
    check(n_shift   > 0, "Shift state");
    check(n_wait    > 0, "Spiend2 wait");
    check(n_high    > 0, "code_high frames");
    check(n_low     > 0, "code_low frames");
    check(n_code_change > 0, "code change");
    check(n_midreset    > 0, "mid-frame reset");
    $display("mechanisms: frames=%0d bitloops=%0d shifts=%0d waits=%0d high=%0d low=%0d code_changes=%0d mid_resets=%0d",
             n_frames, n_bitloop, n_shift, n_wait, n_high, n_low, n_code_change, n_midreset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
