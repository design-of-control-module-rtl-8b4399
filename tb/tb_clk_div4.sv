// tb_clk_div4: self-checking test of the divide-by-four clock divider.
//
// Checks, over many periods and across a reset in the middle: tick comes
// exactly every DIV clk cycles, the first tick comes DIV/2 cycles after
// reset is released, clkdiv4 rises on the edge that ends a tick cycle, and
// clkdiv4 is high for exactly DIV/2 cycles of every DIV.
module tb_clk_div4;
  localparam int unsigned DIV = 4;   // the divider's default ratio

  logic clk = 1'b0, rst_n = 1'b0;
  logic clkdiv4, tick;
  int   checks = 0, failures = 0;

  clk_div4 dut (.clk(clk), .rst_n(rst_n), .clkdiv4(clkdiv4), .tick(tick));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // independent model: clk rising edges since reset release, checked on
  // the falling edge so the model never races the divider
  int   edges = 0;
  logic prev_tick = 1'b0;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) edges <= 0;
    else        edges <= edges + 1;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      // tick on edge counts DIV/2-1, DIV/2-1+DIV, ...
      check(tick == ((edges % DIV) == DIV/2 - 1), "tick position");
      // clkdiv4 high on counts DIV/2 .. DIV-1 of each period
      check(clkdiv4 == ((edges % DIV) >= DIV/2), "clkdiv4 level");
      if (prev_tick) check(clkdiv4 == 1'b1, "clkdiv4 rises after tick");
    end
    prev_tick = tick && rst_n;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (41) @(negedge clk);
    rst_n = 1'b0;               // reset in the middle of a period
    #3;
    check(clkdiv4 == 1'b0 && tick == ((DIV/2 - 1) == 0), "reset clears divider");
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (50) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
