// clk_div4: divide-by-DIV clock divider for the DAC controller.
//
// The original controller runs its state machine on a clock "clkdiv4", the
// system clock divided by four. Here the divider is a free-running counter
// that stays in the system clock domain: it outputs the divided square wave
// (clkdiv4, high for the second half of each period) for observation and
// for use as a pin, and a one-system-clock tick (tick) in the cycle whose
// closing edge is the rising edge of clkdiv4. Logic clocked by clk and
// enabled by tick therefore updates exactly where logic clocked by clkdiv4
// would. Using an enable rather than a derived clock is this design's
// choice; the ratio of four follows the original design.
//
// Interface: clk, rst_n (asynchronous, active low; counter cleared, clkdiv4
// low). Timing: tick is high for one clk cycle every DIV cycles; clkdiv4
// rises on the clk edge that ends a tick cycle.
module clk_div4 #(
  parameter int unsigned DIV = 4  // division ratio, even, at least 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic clkdiv4,
  output logic tick
);

  localparam int unsigned CW = (DIV > 2) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      clkdiv4 <= 1'b0;
    end else begin
      if (cnt == CW'(DIV - 1)) cnt <= '0;
      else                     cnt <= cnt + 1'b1;
      // high for the second half of the period
      if (cnt == CW'(DIV/2 - 1))      clkdiv4 <= 1'b1;
      else if (cnt == CW'(DIV - 1))   clkdiv4 <= 1'b0;
    end
  end

  // clkdiv4 rises at the edge where cnt leaves DIV/2-1
  assign tick = (cnt == CW'(DIV/2 - 1));

  initial begin
    assert (DIV >= 2 && DIV % 2 == 0) else $error("clk_div4: DIV must be even and >= 2");
  end

endmodule
