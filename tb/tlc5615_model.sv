// tlc5615_model: behavioural model of the serial interface of the TI TLC5615
// 10-bit DAC, for simulation only (not synthesizable logic of this design).
//
// While cs_n is low, each rising edge of sclk shifts din into a 16-bit shift
// register, MSB first; dout is the register's MSB. The rising edge of cs_n
// copies the 10 data bits into the DAC register. With the 12-bit input
// format (no daisy chain) the data bits are shift-register bits [11:2];
// bits [1:0] are the two fill zeros. The model also reports the number of
// sclk edges seen in the last frame, whether sclk was high at any cs_n
// transition (the chip forbids it), and the analog output as a code.
module tlc5615_model (
  input  logic       cs_n,
  input  logic       sclk,
  input  logic       din,
  output logic       dout,
  output logic [9:0] dac_reg,
  output logic [1:0] fill_bits,     // the two fill bits of the last frame
  output int         last_bits,     // sclk rising edges in the last frame
  output int         latches,       // number of cs_n rising edges
  output int         cs_violations  // cs_n transitions with sclk high
);
  logic [15:0] sr = '0;
  int          bits = 0;

  initial begin
    dac_reg       = '0;   // power-on reset
    fill_bits     = '0;
    last_bits     = 0;
    latches       = 0;
    cs_violations = 0;
  end

  assign dout = sr[15];

  // one process for all events, so each variable has a single driver
  logic p_cs = 1'b1;
  always @(posedge sclk or cs_n) begin
    if (cs_n != p_cs) begin
      if (sclk) cs_violations = cs_violations + 1;
      if (!cs_n) begin
        bits = 0;
      end else begin
        dac_reg   = sr[11:2];
        fill_bits = sr[1:0];
        last_bits = bits;
        latches   = latches + 1;
      end
      p_cs = cs_n;
    end else if (sclk && !cs_n) begin
      sr   = {sr[14:0], din};
      bits = bits + 1;
    end
  end
endmodule
