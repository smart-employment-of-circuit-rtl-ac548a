// clock_gate -- AND clock gate that stops the operating core.
//
// clk_o = clk_i AND en, where en is en_i captured by a latch that is open
// while clk_i is low. The latch keeps a change of en_i made after a rising
// edge from cutting the high phase short, so clk_o only ever loses whole
// pulses: a clock in which en_i is low at the rising edge produces no edge
// on clk_o. The AND gate follows the document; the latch in front of it is
// the usual integrated-clock-gate form and is this design's choice. It is
// the one intended latch of the design.
module clock_gate (
  input  logic clk_i,
  input  logic en_i,
  output logic clk_o
);
  logic en_l;

  always_latch begin
    if (!clk_i) en_l = en_i;
  end

  assign clk_o = clk_i & en_l;
endmodule
