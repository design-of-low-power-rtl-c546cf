// One flip-flop with a data-driven gated clock: the flop is clocked only when
// its input differs from its output, so a bit that does not change draws no
// clock power.
//
// The toggle condition d ^ q and the inverted system clock clk_n enter a NAND
// whose output is the flop's clock, gclk = ~(clk_n & (d ^ q)). While clk is
// high gclk is held high. While clk is low gclk falls only if d != q, and it
// rises again with the next rising edge of clk, where the flop takes d. If d
// changes back to q while clk is low, gclk may rise early, but the flop then
// loads the value it already holds, so the result is the same as a plain
// rising-edge flop. The inverter that makes clk_n is outside: one inverter
// serves all flops of an LFSR.
//
// Interface: clk_n (inverted clock), rst_n (asynchronous, active low, clears
// q), d, q, and gclk brought out so that clock activity can be counted.
// Timing: q takes d at the rising edge of the system clock, like an ordinary
// rising-edge flop. The XOR/NAND gating comes from the source design; the
// reset is this design's addition.
module gated_ff (
  input  logic clk_n,
  input  logic rst_n,
  input  logic d,
  output logic q,
  output logic gclk
);

  logic toggle;

  assign toggle = d ^ q;
  assign gclk   = ~(clk_n & toggle);

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end

endmodule
