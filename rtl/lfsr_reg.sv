// W-bit register used for every state bit of the parallel LFSR.
//
// With GATED = 1 each bit is a gated_ff, clocked only when its input differs
// from its output; all bits share the one inverted clock clk_n that the
// caller supplies. With GATED = 0 the bits are plain rising-edge flops.
// Both forms load d at the rising edge of clk and reset to 0 asynchronously
// when rst_n is low, so they are interchangeable. gclk shows the clock each
// bit received (clk itself for plain flops).
module lfsr_reg #(
  parameter int unsigned W     = 1,
  parameter bit          GATED = 1'b1
) (
  input  logic         clk,
  input  logic         clk_n,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic [W-1:0] gclk
);

  if (GATED) begin : g_gated
    for (genvar i = 0; i < W; i++) begin : g_bit
      gated_ff u_ff (
        .clk_n(clk_n),
        .rst_n(rst_n),
        .d    (d[i]),
        .q    (q[i]),
        .gclk (gclk[i])
      );
    end
  end else begin : g_plain
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) q <= '0;
      else        q <= d;
    end
    assign gclk = {W{clk}};
  end

endmodule
