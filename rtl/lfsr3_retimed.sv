// Three-parallel, pipelined and retimed LFSR for g(x) = 1 + x + x^8 + x^9,
// with gated-clock state flops.
//
// The serial LFSR (one bit per clock) is a shift register D - 7D - D with
// XORs after the first D and after the 7D; its output y(n) is XORed with the
// input u(n) and fed back to the first D and both XORs. This module produces
// the same y(n) three bits per clock. Look-ahead turns the recursion into
//   y(n) = y(n-3) ^ y(n-8) ^ y(n-11) ^ v(n),
//   v(n) = u(n-1) ^ u(n-2) ^ u(n-3) ^ u(n-8) ^ u(n-11)
// (see lfsr_pkg), in which each output lane depends only on earlier blocks.
//
// Structure, clock by clock (block c = the three input bits of clock c):
//   * Feed-forward network: v for block c from the current input and four
//     blocks of input history. It has no feedback, so it is cut from the loop
//     by a pipelining register (the "cutset" register t).
//   * Retiming: the older feedback terms, y of blocks c-2..c-4, are already
//     in registers one clock before they are needed, so their XOR h is formed
//     early and stored in t together with v. The loop from an output
//     register back to itself is then only the feedback mux and one 2-input
//     XOR: y_q <= mux(y_q) ^ t. The shared feedback nodes no longer fan out
//     into the loop.
//   * Feedback muxes: fb = fb_en ? y_q : 0. Lanes 1 and 2 of fb pass
//     through a two-block delay (d1, d2); lane 0 is needed one and two
//     blocks after the output register, so it uses fb itself and d1.
//     fb_en acts on the block held in the cutset register, i.e. the block
//     that entered one clock earlier. To start the next message (or key
//     load) from the zero state, feed u = 0 after the last block and, from
//     the following clock on, hold fb_en low for 6 clocks: every register
//     is then 0.
//   * All 23 state flops are gated-clock flops when CLOCK_GATING = 1, fed by
//     one shared clock inverter; CLOCK_GATING = 0 builds plain flops with the
//     same behaviour.
//
// Interface: u[j] = u(3c+j), y[j] = y(3c'+j). A block entering at clock c is
// on y after the second rising edge (2 clocks latency), one block per clock.
// Reset (asynchronous, active low) sets all state to 0, i.e. u(n) = y(n) = 0
// for n < 0. A key (seed) is loaded by shifting it in through u from the zero
// state; then u = 0 turns the LFSR into a free-running generator.
// The polynomial, the three lanes, the cutset, the retimed loop, the muxes
// with a 0 input and the gated flops follow the source design; the exact
// tap placement, latency, mux control and reset are this design's choices.
module lfsr3_retimed
  import lfsr_pkg::*;
#(
  parameter bit CLOCK_GATING = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             fb_en,
  input  lane_t            u,
  output lane_t            y,
  output logic [N_FF-1:0]  gclk
);

  localparam int unsigned UH_W = LANES * U_HIST_BLOCKS;

  // One inverter shared by all gated flops.
  logic clk_n;
  assign clk_n = ~clk;

  // ---------------------------------------------------------------- state
  logic [UH_W-1:0] uh_q, uh_d;   // uh_q[3*b+j] = u of block c-1-b, lane j
  lane_t           t_q,  t_d;    // cutset register: v ^ h of the next block
  lane_t           y_q,  y_d;    // output register
  lane_t           d1_q;         // fb one block back
  logic [2:1]      d2_q;         // fb two blocks back (lanes 1, 2 only)
  lane_t           fb;

  // -------------------------------------------------- feed-forward network
  // uall[3*b+j] = u of block c-b, lane j (b = 0 is the current input).
  logic [UH_W+LANES-1:0] uall;
  lane_t                 v;

  assign uall = {uh_q, u};
  assign uh_d = uall[UH_W-1:0];

  always_comb begin
    int m, lane, back;
    v = '0;
    for (int j = 0; j < LANES; j++) begin
      for (int k = 0; k < N_UTAPS; k++) begin
        // u(3c + j - d): lane (j-d) mod 3, (lane - (j-d)) / 3 blocks back.
        m    = j - int'(UTAPS[k]);
        lane = ((m % int'(LANES)) + int'(LANES)) % int'(LANES);
        back = (lane - m) / int'(LANES);
        v[j] = v[j] ^ uall[int'(LANES)*back + lane];
      end
    end
  end

  // ------------------------------------------------------- feedback loop
  // During clock c: fb = y of block c-2, d1_q = block c-3, d2_q = block c-4.
  // Terms for block c (lane j, n = 3c+j):
  //   lane 0: y(n-8)  = block c-3 lane 1, y(n-11) = block c-4 lane 1
  //   lane 1: y(n-8)  = block c-3 lane 2, y(n-11) = block c-4 lane 2
  //   lane 2: y(n-8)  = block c-2 lane 0, y(n-11) = block c-3 lane 0
  // y(n-3) (block c-1, lane j) is applied in the loop one clock later.
  lane_t h;

  assign fb = fb_en ? y_q : '0;

  always_comb begin
    h[0] = d1_q[1] ^ d2_q[1];
    h[1] = d1_q[2] ^ d2_q[2];
    h[2] = fb[0]   ^ d1_q[0];
    t_d  = h ^ v;
    y_d  = fb ^ t_q;
  end

  assign y = y_q;

  // ------------------------------------------------------------ registers
  lfsr_reg #(.W(UH_W),  .GATED(CLOCK_GATING)) u_uh (
    .clk(clk), .clk_n(clk_n), .rst_n(rst_n), .d(uh_d), .q(uh_q),
    .gclk(gclk[UH_W-1:0]));
  lfsr_reg #(.W(LANES), .GATED(CLOCK_GATING)) u_t (
    .clk(clk), .clk_n(clk_n), .rst_n(rst_n), .d(t_d), .q(t_q),
    .gclk(gclk[UH_W +: LANES]));
  lfsr_reg #(.W(LANES), .GATED(CLOCK_GATING)) u_y (
    .clk(clk), .clk_n(clk_n), .rst_n(rst_n), .d(y_d), .q(y_q),
    .gclk(gclk[UH_W+LANES +: LANES]));
  lfsr_reg #(.W(LANES), .GATED(CLOCK_GATING)) u_d1 (
    .clk(clk), .clk_n(clk_n), .rst_n(rst_n), .d(fb), .q(d1_q),
    .gclk(gclk[UH_W+2*LANES +: LANES]));
  lfsr_reg #(.W(LANES-1), .GATED(CLOCK_GATING)) u_d2 (
    .clk(clk), .clk_n(clk_n), .rst_n(rst_n), .d(d1_q[2:1]), .q(d2_q),
    .gclk(gclk[UH_W+3*LANES +: LANES-1]));

endmodule
