// Self-checking testbench for lfsr3_retimed.
//
// The reference is the serial LFSR for g(x) = 1 + x + x^8 + x^9 written
// bit by bit: registers s[0] (D), s[1..7] (7D), s[8] (D); y(n) = s[8],
// w(n) = y(n) ^ u(n) is fed back to s[0], and XORed into s[1] and s[8].
// It knows nothing of the look-ahead form. Two instances of the parallel
// LFSR run side by side, one with gated-clock flops and one with plain
// flops, and both must match the reference three bits per clock with a
// latency of exactly 2 clocks.
//
// Phases: random message, feedback flush (u = 0 for 7 clocks, fb_en low
// for the last 6 of them),
// a key loaded through u followed by a free-running stretch with u = 0, a
// second flush and a second random message. Each restart is checked against
// a reference started from the zero state. The gated clocks are counted:
// the gated instance must clock its flops fewer times than the plain one.
module lfsr3_retimed_tb;
  import lfsr_pkg::*;

  localparam int N_BLOCKS = 400;
  localparam int FLUSH    = 7;
  localparam int LATENCY  = 2;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  fb_en;
  lane_t u;
  lane_t y_g, y_p;
  logic [N_FF-1:0] gclk_g, gclk_p;

  int checks   = 0;
  int failures = 0;
  int flushes  = 0;

  lfsr3_retimed #(.CLOCK_GATING(1'b1)) dut_g (
    .clk(clk), .rst_n(rst_n), .fb_en(fb_en), .u(u), .y(y_g), .gclk(gclk_g));
  lfsr3_retimed #(.CLOCK_GATING(1'b0)) dut_p (
    .clk(clk), .rst_n(rst_n), .fb_en(fb_en), .u(u), .y(y_p), .gclk(gclk_p));

  always #5 clk = ~clk;

  // gated clock pulses of every flop, both instances
  int pulses_g = 0;
  int pulses_p = 0;
  for (genvar i = 0; i < N_FF; i++) begin : g_cnt
    always @(posedge gclk_g[i]) if (rst_n) pulses_g++;
    always @(posedge gclk_p[i]) if (rst_n) pulses_p++;
  end

  // serial reference
  logic [8:0] s;
  function automatic lane_t ref_block(input lane_t ub);
    lane_t yb;
    logic  w;
    for (int j = 0; j < LANES; j++) begin
      yb[j] = s[8];
      w     = s[8] ^ ub[j];
      s     = {s[7] ^ w, s[6:2], s[1], s[0] ^ w, w};
    end
    return yb;
  endfunction

  // expected outputs by block number; valid only for checked blocks
  lane_t exp_y [N_BLOCKS + LATENCY + 1];
  bit    exp_v [N_BLOCKS + LATENCY + 1];

  task automatic check(input bit ok, input string what, input int k);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (block %0d)", what, k);
    end
  endtask

  initial begin : watchdog
    repeat (N_BLOCKS * 2 + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int phase_end [5];
    // message 1, flush, key + free run, flush, message 2
    phase_end = '{150, 150 + FLUSH, 260, 260 + FLUSH, N_BLOCKS};
    foreach (exp_v[i]) exp_v[i] = 1'b0;
    rst_n = 1'b0;
    fb_en = 1'b1;
    u     = '0;
    s     = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < N_BLOCKS + LATENCY; k++) begin
      // outputs of block k - LATENCY are on y now
      if (k >= LATENCY && exp_v[k-LATENCY]) begin
        check(y_g == exp_y[k-LATENCY], "gated LFSR output", k - LATENCY);
        check(y_p == exp_y[k-LATENCY], "plain LFSR output", k - LATENCY);
      end
      if (k < N_BLOCKS) begin
        if ((k >= phase_end[0] && k < phase_end[1]) ||
            (k >= phase_end[2] && k < phase_end[3])) begin
          // fb_en acts one clock behind u: keep it high for the first
          // flush clock so the last message block still gets its feedback
          fb_en = (k == phase_end[0] || k == phase_end[2]);
          u     = '0;
          s     = '0;          // reference restarts from the zero state
          if (k == phase_end[0] || k == phase_end[2]) flushes++;
        end else begin
          fb_en = 1'b1;
          if (k >= phase_end[1] && k < phase_end[2])
            u = (k < phase_end[1] + 3) ? lane_t'($urandom) : '0;  // key, then free run
          else
            u = lane_t'($urandom);
          exp_y[k] = ref_block(u);
          exp_v[k] = 1'b1;
        end
      end else begin
        fb_en = 1'b1;
        u     = '0;
      end
      @(negedge clk);
    end
    check(flushes == 2, "both feedback flushes happened", 0);
    check(pulses_p == N_FF * (N_BLOCKS + LATENCY), "plain flops clocked every cycle", 0);
    check(pulses_g > 0 && pulses_g < pulses_p, "gated flops skip clocks", 0);
    $display("clock pulses: gated %0d, plain %0d (%0d%%)", pulses_g, pulses_p,
             pulses_g * 100 / pulses_p);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
