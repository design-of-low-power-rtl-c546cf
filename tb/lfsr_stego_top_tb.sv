// End-to-end testbench for lfsr_stego_top at its default parameters.
//
// Sender and receiver LFSRs are loaded with the same key (9 key bits shifted
// in through u over 3 clocks after reset), then run free with u = 0. Every
// clock three random message bits are embedded into three random cover
// pixel pairs; the stego pixels go straight to the receiver, which must
// recover the message bits in the same clock. The pseudo-random bits of
// both sides are checked against a bit-serial model of the LFSR
// g(x) = 1 + x + x^8 + x^9, and every stego pair must differ from its
// cover pair by at most one gray level in the first pixel only.
//
// Session 2 flushes both LFSRs through their feedback muxes (fb_en low),
// loads a new key and repeats. Session 3 gives the receiver a different key
// than the sender: the recovered bits must then disagree with the message
// somewhere. Counted mechanisms, each of which must occur: key loads,
// feedback flushes, pairs that needed a modified LSB, pairs that did not,
// clock pulses suppressed by the gated flops, and wrong-key mismatches.
module lfsr_stego_top_tb;
  import lfsr_pkg::*;

  localparam int PIX_W    = 8;
  localparam int KEY_BLK  = 3;     // 9 key bits = the serial LFSR's length
  localparam int LATENCY  = 2;
  localparam int MSG_BLK  = 120;   // message clocks per session
  localparam int FLUSH    = 7;

  logic             clk = 1'b0;
  logic             rst_n;
  logic             tx_fb_en, rx_fb_en;
  lane_t            tx_u, rx_u;
  logic [PIX_W-1:0] cover_a [LANES];
  logic [PIX_W-1:0] cover_b [LANES];
  lane_t            msg_in;
  logic [PIX_W-1:0] stego_a [LANES];
  logic [PIX_W-1:0] stego_b [LANES];
  lane_t            changed;
  lane_t            tx_prn, rx_prn;
  logic [N_FF-1:0]  tx_gclk, rx_gclk;
  lane_t            msg_out;

  lfsr_stego_top dut (
    .clk(clk), .rst_n(rst_n),
    .tx_fb_en(tx_fb_en), .tx_u(tx_u), .cover_a(cover_a), .cover_b(cover_b),
    .msg_in(msg_in), .stego_a(stego_a), .stego_b(stego_b), .changed(changed),
    .tx_prn(tx_prn), .tx_gclk(tx_gclk),
    .rx_fb_en(rx_fb_en), .rx_u(rx_u), .rx_a(stego_a), .rx_b(stego_b),
    .msg_out(msg_out), .rx_prn(rx_prn), .rx_gclk(rx_gclk));

  always #5 clk = ~clk;

  int checks      = 0;
  int failures    = 0;
  int n_keyloads  = 0;
  int n_flushes   = 0;
  int n_modified  = 0;
  int n_kept      = 0;
  int n_wrongkey  = 0;
  int n_cycles    = 0;
  int n_pulses    = 0;

  for (genvar i = 0; i < N_FF; i++) begin : g_cnt
    always @(posedge tx_gclk[i]) if (rst_n) n_pulses++;
  end
  always @(posedge clk) if (rst_n) n_cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // bit-serial reference LFSRs, one per side
  typedef logic [8:0] sstate_t;
  function automatic lane_t ref_block(ref sstate_t s, input lane_t ub);
    lane_t yb;
    logic  w;
    for (int j = 0; j < LANES; j++) begin
      yb[j] = s[8];
      w     = s[8] ^ ub[j];
      s     = {s[7] ^ w, s[6:2], s[1], s[0] ^ w, w};
    end
    return yb;
  endfunction

  sstate_t s_tx, s_rx;
  lane_t   exp_tx [$];
  lane_t   exp_rx [$];

  // One clock: apply inputs at the falling edge, check at the next one.
  task automatic step(input logic tfb, input lane_t tu, input logic rfb, input lane_t ru,
                      input bit track);
    tx_fb_en = tfb; tx_u = tu;
    rx_fb_en = rfb; rx_u = ru;
    if (track) begin
      exp_tx.push_back(ref_block(s_tx, tu));
      exp_rx.push_back(ref_block(s_rx, ru));
    end
    @(negedge clk);
  endtask

  // Flush both sides and shift in the keys; afterwards the expected-PRN
  // queues are aligned so their head is the block on tx_prn / rx_prn.
  task automatic start_session(input logic [8:0] tx_key, input logic [8:0] rx_key);
    // flush: u = 0, then fb_en low for 6 clocks
    step(1'b1, '0, 1'b1, '0, 1'b0);
    for (int i = 1; i < FLUSH; i++) step(1'b0, '0, 1'b0, '0, 1'b0);
    n_flushes++;
    s_tx = '0; s_rx = '0;
    exp_tx.delete(); exp_rx.delete();
    for (int b = 0; b < KEY_BLK; b++)
      step(1'b1, tx_key[3*b +: 3], 1'b1, rx_key[3*b +: 3], 1'b1);
    n_keyloads++;
    for (int b = 0; b < LATENCY; b++) step(1'b1, '0, 1'b1, '0, 1'b1);
    repeat (KEY_BLK) begin
      void'(exp_tx.pop_front());
      void'(exp_rx.pop_front());
    end
  endtask

  // Message clocks: random cover pairs and message bits.
  task automatic run_message(input bit same_key);
    for (int c = 0; c < MSG_BLK; c++) begin
      lane_t exp_prn_tx, exp_prn_rx;
      for (int j = 0; j < LANES; j++) begin
        cover_a[j] = PIX_W'($urandom);
        cover_b[j] = PIX_W'($urandom);
      end
      msg_in = lane_t'($urandom);
      #1;
      exp_prn_tx = exp_tx.pop_front();
      exp_prn_rx = exp_rx.pop_front();
      check(tx_prn == exp_prn_tx, "sender PRN matches serial LFSR");
      check(rx_prn == exp_prn_rx, "receiver PRN matches serial LFSR");
      for (int j = 0; j < LANES; j++) begin
        int diff;
        diff = int'(stego_a[j]) - int'(cover_a[j]);
        check(stego_b[j] == cover_b[j], "second pixel unchanged");
        check(diff >= -1 && diff <= 1, "at most one gray level changed");
        check((stego_a[j][0] ^ stego_b[j][0]) == (msg_in[j] ^ exp_prn_tx[j]),
              "stego pair encodes randomized bit");
        if (changed[j]) n_modified++; else n_kept++;
      end
      if (same_key) check(msg_out == msg_in, "receiver recovers message");
      else if (msg_out != msg_in) n_wrongkey++;
      step(1'b1, '0, 1'b1, '0, 1'b1);
    end
  endtask

  initial begin : watchdog
    repeat (3 * (MSG_BLK + FLUSH + KEY_BLK + LATENCY) + 50) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [8:0] key1, key2;
    rst_n = 1'b0;
    tx_fb_en = 1'b1; rx_fb_en = 1'b1;
    tx_u = '0; rx_u = '0; msg_in = '0;
    for (int j = 0; j < LANES; j++) begin
      cover_a[j] = '0;
      cover_b[j] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    key1 = 9'h1A5;
    key2 = 9'h0C3;
    start_session(key1, key1);
    run_message(1'b1);
    start_session(key2, key2);
    run_message(1'b1);
    start_session(key1, key2);
    run_message(1'b0);

    check(n_keyloads == 3, "key loads happened");
    check(n_flushes  == 3, "feedback flushes happened");
    check(n_modified > 0,  "pairs with a modified LSB occurred");
    check(n_kept > 0,      "pairs left unmodified occurred");
    check(n_wrongkey > 0,  "a wrong key garbles the message");
    check(n_pulses < N_FF * n_cycles, "gated flops skipped clock pulses");
    $display("key loads %0d, flushes %0d, modified %0d, kept %0d, wrong-key errors %0d",
             n_keyloads, n_flushes, n_modified, n_kept, n_wrongkey);
    $display("sender flop clock pulses %0d of %0d (%0d%%)", n_pulses, N_FF * n_cycles,
             n_pulses * 100 / (N_FF * n_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
