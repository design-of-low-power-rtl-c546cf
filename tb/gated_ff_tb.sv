// Self-checking testbench for gated_ff.
//
// Drives random data (changing once, sometimes twice, while the clock is
// low) and checks that q behaves like a rising-edge flop: after each rising
// clock edge q equals the d that was present at the edge. It also counts the
// rising edges of the gated clock per clock period and checks that the flop
// is clocked exactly when d differed from q before the edge, and never when
// they were equal. Reset is checked at the start.
module gated_ff_tb;

  logic clk = 1'b0;
  logic clk_n;
  logic rst_n;
  logic d;
  logic q;
  logic gclk;

  int checks   = 0;
  int failures = 0;
  int gpulses  = 0;   // gated clock rising edges in the current period
  int n_gated  = 0;   // periods in which the flop was clocked
  int n_idle   = 0;   // periods in which the clock was suppressed

  assign clk_n = ~clk;

  gated_ff dut (.clk_n(clk_n), .rst_n(rst_n), .d(d), .q(q), .gclk(gclk));

  always #5 clk = ~clk;

  always @(posedge gclk) gpulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (d=%0b q=%0b t=%0t)", what, d, q, $time);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic d_at_edge;
    logic q_before;
    bit   glitch;
    rst_n = 1'b0;
    d     = 1'b1;
    @(negedge clk);
    check(q == 1'b0, "reset clears q");
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      // clk is low here: pick the new data, sometimes with a glitch first
      #1;
      gpulses = 0;
      glitch  = ($urandom_range(3) == 0);
      if (glitch) begin
        d = ~q;
        #1;
      end
      d = 1'($urandom_range(1));
      d_at_edge = d;
      q_before  = q;
      #2;
      @(posedge clk);
      #1;
      check(q == d_at_edge, "q takes d at the rising clock edge");
      if (q_before != d_at_edge) begin
        n_gated++;
        check(gpulses >= 1, "flop clocked when d != q");
      end else begin
        n_idle++;
        // a glitch back to d == q may give one harmless early pulse
        check(gpulses == 0 || (glitch && gpulses == 1), "no clock when d == q");
      end
      @(negedge clk);
    end
    check(n_gated > 100 && n_idle > 100, "both gated and idle periods seen");
    $display("gated_ff: clocked %0d periods, clock suppressed in %0d", n_gated, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
