// Self-checking testbench for stego_pair_embed.
//
// Applies every combination of the two LSBs, message bit and PRN bit, plus
// random pixel values, and checks: the stego pair encodes msg ^ prn as the
// XOR of its LSBs; the second pixel is unchanged; the first pixel is
// unchanged above its LSB; the first pixel changes only when the cover pair
// did not already encode the bit (changed flag and pixel agree); and no
// pixel moves by more than one gray level.
module stego_pair_embed_tb;

  localparam int PIX_W = 8;

  logic [PIX_W-1:0] pix_a, pix_b, stego_a, stego_b;
  logic             msg, prn, changed;

  int checks    = 0;
  int failures  = 0;
  int n_changed = 0;
  int n_kept    = 0;

  stego_pair_embed #(.PIX_W(PIX_W)) dut (
    .pix_a(pix_a), .pix_b(pix_b), .msg(msg), .prn(prn),
    .stego_a(stego_a), .stego_b(stego_b), .changed(changed));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: a=%0d b=%0d msg=%0b prn=%0b -> %0d %0d ch=%0b",
                 what, pix_a, pix_b, msg, prn, stego_a, stego_b, changed);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int diff;
    bit need_change;
    for (int i = 0; i < 2000; i++) begin
      pix_a = PIX_W'($urandom);
      pix_b = PIX_W'($urandom);
      if (i < 16) begin
        pix_a[0] = i[0];
        pix_b[0] = i[1];
        msg      = i[2];
        prn      = i[3];
      end else begin
        msg = 1'($urandom);
        prn = 1'($urandom);
      end
      need_change = (pix_a[0] ^ pix_b[0]) != (msg ^ prn);
      #1;
      diff = int'(stego_a) - int'(pix_a);
      check((stego_a[0] ^ stego_b[0]) == (msg ^ prn), "pair encodes msg ^ prn");
      check(stego_b == pix_b, "second pixel unchanged");
      check(stego_a[PIX_W-1:1] == pix_a[PIX_W-1:1], "upper bits unchanged");
      check(changed == need_change, "changed only when needed");
      check((stego_a != pix_a) == need_change, "pixel modified only when needed");
      check(diff >= -1 && diff <= 1, "change of at most one gray level");
      if (need_change) n_changed++; else n_kept++;
      #1;
    end
    check(n_changed > 0 && n_kept > 0, "both modified and unmodified pairs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
