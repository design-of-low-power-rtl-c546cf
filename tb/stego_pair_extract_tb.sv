// Self-checking testbench for stego_pair_extract.
//
// Applies every combination of the two LSBs and the PRN bit, plus random
// pixel values, and checks msg = lsb(a) ^ lsb(b) ^ prn; the upper pixel bits
// must not matter.
module stego_pair_extract_tb;

  localparam int PIX_W = 8;

  logic [PIX_W-1:0] pix_a, pix_b;
  logic             prn, msg;

  int checks   = 0;
  int failures = 0;

  stego_pair_extract #(.PIX_W(PIX_W)) dut (
    .pix_a(pix_a), .pix_b(pix_b), .prn(prn), .msg(msg));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: a=%0d b=%0d prn=%0b -> msg=%0b", what, pix_a, pix_b, prn, msg);
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
    logic expected;
    for (int i = 0; i < 1000; i++) begin
      pix_a = PIX_W'($urandom);
      pix_b = PIX_W'($urandom);
      prn   = 1'($urandom);
      if (i < 8) begin
        pix_a[0] = i[0];
        pix_b[0] = i[1];
        prn      = i[2];
      end
      expected = (pix_a % 2 == 1) != (pix_b % 2 == 1);
      expected = expected ^ prn;
      #1;
      check(msg == expected, "msg = lsb(a) ^ lsb(b) ^ prn");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
