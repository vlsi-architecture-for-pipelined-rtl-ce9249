// tb_booth_mult: checks the radix-2 Booth multiplier against the product
// computed with 64-bit integer arithmetic, for corner operands (zero, +-1,
// most negative and most positive words, alternating bit patterns that give
// the most Booth add/subtract operations) and for random operands.
module tb_booth_mult;
  localparam int AW = 20;
  localparam int BW = 16;

  logic signed [AW-1:0]    a;
  logic signed [BW-1:0]    b;
  logic signed [AW+BW-1:0] p;
  int checks = 0, failures = 0;

  booth_mult #(.AW(AW), .BW(BW)) dut (.a, .b, .p);

  task automatic check(input longint av, input longint bv);
    longint expct;
    a = AW'(av);
    b = BW'(bv);
    #1;
    expct = longint'(a) * longint'(b);
    checks++;
    if (longint'(p) != expct) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d p=%0d expected %0d", a, b, p, expct);
    end
  endtask

  initial begin
    static longint ca[8] = '{0, 1, -1, 524287, -524288, 'h55555, -'h2AAAB, 12345};
    static longint cb[8] = '{0, 1, -1, 32767, -32768, 'h5555, -'h2AAB, -5165};
    foreach (ca[i]) foreach (cb[j]) check(ca[i], cb[j]);
    repeat (20000) check(longint'($signed($urandom)), longint'($signed($urandom)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
