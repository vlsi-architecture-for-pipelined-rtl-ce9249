// tb_lift_pe: checks the lifting processing element y = K*c + (a+b)/2^SH for
// every shift used by the lifting steps (SH = 0, 4, 1) and every published
// constant. The expected value is formed with 64-bit integers: the product over
// 2^CF plus the neighbour sum over 2^SH, each rounded half up, wrapped to the
// sample width.
module tb_lift_pe;
  import dwt_pkg::*;

  coef_t   k;
  sample_t a, b, c;
  sample_t y0, y4, y1;
  int checks = 0, failures = 0;

  lift_pe #(.SH(0)) dut0 (.k, .c, .a, .b, .y(y0));
  lift_pe #(.SH(4)) dut4 (.k, .c, .a, .b, .y(y4));
  lift_pe #(.SH(1)) dut1 (.k, .c, .a, .b, .y(y1));

  // round half up: floor((x + 2^(sh-1)) / 2^sh)
  function automatic longint round_div(longint x, int sh);
    return (sh == 0) ? x : floor_div(x + (longint'(1) << (sh - 1)), sh);
  endfunction

  function automatic longint floor_div(longint x, int sh);
    // arithmetic floor(x / 2^sh) without using shifts of the block
    longint q = x / (longint'(1) << sh);
    if (x < 0 && q * (longint'(1) << sh) != x) q = q - 1;
    return q;
  endfunction

  function automatic sample_t model(coef_t kk, sample_t cc, sample_t aa, sample_t bb, int sh);
    longint r;
    r = round_div(longint'(kk) * longint'(cc), CF) + round_div(longint'(aa) + longint'(bb), sh);
    return sample_t'(r);
  endfunction

  task automatic cmp(sample_t got, int sh);
    sample_t e = model(k, c, a, b, sh);
    checks++;
    if (got !== e) begin
      failures++;
      if (failures < 10) $display("FAIL sh=%0d k=%0d c=%0d a=%0d b=%0d y=%0d exp=%0d", sh, k, c, a, b, got, e);
    end
  endtask

  initial begin
    static coef_t ks[6] = '{COEF_A, COEF_B, COEF_C, COEF_D, COEF_K0, COEF_K1};
    for (int n = 0; n < 6000; n++) begin
      k = ks[n % 6];
      // keep most inputs in the range of real image data, some full range
      if (n % 4 == 0) begin
        a = sample_t'($urandom); b = sample_t'($urandom); c = sample_t'($urandom);
      end else begin
        a = sample_t'($signed($urandom_range(0, 16383)) - 8192);
        b = sample_t'($signed($urandom_range(0, 16383)) - 8192);
        c = sample_t'($signed($urandom_range(0, 16383)) - 8192);
      end
      #1;
      cmp(y0, 0);
      cmp(y4, 4);
      cmp(y1, 1);
    end
    // a known point in raw sample words: A * 1600 + (160 + 320)
    k = COEF_A; c = sample_t'(1600); a = sample_t'(160); b = sample_t'(320);
    #1;
    checks++;
    if (y0 != sample_t'(-529)) begin  // floor(-5165*1600/8192) + 480 = -1009 + 480
      failures++;
      $display("FAIL known point y0=%0d", y0);
    end
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
