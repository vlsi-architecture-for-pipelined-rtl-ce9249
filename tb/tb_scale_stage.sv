// tb_scale_stage: drives random pairs (with random idle cycles) into the
// scaling stage and checks s = round(K0*s / 2^CF), d = round(K1*d / 2^CF), the
// pass-through of the line flags and tag, and a latency of 1 cycle. It also
// checks one known point: the sample word 1600 scaled by K0 and K1.
module tb_scale_stage;
  import dwt_pkg::*;

  localparam int TW = 12;

  logic          clk = 0, rst_n = 0;
  pair_t         in, out;
  logic [TW-1:0] in_tag, out_tag;
  int checks = 0, failures = 0;

  scale_stage #(.TW(TW)) dut (.*);

  always #5 clk = ~clk;

  // round half up: floor((x + 2^(sh-1)) / 2^sh)
  function automatic longint round_div(longint x, int sh);
    return (sh == 0) ? x : floor_div(x + (longint'(1) << (sh - 1)), sh);
  endfunction

  function automatic longint floor_div(longint x, int sh);
    longint q = x / (longint'(1) << sh);
    if (x < 0 && q * (longint'(1) << sh) != x) q = q - 1;
    return q;
  endfunction

  pair_t         exp_p;
  logic [TW-1:0] exp_tag;
  logic          have_exp = 0;

  initial begin
    in = '0; in_tag = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      if (have_exp) begin
        checks++;
        if (out !== exp_p || out_tag !== exp_tag) begin
          failures++;
          if (failures < 10) $display("FAIL got s=%0d d=%0d exp s=%0d d=%0d", out.s, out.d, exp_p.s, exp_p.d);
        end
      end
      in.v     = ($urandom_range(0, 3) != 0);
      in.first = 1'($urandom);
      in.last  = 1'($urandom);
      in.s     = (n == 0) ? sample_t'(1600) : sample_t'($signed($urandom_range(0, 65535)) - 32768);
      in.d     = (n == 0) ? sample_t'(1600) : sample_t'($signed($urandom_range(0, 65535)) - 32768);
      in_tag   = TW'($urandom);
      exp_p    = '{v: in.v, first: in.first, last: in.last,
                   s: sample_t'(round_div(longint'(COEF_K0) * longint'(in.s), CF)),
                   d: sample_t'(round_div(longint'(COEF_K1) * longint'(in.d), CF))};
      exp_tag  = in_tag;
      have_exp = 1;
      if (n == 0) begin
        @(negedge clk);
        checks++;
        // 1600 * 2.590697 = 4145.1, 1600 * 1.929981 = 3087.97
        if (out.s != sample_t'(4145) || out.d != sample_t'(3088)) begin
          failures++;
          $display("FAIL known point s=%0d d=%0d", out.s, out.d);
        end
        have_exp = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
