// tb_predict_stage: streams lines of random length (1 to 9 pairs) through a
// predict stage configured as P2 (constant C, shift 1), with and without idle
// cycles between lines. For each line the expected outputs are computed in the
// testbench from the whole line (right edge mirrored), and each output pair is
// checked for value, line flags, tag and a latency of exactly 2 cycles.
module tb_predict_stage;
  import dwt_pkg::*;

  localparam int TW = 16;

  logic          clk = 0, rst_n = 0;
  pair_t         in, out;
  logic [TW-1:0] in_tag, out_tag;
  int            cyc = 0;
  int checks = 0, failures = 0;

  predict_stage #(.K(COEF_C), .SH(SH_P2), .TW(TW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { pair_t p; int tag; int cyc; } exp_t;
  exp_t expq[$];

  // round half up: floor((x + 2^(sh-1)) / 2^sh)
  function automatic longint round_div(longint x, int sh);
    return (sh == 0) ? x : floor_div(x + (longint'(1) << (sh - 1)), sh);
  endfunction

  function automatic longint floor_div(longint x, int sh);
    longint q = x / (longint'(1) << sh);
    if (x < 0 && q * (longint'(1) << sh) != x) q = q - 1;
    return q;
  endfunction

  // compare the output seen at this negedge
  task automatic monitor();
    if (out.v) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e = expq.pop_front();
        if (out !== e.p || out_tag !== TW'(e.tag) || cyc != e.cyc + 2) begin
          failures++;
          if (failures < 10)
            $display("FAIL tag=%0d got s=%0d d=%0d f=%b l=%b tag=%0d cyc=%0d, exp s=%0d d=%0d f=%b l=%b cyc=%0d",
                     e.tag, out.s, out.d, out.first, out.last, out_tag, cyc,
                     e.p.s, e.p.d, e.p.first, e.p.last, e.cyc + 2);
        end
      end
    end
  endtask

  int tag = 0;

  initial begin
    in = '0; in_tag = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int line = 0; line < 400; line++) begin
      automatic int np = $urandom_range(1, 9);
      sample_t s[], d[];
      s = new[np]; d = new[np];
      for (int i = 0; i < np; i++) begin
        s[i] = sample_t'($signed($urandom_range(0, 8191)) - 4096);
        d[i] = sample_t'($signed($urandom_range(0, 8191)) - 4096);
      end
      for (int i = 0; i < np; i++) begin
        exp_t e;
        automatic longint sn = (i == np - 1) ? longint'(s[i]) : longint'(s[i+1]);
        @(negedge clk);
        monitor();
        in = '{v: 1'b1, first: (i == 0), last: (i == np - 1), s: s[i], d: d[i]};
        in_tag = TW'(tag);
        e.p = '{v: 1'b1, first: (i == 0), last: (i == np - 1), s: s[i],
                d: sample_t'(round_div(longint'(COEF_C) * longint'(d[i]), CF) +
                             round_div(longint'(s[i]) + sn, SH_P2))};
        e.tag = tag; e.cyc = cyc;
        expq.push_back(e);
        tag++;
      end
      // optional gap between lines
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        monitor();
        in = '0;
      end
    end
    repeat (6) begin
      @(negedge clk);
      monitor();
      in = '0;
    end
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", expq.size());
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
