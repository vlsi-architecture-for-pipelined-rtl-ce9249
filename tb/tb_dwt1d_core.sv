// tb_dwt1d_core: streams lines of 8-bit samples (2 to 64 samples per line,
// back to back or with idle cycles between lines) through the five-stage
// lifting core. Each output pair is compared with the real-valued reference
// transform (tolerance TOL pixel units, for the fixed-point rounding), its tag
// and line flags are checked, and its latency must be 7 cycles after the pair
// entered, i.e. 5 cycles after the last input pair it depends on (pair i+2).
module tb_dwt1d_core;
  import dwt_pkg::*;
  `include "tb/dwt97_ref.svh"

  localparam int  TW  = 16;
  localparam real TOL = 0.1;

  logic          clk = 0, rst_n = 0;
  pair_t         in, out;
  logic [TW-1:0] in_tag, out_tag;
  int            cyc = 0;
  int checks = 0, failures = 0;
  real maxerr = 0.0;

  dwt1d_core #(.TW(TW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { real lo; real hi; bit first; bit last; int tag; int cyc; } exp_t;
  exp_t expq[$];

  function automatic real to_real(sample_t v);
    return real'(v) / real'(1 << FB);
  endfunction

  task automatic monitor();
    if (out.v) begin
      exp_t e;
      real el, eh;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
        return;
      end
      e  = expq.pop_front();
      el = to_real(out.s) - e.lo;  if (el < 0) el = -el;
      eh = to_real(out.d) - e.hi;  if (eh < 0) eh = -eh;
      if (el > maxerr) maxerr = el;
      if (eh > maxerr) maxerr = eh;
      if (el > TOL || eh > TOL || out.first != e.first || out.last != e.last ||
          out_tag != TW'(e.tag) || cyc != e.cyc + 7) begin
        failures++;
        if (failures < 10)
          $display("FAIL tag=%0d lo=%f (exp %f) hi=%f (exp %f) cyc=%0d exp %0d",
                   e.tag, to_real(out.s), e.lo, to_real(out.d), e.hi, cyc, e.cyc + 7);
      end
    end
  endtask

  int tag = 0;

  initial begin
    in = '0; in_tag = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int line = 0; line < 300; line++) begin
      automatic int np = (line < 4) ? line + 1 : $urandom_range(1, 32);
      real x[], lo[], hi[];
      int  px[];
      x = new[2*np]; px = new[2*np];
      for (int i = 0; i < 2*np; i++) begin
        px[i] = (line % 3 == 0) ? ((i % 2 != 0) ? 255 : 0) : $urandom_range(0, 255);
        x[i]  = real'(px[i]);
      end
      dwt97_line(x, lo, hi);
      for (int i = 0; i < np; i++) begin
        exp_t e;
        @(negedge clk);
        monitor();
        in = '{v: 1'b1, first: (i == 0), last: (i == np - 1),
               s: sample_t'(px[2*i] * (1 << FB)), d: sample_t'(px[2*i+1] * (1 << FB))};
        in_tag = TW'(tag);
        e.lo = lo[i]; e.hi = hi[i]; e.first = (i == 0); e.last = (i == np - 1);
        e.tag = tag; e.cyc = cyc;
        expq.push_back(e);
        tag++;
      end
      repeat ((line % 2 != 0) ? 0 : $urandom_range(0, 3)) begin
        @(negedge clk);
        monitor();
        in = '0;
      end
    end
    repeat (10) begin
      @(negedge clk);
      monitor();
      in = '0;
    end
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", expq.size());
    end
    $display("largest deviation from the real-valued transform: %f", maxerr);
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
