// tb_dwt2d_top: end-to-end test of the 2-D DWT on a 32 x 32 image. Runs one,
// two and three decomposition levels on a random image, three levels on a
// 0/255 checkerboard (largest coefficient growth) and on a noisy ramp, and a
// request for 0 levels (treated as 1). After each run all 1024 coefficients
// are read back and compared with the real-valued reference transform; the
// busy time of each run is checked against 2 * ((N>>l)^2/2 + 8) cycles per
// level. It counts row passes, column passes, levels and left/right line-end
// mirrorings, and fails if one of them never happened.
module tb_dwt2d_top;
  import dwt_pkg::*;

  localparam int  N      = 32;
  localparam int  LEVELS = 3;
  localparam int  CRD    = 5;
  localparam int  LVW    = 2;

  logic           clk = 0, rst_n = 0;
  logic           start = 0;
  logic [LVW-1:0] num_levels = '0;
  logic           busy, done, col_pass;
  logic [LVW-1:0] level;
  logic           pix_we = 0;
  logic [CRD-1:0] pix_row = '0, pix_col = '0;
  logic [7:0]     pix_data = '0;
  logic           coef_re = 0;
  logic [CRD-1:0] coef_row = '0, coef_col = '0;
  logic           coef_valid;
  sample_t        coef_data;
  int checks = 0, failures = 0;

  dwt2d_top #(.N(N), .LEVELS(LEVELS)) dut (.*);

  always #5 clk = ~clk;

  `include "tb/dwt2d_tb_common.svh"

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      automatic int kind = (t == 3) ? 1 : (t == 4) ? 2 : 0;
      automatic int nl   = (t < 3) ? t + 1 : (t == 5) ? 0 : 3;
      automatic int eff  = (nl == 0) ? 1 : nl;
      make_image(kind);
      reference(eff);
      load_image();
      run(eff);
      readout_check(eff);
    end
    report_mechanisms(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
