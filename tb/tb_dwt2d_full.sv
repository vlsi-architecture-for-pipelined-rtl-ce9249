// tb_dwt2d_full: the 2-D DWT at its default size, a 512 x 512 8-bit image
// decomposed over one, two and three levels. For each run the image (a ramp
// pattern with random noise) is loaded, transformed, and all 262144
// coefficients are read back and compared with the real-valued reference
// transform; the busy time must be 2 * ((512>>l)^2/2 + 8) cycles summed over
// the levels.
module tb_dwt2d_full;
  import dwt_pkg::*;

  localparam int N      = 512;
  localparam int LEVELS = 3;
  localparam int CRD    = 9;
  localparam int LVW    = 2;

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

  dwt2d_top dut (.*);

  always #5 clk = ~clk;

  `include "tb/dwt2d_tb_common.svh"

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // one, two and three decomposition levels of the same image
    make_image(2);
    for (int nl = 1; nl <= LEVELS; nl++) begin
      reference(nl);
      load_image();
      run(nl);
      readout_check(nl);
    end
    report_mechanisms(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
