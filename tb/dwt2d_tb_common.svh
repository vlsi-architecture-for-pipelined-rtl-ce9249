// dwt2d_tb_common.svh: shared body of the 2-D DWT testbenches. The including
// module declares N, LEVELS, CRD, LVW, the DUT signals and the counters
// checks/failures. It provides image generation, loading, a run with cycle
// count check, and a read-out of all N x N coefficients compared with the
// real-valued reference transform in the same in-place interleaved layout.
`ifndef DWT2D_TB_COMMON_SVH
`define DWT2D_TB_COMMON_SVH

`include "tb/dwt97_ref.svh"

// Allowed deviation from the real-valued transform: TOL absolute for the
// rounding of the sample words plus TOL_REL of the value for the 16-bit
// lifting constants, whose error compounds over the levels.
localparam real TOL     = 0.2;
localparam real TOL_REL = 3.0e-4;

int  img [N][N];
real ref_c [N][N];
real maxerr = 0.0;

// mechanism counters
int n_row_pass = 0, n_col_pass = 0, n_levels_done = 0;
int n_left_mirror = 0, n_right_mirror = 0, n_runs = 0;

// image patterns: 0 random, 1 checkerboard 0/255 (largest detail values),
// 2 smooth ramp with noise
task automatic make_image(int kind);
  for (int r = 0; r < N; r++)
    for (int c = 0; c < N; c++)
      case (kind)
        0:       img[r][c] = $urandom_range(0, 255);
        1:       img[r][c] = ((r + c) % 2 != 0) ? 255 : 0;
        default: img[r][c] = ((r * 7 + c * 3) % 200) + $urandom_range(0, 55);
      endcase
endtask

// real-valued multi-level transform, written back in place at stride 2^l
task automatic reference(int nl);
  for (int r = 0; r < N; r++)
    for (int c = 0; c < N; c++) ref_c[r][c] = real'(img[r][c]);
  for (int l = 0; l < nl; l++) begin
    int len = N >> l, st = 1 << l;
    real x[], lo[], hi[];
    x = new[len];
    for (int k = 0; k < len; k++) begin           // rows
      for (int j = 0; j < len; j++) x[j] = ref_c[k*st][j*st];
      dwt97_line(x, lo, hi);
      for (int i = 0; i < len / 2; i++) begin
        ref_c[k*st][2*i*st]     = lo[i];
        ref_c[k*st][(2*i+1)*st] = hi[i];
      end
    end
    for (int k = 0; k < len; k++) begin           // columns
      for (int j = 0; j < len; j++) x[j] = ref_c[j*st][k*st];
      dwt97_line(x, lo, hi);
      for (int i = 0; i < len / 2; i++) begin
        ref_c[2*i*st][k*st]     = lo[i];
        ref_c[(2*i+1)*st][k*st] = hi[i];
      end
    end
  end
endtask

task automatic load_image();
  for (int r = 0; r < N; r++)
    for (int c = 0; c < N; c++) begin
      @(negedge clk);
      pix_we = 1; pix_row = CRD'(r); pix_col = CRD'(c); pix_data = 8'(img[r][c]);
    end
  @(negedge clk);
  pix_we = 0;
endtask

// start a transform of nl levels and check the busy time
task automatic run(int nl);
  int cycles = 0, expc = 0;
  for (int l = 0; l < nl; l++) expc += 2 * ((N >> l) * (N >> l) / 2 + 8);
  @(negedge clk);
  start = 1; num_levels = LVW'(nl);
  @(negedge clk);
  start = 0;
  while (!done) begin
    cycles++;
    @(negedge clk);
  end
  n_runs++;
  checks++;
  if (cycles != expc) begin
    failures++;
    $display("FAIL %0d levels took %0d cycles, expected %0d", nl, cycles, expc);
  end
endtask

task automatic readout_check(int nl);
  int bad = 0;
  for (int r = 0; r < N; r++)
    for (int c = 0; c < N; c++) begin
      real got, err;
      @(negedge clk);
      coef_re = 1; coef_row = CRD'(r); coef_col = CRD'(c);
      @(negedge clk);
      coef_re = 0;
      got = real'(coef_data) / real'(1 << dwt_pkg::FB);
      err = got - ref_c[r][c];
      if (err < 0) err = -err;
      if (err > maxerr) maxerr = err;
      checks++;
      if (!coef_valid || err > TOL + TOL_REL * ((ref_c[r][c] < 0) ? -ref_c[r][c] : ref_c[r][c])) begin
        failures++;
        bad++;
        if (bad < 5) $display("FAIL levels=%0d (%0d,%0d) got %f expected %f", nl, r, c, got, ref_c[r][c]);
      end
    end
endtask

// count the mechanisms as they happen
always @(posedge clk) if (rst_n) begin
  if (dut.u_core.in.v && dut.u_core.in.first) n_left_mirror++;
  if (dut.u_core.in.v && dut.u_core.in.last)  n_right_mirror++;
end
logic col_pass_q = 0;
always @(posedge clk) begin
  col_pass_q <= col_pass;
  if (rst_n && dut.u_ctrl.issue && !dut.u_ctrl.col_pass && dut.u_ctrl.line == '0 && dut.u_ctrl.idx == '0)
    n_row_pass++;
  if (rst_n && dut.u_ctrl.issue && dut.u_ctrl.col_pass && dut.u_ctrl.line == '0 && dut.u_ctrl.idx == '0)
    n_col_pass++;
  if (rst_n && col_pass_q && !col_pass) n_levels_done++;
end

task automatic report_mechanisms(int min_levels);
  $display("runs=%0d levels=%0d row passes=%0d column passes=%0d left-edge mirrors=%0d right-edge mirrors=%0d",
           n_runs, n_levels_done, n_row_pass, n_col_pass, n_left_mirror, n_right_mirror);
  $display("largest deviation from the real-valued transform: %f", maxerr);
  checks++;
  if (n_levels_done < min_levels || n_row_pass < min_levels || n_col_pass < min_levels ||
      n_left_mirror == 0 || n_right_mirror == 0) begin
    failures++;
    $display("FAIL a mechanism never happened");
  end
endtask

`endif
