// tb_frame_mem: exercises the two-bank frame memory of a 16 x 16 image with
// the access patterns of the transform: pair writes and pair reads along rows
// and along columns at strides 1, 2, 4 and 8, and single-sample accesses as
// used for loading and reading out. Every read is compared with a testbench
// copy of the image one cycle after the request.
module tb_frame_mem;
  import dwt_pkg::*;

  localparam int N   = 16;
  localparam int CRD = 4;

  logic                clk = 0;
  logic                rd_en = 0;
  logic [1:0][CRD-1:0] rd_r = '0, rd_c = '0, wr_r = '0, wr_c = '0;
  sample_t [1:0]       rd_data, wr_data = '0;
  logic [1:0]          wr_en = '0;
  sample_t             model [N][N];
  sample_t [1:0]       exp_d;
  logic [1:0]          exp_v = '0;
  int checks = 0, failures = 0;

  frame_mem #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  // a random pair along a row (dir 0) or column (dir 1) at stride 2^l
  task automatic rand_pair(output logic [1:0][CRD-1:0] r, output logic [1:0][CRD-1:0] c);
    int l    = $urandom_range(0, 3);
    int dir  = $urandom_range(0, 1);
    int st   = 1 << l;
    int line = $urandom_range(0, N / st - 1) * st;
    int e    = $urandom_range(0, N / st / 2 - 1) * 2 * st;
    if (dir == 0) begin
      r = {CRD'(line), CRD'(line)};  c = {CRD'(e + st), CRD'(e)};
    end else begin
      r = {CRD'(e + st), CRD'(e)};   c = {CRD'(line), CRD'(line)};
    end
  endtask

  initial begin
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        @(negedge clk);
        wr_en = 2'b01; wr_r[0] = CRD'(r); wr_c[0] = CRD'(c);
        wr_data[0] = sample_t'($urandom); model[r][c] = wr_data[0];
      end
    // requests change 1 time unit after each rising edge, as from clocked
    // logic; the data of the previous request is checked after that change
    for (int n = 0; n < 8000; n++) begin
      sample_t [1:0] prev_d;
      logic [1:0]    prev_v;
      @(posedge clk);
      #1;
      prev_d = exp_d;
      prev_v = exp_v;
      // read request
      rd_en = 1'($urandom);
      if ($urandom_range(0, 3) == 0) begin
        rd_r[0] = CRD'($urandom); rd_c[0] = CRD'($urandom);
        rd_r[1] = rd_r[0]; rd_c[1] = rd_c[0] ^ CRD'(1);
        exp_v = {1'b0, rd_en};
      end else begin
        rand_pair(rd_r, rd_c);
        exp_v = {2{rd_en}};
      end
      for (int k = 0; k < 2; k++) exp_d[k] = model[rd_r[k]][rd_c[k]];
      // write request (different locations than the read, as in the transform)
      rand_pair(wr_r, wr_c);
      wr_en = 2'($urandom);
      if ((wr_r[0] == rd_r[0] && wr_c[0] == rd_c[0]) || (wr_r[1] == rd_r[1] && wr_c[1] == rd_c[1]) ||
          (wr_r[0] == rd_r[1] && wr_c[0] == rd_c[1]) || (wr_r[1] == rd_r[0] && wr_c[1] == rd_c[0]))
        wr_en = '0;
      for (int k = 0; k < 2; k++) begin
        wr_data[k] = sample_t'($urandom);
        if (wr_en[k]) model[wr_r[k]][wr_c[k]] = wr_data[k];
      end
      #1;
      for (int k = 0; k < 2; k++)
        if (prev_v[k]) begin
          checks++;
          if (rd_data[k] !== prev_d[k]) begin
            failures++;
            if (failures < 10) $display("FAIL elem %0d read %0d expected %0d", k, rd_data[k], prev_d[k]);
          end
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
