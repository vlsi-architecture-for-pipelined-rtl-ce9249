// tb_dwt2d_ctrl: runs the pass sequencer for a 16 x 16 image with 1, 2 and 3
// levels against a testbench frame memory (one-cycle read latency) and a
// stand-in for the lifting core (a 7-cycle delay line that adds 3 to the even
// sample and subtracts 5 from the odd one). It checks the exact order of the
// pair reads (rows, then columns, of each level, at stride 2^level), the line
// flags at the core input, that every result is written back to the two
// positions its pair was read from, that no read touches a sample whose new
// value is still in the core, and the number of busy cycles.
module tb_dwt2d_ctrl;
  import dwt_pkg::*;

  localparam int N        = 16;
  localparam int LEVELS   = 3;
  localparam int CRD      = 4;
  localparam int LVW      = 2;
  localparam int TW       = 2 * CRD;
  localparam int CORE_LAT = 7;

  logic                clk = 0, rst_n = 0, start = 0;
  logic [LVW-1:0]      num_levels = '0;
  logic                busy, done, col_pass;
  logic [LVW-1:0]      level;
  logic                mem_rd_en;
  logic [1:0][CRD-1:0] mem_rd_r, mem_rd_c, mem_wr_r, mem_wr_c;
  sample_t [1:0]       mem_rd_data, mem_wr_data;
  logic [1:0]          mem_wr_en;
  pair_t               core_in, core_out;
  logic [TW-1:0]       core_in_tag, core_out_tag;
  int checks = 0, failures = 0;

  dwt2d_ctrl #(.N(N), .LEVELS(LEVELS), .PIPE_LAT(CORE_LAT)) dut (.*);

  always #5 clk = ~clk;

  // frame memory model
  sample_t mem [N][N];
  int      pending [N][N];   // results still in flight for this sample

  always @(posedge clk) begin
    if (mem_rd_en)
      for (int k = 0; k < 2; k++) mem_rd_data[k] <= mem[mem_rd_r[k]][mem_rd_c[k]];
    for (int k = 0; k < 2; k++)
      if (mem_wr_en[k]) mem[mem_wr_r[k]][mem_wr_c[k]] <= mem_wr_data[k];
  end

  // core stand-in
  pair_t         dl [CORE_LAT];
  logic [TW-1:0] dl_tag [CORE_LAT];
  always @(posedge clk) begin
    if (!rst_n) dl[0] <= '0;
    else dl[0] <= '{v: core_in.v, first: core_in.first, last: core_in.last,
                   s: core_in.s + sample_t'(3), d: core_in.d - sample_t'(5)};
    dl_tag[0] <= core_in_tag;
    for (int i = 1; i < CORE_LAT; i++) begin
      dl[i]     <= dl[i-1];
      dl_tag[i] <= dl_tag[i-1];
    end
  end
  assign core_out     = dl[CORE_LAT-1];
  assign core_out_tag = dl_tag[CORE_LAT-1];

  typedef struct { int r0; int c0; int r1; int c1; bit first; bit last; } rd_t;
  rd_t expq[$];     // reads still to come
  rd_t flagq[$];    // reads whose data is on its way to the core
  typedef struct { int r0; int c0; int r1; int c1; sample_t s; sample_t d; } wr_t;
  wr_t wrq[$];      // writes still to come
  int  busy_cycles;

  // expected read order for one run
  task automatic plan(int nl);
    for (int l = 0; l < nl; l++) begin
      int len = N >> l, st = 1 << l;
      for (int dir = 0; dir < 2; dir++)
        for (int ln = 0; ln < len; ln++)
          for (int i = 0; i < len / 2; i++) begin
            rd_t e;
            if (dir == 0) e = '{ln * st, 2 * i * st, ln * st, (2 * i + 1) * st, i == 0, i == len / 2 - 1};
            else          e = '{2 * i * st, ln * st, (2 * i + 1) * st, ln * st, i == 0, i == len / 2 - 1};
            expq.push_back(e);
          end
    end
  endtask

  // monitor (sampled just before each rising edge)
  always @(negedge clk) if (rst_n) begin
    if (busy) busy_cycles++;
    if (mem_rd_en) begin
      rd_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected read");
      end else begin
        e = expq.pop_front();
        if (mem_rd_r[0] != CRD'(e.r0) || mem_rd_c[0] != CRD'(e.c0) ||
            mem_rd_r[1] != CRD'(e.r1) || mem_rd_c[1] != CRD'(e.c1)) begin
          failures++;
          if (failures < 10) $display("FAIL read (%0d,%0d)(%0d,%0d) expected (%0d,%0d)(%0d,%0d)",
            mem_rd_r[0], mem_rd_c[0], mem_rd_r[1], mem_rd_c[1], e.r0, e.c0, e.r1, e.c1);
        end
        if (pending[e.r0][e.c0] != 0 || pending[e.r1][e.c1] != 0) begin
          failures++;
          $display("FAIL read of (%0d,%0d) before its result was written", e.r0, e.c0);
        end
        pending[e.r0][e.c0]++;
        pending[e.r1][e.c1]++;
        wrq.push_back('{e.r0, e.c0, e.r1, e.c1,
                        mem[e.r0][e.c0] + sample_t'(3), mem[e.r1][e.c1] - sample_t'(5)});
        flagq.push_back(e);
      end
    end
    if (core_in.v) begin
      automatic rd_t e = flagq.pop_front();
      checks++;
      if (core_in.first != e.first || core_in.last != e.last) begin
        failures++;
        $display("FAIL line flags at (%0d,%0d)", e.r0, e.c0);
      end
    end
    if (mem_wr_en != 2'b00) begin
      wr_t w;
      checks++;
      if (mem_wr_en != 2'b11 || wrq.size() == 0) begin
        failures++; $display("FAIL unexpected write");
      end else begin
        w = wrq.pop_front();
        if (mem_wr_r[0] != CRD'(w.r0) || mem_wr_c[0] != CRD'(w.c0) ||
            mem_wr_r[1] != CRD'(w.r1) || mem_wr_c[1] != CRD'(w.c1) ||
            mem_wr_data[0] != w.s || mem_wr_data[1] != w.d) begin
          failures++;
          if (failures < 10) $display("FAIL write to (%0d,%0d) expected (%0d,%0d)",
                                      mem_wr_r[0], mem_wr_c[0], w.r0, w.c0);
        end
        pending[w.r0][w.c0]--;
        pending[w.r1][w.c1]--;
      end
    end
  end

  initial begin
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        mem[r][c] = sample_t'($urandom_range(0, 4095));
        pending[r][c] = 0;
      end
    for (int i = 0; i < CORE_LAT; i++) begin dl[i] = '0; dl_tag[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int nl = 1; nl <= LEVELS; nl++) begin
      automatic int exp_cycles = 0;
      for (int l = 0; l < nl; l++) exp_cycles += 2 * ((N >> l) * (N >> l) / 2 + CORE_LAT + 1);
      plan(nl);
      busy_cycles = 0;
      @(negedge clk);
      start = 1; num_levels = LVW'(nl);
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      checks++;
      if (expq.size() != 0 || wrq.size() != 0 || busy) begin
        failures++;
        $display("FAIL levels=%0d: %0d reads and %0d writes missing", nl, expq.size(), wrq.size());
      end
      checks++;
      if (busy_cycles != exp_cycles) begin
        failures++;
        $display("FAIL levels=%0d: busy for %0d cycles, expected %0d", nl, busy_cycles, exp_cycles);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
