// dwt2d_ctrl: sequencer of the multi-level in-place 2-D DWT.
//
// A 2-D level is a row pass followed by a column pass over the current
// low-low region, both run through the same 1-D lifting core. At level l the
// region holds LEN = N >> l samples per line at stride 2^l in the frame
// memory. In a pass the controller issues one memory pair read per cycle:
// line by line, pairs 0 .. LEN/2-1, with first/last marking the line ends. The
// read data (one cycle later) enters the core together with a tag holding the
// frame coordinates of the even sample; when the pair leaves the core its
// low-pass result is written back to the even position and its high-pass
// result to the odd position (in-place, interleaved layout). Between passes
// the controller waits until the core has drained, so a pass never reads a
// sample that the previous pass has still to write. After num_levels levels it
// pulses done. Row-then-column order per level follows the usual separable
// 2-D DWT; the in-place schedule is this design's choice.
//
// Timing: a pass over an L x L region takes L*L/2 issue cycles plus
// PIPE_LAT + 1 cycles to drain.
module dwt2d_ctrl
  import dwt_pkg::*;
#(
  parameter int N        = 512,
  parameter int LEVELS   = 3,
  parameter int PIPE_LAT = dwt_pkg::CORE_LAT,
  parameter int CRD      = $clog2(N),
  parameter int LVW      = $clog2(LEVELS + 1),
  parameter int TW       = 2 * CRD
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [LVW-1:0]      num_levels,
  output logic                busy,
  output logic                done,
  output logic [LVW-1:0]      level,
  output logic                col_pass,
  // frame memory read request and data
  output logic                mem_rd_en,
  output logic [1:0][CRD-1:0] mem_rd_r,
  output logic [1:0][CRD-1:0] mem_rd_c,
  input  sample_t [1:0]       mem_rd_data,
  // frame memory write
  output logic [1:0]          mem_wr_en,
  output logic [1:0][CRD-1:0] mem_wr_r,
  output logic [1:0][CRD-1:0] mem_wr_c,
  output sample_t [1:0]       mem_wr_data,
  // 1-D lifting core
  output pair_t               core_in,
  output logic [TW-1:0]       core_in_tag,
  input  pair_t               core_out,
  input  logic [TW-1:0]       core_out_tag
);

  typedef enum logic [2:0] {
    S_IDLE, S_ROW, S_ROW_DRAIN, S_COL, S_COL_DRAIN
  } state_e;

  state_e         state;
  logic [LVW-1:0] nlev;
  logic [CRD-1:0] line, idx;     // line number and pair index, level units
  logic [CRD:0]   len;           // samples per line at this level
  logic [CRD-1:0] half_m1;       // pairs per line minus one
  logic [CRD-1:0] line_m1;
  logic [CRD-1:0] step;          // 2^level
  logic [4:0]     drain_cnt;
  logic           issue;
  logic           last_pair, last_line;
  logic [CRD-1:0] e_along, o_along, across;

  always_comb begin
    len       = (CRD+1)'(N) >> level;
    half_m1   = CRD'((len >> 1) - 1'b1);
    line_m1   = CRD'(len - 1);
    step      = CRD'(1) << level;
    issue     = (state == S_ROW) || (state == S_COL);
    last_pair = (idx == half_m1);
    last_line = (line == line_m1);
    e_along   = CRD'({idx, 1'b0} << level);
    o_along   = e_along | step;
    across    = CRD'(line << level);
  end

  assign busy     = (state != S_IDLE);
  assign col_pass = (state == S_COL) || (state == S_COL_DRAIN);

  // read request for the current pair
  always_comb begin
    mem_rd_en = issue;
    if (state == S_COL) begin
      mem_rd_r = {o_along, e_along};
      mem_rd_c = {across, across};
    end else begin
      mem_rd_r = {across, across};
      mem_rd_c = {o_along, e_along};
    end
  end

  // pair stream into the core, aligned with the memory read latency
  logic          rd_v_q, rd_first_q, rd_last_q;
  logic [TW-1:0] rd_tag_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_v_q     <= 1'b0;
      rd_first_q <= 1'b0;
      rd_last_q  <= 1'b0;
      rd_tag_q   <= '0;
    end else begin
      rd_v_q     <= issue;
      rd_first_q <= (idx == '0);
      rd_last_q  <= last_pair;
      rd_tag_q   <= {mem_rd_r[0], mem_rd_c[0]};
    end
  end

  always_comb begin
    core_in     = '{v: rd_v_q, first: rd_first_q, last: rd_last_q,
                    s: mem_rd_data[0], d: mem_rd_data[1]};
    core_in_tag = rd_tag_q;
  end

  // write-back of the core results, in place
  always_comb begin
    logic [CRD-1:0] er, ec;
    {er, ec}       = core_out_tag;
    mem_wr_en      = {2{core_out.v}};
    mem_wr_r       = col_pass ? {er | step, er} : {er, er};
    mem_wr_c       = col_pass ? {ec, ec} : {ec | step, ec};
    mem_wr_data    = {core_out.d, core_out.s};
  end

  // sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      nlev      <= '0;
      level     <= '0;
      line      <= '0;
      idx       <= '0;
      drain_cnt <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            nlev  <= (num_levels == '0) ? LVW'(1) :
                     (num_levels >= LVW'(LEVELS)) ? LVW'(LEVELS) : num_levels;
            level <= '0;
            line  <= '0;
            idx   <= '0;
            state <= S_ROW;
          end
        end
        S_ROW, S_COL: begin
          if (last_pair) begin
            idx <= '0;
            if (last_line) begin
              line      <= '0;
              drain_cnt <= '0;
              state     <= (state == S_ROW) ? S_ROW_DRAIN : S_COL_DRAIN;
            end else begin
              line <= line + 1'b1;
            end
          end else begin
            idx <= idx + 1'b1;
          end
        end
        S_ROW_DRAIN, S_COL_DRAIN: begin
          if (drain_cnt == 5'(PIPE_LAT)) begin
            if (state == S_ROW_DRAIN) begin
              state <= S_COL;
            end else if (level + 1'b1 == nlev) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              level <= level + 1'b1;
              state <= S_ROW;
            end
          end else begin
            drain_cnt <= drain_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the core must be empty (all results of the previous pass written back)
  // when a new pass issues its first read
  a_drained: assert property (@(posedge clk) disable iff (!rst_n)
    (issue && line == '0 && idx == '0) |-> !core_out.v)
    else $error("dwt2d_ctrl: pass started before the core drained");

endmodule
