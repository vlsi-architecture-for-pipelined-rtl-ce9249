// dwt2d_top: multi-level 2-D 9/7 discrete wavelet transform of an N x N
// 8-bit image, built around one five-stage pipelined lifting core with Booth
// multipliers.
//
// Operation: while idle, the image is written one pixel per cycle through the
// pix_* port (pixel p is stored as p * 2^FB). A start pulse runs num_levels
// decomposition levels (1 .. LEVELS); each level is a row pass and a column
// pass of the 1-D lifting core over the current low-low region, each pass
// feeding one sample pair per clock. busy stays high until the done pulse.
// The coefficients are then read through the coef_* port (data one cycle after
// coef_re; signed, FB fractional bits).
//
// Coefficient layout (in place, interleaved): after level l the low-low
// samples sit at (r, c) with r and c multiples of 2^l; the level-l detail
// coefficients sit where, in units of 2^(l-1), a coordinate is odd:
// odd row and even column = LH (vertical high-pass), even row and odd column
// = HL, both odd = HH.
//
// The lifting core follows the published pipeline; the frame memory, the pass
// sequencing, the external ports and the layout are this design's choices.
// Timing: level l takes 2 * ((N>>l)^2 / 2 + CORE_LAT + 1) cycles.
module dwt2d_top
  import dwt_pkg::*;
#(
  parameter int N      = 512,
  parameter int LEVELS = 3,
  parameter int CRD    = $clog2(N),
  parameter int LVW    = $clog2(LEVELS + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // control
  input  logic           start,
  input  logic [LVW-1:0] num_levels,
  output logic           busy,
  output logic           done,
  output logic [LVW-1:0] level,      // level being processed
  output logic           col_pass,   // 1 during a column pass
  // image load (idle only)
  input  logic           pix_we,
  input  logic [CRD-1:0] pix_row,
  input  logic [CRD-1:0] pix_col,
  input  logic [7:0]     pix_data,
  // coefficient read-out (idle only)
  input  logic           coef_re,
  input  logic [CRD-1:0] coef_row,
  input  logic [CRD-1:0] coef_col,
  output logic           coef_valid,
  output sample_t        coef_data
);

  localparam int TW       = 2 * CRD;

  logic                c_rd_en;
  logic [1:0][CRD-1:0] c_rd_r, c_rd_c, c_wr_r, c_wr_c;
  logic [1:0]          c_wr_en;
  sample_t [1:0]       c_wr_data;

  logic                m_rd_en;
  logic [1:0][CRD-1:0] m_rd_r, m_rd_c, m_wr_r, m_wr_c;
  logic [1:0]          m_wr_en;
  sample_t [1:0]       m_wr_data, m_rd_data;

  pair_t               core_in, core_out;
  logic [TW-1:0]       core_in_tag, core_out_tag;

  dwt2d_ctrl #(.N(N), .LEVELS(LEVELS), .PIPE_LAT(CORE_LAT)) u_ctrl (
    .clk, .rst_n, .start, .num_levels, .busy, .done, .level, .col_pass,
    .mem_rd_en(c_rd_en), .mem_rd_r(c_rd_r), .mem_rd_c(c_rd_c),
    .mem_rd_data(m_rd_data),
    .mem_wr_en(c_wr_en), .mem_wr_r(c_wr_r), .mem_wr_c(c_wr_c),
    .mem_wr_data(c_wr_data),
    .core_in, .core_in_tag, .core_out, .core_out_tag);

  dwt1d_core #(.TW(TW)) u_core (
    .clk, .rst_n, .in(core_in), .in_tag(core_in_tag),
    .out(core_out), .out_tag(core_out_tag));

  // memory port: the controller while busy, the external ports while idle
  always_comb begin
    if (busy) begin
      m_rd_en   = c_rd_en;
      m_rd_r    = c_rd_r;
      m_rd_c    = c_rd_c;
      m_wr_en   = c_wr_en;
      m_wr_r    = c_wr_r;
      m_wr_c    = c_wr_c;
      m_wr_data = c_wr_data;
    end else begin
      m_rd_en   = coef_re;
      m_rd_r    = {coef_row, coef_row};
      m_rd_c    = {coef_col ^ CRD'(1), coef_col};
      m_wr_en   = {1'b0, pix_we};
      m_wr_r    = {pix_row, pix_row};
      m_wr_c    = {pix_col ^ CRD'(1), pix_col};
      m_wr_data = {sample_t'(0), sample_t'({pix_data, FB'(0)})};
    end
  end

  frame_mem #(.N(N)) u_mem (
    .clk, .rd_en(m_rd_en), .rd_r(m_rd_r), .rd_c(m_rd_c), .rd_data(m_rd_data),
    .wr_en(m_wr_en), .wr_r(m_wr_r), .wr_c(m_wr_c), .wr_data(m_wr_data));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) coef_valid <= 1'b0;
    else        coef_valid <= coef_re && !busy;
  end

  assign coef_data = m_rd_data[0];

endmodule
