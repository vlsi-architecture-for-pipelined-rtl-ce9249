// update_stage: pipelined lifting update step (U1 or U2) on a pair stream.
//
// For every pair i of a line it replaces the even sample:
//   s'[i] = K*s[i] + (d[i-1] + d[i]) / 2^SH
// An update step needs the odd sample of the PREVIOUS pair, which the stage
// keeps in a register, so no look-ahead is needed. At the first pair of a line
// d[i-1] is replaced by d[i] (whole-sample symmetric extension at the left
// edge; this line-end rule is this design's choice).
//
// Interface: in/in_tag one pair per cycle, tag passed through.
// Timing: latency 1 cycle, one pair per cycle throughput.
module update_stage
  import dwt_pkg::*;
#(
  parameter coef_t K  = dwt_pkg::COEF_B,
  parameter int    SH = dwt_pkg::SH_U1,
  parameter int    TW = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  pair_t         in,
  input  logic [TW-1:0] in_tag,
  output pair_t         out,
  output logic [TW-1:0] out_tag
);

  sample_t d_prev;
  sample_t d_left;
  sample_t s_new;

  always_comb d_left = in.first ? in.d : d_prev;

  lift_pe #(.SH(SH)) u_pe (
    .k(K),
    .c(in.s),
    .a(d_left),
    .b(in.d),
    .y(s_new)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_prev  <= '0;
      out     <= '0;
      out_tag <= '0;
    end else begin
      if (in.v) d_prev <= in.d;
      out     <= '{v: in.v, first: in.first, last: in.last, s: s_new, d: in.d};
      out_tag <= in_tag;
    end
  end

endmodule
