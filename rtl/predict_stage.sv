// predict_stage: pipelined lifting predict step (P1 or P2) on a pair stream.
//
// For every pair i of a line it replaces the odd sample:
//   d'[i] = K*d[i] + (s[i] + s[i+1]) / 2^SH
// A predict step needs the even sample of the NEXT pair, so the stage first
// holds pair i in a register and computes it in the cycle in which pair i+1
// is at its input. At the last pair of a line the missing s[i+1] is replaced
// by s[i] (whole-sample symmetric extension at the right edge); the line-end
// rule is this design's choice, the published equations do not state it.
//
// Interface: in/in_tag carry one pair per cycle (valid bit in in.v); the tag
// is passed through untouched. Pairs of one line must arrive on consecutive
// cycles (as the published structure requires); a line may follow the
// previous one with or without gap cycles.
// Timing: latency 2 cycles from in to out, one pair per cycle throughput.
module predict_stage
  import dwt_pkg::*;
#(
  parameter coef_t K  = dwt_pkg::COEF_A,
  parameter int    SH = dwt_pkg::SH_P1,
  parameter int    TW = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  pair_t         in,
  input  logic [TW-1:0] in_tag,
  output pair_t         out,
  output logic [TW-1:0] out_tag
);

  pair_t         hold;
  logic [TW-1:0] hold_tag;
  sample_t       s_next;
  sample_t       d_new;

  always_comb s_next = hold.last ? hold.s : in.s;

  lift_pe #(.SH(SH)) u_pe (
    .k(K),
    .c(hold.d),
    .a(hold.s),
    .b(s_next),
    .y(d_new)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold     <= '0;
      hold_tag <= '0;
      out      <= '0;
      out_tag  <= '0;
    end else begin
      hold     <= in;
      hold_tag <= in_tag;
      out      <= '{v: hold.v, first: hold.first, last: hold.last, s: hold.s, d: d_new};
      out_tag  <= hold_tag;
    end
  end

  // A pair that is not the last of its line must be followed at once by the
  // next pair of the same line.
  a_line_contiguous: assert property (@(posedge clk) disable iff (!rst_n)
    (hold.v && !hold.last) |-> (in.v && !in.first))
    else $error("predict_stage: line interrupted");

endmodule
