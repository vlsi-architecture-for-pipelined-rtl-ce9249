// dwt1d_core: five-stage pipelined 1-D 9/7 lifting DWT.
//
// Samples enter as even/odd pairs (x[2i], x[2i+1]), one pair per clock; the
// split into the even and odd branch is the pair itself. Five arithmetic stages
// follow, each one Booth multiplier and two adders deep:
//   P1 (A, /1)  ->  U1 (B, /16)  ->  P2 (C, /2)  ->  U2 (D, /2)  ->  scaling (K0, K1)
// The two predict stages hold a pair for one extra cycle because they need the
// even sample of the following pair. The pair-out (L, H) = (s[i], d[i])
// leaves CORE_LAT = 7 cycles (dwt_pkg) after pair i enters; the last input it
// depends on is pair i+2, so every output is ready five cycles after its last
// input arrived, which is how this design meets the five-cycle result latency
// of the original architecture.
// Line ends use whole-sample symmetric extension (this design's choice).
//
// Interface: in (pair_t: v, first, last, s = x[2i], d = x[2i+1]) with a TW-bit
// tag that travels with the pair (used by the 2-D controller as the write
// address); out: s = low-pass coefficient, d = high-pass coefficient.
// Pairs of one line must arrive on consecutive cycles.
module dwt1d_core
  import dwt_pkg::*;
#(
  parameter int TW = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  pair_t         in,
  input  logic [TW-1:0] in_tag,
  output pair_t         out,
  output logic [TW-1:0] out_tag
);

  pair_t         p1, u1, p2, u2;
  logic [TW-1:0] p1_tag, u1_tag, p2_tag, u2_tag;

  predict_stage #(.K(COEF_A), .SH(SH_P1), .TW(TW)) u_p1 (
    .clk, .rst_n, .in(in), .in_tag(in_tag), .out(p1), .out_tag(p1_tag));

  update_stage #(.K(COEF_B), .SH(SH_U1), .TW(TW)) u_u1 (
    .clk, .rst_n, .in(p1), .in_tag(p1_tag), .out(u1), .out_tag(u1_tag));

  predict_stage #(.K(COEF_C), .SH(SH_P2), .TW(TW)) u_p2 (
    .clk, .rst_n, .in(u1), .in_tag(u1_tag), .out(p2), .out_tag(p2_tag));

  update_stage #(.K(COEF_D), .SH(SH_U2), .TW(TW)) u_u2 (
    .clk, .rst_n, .in(p2), .in_tag(p2_tag), .out(u2), .out_tag(u2_tag));

  scale_stage #(.K0(COEF_K0), .K1(COEF_K1), .TW(TW)) u_sc (
    .clk, .rst_n, .in(u2), .in_tag(u2_tag), .out(out), .out_tag(out_tag));

endmodule
