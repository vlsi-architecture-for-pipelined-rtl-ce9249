// scale_stage: final scaling of the lifting pipeline, s = K0*s2, d = K1*d2.
//
// Two Booth multipliers scale the even (low-pass) and odd (high-pass) branch by
// their constants and the products are rounded (half up, this design's
// choice) to sample precision. The
// published scheme folds all normalisation of the rearranged lifting steps
// into these two constants.
//
// Interface: in/in_tag one pair per cycle, tag passed through.
// Timing: latency 1 cycle, one pair per cycle throughput.
module scale_stage
  import dwt_pkg::*;
#(
  parameter coef_t K0 = dwt_pkg::COEF_K0,
  parameter coef_t K1 = dwt_pkg::COEF_K1,
  parameter int    TW = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  pair_t         in,
  input  logic [TW-1:0] in_tag,
  output pair_t         out,
  output logic [TW-1:0] out_tag
);

  localparam logic signed [DW+CW-1:0] RND = (DW+CW)'(1) <<< (CF - 1);

  logic signed [DW+CW-1:0] ps, pd;
  logic signed [DW+CW-1:0] ps_sh, pd_sh;

  booth_mult #(.AW(DW), .BW(CW)) u_mult_s (.a(in.s), .b(K0), .p(ps));
  booth_mult #(.AW(DW), .BW(CW)) u_mult_d (.a(in.d), .b(K1), .p(pd));

  always_comb begin
    ps_sh = (ps + RND) >>> CF;
    pd_sh = (pd + RND) >>> CF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out     <= '0;
      out_tag <= '0;
    end else begin
      out     <= '{v: in.v, first: in.first, last: in.last,
                   s: ps_sh[DW-1:0], d: pd_sh[DW-1:0]};
      out_tag <= in_tag;
    end
  end

endmodule
