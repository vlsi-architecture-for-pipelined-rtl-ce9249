// frame_mem: N x N coefficient memory that reads and writes a sample pair per
// cycle, for the row pass and for the column pass alike.
//
// The transform works in place, and a pass at level l touches the samples at
// stride 2^l: a row pair is (r, c) and (r, c + 2^l), a column pair (r, c) and
// (r + 2^l, c), where the even member has bit l of the moving coordinate clear.
// Sample (r, c) lives in bank parity(r XOR c) (the XOR of all address bits),
// at word {r, c[msb:1]}. Adding 2^l to a coordinate whose bit l is clear flips
// exactly one bit, so the two members of every pair of every pass fall in
// different banks and each bank needs only one read and one write port.
// The banking scheme is this design's choice.
//
// Ports: read request rd_en with two coordinates (element 0 and 1); rd_data
// holds the two samples one cycle later. Write: per-element enable, address
// and data. Two enabled elements must lie in different banks.
module frame_mem
  import dwt_pkg::*;
#(
  parameter int N   = 512,
  parameter int CRD = $clog2(N)
) (
  input  logic                clk,
  input  logic                rd_en,
  input  logic [1:0][CRD-1:0] rd_r,
  input  logic [1:0][CRD-1:0] rd_c,
  output sample_t [1:0]       rd_data,
  input  logic [1:0]          wr_en,
  input  logic [1:0][CRD-1:0] wr_r,
  input  logic [1:0][CRD-1:0] wr_c,
  input  sample_t [1:0]       wr_data
);

  localparam int DEPTH = N * N / 2;
  localparam int BA    = 2 * CRD - 1;

  logic [1:0]         rd_bank, wr_bank, rd_bank_q;
  logic [1:0][BA-1:0] rd_addr, wr_addr;

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      rd_bank[k] = ^{rd_r[k], rd_c[k]};
      wr_bank[k] = ^{wr_r[k], wr_c[k]};
      rd_addr[k] = {rd_r[k], rd_c[k][CRD-1:1]};
      wr_addr[k] = {wr_r[k], wr_c[k][CRD-1:1]};
    end
  end

  logic [DW-1:0] bank_q [2];

  for (genvar b = 0; b < 2; b++) begin : g_bank
    logic          we;
    logic [BA-1:0] waddr, raddr;
    logic [DW-1:0] wdata;

    always_comb begin
      if (wr_en[0] && wr_bank[0] == 1'(b)) begin
        we = 1'b1;  waddr = wr_addr[0];  wdata = wr_data[0];
      end else begin
        we = wr_en[1] && wr_bank[1] == 1'(b);
        waddr = wr_addr[1];  wdata = wr_data[1];
      end
      raddr = (rd_bank[0] == 1'(b)) ? rd_addr[0] : rd_addr[1];
    end

    dwt_bank #(.DEPTH(DEPTH), .W(DW), .AW(BA)) u_bank (
      .clk, .we, .waddr, .wdata, .re(rd_en), .raddr, .rdata(bank_q[b]));
  end

  always_ff @(posedge clk) if (rd_en) rd_bank_q <= rd_bank;

  always_comb begin
    for (int k = 0; k < 2; k++) rd_data[k] = bank_q[rd_bank_q[k]];
  end

  a_wr_banks_differ: assert property (@(posedge clk)
    (wr_en[0] && wr_en[1]) |-> (wr_bank[0] != wr_bank[1]))
    else $error("frame_mem: write pair in one bank");

endmodule
