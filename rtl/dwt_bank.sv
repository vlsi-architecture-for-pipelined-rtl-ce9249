// dwt_bank: one bank of the coefficient frame memory, a simple dual-port RAM.
//
// One synchronous write port and one synchronous read port; the read data
// appears the cycle after the address (read-before-write when both ports hit
// the same word). The contents are not reset. Written as an array so that
// synthesis can map it to block RAM. The published design only reports its
// storage as registers; the organisation is this design's choice.
module dwt_bank #(
  parameter int DEPTH = 131072,     // 512 x 512 samples over two banks
  parameter int W     = dwt_pkg::DW,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
