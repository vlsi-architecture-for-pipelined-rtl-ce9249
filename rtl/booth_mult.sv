// booth_mult: combinational radix-2 Booth multiplier for signed
// two's-complement operands.
//
// The multiplier b is scanned one bit pair {b[i], b[i-1]} at a time (b[-1] = 0).
// Each pair selects a partial product: 00 and 11 give nothing (inside a string
// of zeros or ones), 10 subtracts a*2^i (a string of ones begins), 01 adds
// a*2^i (a string of ones ends). The BW partial products are summed into the
// full AW+BW bit product, so no precision is lost. Radix-2 recoding follows the
// published Booth table; the adder organisation (a plain accumulation chain,
// left to synthesis) is this design's choice.
//
// Ports: a (multiplicand, AW bits), b (multiplier, BW bits, the Booth-recoded
// operand; in the lifting stages this is the constant), p = a*b.
// Timing: purely combinational.
module booth_mult
  import dwt_pkg::*;
#(
  parameter int AW = dwt_pkg::DW,
  parameter int BW = dwt_pkg::CW
) (
  input  logic signed [AW-1:0]    a,
  input  logic signed [BW-1:0]    b,
  output logic signed [AW+BW-1:0] p
);

  localparam int PW = AW + BW;

  booth_op_e op [BW];

  // Booth encoder: one operation per multiplier bit.
  always_comb begin
    for (int i = 0; i < BW; i++) begin
      logic prev;
      prev = (i == 0) ? 1'b0 : b[i-1];
      unique case ({b[i], prev})
        2'b01:   op[i] = BOOTH_ADD;
        2'b10:   op[i] = BOOTH_SUB;
        default: op[i] = BOOTH_NONE;
      endcase
    end
  end

  // Partial-product generation and summation.
  always_comb begin
    logic signed [PW-1:0] ae;
    logic signed [PW-1:0] acc;
    ae  = PW'(a);
    acc = '0;
    for (int i = 0; i < BW; i++) begin
      unique case (op[i])
        BOOTH_ADD:  acc = acc + (ae <<< i);
        BOOTH_SUB:  acc = acc - (ae <<< i);
        default:    acc = acc;
      endcase
    end
    p = acc;
  end

endmodule
