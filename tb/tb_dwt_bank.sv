// tb_dwt_bank: random writes and reads on a small memory bank, compared with a
// testbench copy of the contents. Reads return data one cycle after the
// address; a read of a word written in the same cycle returns the old value.
module tb_dwt_bank;
  localparam int DEPTH = 256;
  localparam int W     = 24;
  localparam int AW    = 8;

  logic          clk = 0;
  logic          we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0]  wdata = '0, rdata;
  logic [W-1:0]  model [DEPTH];
  logic [W-1:0]  exp_q;
  logic          exp_v = 0;
  int checks = 0, failures = 0;

  dwt_bank #(.DEPTH(DEPTH), .W(W), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    // fill every word first so that every later read has a known value
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = W'($urandom); model[i] = wdata;
    end
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rdata !== exp_q) begin
          failures++;
          if (failures < 10) $display("FAIL read %h expected %h", rdata, exp_q);
        end
      end
      we = 1'($urandom); re = 1'($urandom);
      waddr = AW'($urandom); raddr = (n % 7 == 0) ? waddr : AW'($urandom);
      wdata = W'($urandom);
      exp_v = re;
      exp_q = model[raddr];           // value before this cycle's write
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
