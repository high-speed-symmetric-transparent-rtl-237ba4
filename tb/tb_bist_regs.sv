// tb_bist_regs: self-checking test of the BIST register interface: start
// pulse only for a write of bit0 to REG_CTRL with byte 0 enabled and the
// test idle; status bits and signature capture on test_done; pass only for
// the all-1 signature; one-cycle read latency with data held between reads.
module tb_bist_regs;
  import stbist_pkg::*;
  localparam int unsigned DATA_W = 32;

  logic clk = 0, rst, reg_wr, reg_rd, start, test_busy, test_done;
  logic [(DATA_W+7)/8-1:0] reg_byte_en;
  logic [DATA_W-1:0] reg_wr_data, reg_rd_data, signature;
  logic [3:0] reg_addr;
  int checks = 0, failures = 0;

  bist_regs #(.DATA_W(DATA_W), .REG_ADDR_W(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(logic [DATA_W-1:0] got, logic [DATA_W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h t=%0t", what, got, exp, $time);
    end
  endtask

  task automatic rd(logic [3:0] a, logic [DATA_W-1:0] exp, string what);
    reg_rd = 1; reg_addr = a;
    @(posedge clk); #1;
    reg_rd = 0; reg_addr = 4'hf;
    chk(reg_rd_data, exp, what);
    @(posedge clk); #1;
    chk(reg_rd_data, exp, {what, " held"});
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; reg_wr = 0; reg_rd = 0; reg_byte_en = '0; reg_wr_data = '0;
    reg_addr = '0; test_busy = 0; test_done = 0; signature = '0;
    @(posedge clk); #1 rst = 0;
    rd(4'h1, 32'h0, "status after reset");
    rd(4'h2, 32'h0, "sig after reset");
    // writes that must not start
    reg_wr = 1; reg_addr = 4'h0; reg_wr_data = 32'h1; reg_byte_en = 4'b1110; #1;
    chk(32'(start), 0, "byte 0 disabled");
    reg_byte_en = 4'b0001; reg_wr_data = 32'h2; #1;
    chk(32'(start), 0, "bit0 clear");
    reg_wr_data = 32'h1; reg_addr = 4'h1; #1;
    chk(32'(start), 0, "wrong address");
    reg_addr = 4'h0; test_busy = 1; #1;
    chk(32'(start), 0, "busy");
    test_busy = 0; #1;
    chk(32'(start), 1, "start");
    reg_wr = 0; #1;
    chk(32'(start), 0, "start is a pulse");
    // a failing run
    test_busy = 1;
    rd(4'h1, 32'h1, "status busy");
    signature = 32'hdead_beef; test_done = 1;
    @(posedge clk); #1 test_done = 0; test_busy = 0; signature = '0;
    rd(4'h1, 32'ha, "status done+fail");
    rd(4'h2, 32'hdead_beef, "signature captured");
    // a passing run
    reg_wr = 1; reg_addr = 4'h0; reg_byte_en = 4'hf; reg_wr_data = 32'h1;
    @(posedge clk); #1 reg_wr = 0; test_busy = 1;
    rd(4'h1, 32'h1, "start clears done");
    signature = '1; test_done = 1;
    @(posedge clk); #1 test_done = 0; test_busy = 0;
    rd(4'h1, 32'h6, "status done+pass");
    rd(4'h2, 32'hffff_ffff, "all-1 signature");
    rd(4'h0, 32'h0, "ctrl reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
