// tb_example_4x3: the worked example of a 4-word, 3-bit RAM with a 3-stage
// 1's complement accumulator, run exhaustively. The whole design is
// instantiated with 3-bit words and 4 words, and the BIST is run once for
// every one of the 4096 possible RAM contents: each run must end with the
// all-1 signature (3'b111), report pass, take 16 cycles per word and leave
// the RAM contents unchanged.
module tb_example_4x3;
  localparam int unsigned DATA_W = 3;
  localparam int unsigned ADDR_W = 2;
  localparam int unsigned D = 1 << ADDR_W;

  logic clk = 0, rst;
  logic reg_wr, reg_rd, bist_busy;
  logic [0:0] reg_byte_en;
  logic [DATA_W-1:0] reg_wr_data, reg_rd_data;
  logic [3:0] reg_addr;
  logic [DATA_W-1:0] ram_b_data_out;
  int checks = 0, failures = 0, passes = 0;

  stbist_top #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .REG_ADDR_W(4)) dut (
    .i_clk(clk), .i_rst(rst),
    .i_reg_wr(reg_wr), .i_reg_rd(reg_rd), .i_reg_byte_en(reg_byte_en),
    .i_reg_wr_data(reg_wr_data), .i_reg_addr(reg_addr),
    .o_reg_rd_data(reg_rd_data), .o_bist_busy(bist_busy),
    .i_ram_en(1'b0), .i_ram_wa(1'b0), .i_ram_wa_data('0), .i_ram_adda('0),
    .i_ram_rb(1'b0), .i_ram_addb('0), .o_ram_b_data_out(ram_b_data_out)
  );

  always #5 clk = ~clk;

  task automatic chk(logic cond, string what, int pattern);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s contents=%03h", what, pattern);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    rst = 1; reg_wr = 0; reg_rd = 0; reg_byte_en = '1; reg_wr_data = '0; reg_addr = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int p = 0; p < (1 << (DATA_W * D)); p++) begin
      for (int i = 0; i < D; i++) dut.u_ram.mem[i] = DATA_W'(p >> (DATA_W * i));
      reg_wr = 1; reg_addr = 4'h0; reg_wr_data = 1;
      @(posedge clk); #1 reg_wr = 0;
      cycles = 1;
      while (bist_busy) begin
        @(posedge clk); #1 cycles++;
      end
      chk(cycles == 16 * D + 2, "16 cycles per word", p);
      reg_rd = 1; reg_addr = 4'h2;
      @(posedge clk); #1 reg_rd = 0;
      chk(reg_rd_data == 3'b111, "all-1 signature", p);
      reg_rd = 1; reg_addr = 4'h1;
      @(posedge clk); #1 reg_rd = 0;
      chk(reg_rd_data == 3'b110, "done and pass", p);
      if (reg_rd_data == 3'b110) passes++;
      for (int i = 0; i < D; i++)
        chk(dut.u_ram.mem[i] == DATA_W'(p >> (DATA_W * i)), "contents unchanged", p);
    end
    $display("passing runs: %0d of %0d contents", passes, 1 << (DATA_W * D));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
