// tb_two_port_ram: self-checking test of the two-port RAM against an array
// model: random writes on port A and reads on port B, one-cycle read
// latency, output held while rb is low, no write without en and wa or in
// reset, resetb clearing the read register, old data on a same-word
// read/write.
module tb_two_port_ram;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned ADDR_W = 4;
  localparam int unsigned D = 1 << ADDR_W;

  logic clk = 0;
  logic reseta, en, wa, resetb, rb;
  logic [DATA_W-1:0] wa_data, b_data_out, expq;
  logic [ADDR_W-1:0] adda, addb;
  logic [DATA_W-1:0] model [D];
  int checks = 0, failures = 0;

  two_port_ram #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) dut (
    .clka(clk), .reseta, .en, .wa, .wa_data, .adda,
    .clkb(clk), .resetb, .rb, .addb, .b_data_out
  );

  always #5 clk = ~clk;

  task automatic chk(logic [DATA_W-1:0] got, logic [DATA_W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h t=%0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reseta = 0; resetb = 1; en = 0; wa = 0; rb = 0; adda = 0; addb = 0; wa_data = 0;
    @(posedge clk); #1;
    chk(b_data_out, '0, "resetb clears output");
    resetb = 0;
    for (int i = 0; i < D; i++) begin
      en = 1; wa = 1; adda = ADDR_W'(i); wa_data = DATA_W'($urandom); model[i] = wa_data;
      @(posedge clk); #1;
    end
    en = 0; wa = 0;
    expq = '0;
    for (int i = 0; i < 3000; i++) begin
      logic [1:0] kind;
      kind = 2'($urandom);
      en = 1'($urandom); wa = 1'($urandom); reseta = ($urandom % 8) == 0;
      adda = ADDR_W'($urandom); wa_data = DATA_W'($urandom);
      rb = 1'($urandom); addb = (kind == 0) ? adda : ADDR_W'($urandom);
      if (rb) expq = model[addb];           // old data on same-word access
      if (en && wa && !reseta) model[adda] = wa_data;
      @(posedge clk); #1;
      chk(b_data_out, expq, "read data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
