// tb_bist_module: self-checking test of the BIST module on a behavioural
// RAM. Each run loads random contents, starts the test through the register
// interface, polls the status register and reads the signature. The
// expected signature comes from a reference run of the march test on an
// array model (1's complement sums modulo 2**DATA_W - 1). Fault-free runs
// must pass with the all-1 signature, leave the RAM contents unchanged and
// take 16 cycles per word; runs with a stuck-at bit injected must report
// the reference signature, and fail whenever that signature is not all-1.
module tb_bist_module;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned ADDR_W = 3;
  localparam int unsigned D = 1 << ADDR_W;
  localparam longint unsigned M = (64'd1 << DATA_W) - 1;

  logic clk = 0, rst;
  logic reg_wr, reg_rd;
  logic [(DATA_W+7)/8-1:0] reg_byte_en;
  logic [DATA_W-1:0] reg_wr_data, reg_rd_data, mem_rd_data, mem_wr_data;
  logic [3:0] reg_addr;
  logic mem_wr, mem_rd, busy;
  logic [ADDR_W-1:0] mem_rd_addr, mem_wr_addr;
  logic fault_en, fault_val;
  logic [ADDR_W-1:0] fault_addr;
  int unsigned fault_bit;
  logic [DATA_W-1:0] init [D];
  int checks = 0, failures = 0, detected = 0, fault_runs = 0;

  bist_module #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .REG_ADDR_W(4)) dut (
    .i_clk(clk), .i_reset(rst), .i_reg_wr(reg_wr), .i_reg_rd(reg_rd),
    .i_reg_byte_en(reg_byte_en), .i_reg_wr_data(reg_wr_data),
    .i_reg_addr(reg_addr), .i_mem_rd_data(mem_rd_data),
    .o_mem_wr(mem_wr), .o_mem_rd(mem_rd), .o_mem_rd_addr(mem_rd_addr),
    .o_mem_wr_addr(mem_wr_addr), .o_mem_wr_data(mem_wr_data),
    .o_reg_rd_data(reg_rd_data), .o_busy(busy)
  );

  faulty_ram_model #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) ram (
    .clk, .wr(mem_wr), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data),
    .rd(mem_rd), .rd_addr(mem_rd_addr), .rd_data(mem_rd_data),
    .fault_en, .fault_addr, .fault_bit, .fault_val
  );

  always #5 clk = ~clk;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  function automatic logic [DATA_W-1:0] oc_add(longint unsigned x, longint unsigned z);
    longint unsigned s = x + z;
    if (s == 0) return '0;
    if (s % M == 0) return DATA_W'(M);
    return DATA_W'(s % M);
  endfunction

  // Reference: the march test on an array with the same stuck-at bit.
  function automatic logic [DATA_W-1:0] ref_signature();
    logic [DATA_W-1:0] m [D];
    logic [DATA_W-1:0] acc = '0;
    bit dn [6]  = '{0, 0, 0, 1, 1, 1};
    bit sb [6]  = '{1, 0, 0, 0, 0, 0};
    bit wrt [6] = '{0, 1, 1, 1, 1, 0};
    foreach (m[i]) m[i] = init[i];
    for (int e = 0; e < 6; e++)
      for (int k = 0; k < D; k++) begin
        int a;
        logic [DATA_W-1:0] d;
        a = dn[e] ? D - 1 - k : k;
        d = m[a];
        if (fault_en && a == int'(fault_addr)) d[fault_bit] = fault_val;
        acc = sb[e] ? oc_add(acc, M - d) : oc_add(acc, d);
        if (wrt[e]) m[a] = ~d;
      end
    return acc;
  endfunction

  task automatic reg_write(logic [3:0] a, logic [DATA_W-1:0] d);
    reg_wr = 1; reg_addr = a; reg_wr_data = d; reg_byte_en = '1;
    @(posedge clk); #1 reg_wr = 0;
  endtask

  task automatic reg_read(logic [3:0] a, output logic [DATA_W-1:0] d);
    reg_rd = 1; reg_addr = a;
    @(posedge clk); #1 reg_rd = 0;
    d = reg_rd_data;
  endtask

  task automatic run_test(bit with_fault);
    logic [DATA_W-1:0] st, sig, exp_sig;
    int cycles;
    foreach (init[i]) begin
      init[i] = DATA_W'($urandom);
      ram.mem[i] = init[i];
    end
    fault_en = with_fault;
    fault_addr = ADDR_W'($urandom); fault_bit = $urandom % DATA_W;
    fault_val = 1'($urandom);
    exp_sig = ref_signature();
    reg_write(4'h0, 1);
    cycles = 1;
    while (busy) begin
      @(posedge clk); #1 cycles++;
    end
    reg_read(4'h1, st);
    reg_read(4'h2, sig);
    chk(sig == exp_sig, "signature equals reference");
    if (!with_fault) begin
      chk(cycles == 16 * D + 2, "test length 16 cycles per word");
      if (cycles != 16 * D + 2) $display("  cycles=%0d", cycles);
      chk(st[3:0] == 4'b0110, "done and pass");
      chk(sig == '1, "all-1 signature");
      foreach (init[i]) chk(ram.mem[i] == init[i], "contents restored");
    end else begin
      fault_runs++;
      chk(st[2] == (exp_sig == '1) && st[3] == (exp_sig != '1) && st[1], "pass/fail flags");
      if (st[3]) detected++;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; reg_wr = 0; reg_rd = 0; reg_byte_en = '0; reg_wr_data = '0;
    reg_addr = '0; fault_en = 0; fault_addr = '0; fault_bit = 0; fault_val = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int r = 0; r < 40; r++) run_test(0);
    for (int r = 0; r < 60; r++) run_test(1);
    $display("stuck-at faults detected: %0d of %0d", detected, fault_runs);
    chk(detected > 0, "some fault detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
