// tb_stbist_top: end-to-end test of the RAM with its symmetric transparent
// BIST, at the design's default sizes (32-bit words, 16 words).
// The system fills the RAM through its own ports and reads it back; then a
// host starts the BIST through the register interface while the system
// keeps issuing writes (which must be ignored), waits for the end, reads
// status and signature, and the system checks that its data survived.
// A stuck-at bit on the RAM read data seen by the BIST is then forced for some runs: the
// BIST must report the signature of a reference run of the march test over
// the faulty RAM, and fail when it is not all-1.
// Each mechanism is counted and must occur: every march element, both
// address orders, subtracted reads, inverted write-backs, blocked system
// writes, passing and failing runs. Test length checked: 16 cycles per word.
module tb_stbist_top;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned ADDR_W = 4;
  localparam int unsigned D = 1 << ADDR_W;
  localparam longint unsigned M = (64'd1 << DATA_W) - 1;

  logic clk = 0, rst;
  logic reg_wr, reg_rd, bist_busy;
  logic [(DATA_W+7)/8-1:0] reg_byte_en;
  logic [DATA_W-1:0] reg_wr_data, reg_rd_data;
  logic [3:0] reg_addr;
  logic ram_en, ram_wa, ram_rb;
  logic [DATA_W-1:0] ram_wa_data, ram_b_data_out;
  logic [ADDR_W-1:0] ram_adda, ram_addb;
  logic [DATA_W-1:0] sysdata [D];
  logic [DATA_W-1:0] fmask, fset;
  int checks = 0, failures = 0;
  int n_elem [6];
  int n_up = 0, n_down = 0, n_sub = 0, n_inv_wr = 0, n_blocked = 0;
  int n_pass = 0, n_fail = 0;

  stbist_top dut (
    .i_clk(clk), .i_rst(rst),
    .i_reg_wr(reg_wr), .i_reg_rd(reg_rd), .i_reg_byte_en(reg_byte_en),
    .i_reg_wr_data(reg_wr_data), .i_reg_addr(reg_addr),
    .o_reg_rd_data(reg_rd_data), .o_bist_busy(bist_busy),
    .i_ram_en(ram_en), .i_ram_wa(ram_wa), .i_ram_wa_data(ram_wa_data),
    .i_ram_adda(ram_adda), .i_ram_rb(ram_rb), .i_ram_addb(ram_addb),
    .o_ram_b_data_out(ram_b_data_out)
  );

  always #5 clk = ~clk;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  // Mechanism counters, from the memory traffic the BIST drives.
  logic [ADDR_W-1:0] prev_addr;
  logic              prev_valid;
  always @(posedge clk) begin
    if (bist_busy) begin
      if (dut.u_bist.o_mem_rd) begin
        n_elem[dut.u_bist.u_ctrl.elem]++;
        if (prev_valid && dut.u_bist.o_mem_rd_addr == prev_addr + 1'b1) n_up++;
        if (prev_valid && dut.u_bist.o_mem_rd_addr == prev_addr - 1'b1) n_down++;
        prev_addr  <= dut.u_bist.o_mem_rd_addr;
        prev_valid <= 1'b1;
      end
      if (dut.u_bist.u_ctrl.acc_en && dut.u_bist.u_ctrl.acc_sub) n_sub++;
      if (dut.u_bist.o_mem_wr && dut.u_bist.u_ctrl.acc_inv) begin
        n_inv_wr++;
        if (dut.u_bist.o_mem_wr_data !== ~dut.u_bist.i_mem_rd_data) begin
          failures++;
          $display("FAIL write-back is not the inverse of the read word");
        end
      end
      if (ram_en && ram_wa) n_blocked++;
    end else begin
      prev_valid <= 1'b0;
    end
  end

  function automatic logic [DATA_W-1:0] oc_add(longint unsigned x, longint unsigned z);
    longint unsigned s = x + z;
    if (s == 0) return '0;
    if (s % M == 0) return DATA_W'(M);
    return DATA_W'(s % M);
  endfunction

  // Reference run of the symmetric transparent C- test over a RAM whose
  // read data has bit fbit stuck at fval (when fen).
  function automatic logic [DATA_W-1:0] ref_signature(bit fen, int fbit, bit fval);
    logic [DATA_W-1:0] m [D];
    logic [DATA_W-1:0] acc = '0;
    bit dn [6]  = '{0, 0, 0, 1, 1, 1};
    bit sb [6]  = '{1, 0, 0, 0, 0, 0};
    bit wrt [6] = '{0, 1, 1, 1, 1, 0};
    foreach (m[i]) m[i] = sysdata[i];
    for (int e = 0; e < 6; e++)
      for (int k = 0; k < D; k++) begin
        int a;
        logic [DATA_W-1:0] d;
        a = dn[e] ? D - 1 - k : k;
        d = m[a];
        if (fen) d[fbit] = fval;
        acc = sb[e] ? oc_add(acc, M - d) : oc_add(acc, d);
        if (wrt[e]) m[a] = ~d;
      end
    return acc;
  endfunction

  task automatic sys_write(int a, logic [DATA_W-1:0] d);
    ram_en = 1; ram_wa = 1; ram_adda = ADDR_W'(a); ram_wa_data = d;
    @(posedge clk); #1 ram_en = 0; ram_wa = 0;
  endtask

  task automatic sys_read(int a, output logic [DATA_W-1:0] d);
    ram_rb = 1; ram_addb = ADDR_W'(a);
    @(posedge clk); #1 ram_rb = 0;
    d = ram_b_data_out;
  endtask

  task automatic reg_access(bit wr, logic [3:0] a, logic [DATA_W-1:0] wd,
                            output logic [DATA_W-1:0] rd);
    reg_wr = wr; reg_rd = !wr; reg_addr = a; reg_wr_data = wd; reg_byte_en = '1;
    @(posedge clk); #1 reg_wr = 0; reg_rd = 0;
    rd = reg_rd_data;
  endtask

  task automatic run(bit fen);
    logic [DATA_W-1:0] d, st, sig, exp_sig;
    int cycles, fbit;
    bit fval;
    for (int i = 0; i < D; i++) begin
      sysdata[i] = DATA_W'($urandom);
      sys_write(i, sysdata[i]);
    end
    for (int i = 0; i < D; i++) begin
      sys_read(i, d);
      chk(d == sysdata[i], "system read before test");
    end
    fbit = $urandom % DATA_W; fval = 1'($urandom);
    exp_sig = ref_signature(fen, fbit, fval);
    fmask = DATA_W'(1) << fbit;
    fset  = fval ? fmask : '0;
    if (fen) force dut.u_bist.i_mem_rd_data = (dut.b_data_out & ~fmask) | fset;
    reg_access(1, 4'h0, 1, d);
    cycles = 1;
    while (bist_busy) begin
      // the system keeps writing garbage: must be ignored
      ram_en = 1; ram_wa = 1; ram_adda = ADDR_W'($urandom); ram_wa_data = '0;
      @(posedge clk); #1 cycles++;
    end
    ram_en = 0; ram_wa = 0;
    if (fen) release dut.u_bist.i_mem_rd_data;
    chk(cycles == 16 * D + 2, "16 cycles per word");
    reg_access(0, 4'h1, 0, st);
    reg_access(0, 4'h2, 0, sig);
    chk(sig == exp_sig, "signature equals reference");
    chk(st[1] && !st[0], "done");
    if (st[2]) n_pass++;
    if (st[3]) n_fail++;
    chk(st[2] == (sig == '1) && st[3] == (sig != '1), "pass flag");
    if (!fen) begin
      chk(sig == '1, "fault-free signature is all-1");
      for (int i = 0; i < D; i++) begin
        sys_read(i, d);
        chk(d == sysdata[i], "system data survives the test");
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] d;
    foreach (n_elem[i]) n_elem[i] = 0;
    rst = 1; reg_wr = 0; reg_rd = 0; reg_byte_en = '0; reg_wr_data = '0; reg_addr = '0;
    ram_en = 0; ram_wa = 0; ram_rb = 0; ram_wa_data = '0; ram_adda = '0; ram_addb = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    reg_access(0, 4'h1, 0, d);
    chk(d == 0, "idle status after reset");
    for (int r = 0; r < 10; r++) run(0);
    for (int r = 0; r < 20; r++) run(1);
    foreach (n_elem[i]) begin
      $display("element M%0d reads: %0d", i, n_elem[i]);
      chk(n_elem[i] > 0, "every march element applied");
    end
    $display("up steps %0d, down steps %0d, subtracted reads %0d, inverted write-backs %0d",
             n_up, n_down, n_sub, n_inv_wr);
    $display("blocked system writes %0d, passing runs %0d, failing runs %0d",
             n_blocked, n_pass, n_fail);
    chk(n_up > 0, "increasing address order");
    chk(n_down > 0, "decreasing address order");
    chk(n_sub > 0, "subtracted (r_a)^c reads");
    chk(n_inv_wr > 0, "inverted write-backs");
    chk(n_blocked > 0, "system writes blocked during test");
    chk(n_pass > 0, "passing run");
    chk(n_fail > 0, "failing run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
