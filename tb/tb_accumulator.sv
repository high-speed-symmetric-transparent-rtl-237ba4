// tb_accumulator: self-checking test of the response compactor.
// Runs the read sequence of a symmetric march test over random words (each
// word fed once as d, once subtracted, and as pairs d, d^c) and checks the
// all-1 final state; checks random add/subtract steps against a modulo
// 2**N - 1 reference, the inv output (inverse of din), clr, and that en=0
// holds the register.
module tb_accumulator;
  localparam int unsigned N = 16;
  localparam longint unsigned M = (64'd1 << N) - 1;

  logic clk = 0, rst, clr, en, sub, inv;
  logic [N-1:0] din, y, acc;
  logic [N-1:0] model;
  logic [N-1:0] words [8];
  int checks = 0, failures = 0;

  accumulator #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] ref_add(longint unsigned x, longint unsigned z);
    longint unsigned s = x + z;
    if (s == 0) return '0;
    if (s % M == 0) return N'(M);
    return N'(s % M);
  endfunction

  task automatic chk(logic [N-1:0] got, logic [N-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic step(logic e, logic s, logic [N-1:0] d);
    en = e; sub = s; din = d; inv = 0; clr = 0;
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; clr = 0; en = 0; sub = 0; inv = 0; din = '0;
    @(posedge clk); #1;
    rst = 0;
    chk(acc, '0, "reset");
    for (int run = 0; run < 50; run++) begin
      foreach (words[i]) words[i] = N'($urandom);
      if (run == 0) foreach (words[i]) words[i] = '0;
      if (run == 1) foreach (words[i]) words[i] = '1;
      clr = 1; en = 1; @(posedge clk); #1; clr = 0;
      chk(acc, '0, "clr");
      // M0 (r_a)^c, M1 r_a, M2 r_a^c, M3 r_a, M4 r_a^c, M5 r_a
      foreach (words[i]) step(1, 1, words[i]);
      foreach (words[i]) step(1, 0, words[i]);
      foreach (words[i]) step(1, 0, ~words[i]);
      for (int i = 7; i >= 0; i--) step(1, 0, words[i]);
      for (int i = 7; i >= 0; i--) step(1, 0, ~words[i]);
      for (int i = 7; i >= 0; i--) step(1, 0, words[i]);
      chk(acc, '1, "symmetric signature");
    end
    // random steps against the reference
    clr = 1; @(posedge clk); #1; clr = 0;
    model = '0;
    for (int i = 0; i < 2000; i++) begin
      logic e, s;
      logic [N-1:0] d;
      e = 1'($urandom); s = 1'($urandom); d = N'($urandom);
      if (e) model = s ? ref_add(model, M - d) : ref_add(model, d);
      step(e, s, d);
      chk(acc, model, "random step");
    end
    // inverse for write-back, register untouched
    for (int i = 0; i < 200; i++) begin
      din = N'($urandom); if (i == 0) din = '1; if (i == 1) din = '0;
      inv = 1; sub = 1; en = 0; #1;
      chk(y, ~din, "inverse");
      @(posedge clk); #1;
      chk(acc, model, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
