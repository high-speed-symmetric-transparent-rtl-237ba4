// tb_ones_comp_addsub: self-checking test of the 1's complement
// adder/subtractor. A reference computes 1's complement sums by reducing
// modulo 2**N - 1 in wider arithmetic (all-1 kept for a non-zero result that
// is a multiple of 2**N - 1) and checks add, subtract, and the inverse
// produced with inv, including the all-0 and all-1 corner words.
module tb_ones_comp_addsub;
  localparam int unsigned N = 8;
  localparam longint unsigned M = (64'd1 << N) - 1;

  logic [N-1:0] a, b, y;
  logic sub, inv;
  int checks = 0, failures = 0;

  ones_comp_addsub #(.N(N)) dut (.a(a), .b(b), .sub(sub), .inv(inv), .y(y));

  // 1's complement a + b: the sum reduced modulo 2**N - 1, represented by
  // the all-1 word when it is a non-zero multiple of 2**N - 1.
  function automatic logic [N-1:0] ref_add(longint unsigned x, longint unsigned z);
    longint unsigned s = x + z;
    if (s == 0) return '0;
    if (s % M == 0) return N'(M);
    return N'(s % M);
  endfunction

  task automatic check(logic [N-1:0] exp, string what);
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h sub=%b inv=%b y=%h exp=%h", what, a, b, sub, inv, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      a = N'($urandom); b = N'($urandom);
      if (i < 4) begin a = (i[0]) ? '1 : '0; b = (i[1]) ? '1 : '0; end
      sub = 0; inv = 0; check(ref_add(a, b), "add");
      sub = 1; inv = 0; check(ref_add(a, M - b), "sub");
      sub = 1; inv = 1; check(~b, "inv");
    end
    // The compaction property: d + d^c gives the all-1 word from zero.
    for (int i = 0; i < 256; i++) begin
      a = '0; b = N'(i); sub = 0; inv = 0; #1;
      a = y; b = ~N'(i); check('1, "pair");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
