// tb_march_controller: self-checking test of the march FSM.
// The expected cycle-by-cycle trace of the symmetric transparent C- test
//   M0 up((r_a)^c)  M1 up(r_a,w_a^c)  M2 up(r_a^c,w_a)
//   M3 down(r_a,w_a^c)  M4 down(r_a^c,w_a)  M5 down(r_a)
// is built here from that list (read cycle, accumulate cycle, optional
// write cycle per word) and compared with the controller's outputs every
// cycle; the test length (16 cycles per word plus the done cycle) and
// start being ignored while busy are checked too. Run twice.
module tb_march_controller;
  localparam int unsigned ADDR_W = 3;
  localparam int unsigned D = 1 << ADDR_W;

  logic clk = 0, rst, start;
  logic busy, done, mem_rd, mem_wr, acc_clr, acc_en, acc_sub, acc_inv;
  logic [ADDR_W-1:0] addr;
  logic [2:0] elem;
  int checks = 0, failures = 0;

  march_controller #(.ADDR_W(ADDR_W)) dut (.*);

  always #5 clk = ~clk;

  // expected trace: one entry per cycle
  typedef struct packed {
    logic rd, wr, en, sub, inv;
    logic [ADDR_W-1:0] a;
    logic [2:0] e;
  } ev_t;
  ev_t trace [$];

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // is_down, subtract on read, has write
    bit dn [6]  = '{0, 0, 0, 1, 1, 1};
    bit sb [6]  = '{1, 0, 0, 0, 0, 0};
    bit wrt [6] = '{0, 1, 1, 1, 1, 0};
    for (int e = 0; e < 6; e++)
      for (int k = 0; k < D; k++) begin
        logic [ADDR_W-1:0] a;
        a = dn[e] ? ADDR_W'(D - 1 - k) : ADDR_W'(k);
        trace.push_back('{rd:1, wr:0, en:0, sub:0, inv:0, a:a, e:3'(e)});
        trace.push_back('{rd:0, wr:0, en:1, sub:sb[e], inv:0, a:a, e:3'(e)});
        if (wrt[e]) trace.push_back('{rd:0, wr:1, en:0, sub:1, inv:1, a:a, e:3'(e)});
      end
    chk(trace.size() == 16 * D, "trace length 16 cycles per word");

    rst = 1; start = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    chk(!busy && !done && !mem_rd && !mem_wr, "idle after reset");
    for (int run = 0; run < 2; run++) begin
      repeat (3) @(posedge clk);
      #1 start = 1;
      #1;
      chk(acc_clr, "acc_clr with start");
      @(posedge clk); #1 start = 0;
      foreach (trace[i]) begin
        if (i == 5) start = 1;  // ignored while busy
        chk(busy && !done, "busy");
        chk(mem_rd == trace[i].rd && mem_wr == trace[i].wr, "rd/wr");
        chk(acc_en == trace[i].en && acc_inv == trace[i].inv, "en/inv");
        chk(!trace[i].en && !trace[i].wr || acc_sub == trace[i].sub, "sub");
        chk(addr == trace[i].a && elem == trace[i].e, "addr/elem");
        chk(!acc_clr, "no clr while busy");
        if (addr != trace[i].a || mem_rd != trace[i].rd)
          $display("  cycle %0d addr=%0d exp=%0d rd=%b", i, addr, trace[i].a, mem_rd);
        @(posedge clk); #1;
        if (i == 5) start = 0;
      end
      chk(done && busy, "done pulse after 16 cycles per word");
      @(posedge clk); #1;
      chk(!done && !busy, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
