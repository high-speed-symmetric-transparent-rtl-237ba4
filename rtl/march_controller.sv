// march_controller: FSM that generates the march events of the symmetric
// transparent C- test.
//
// The six elements (M0..M5, table MARCH_C_SYM in stbist_pkg) are applied one
// after another to every word of a 2**ADDR_W-word RAM, in increasing address
// order for M0..M2 and decreasing order for M3..M5. For each word:
//   S_RD  issue a read of the word (mem_rd)
//   S_ACC the read word is on the RAM output: add it to the accumulator, or
//         subtract it for a (r_a)^c read (acc_en, acc_sub)
//   S_WR  only in elements with a write: drive inv and sub so that the
//         accumulator's adder outputs the inverse of the read word, and
//         write it back to the same address (mem_wr)
// so a read-only element costs 2 cycles per word and a read/write element 3.
// The march operations therefore fill 16 * 2**ADDR_W cycles; they are
// followed by one cycle with the done pulse (S_FIN), in which the
// accumulator holds the signature.
//
// Interface: start is sampled in S_IDLE; acc_clr is high in that cycle and
// clears the accumulator. busy is high from the cycle after start through the
// done cycle, 16 * 2**ADDR_W + 1 cycles in all.
// The sequence of elements and the add/subtract use follow the document; the
// state split and the cycle timing are this design's own choices, and rely
// on a RAM with one cycle of read latency that holds its output.
module march_controller
  import stbist_pkg::*;
#(
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              mem_rd,
  output logic              mem_wr,
  output logic [ADDR_W-1:0] addr,
  output logic              acc_clr,
  output logic              acc_en,
  output logic              acc_sub,
  output logic              acc_inv,
  output logic [2:0]        elem
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_RD,
    S_ACC,
    S_WR,
    S_FIN
  } state_e;

  localparam logic [ADDR_W-1:0] ADDR_LAST = '1;

  state_e      state;
  march_elem_t cur;
  logic        last_addr;
  logic        last_elem;

  always_comb begin
    cur       = MARCH_C_SYM[elem];
    last_addr = (cur.dir == DIR_UP) ? (addr == ADDR_LAST) : (addr == '0);
    last_elem = (elem == 3'(NUM_ELEMS - 1));
  end

  state_e            state_n;
  logic [2:0]        elem_n;
  logic [ADDR_W-1:0] addr_n;
  logic              go_next;  // this cycle finishes the current word
  march_elem_t       nxt;

  always_comb begin
    state_n = state;
    elem_n  = elem;
    addr_n  = addr;
    go_next = 1'b0;
    nxt     = MARCH_C_SYM[last_elem ? elem : elem + 3'd1];
    unique case (state)
      S_IDLE: if (start) begin
        elem_n  = '0;
        addr_n  = (MARCH_C_SYM[0].dir == DIR_UP) ? '0 : ADDR_LAST;
        state_n = S_RD;
      end
      S_RD:  state_n = S_ACC;
      S_ACC: if (cur.wr_inv) state_n = S_WR;
             else            go_next = 1'b1;
      S_WR:  go_next = 1'b1;
      S_FIN: state_n = S_IDLE;
      default: state_n = S_IDLE;
    endcase
    // Move to the next word, or to the first word of the next element.
    if (go_next) begin
      if (!last_addr) begin
        addr_n  = (cur.dir == DIR_UP) ? addr + 1'b1 : addr - 1'b1;
        state_n = S_RD;
      end else if (last_elem) begin
        state_n = S_FIN;
      end else begin
        elem_n  = elem + 3'd1;
        addr_n  = (nxt.dir == DIR_UP) ? '0 : ADDR_LAST;
        state_n = S_RD;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      elem  <= '0;
      addr  <= '0;
    end else begin
      state <= state_n;
      elem  <= elem_n;
      addr  <= addr_n;
    end
  end

  always_comb begin
    busy    = (state != S_IDLE);
    done    = (state == S_FIN);
    mem_rd  = (state == S_RD);
    mem_wr  = (state == S_WR);
    acc_clr = (state == S_IDLE) && start;
    acc_en  = (state == S_ACC);
    acc_sub = ((state == S_ACC) && (cur.rd == RD_A_CMP)) || (state == S_WR);
    acc_inv = (state == S_WR);
  end

  // Protocol rules: one RAM operation per cycle; write-back data is only
  // requested together with a write; a read is always followed by the
  // accumulate cycle that consumes its data.
  a_rd_wr_exclusive: assert property (@(posedge clk) disable iff (rst)
    !(mem_rd && mem_wr));
  a_inv_with_write: assert property (@(posedge clk) disable iff (rst)
    acc_inv |-> (mem_wr && acc_sub && !acc_en));
  a_read_then_acc: assert property (@(posedge clk) disable iff (rst)
    mem_rd |=> acc_en);

endmodule
