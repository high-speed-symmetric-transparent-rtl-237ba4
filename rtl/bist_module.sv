// bist_module: symmetric transparent BIST for a word-organised RAM.
//
// A host starts a test through the register interface (bist_regs). The
// march controller then applies the symmetric transparent C- march test to
// every word of the RAM through the memory ports, and the accumulator
// compacts the words read with a 1's complement adder/subtractor. Because
// the test reads every word as often in true form as in complemented form,
// a fault-free RAM leaves the accumulator at the all-1 word whatever the
// RAM held, so no signature has to be predicted beforehand; every write of
// the test stores the inverse of the word just read, produced by the same
// adder/subtractor with its inv input set, and the RAM ends the test with
// its original contents. The host reads pass/fail and the signature back.
//
// Interface: port names follow the block diagram of the design. The memory
// side expects a RAM with a write port (o_mem_wr, o_mem_wr_addr,
// o_mem_wr_data) and a read port (o_mem_rd, o_mem_rd_addr) whose read data
// i_mem_rd_data appears one clock after o_mem_rd and holds until the next
// read. o_busy (not in the diagram) tells the surrounding logic that the BIST
// owns the RAM. Timing: o_busy rises on the clock edge that accepts the
// start write and stays high for 16 * 2**ADDR_W + 1 cycles: 16 cycles per
// word of march operations, then one cycle in which the result is captured;
// the status register shows done from the next cycle on.
// i_reset is synchronous and active high.
module bist_module
  import stbist_pkg::*;
#(
  parameter int unsigned DATA_W     = 32,
  parameter int unsigned ADDR_W     = 4,
  parameter int unsigned REG_ADDR_W = 4
) (
  input  logic                  i_clk,
  input  logic                  i_reset,
  input  logic                  i_reg_wr,
  input  logic                  i_reg_rd,
  input  logic [(DATA_W+7)/8-1:0]   i_reg_byte_en,
  input  logic [DATA_W-1:0]     i_reg_wr_data,
  input  logic [REG_ADDR_W-1:0] i_reg_addr,
  input  logic [DATA_W-1:0]     i_mem_rd_data,
  output logic                  o_mem_wr,
  output logic                  o_mem_rd,
  output logic [ADDR_W-1:0]     o_mem_rd_addr,
  output logic [ADDR_W-1:0]     o_mem_wr_addr,
  output logic [DATA_W-1:0]     o_mem_wr_data,
  output logic [DATA_W-1:0]     o_reg_rd_data,
  output logic                  o_busy
);

  logic              start;
  logic              done;
  logic [ADDR_W-1:0] addr;
  logic              acc_clr;
  logic              acc_en;
  logic              acc_sub;
  logic              acc_inv;
  logic [2:0]        elem;
  logic [DATA_W-1:0] acc_y;
  logic [DATA_W-1:0] acc_q;

  bist_regs #(
    .DATA_W    (DATA_W),
    .REG_ADDR_W(REG_ADDR_W)
  ) u_regs (
    .clk        (i_clk),
    .rst        (i_reset),
    .reg_wr     (i_reg_wr),
    .reg_rd     (i_reg_rd),
    .reg_byte_en(i_reg_byte_en),
    .reg_wr_data(i_reg_wr_data),
    .reg_addr   (i_reg_addr),
    .reg_rd_data(o_reg_rd_data),
    .start      (start),
    .test_busy  (o_busy),
    .test_done  (done),
    .signature  (acc_q)
  );

  march_controller #(.ADDR_W(ADDR_W)) u_ctrl (
    .clk    (i_clk),
    .rst    (i_reset),
    .start  (start),
    .busy   (o_busy),
    .done   (done),
    .mem_rd (o_mem_rd),
    .mem_wr (o_mem_wr),
    .addr   (addr),
    .acc_clr(acc_clr),
    .acc_en (acc_en),
    .acc_sub(acc_sub),
    .acc_inv(acc_inv),
    .elem   (elem)
  );

  accumulator #(.N(DATA_W)) u_acc (
    .clk(i_clk),
    .rst(i_reset),
    .clr(acc_clr),
    .en (acc_en),
    .sub(acc_sub),
    .inv(acc_inv),
    .din(i_mem_rd_data),
    .y  (acc_y),
    .acc(acc_q)
  );

  assign o_mem_rd_addr = addr;
  assign o_mem_wr_addr = addr;
  assign o_mem_wr_data = acc_y;

endmodule
