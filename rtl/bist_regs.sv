// bist_regs: host register interface of the BIST module.
//
// Three word registers, selected by reg_addr (map in stbist_pkg):
//   REG_CTRL   write: bit0 = 1 starts a test (one-cycle start pulse); reads 0
//   REG_STATUS read: bit0 busy, bit1 done, bit2 pass, bit3 fail
//   REG_SIG    read: accumulator contents captured when the last test ended
// A write takes effect on the rising edge where reg_wr is high, and only for
// the bytes whose reg_byte_en bit is set (start lives in byte 0). A read
// returns the selected register on reg_rd_data on the edge after reg_rd is
// sampled high (one cycle of latency); reg_rd_data holds otherwise. A start
// written while a test runs is ignored. With words narrower than 4 bits the
// status bits above the word width are dropped.
// done, pass and fail are set by test_done and cleared by the next start;
// pass means the accumulator ended at the all-1 word, the fault-free result
// the document proves for a symmetric transparent march test.
// The port names come from the block diagram; the register map, the
// latency and the byte-enable use are this design's own choices.
module bist_regs
  import stbist_pkg::*;
#(
  parameter int unsigned DATA_W     = 32,
  parameter int unsigned REG_ADDR_W = 4
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  reg_wr,
  input  logic                  reg_rd,
  input  logic [(DATA_W+7)/8-1:0]   reg_byte_en,
  input  logic [DATA_W-1:0]     reg_wr_data,
  input  logic [REG_ADDR_W-1:0] reg_addr,
  output logic [DATA_W-1:0]     reg_rd_data,
  output logic                  start,
  input  logic                  test_busy,
  input  logic                  test_done,
  input  logic [DATA_W-1:0]     signature
);

  logic              done_q;
  logic              pass_q;
  logic [DATA_W-1:0] sig_q;

  always_comb begin
    start = reg_wr && reg_byte_en[0] && reg_wr_data[0] && !test_busy &&
            (reg_addr == REG_ADDR_W'(REG_CTRL));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      done_q <= 1'b0;
      pass_q <= 1'b0;
      sig_q  <= '0;
    end else if (test_done) begin
      done_q <= 1'b1;
      pass_q <= (signature == '1);
      sig_q  <= signature;
    end else if (start) begin
      done_q <= 1'b0;
      pass_q <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_rd_data <= '0;
    end else if (reg_rd) begin
      reg_rd_data <= '0;
      if (reg_addr == REG_ADDR_W'(REG_STATUS))
        reg_rd_data <= DATA_W'({done_q && !pass_q, pass_q, done_q, test_busy});
      else if (reg_addr == REG_ADDR_W'(REG_SIG))
        reg_rd_data <= sig_q;
    end
  end

endmodule
