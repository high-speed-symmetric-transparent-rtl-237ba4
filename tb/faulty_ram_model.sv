// faulty_ram_model: behavioural RAM for testbenches, not for synthesis.
// A 2**ADDR_W x DATA_W RAM with a write port and a read port of one cycle
// read latency (output held while rd is low), like two_port_ram, plus an
// injectable stuck-at fault: while fault_en is high, bit fault_bit of word
// fault_addr always holds fault_val, whatever is written to it.
module faulty_ram_model #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clk,
  input  logic              wr,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  input  logic              rd,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_data,
  input  logic              fault_en,
  input  logic [ADDR_W-1:0] fault_addr,
  input  int unsigned       fault_bit,
  input  logic              fault_val
);
  logic [DATA_W-1:0] mem [1 << ADDR_W];

  function automatic logic [DATA_W-1:0] stuck(logic [ADDR_W-1:0] a, logic [DATA_W-1:0] d);
    logic [DATA_W-1:0] r = d;
    if (fault_en && a == fault_addr) r[fault_bit] = fault_val;
    return r;
  endfunction

  always @(posedge clk) begin
    if (wr) mem[wr_addr] <= wr_data;
    if (rd) rd_data <= stuck(rd_addr, mem[rd_addr]);
  end
endmodule
