// stbist_top: a two-port RAM with its symmetric transparent BIST.
//
// The BIST module and the RAM it tests are wired as in the block diagram of
// the design: the BIST drives the RAM's write port and read port and takes
// the RAM's read data back. The RAM's own ports (write port A: i_ram_en,
// i_ram_wa, i_ram_wa_data, i_ram_adda; read port B: i_ram_rb, i_ram_addb,
// o_ram_b_data_out) are brought out for the system's normal use; while a
// test runs (o_bist_busy) the BIST owns both ports and the system's accesses
// are ignored. Because the test is transparent, the system finds its data
// unchanged afterwards. Both RAM ports and the BIST run on i_clk; i_rst is
// synchronous and active high and resets the BIST and the RAM's read
// register, not the RAM contents.
// How the system and the BIST share the RAM ports, and the single clock,
// are this design's own choices: the block diagram shows the RAM's pins and
// the BIST connections side by side without saying how they are merged.
module stbist_top #(
  parameter int unsigned DATA_W     = 32,
  parameter int unsigned ADDR_W     = 4,
  parameter int unsigned REG_ADDR_W = 4
) (
  input  logic                  i_clk,
  input  logic                  i_rst,
  // BIST register interface
  input  logic                  i_reg_wr,
  input  logic                  i_reg_rd,
  input  logic [(DATA_W+7)/8-1:0]   i_reg_byte_en,
  input  logic [DATA_W-1:0]     i_reg_wr_data,
  input  logic [REG_ADDR_W-1:0] i_reg_addr,
  output logic [DATA_W-1:0]     o_reg_rd_data,
  output logic                  o_bist_busy,
  // system access to the RAM
  input  logic                  i_ram_en,
  input  logic                  i_ram_wa,
  input  logic [DATA_W-1:0]     i_ram_wa_data,
  input  logic [ADDR_W-1:0]     i_ram_adda,
  input  logic                  i_ram_rb,
  input  logic [ADDR_W-1:0]     i_ram_addb,
  output logic [DATA_W-1:0]     o_ram_b_data_out
);

  logic              bist_mem_wr;
  logic              bist_mem_rd;
  logic [ADDR_W-1:0] bist_mem_rd_addr;
  logic [ADDR_W-1:0] bist_mem_wr_addr;
  logic [DATA_W-1:0] bist_mem_wr_data;
  logic [DATA_W-1:0] b_data_out;

  logic              ram_en;
  logic              ram_wa;
  logic [DATA_W-1:0] ram_wa_data;
  logic [ADDR_W-1:0] ram_adda;
  logic              ram_rb;
  logic [ADDR_W-1:0] ram_addb;

  bist_module #(
    .DATA_W    (DATA_W),
    .ADDR_W    (ADDR_W),
    .REG_ADDR_W(REG_ADDR_W)
  ) u_bist (
    .i_clk        (i_clk),
    .i_reset      (i_rst),
    .i_reg_wr     (i_reg_wr),
    .i_reg_rd     (i_reg_rd),
    .i_reg_byte_en(i_reg_byte_en),
    .i_reg_wr_data(i_reg_wr_data),
    .i_reg_addr   (i_reg_addr),
    .i_mem_rd_data(b_data_out),
    .o_mem_wr     (bist_mem_wr),
    .o_mem_rd     (bist_mem_rd),
    .o_mem_rd_addr(bist_mem_rd_addr),
    .o_mem_wr_addr(bist_mem_wr_addr),
    .o_mem_wr_data(bist_mem_wr_data),
    .o_reg_rd_data(o_reg_rd_data),
    .o_busy       (o_bist_busy)
  );

  always_comb begin
    if (o_bist_busy) begin
      ram_en      = bist_mem_wr;
      ram_wa      = bist_mem_wr;
      ram_wa_data = bist_mem_wr_data;
      ram_adda    = bist_mem_wr_addr;
      ram_rb      = bist_mem_rd;
      ram_addb    = bist_mem_rd_addr;
    end else begin
      ram_en      = i_ram_en;
      ram_wa      = i_ram_wa;
      ram_wa_data = i_ram_wa_data;
      ram_adda    = i_ram_adda;
      ram_rb      = i_ram_rb;
      ram_addb    = i_ram_addb;
    end
  end

  two_port_ram #(
    .DATA_W(DATA_W),
    .ADDR_W(ADDR_W)
  ) u_ram (
    .clka      (i_clk),
    .reseta    (i_rst),
    .en        (ram_en),
    .wa        (ram_wa),
    .wa_data   (ram_wa_data),
    .adda      (ram_adda),
    .clkb      (i_clk),
    .resetb    (i_rst),
    .rb        (ram_rb),
    .addb      (ram_addb),
    .b_data_out(b_data_out)
  );

  assign o_ram_b_data_out = b_data_out;

endmodule
