// two_port_ram: the RAM under test, with one write port and one read port.
//
// Port A writes wa_data to word adda on the rising edge of clka when en and
// wa are both high. Port B reads word addb on the rising edge of clkb when
// rb is high and presents it on b_data_out from that edge on (one cycle of
// read latency); b_data_out holds its value while rb is low. reseta and
// resetb are synchronous, active high: resetb clears the read register,
// reseta blocks writes. Neither clears the array, since a transparent test
// must find the contents as the system left them.
// The port names follow the block diagram of the design; the read latency,
// the meaning of en and of the resets are this design's own choices. A
// simultaneous write and read of the same word returns the old word.
module two_port_ram #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clka,
  input  logic              reseta,
  input  logic              en,
  input  logic              wa,
  input  logic [DATA_W-1:0] wa_data,
  input  logic [ADDR_W-1:0] adda,
  input  logic              clkb,
  input  logic              resetb,
  input  logic              rb,
  input  logic [ADDR_W-1:0] addb,
  output logic [DATA_W-1:0] b_data_out
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clka) begin
    if (!reseta && en && wa) mem[adda] <= wa_data;
  end

  always_ff @(posedge clkb) begin
    if (resetb)  b_data_out <= '0;
    else if (rb) b_data_out <= mem[addb];
  end

endmodule
