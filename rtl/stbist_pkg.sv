// stbist_pkg: types and constants shared by the symmetric transparent BIST.
//
// The march test run by the controller is the symmetric transparent version
// of the C- algorithm:
//   M0 up((r_a)^c)  M1 up(r_a, w_a^c)  M2 up(r_a^c, w_a)
//   M3 down(r_a, w_a^c)  M4 down(r_a^c, w_a)  M5 down(r_a)
// Every write in it stores the complement of the word just read, so one
// "write back the inverse" operation serves both w_a and w_a^c. The only
// difference between the read kinds seen by the compactor is whether the
// word is added ((r_a) and (r_a^c)) or subtracted ((r_a)^c).
// The register map of the BIST module is this design's own choice.
package stbist_pkg;

  typedef enum logic {
    DIR_UP   = 1'b0,
    DIR_DOWN = 1'b1
  } addr_dir_e;

  typedef enum logic [1:0] {
    RD_A     = 2'd0,  // r_a     : expect initial contents, add
    RD_AC    = 2'd1,  // r_a^c   : expect complemented contents, add
    RD_A_CMP = 2'd2   // (r_a)^c : expect initial contents, feed complement (subtract)
  } read_kind_e;

  typedef struct packed {
    addr_dir_e  dir;
    read_kind_e rd;
    logic       wr_inv;  // element ends with a write of the inverted read word
  } march_elem_t;

  localparam int unsigned NUM_ELEMS = 6;

  localparam march_elem_t MARCH_C_SYM [NUM_ELEMS] = '{
    '{dir: DIR_UP,   rd: RD_A_CMP, wr_inv: 1'b0},  // M0
    '{dir: DIR_UP,   rd: RD_A,     wr_inv: 1'b1},  // M1
    '{dir: DIR_UP,   rd: RD_AC,    wr_inv: 1'b1},  // M2
    '{dir: DIR_DOWN, rd: RD_A,     wr_inv: 1'b1},  // M3
    '{dir: DIR_DOWN, rd: RD_AC,    wr_inv: 1'b1},  // M4
    '{dir: DIR_DOWN, rd: RD_A,     wr_inv: 1'b0}   // M5
  };

  // Register map (word addresses on the register interface).
  localparam logic [3:0] REG_CTRL   = 4'h0;  // bit0: write 1 to start a test
  localparam logic [3:0] REG_STATUS = 4'h1;  // bit0 busy, bit1 done, bit2 pass, bit3 fail
  localparam logic [3:0] REG_SIG    = 4'h2;  // final accumulator contents (signature)

endpackage
