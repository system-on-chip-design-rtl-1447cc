// cn_pkg: types and constants shared by the blocks of a nerve-centre (CN) core.
//
// A CN core runs a micro-program of fixed-width instructions, one per clock.
// Each instruction names an operation, a starting (source) component with an
// internal address inside it, and a terminal (destination) component with an
// internal address. The field order and the operation and component codes
// follow the published instruction format; the 6-bit internal address width
// is the one the CD-centre program uses. Code 3'b111 (operation) and 2'b11
// (source component) are unused and decode as "do nothing".
package cn_pkg;

  localparam int unsigned OP_W    = 3;
  localparam int unsigned BLK_W   = 2;
  localparam int unsigned IADDR_W = 6;   // internal address inside a component
  localparam int unsigned INSTR_W = OP_W + 2 * (BLK_W + IADDR_W);  // 19 bits

  // Operations (Table of operation codes).
  typedef enum logic [OP_W-1:0] {
    OP_NULL = 3'b000,
    OP_LOAD = 3'b001,
    OP_AND  = 3'b010,
    OP_OR   = 3'b011,
    OP_NOT  = 3'b100,
    OP_EQ   = 3'b101,
    OP_GT   = 3'b110,
    OP_RSVD = 3'b111
  } op_e;

  // Starting components.
  typedef enum logic [BLK_W-1:0] {
    SRC_INPUT  = 2'b00,
    SRC_MEMORY = 2'b01,
    SRC_ALU    = 2'b10,
    SRC_RSVD   = 2'b11
  } src_e;

  // Terminal components.
  typedef enum logic [BLK_W-1:0] {
    DST_OUTPUT = 2'b00,
    DST_STACKP = 2'b01,
    DST_MEMORY = 2'b10,
    DST_ALU    = 2'b11
  } dst_e;

  // One micro-instruction: op | source block | source address | target block | target address.
  typedef struct packed {
    op_e                op;
    src_e               src_blk;
    logic [IADDR_W-1:0] src_addr;
    dst_e               dst_blk;
    logic [IADDR_W-1:0] dst_addr;
  } instr_t;


endpackage
