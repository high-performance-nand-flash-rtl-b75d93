// nand_pkg: shared constants and types of the out-of-order NAND flash controller.
//
// Geometry follows the target device (MT29F32G08Q class part): 4314-byte pages
// (4096 data + 218 spare), 128 pages per block, 4096 blocks per die, two dies
// and two planes per chip, four chips, an eight-entry command queue.
//
// Row address layout (24 bits sent in three address cycles):
//   row[6:0]   page, row[18:7] block (row[7] is the plane), row[19] die,
//   row[23:20] zero.
// The die sits directly above the block field; the document only says the die
// is selected by an address bit, so that position is this design's choice.
// Column address (two cycles): col[12:0], bits [15:13] forced to zero.
//
// Command opcodes are the ONFI 1.0 values. 00h/30h, 80h/10h, 60h/D0h, 70h, 78h
// and FFh are the ones the document uses; the multi-plane "queue" opcodes 32h,
// 11h and D1h come from ONFI 1.0 and are this design's choice.
package nand_pkg;

  localparam int unsigned NCHIP      = 4;
  localparam int unsigned NDIE       = 2;
  localparam int unsigned QDEPTH     = 8;
  localparam int unsigned PAGE_BYTES = 4314;

  localparam int unsigned PAGE_W  = 7;   // 128 pages per block
  localparam int unsigned BLOCK_W = 12;  // 4096 blocks per die
  localparam int unsigned ROW_W   = PAGE_W + BLOCK_W + 1;  // + die bit = 20
  localparam int unsigned COL_W   = 13;
  localparam int unsigned DIE_BIT = PAGE_W + BLOCK_W;      // 19

  // Opcodes
  localparam logic [7:0] OPC_READ1      = 8'h00;
  localparam logic [7:0] OPC_READ2      = 8'h30;
  localparam logic [7:0] OPC_READ_MP    = 8'h32;
  localparam logic [7:0] OPC_PROG1      = 8'h80;
  localparam logic [7:0] OPC_PROG2      = 8'h10;
  localparam logic [7:0] OPC_PROG_MP    = 8'h11;
  localparam logic [7:0] OPC_ERASE1     = 8'h60;
  localparam logic [7:0] OPC_ERASE2     = 8'hD0;
  localparam logic [7:0] OPC_ERASE_MP   = 8'hD1;
  localparam logic [7:0] OPC_STATUS     = 8'h70;
  localparam logic [7:0] OPC_STATUS_ENH = 8'h78;
  localparam logic [7:0] OPC_RESET      = 8'hFF;

  // Status register bits
  localparam int unsigned ST_FAIL = 0;
  localparam int unsigned ST_ARDY = 5;
  localparam int unsigned ST_RDY  = 6;
  localparam int unsigned ST_WPN  = 7;

  typedef enum logic [1:0] {
    OP_READ    = 2'd0,
    OP_PROGRAM = 2'd1,
    OP_ERASE   = 2'd2
  } op_e;

  // A command as the flash transfer layer gives it. row is the logical row
  // address: {die, sequential page number}; the interface controller turns it
  // into the physical two-plane row. seq is the sequential-valid bit: the
  // command that follows continues this access (the next page), so the two
  // may be joined into one two-plane command and this one waits for it.
  typedef struct packed {
    logic                    seq;
    op_e                     op;
    logic [1:0]              chip;
    logic [ROW_W-1:0]        row;
  } cmd_t;

  // One command-queue entry.
  typedef struct packed {
    logic  valid;
    logic  issued;    // sent to its interface controller
    logic  done;      // program/erase sent, or read data delivered
    logic  data_ok;   // program data present in the input buffer
    logic  wait_seq;  // the command asked to wait for its sequential successor
    logic  seq;       // this entry and the next form a two-plane pair
    logic  second;    // this entry is the second half of a pair
    cmd_t  cmd;
  } qentry_t;

  function automatic logic is_write(op_e op);
    return op != OP_READ;
  endfunction

  // Two logically sequential commands can run as one two-plane command:
  // same operation, chip and die, the same block above bit 0 and (for read and
  // program) the same page, and block bit 0 going from 0 to 1. In the logical
  // row the block bit 0 is row[0], the page is row[7:1].
  function automatic logic pairable(cmd_t a, cmd_t b);
    logic same_page;
    // (the seq bits of a and b do not take part)
    same_page = (a.op == OP_ERASE) || (a.row[PAGE_W:1] == b.row[PAGE_W:1]);
    return (a.op == b.op) && (a.chip == b.chip) &&
           (a.row[ROW_W-1:PAGE_W+1] == b.row[ROW_W-1:PAGE_W+1]) &&
           same_page && !a.row[0] && b.row[0];
  endfunction

endpackage
