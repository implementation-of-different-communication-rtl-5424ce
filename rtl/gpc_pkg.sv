// gpc_pkg - shared types and constants of the grid of processing cells.
//
// The grid is built from processing cells (tiles) that each own a local
// scratchpad. Tiles reach the scratchpads of their neighbours over
// point-to-point TileLink links and the scratchpads of all tiles over a
// shared SystemBus. This package holds what all blocks agree on:
//   * the TileLink Uncached Lightweight (TL-UL) A and D channel payloads,
//     32-bit data as in an RV32 system, with the standard opcodes;
//   * the tightly integrated memory (TIM) request/response payloads that
//     feed the scratchpad arbiter;
//   * the address map: 32 KiB scratchpads from 0x8000_0000, local scratchpad
//     at the bottom of each core's virtual map and neighbour n at
//     0x8000_0000 + (n+1)*0x8000, physical tile n at 0x8000_0000 + n*0x8000;
//   * the handshake CSR numbers 0x400..0x403;
//   * the four neighbour directions of a two-dimensional grid.
// The address map, the scratchpad size and the CSR numbers follow the
// design description; field widths, the source-id width and the direction
// numbering are this implementation's choices.
package gpc_pkg;

  localparam int unsigned XLEN      = 32;
  localparam int unsigned BE_W      = XLEN / 8;
  localparam int unsigned SRC_W     = 8;   // TileLink source id width

  // Scratchpad map
  localparam logic [31:0] SPAD_BASE  = 32'h8000_0000;
  localparam int unsigned SPAD_BYTES = 32 * 1024;

  // TileLink-UL opcodes
  typedef enum logic [2:0] {
    TL_PUT_FULL    = 3'd0,
    TL_PUT_PARTIAL = 3'd1,
    TL_GET         = 3'd4
  } tl_a_op_e;

  typedef enum logic [2:0] {
    TL_ACCESS_ACK      = 3'd0,
    TL_ACCESS_ACK_DATA = 3'd1
  } tl_d_op_e;

  typedef struct packed {
    tl_a_op_e          opcode;
    logic [2:0]        param;
    logic [1:0]        size;     // log2 of bytes, at most 2 (one word)
    logic [SRC_W-1:0]  source;
    logic [31:0]       address;
    logic [BE_W-1:0]   mask;
    logic [XLEN-1:0]   data;
  } tl_a_t;

  typedef struct packed {
    tl_d_op_e          opcode;
    logic [1:0]        param;
    logic [1:0]        size;
    logic [SRC_W-1:0]  source;
    logic              denied;
    logic [XLEN-1:0]   data;
    logic              corrupt;
  } tl_d_t;

  // Word-addressed scratchpad (TIM) access. The address is a byte offset
  // inside the scratchpad; bits [1:0] are ignored.
  typedef struct packed {
    logic              we;
    logic [BE_W-1:0]   be;
    logic [31:0]       addr;
    logic [XLEN-1:0]   wdata;
  } tim_req_t;

  // Handshake CSR numbers
  localparam logic [11:0] CSR_SELFREADY  = 12'h400;
  localparam logic [11:0] CSR_SELFVALID  = 12'h401;
  localparam logic [11:0] CSR_OTHERREADY = 12'h402;
  localparam logic [11:0] CSR_OTHERVALID = 12'h403;

  // RISC-V CSR access kinds (csrrw / csrrs / csrrc; a read is csrrs x0)
  typedef enum logic [1:0] {
    CSR_READ  = 2'd0,
    CSR_WRITE = 2'd1,
    CSR_SET   = 2'd2,
    CSR_CLEAR = 2'd3
  } csr_op_e;

  // Neighbour slots of a 2-D grid: slot index = virtual map index = CSR bit
  localparam int unsigned DIR_N = 0;  // row above    (y-1)
  localparam int unsigned DIR_E = 1;  // column right (x+1)
  localparam int unsigned DIR_S = 2;  // row below    (y+1)
  localparam int unsigned DIR_W = 3;  // column left  (x-1)

  function automatic int unsigned opposite_dir(int unsigned d);
    return (d + 2) % 4;
  endfunction

  // Virtual base address the core uses for neighbour slot n
  function automatic logic [31:0] neigh_vbase(int unsigned n);
    return SPAD_BASE + 32'((n + 1) * SPAD_BYTES);
  endfunction

  // Physical (SystemBus) base address of tile n's scratchpad
  function automatic logic [31:0] tile_pbase(int unsigned n);
    return SPAD_BASE + 32'(n * SPAD_BYTES);
  endfunction

endpackage
