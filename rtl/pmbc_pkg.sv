// pmbc_pkg: types and constants shared by the proactive memory-based computing (MBC) design.
//
// Memory-based computing replaces an integer add or multiply by a read of a lookup table (LUT)
// that holds the precomputed result for every pair of 8-bit operands. The LUTs live in main
// memory, one region per operation, and are cached by a private L1 MBC cache in each core and by
// a way-partitioned shared L2.
//
// Address map (this design's choice): a 256 MB byte-addressed main memory (28-bit addresses).
// The multiply LUT occupies the 128 KB below the add LUT, and the add LUT the top 128 KB, so the
// two MBC regions sit at the end of memory as in the usual picture of the partitioned hierarchy.
// Entry (i, j) of a LUT is 16 bits. The LUT is stored in 4x4 tiles with the tile bits of i and j
// interleaved: byte offset {i[7:4], j[7:4], i[3:2], j[3:2], i[1:0], j[1:0], 1'b0}. A 32-byte line
// therefore holds one 4x4 tile of operand pairs, and neighbouring tiles of a compact operand region
// fall into different cache sets in both the 16-set L1 MBC cache and the 256-set L2.
package pmbc_pkg;

  localparam int ADDR_W     = 28;          // 256 MB main memory
  localparam int DATA_W     = 32;          // integer datapath width
  localparam int OPND_W     = 8;           // operand width of one LUT lookup
  localparam int ENTRY_W    = 16;          // one LUT entry: full result of an 8x8-bit add or multiply
  localparam int LINE_BYTES = 32;          // cache line size (L2 line size)
  localparam int LINE_W     = LINE_BYTES * 8;
  localparam int OFFS_W     = $clog2(LINE_BYTES);
  localparam int ENTRIES_PER_LINE = LINE_W / ENTRY_W;  // 16, a 4x4 tile of operand pairs
  localparam int TILE_W     = 2;                       // log2 of the tile side
  localparam int LUT_BYTES  = (1 << (2 * OPND_W)) * (ENTRY_W / 8);  // 128 KB per operation

  localparam logic [ADDR_W-1:0] MUL_LUT_BASE = ADDR_W'(28'hFFC_0000);
  localparam logic [ADDR_W-1:0] ADD_LUT_BASE = ADDR_W'(28'hFFE_0000);

  // Instruction operations seen by the execution slice. Only ADD and MUL are supported by MBC.
  typedef enum logic [2:0] {
    OP_ADD = 3'd0,
    OP_SUB = 3'd1,
    OP_MUL = 3'd2,
    OP_AND = 3'd3,
    OP_OR  = 3'd4,
    OP_XOR = 3'd5
  } op_e;

  // Cache partition classes (way-based partitioning).
  localparam int NUM_CLS = 3;
  typedef enum logic [1:0] {
    CLS_ID  = 2'd0,   // conventional instruction/data lines
    CLS_MUL = 2'd1,   // MBC multiply LUT lines
    CLS_ADD = 2'd2    // MBC add LUT lines
  } cls_e;

  // Bounds of one decision function, D(i,j) = (a<=i<=b && c<=j<=d) || (diag_en && i==j).
  typedef struct packed {
    logic [OPND_W-1:0] a;
    logic [OPND_W-1:0] b;
    logic [OPND_W-1:0] c;
    logic [OPND_W-1:0] d;
    logic              diag_en;
  } dfunc_cfg_t;

  // Byte address of LUT entry (i, j) of the multiply (is_mul=1) or add LUT.
  function automatic logic [ADDR_W-1:0] lut_addr(input logic is_mul,
                                                 input logic [OPND_W-1:0] i,
                                                 input logic [OPND_W-1:0] j);
    logic [ADDR_W-1:0] base;
    base = is_mul ? MUL_LUT_BASE : ADD_LUT_BASE;
    return base | ADDR_W'({i[7:4], j[7:4], i[3:2], j[3:2], i[1:0], j[1:0], 1'b0});
  endfunction

  // Position of entry (i, j) inside its 16-entry line.
  function automatic logic [3:0] lut_entry_idx(input logic [OPND_W-1:0] i,
                                               input logic [OPND_W-1:0] j);
    return {i[1:0], j[1:0]};
  endfunction

  // Partition class of an address: MBC regions by address, everything else inst/data.
  function automatic cls_e addr_class(input logic [ADDR_W-1:0] addr);
    if (addr >= ADD_LUT_BASE)      return CLS_ADD;
    else if (addr >= MUL_LUT_BASE) return CLS_MUL;
    else                           return CLS_ID;
  endfunction

endpackage
