// vsbc_pkg: widths, records and helper functions shared by the Variable-Sized
// Block Cache (VSBC) modules.
//
// A trace is a fixed group of NBLK = 4 basic blocks. The block pointer cache
// (BPC) keeps one trace_t per trace: the thread it belongs to, a valid bit, the
// full head and tail address of each block, the basic block cache (BBC) way that
// holds each block and the taken/not-taken status of the branches ending the
// first three blocks (the last block's branch is not kept). The field list
// follows the BPC line of the design; its widths are this design's choice:
// 32-bit byte addresses, 32-bit instructions (4 bytes each), a 4-bit thread ID
// (up to 16 threads) and a 3-bit way ID (up to 8 BBC ways). The LRU field of a
// BPC line lives in the bpc module because its width depends on the partition
// size. PORT_W = 16 is the width of one BBC read port in instructions, which
// also bounds the length of a stored basic block.
package vsbc_pkg;

  localparam int unsigned AW     = 32;  // address width (byte address)
  localparam int unsigned IW     = 32;  // instruction width
  localparam int unsigned NBLK   = 4;   // basic blocks per trace
  localparam int unsigned PORT_W = 16;  // instructions per BBC read port
  localparam int unsigned TIDW   = 4;   // thread-ID field width (16 threads)
  localparam int unsigned WAYW   = 3;   // way-ID field width (8 ways)
  localparam int unsigned LENW   = $clog2(PORT_W + 1);          // 0..PORT_W
  localparam int unsigned CNTW   = $clog2(NBLK * PORT_W + 1);   // 0..64
  localparam int unsigned NBW    = $clog2(NBLK + 1);            // 0..NBLK

  typedef logic [AW-1:0]   addr_t;
  typedef logic [IW-1:0]   instr_t;
  typedef logic [TIDW-1:0] tid_t;
  typedef logic [WAYW-1:0] way_t;

  // One BPC line without its LRU field.
  typedef struct packed {
    tid_t                  tid;
    logic                  valid;
    addr_t [NBLK-1:0]      head;
    addr_t [NBLK-1:0]      tail;
    way_t  [NBLK-1:0]      way;
    logic  [NBLK-2:0]      br;     // branch status of blocks 0..2, 1 = taken
  } trace_t;

  // Request from a trace build engine to the storage module.
  typedef enum logic {WR_INSTR = 1'b0, WR_TRACE = 1'b1} wr_kind_e;

  typedef struct packed {
    wr_kind_e kind;
    addr_t    addr;    // WR_INSTR: address of the instruction
    instr_t   data;    // WR_INSTR: the instruction
    logic     first;   // WR_INSTR: first instruction of a basic block
    way_t     way;     // WR_INSTR, first = 0: way the block is stored in
    trace_t   trace;   // WR_TRACE: the completed trace build buffer
  } wr_req_t;

  // Lookup result passed from the storage module to a coalescing buffer.
  // Slot j holds the j-th delivered block, read through BBC read port j.
  typedef struct packed {
    tid_t                  tid;
    logic                  hit;      // at least one block delivered
    logic                  partial;  // fewer blocks than the trace holds past the start
    logic [NBW-1:0]        nblk;     // number of delivered blocks
    way_t  [NBLK-1:0]      way;      // way of each delivered block
    logic  [NBLK-1:0][LENW-1:0] len; // length of each delivered block (instructions)
    addr_t                 addr;     // lookup address
  } lk_res_t;

  // Number of instructions in a block from its head and tail byte addresses.
  function automatic logic [LENW-1:0] blk_len(addr_t head, addr_t tail);
    addr_t d;
    d = (tail - head) >> 2;
    if (tail < head || d >= addr_t'(PORT_W)) return LENW'(PORT_W);
    return LENW'(d + 1);
  endfunction

endpackage
