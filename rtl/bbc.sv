// bbc: basic block cache (BBC), the instruction store of the VSBC.
//
// Each of the WAYS ways is a tag array plus a data array of LINES lines; a line
// holds one instruction together with its tag, the ID of the thread that wrote
// it and a valid bit. A basic block is stored at the lines indexed by the
// addresses of its own instructions (index = word address modulo LINES, tag =
// the address bits above), so a block starting at head address H occupies
// consecutive lines from index(H) on, wrapping at the end of the way, and any
// instruction is stored at most once per way. The BBC is shared by all threads.
//
// Write port (one instruction per cycle, written at the clock edge): for the
// first instruction of a block (wr_first) the module chooses the way: the way
// that already holds this address for this thread, else an invalid way at that
// index, else a round-robin victim way. wr_way reports the chosen way in the
// same cycle so that the trace build engine can keep the rest of the block and
// the BPC entry in that way. Later instructions of the block go to wr_way_in.
//
// Read ports: NBLK ports per way, each PORT_W instructions wide. Port j reads
// the PORT_W lines starting at index(rd_addr[j]) in every way, combinationally,
// and flags each line whose tag, thread ID and valid bit match the address
// rd_addr[j] + 4*i; the coalescing buffer later picks the way of each block.
//
// From the design: the split into tag and data arrays, the thread-ID field,
// index and set taken from the head addresses, blocks of any length up to the
// size of a way, 4 read ports of 16 instructions per way. This design's own
// choices: one instruction per line, 4-byte instructions, the way choice above,
// and no read of a line before it is written (valid bits cleared on a
// synchronous, active-low reset).
module bbc
  import vsbc_pkg::*;
#(
  parameter int unsigned WAYS  = 4,
  parameter int unsigned LINES = 256
) (
  input  logic   clk,
  input  logic   rst_n,
  // write port
  input  logic   wr_en,
  input  tid_t   wr_tid,
  input  addr_t  wr_addr,
  input  instr_t wr_data,
  input  logic   wr_first,
  input  way_t   wr_way_in,
  output way_t   wr_way,
  // read ports
  input  tid_t                                      rd_tid,
  input  addr_t  [NBLK-1:0]                         rd_addr,
  output instr_t [WAYS-1:0][NBLK-1:0][PORT_W-1:0]   rd_data,
  output logic   [WAYS-1:0][NBLK-1:0][PORT_W-1:0]   rd_hit
);
  localparam int unsigned IDXW = $clog2(LINES);
  localparam int unsigned TAGW = AW - 2 - IDXW;
  localparam int unsigned WIW  = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef logic [IDXW-1:0] idx_t;
  typedef logic [TAGW-1:0] tag_t;

  typedef struct packed {
    logic valid;
    tid_t tid;
    tag_t tag;
  } tag_ent_t;

  tag_ent_t tag_arr  [WAYS][LINES];
  instr_t   data_arr [WAYS][LINES];
  way_t     vptr;        // round-robin victim way

  function automatic idx_t idx_of(addr_t a);
    return a[2 +: IDXW];
  endfunction
  function automatic tag_t tag_of(addr_t a);
    return a[AW-1 -: TAGW];
  endfunction

  // ---- way choice for a write --------------------------------------------
  logic alloc;   // first instruction of a block that is not yet in any way
  always_comb begin
    logic found, inv_found;
    way_t hit_way, inv_way;
    found = 1'b0; inv_found = 1'b0; hit_way = '0; inv_way = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      tag_ent_t e;
      e = tag_arr[w][idx_of(wr_addr)];
      if (!found && e.valid && e.tid == wr_tid && e.tag == tag_of(wr_addr)) begin
        found = 1'b1; hit_way = way_t'(w);
      end
      if (!inv_found && !e.valid) begin
        inv_found = 1'b1; inv_way = way_t'(w);
      end
    end
    alloc = wr_first && !found;
    if (!wr_first)      wr_way = wr_way_in;
    else if (found)     wr_way = hit_way;
    else if (inv_found) wr_way = inv_way;
    else                wr_way = vptr;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vptr <= '0;
      for (int unsigned w = 0; w < WAYS; w++)
        for (int unsigned l = 0; l < LINES; l++)
          tag_arr[w][l].valid <= 1'b0;
    end else if (wr_en) begin
      tag_arr[wr_way[WIW-1:0]][idx_of(wr_addr)]  <= '{valid: 1'b1, tid: wr_tid, tag: tag_of(wr_addr)};
      data_arr[wr_way[WIW-1:0]][idx_of(wr_addr)] <= wr_data;
      if (alloc) vptr <= (int'(vptr) == WAYS - 1) ? '0 : way_t'(vptr + 1'b1);
    end
  end

  // ---- read ports ----------------------------------------------------------
  always_comb begin
    for (int unsigned w = 0; w < WAYS; w++)
      for (int unsigned j = 0; j < NBLK; j++)
        for (int unsigned i = 0; i < PORT_W; i++) begin
          addr_t    a;
          tag_ent_t e;
          a = rd_addr[j] + addr_t'(4 * i);
          e = tag_arr[w][idx_of(a)];
          rd_data[w][j][i] = data_arr[w][idx_of(a)];
          rd_hit[w][j][i]  = e.valid && e.tid == rd_tid && e.tag == tag_of(a);
        end
  end

  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> int'(wr_way) < WAYS);
endmodule
