// abc_pkg: types and constants shared by the Allocation-By-Conflict (ABC)
// multilateral data cache.
//
// The cache is built from two unconnected stores, A (main) and B (buffer),
// that hold disjoint sets of 32-byte lines. The 32-byte line follows the
// data-cache description of the design; the 32-bit address, the 32-bit
// processor word with byte enables, the request tags (up to 16 processor
// requests and 8 line fetches in flight) and the line-wide memory transfer
// are choices of this implementation.
package abc_pkg;

  localparam int unsigned ADDR_W     = 32;              // byte address width
  localparam int unsigned WORD_W     = 32;              // processor word
  localparam int unsigned BE_W       = WORD_W / 8;      // byte enables
  localparam int unsigned LINE_BYTES = 32;              // cache line
  localparam int unsigned LINE_W     = LINE_BYTES * 8;  // 256 bits
  localparam int unsigned WORDS      = LINE_BYTES / BE_W;
  localparam int unsigned OFF_W      = $clog2(LINE_BYTES);
  localparam int unsigned WSEL_W     = $clog2(WORDS);
  localparam int unsigned LADDR_W    = ADDR_W - OFF_W;  // line address width
  localparam int unsigned ID_W       = 4;               // processor request tag
  localparam int unsigned MID_W      = 3;               // memory read tag (MSHR number)

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [BE_W-1:0]    be_t;
  typedef logic [LINE_W-1:0]  line_t;
  typedef logic [LADDR_W-1:0] laddr_t;
  typedef logic [ID_W-1:0]    id_t;
  typedef logic [MID_W-1:0]   mid_t;

  // Processor load/store request (one word). Answers carry the same id and
  // may return out of order.
  typedef struct packed {
    id_t   id;     // request tag, returned with the answer
    logic  we;     // 1 = store
    addr_t addr;   // byte address
    word_t wdata;  // store data
    be_t   be;     // store byte enables
  } cpu_req_t;

  // Request to the secondary cache / main memory (one whole line).
  typedef struct packed {
    mid_t   id;     // read tag, returned with the line (MSHR number)
    logic   we;     // 1 = write back a dirty line, 0 = fetch a line
    laddr_t laddr;  // line address
    line_t  wdata;  // line written back
  } mem_req_t;

  // Operation applied to a store in one cycle.
  typedef enum logic [1:0] {
    ST_NONE = 2'd0,  // no change
    ST_HIT  = 2'd1,  // reference to a resident block (LRU, C bit, store data)
    ST_FILL = 2'd2   // install a new block in the chosen way
  } st_op_e;

  // One-cycle event pulses for counting what the cache did.
  typedef struct packed {
    logic hit_a;     // access hit in A
    logic hit_b;     // access hit in B
    logic miss;      // access missed in both stores
    logic alloc_a;   // miss block placed in A, conflict block replaced
    logic alloc_b;   // miss block placed in B: a CNR in its A-set
    logic wb;        // dirty victim queued for write-back
    logic delayed;   // access held: its line is being fetched (delayed hit)
    logic mshr_full; // access held: miss with every MSHR busy
  } abc_events_t;

  // Merge a word, under byte enables, into a line.
  function automatic line_t merge_word(line_t line, logic [WSEL_W-1:0] wsel,
                                       word_t wdata, be_t be);
    line_t r = line;
    for (int b = 0; b < BE_W; b++)
      if (be[b]) r[wsel*WORD_W + b*8 +: 8] = wdata[b*8 +: 8];
    return r;
  endfunction

endpackage
