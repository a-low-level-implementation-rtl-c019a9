// Shared sizes, types and address helpers of the instruction cache.
//
// The cache stores 1024 quads (32-bit words) in two ways of 16 sets. A block is
// 32 quads, split into four transfer blocks of eight quads. The instruction unit
// gives a 46-bit quad address, which splits into
//   [2:0]   quad within the transfer block ("word" field)
//   [4:3]   transfer block within the block
//   [8:5]   set
//   [45:9]  tag (37 bits)
// A transfer-block address (TBA) is the quad address without the word field
// (43 bits). The tag and status widths (37 and 34 bits) and the 43-bit
// transfer-block address follow the document; the bit order inside the status
// word is this design's choice.
// Some size constants are listed for reference and not used by every
// module; the field-extraction functions each use only their own field.
package icache_pkg;

  localparam int unsigned QUAD_W      = 32;  // quad = 32 bits
  localparam int unsigned ADDR_W      = 46;  // quad address from the instruction unit
  localparam int unsigned WORD_W      = 3;   // 8 quads per transfer block
  localparam int unsigned TB_W        = 2;   // 4 transfer blocks per block
  localparam int unsigned SET_W       = 4;   // 16 sets
  localparam int unsigned TAG_W       = ADDR_W - SET_W - TB_W - WORD_W;  // 37
  localparam int unsigned TBA_W       = ADDR_W - WORD_W;                 // 43
  localparam int unsigned TB_QUADS    = 1 << WORD_W;                     // 8
  localparam int unsigned BLOCK_QUADS = 1 << (WORD_W + TB_W);            // 32
  localparam int unsigned SETS        = 1 << SET_W;                      // 16
  localparam int unsigned STATUS_W    = 2 + BLOCK_QUADS;                 // 34
  localparam int unsigned RAM_AW      = SET_W + 1 + TB_W;                // 7
  localparam int unsigned RAM_DEPTH   = 1 << RAM_AW;                     // 128
  localparam int unsigned TBLK_W      = TB_QUADS * QUAD_W;               // 256
  localparam int unsigned QP_W        = 4;   // quad pointer, 1..8 = buffer slot, 9 = full
  localparam int unsigned COUNT_W     = 3;   // bus unit count = quads wanted - 1

  typedef logic [ADDR_W-1:0] qaddr_t;
  typedef logic [TBA_W-1:0]  tba_t;
  typedef logic [TAG_W-1:0]  tag_t;
  typedef logic [SET_W-1:0]  set_t;
  typedef logic [QUAD_W-1:0] quad_t;
  typedef logic [QP_W-1:0]   qp_t;

  // Status of one block: LRU bit, block valid, one data-valid bit per quad.
  typedef struct packed {
    logic                   lru;     // 1: this way is the least recently used one
    logic                   bvalid;
    logic [BLOCK_QUADS-1:0] dvalid;
  } status_t;

  // One row of the tag/status memory: both ways of a set.
  typedef struct packed {
    tag_t    tag1;
    tag_t    tag0;
    status_t st1;
    status_t st0;
  } tag_row_t;

  // FController states; the code is also the DemandOrPre value seen by the MMU.
  typedef enum logic [1:0] {
    FC_REST  = 2'b00,   // fetcher and MMU idle
    FC_PREF  = 2'b01,   // prefetching
    FC_DEMF  = 2'b10,   // demand fetching
    FC_DEMF3 = 2'b11    // demand fetch requested, prefetcher updating the cache status
  } fstate_e;

  // The fetcher control bus C<0:10> (Request, StartFetcher, TransferBlockHit,
  // Ready, QuadPointer, State, CacheHit), as named fields.
  typedef struct packed {
    logic    cache_hit;     // C<10>
    fstate_e state;         // C<8:9>
    qp_t     qp;            // C<4:7>
    logic    ready;         // C<3>
    logic    tb_hit;        // C<2>
    logic    start_fetcher; // C<1>
    logic    request;       // C<0>
  } fctrl_t;

  function automatic tba_t tba_of(qaddr_t a);
    return a[ADDR_W-1:WORD_W];
  endfunction
  function automatic logic [WORD_W-1:0] word_of(qaddr_t a);
    return a[WORD_W-1:0];
  endfunction
  function automatic logic [TB_W-1:0] tb_of(tba_t t);
    return t[TB_W-1:0];
  endfunction
  function automatic set_t set_of(tba_t t);
    return t[TB_W+SET_W-1:TB_W];
  endfunction
  function automatic tag_t tag_of(tba_t t);
    return t[TBA_W-1:TB_W+SET_W];
  endfunction
  // The eight data-valid bits of transfer block tb inside a block status.
  function automatic logic [TB_QUADS-1:0] tb_valid(status_t s, logic [TB_W-1:0] tb);
    return s.dvalid[tb*TB_QUADS +: TB_QUADS];
  endfunction

endpackage
