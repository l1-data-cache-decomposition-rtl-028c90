// l1_pkg: widths, types and helper functions shared by the split L1 data
// cache (pseudo set-associative cache plus specialized stack cache).
//
// The 32-byte line and the 40-bit physical address are the figures of the
// evaluated machine. The 32-bit virtual address, the 64-bit processor word,
// the 4 KB page and the line-wide L2 port are choices of this design.
package l1_pkg;

  localparam int unsigned VA_W        = 32;            // virtual address bits
  localparam int unsigned PA_W        = 40;            // physical address bits
  localparam int unsigned LINE_BYTES  = 32;            // L1 and L2 line size
  localparam int unsigned OFF_W       = $clog2(LINE_BYTES);
  localparam int unsigned LINE_W      = LINE_BYTES * 8;
  localparam int unsigned DATA_W      = 64;            // processor word
  localparam int unsigned WORD_BYTES  = DATA_W / 8;
  localparam int unsigned WORDS_PER_LINE = LINE_BYTES / WORD_BYTES;
  localparam int unsigned WIDX_W      = $clog2(WORDS_PER_LINE);
  localparam int unsigned PAGE_W      = 12;            // 4 KB pages
  localparam int unsigned VPN_W       = VA_W - PAGE_W;
  localparam int unsigned PFN_W       = PA_W - PAGE_W;
  localparam int unsigned VLINE_W     = VA_W - OFF_W;  // virtual line address
  localparam int unsigned PLINE_W     = PA_W - OFF_W;  // physical line address

  typedef logic [LINE_W-1:0]     line_t;
  typedef logic [DATA_W-1:0]     word_t;
  typedef logic [WORD_BYTES-1:0] be_t;
  typedef logic [LINE_BYTES-1:0] line_be_t;
  typedef logic [VA_W-1:0]       vaddr_t;
  typedef logic [PA_W-1:0]       paddr_t;
  typedef logic [VLINE_W-1:0]    vline_t;
  typedef logic [PLINE_W-1:0]    pline_t;

  // Probing scheme of the pseudo set-associative cache.
  //   PREDICT_PHA : first probe = all tags + data of the predicted way;
  //                 second probe = data of the way the tags named.
  //   FALLBACK_PHA: first probe = tag and data of the predicted way;
  //                 second = tags of the other ways; third = data of the hit way.
  typedef enum logic [0:0] {PREDICT_PHA, FALLBACK_PHA} psac_scheme_e;

  // One processor load or store.
  typedef struct packed {
    logic   we;      // 1 = store
    vaddr_t va;      // byte address (word aligned use is expected)
    word_t  wdata;
    be_t    be;      // byte enables of the store
    vaddr_t pc;      // address of the load/store instruction
    logic   sp;      // decode marked it as stack-pointer based
  } cpu_req_t;

  // One-cycle event pulses of the whole L1, for performance and energy
  // accounting outside the cache.
  typedef struct packed {
    logic sp_route;          // stack-pointer reference sent to the SSC
    logic redirect;          // other stack reference redirected to the SSC
    logic ssc_hit;
    logic ssc_miss;
    logic ssc_wb;            // SSC dirty line written back
    logic ssc_wb_skipped;    // SSC dirty dead line dropped
    logic ssc_fetch;         // SSC line fetched
    logic ssc_fetch_skipped; // SSC store miss allocated without fetch
    logic srb_shrink;
    logic srb_reset;
    logic psac_pred_hit;
    logic psac_mispred;
    logic psac_miss;
    logic psac_wb;
    logic psac_adapt;        // adaptive fill moved away from the MRU way
    logic tlb_miss;          // PSAC request answered with a TLB miss
    logic ssc_xlate_wait;    // SSC L2 request waiting for a translation
  } l1_events_t;

  // Word (with byte enables) placed into a line.
  function automatic line_t merge_word(line_t line, logic [WIDX_W-1:0] widx,
                                       word_t wdata, be_t be);
    line_t r = line;
    for (int b = 0; b < int'(WORD_BYTES); b++)
      if (be[b]) r[(int'(widx) * int'(WORD_BYTES) + b) * 8 +: 8] = wdata[b*8 +: 8];
    return r;
  endfunction

  function automatic word_t get_word(line_t line, logic [WIDX_W-1:0] widx);
    return line[int'(widx) * int'(DATA_W) +: DATA_W];
  endfunction

  // Line-wide byte enables of one word store.
  function automatic line_be_t word_be(logic [WIDX_W-1:0] widx, be_t be);
    line_be_t r = '0;
    r[int'(widx) * int'(WORD_BYTES) +: WORD_BYTES] = be;
    return r;
  endfunction

endpackage
