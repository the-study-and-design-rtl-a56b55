// tlb_pkg: constants and types shared by the banked, task-tagged TLB.
//
// The TLB translates 32-bit virtual addresses with a 32 KB page, so the
// virtual page number is bits [31:15] and the offset bits [14:0]. Each of
// the ITLB and DTLB is split into 32 banks of 32 fully associative entries
// (1024 entries per side); each bank belongs to one task, named by a task
// tag held in a bank-tag register. A prefetch buffer of 17 entries is filled
// by sequential prefetching at distances +1..+9 and -1..-8 pages.
// Bank count, bank size, page size and prefetch distances follow the
// design as published; the physical address width (32 bits) is this
// design's own choice.
package tlb_pkg;

  parameter int unsigned VA_W          = 32;  // virtual address width
  parameter int unsigned PA_W          = 32;  // physical address width (chosen)
  parameter int unsigned PAGE_OFFSET_W = 15;  // 32 KB pages
  parameter int unsigned VPN_W         = VA_W - PAGE_OFFSET_W;
  parameter int unsigned PPN_W         = PA_W - PAGE_OFFSET_W;
  parameter int unsigned NBANKS        = 32;  // task banks per TLB side
  parameter int unsigned BANK_ENTRIES  = 32;  // entries per bank
  parameter int unsigned SP_FWD        = 9;   // sequential prefetch: v+1 .. v+9
  parameter int unsigned SP_BWD        = 8;   // sequential prefetch: v-1 .. v-8
  parameter int unsigned PF_ENTRIES    = SP_FWD + SP_BWD;  // 17
  parameter int unsigned DP_ROWS       = 64;  // distance prefetching: table rows
  parameter int unsigned DP_SLOTS      = 2;   // predicted distances per row
  parameter int unsigned DP_PF_ENTRIES = 16;  // prefetch buffer with distance prefetching

  // Prefetch logic of a TLB side.
  typedef enum logic {
    PF_SP = 1'b0,  // sequential prefetching (default)
    PF_DP = 1'b1   // distance prefetching
  } pf_mode_e;

  // One-cycle event pulses brought out of the top for performance counting.
  typedef struct packed {
    logic i_bank_hit;    // ITLB lookup hit in the current bank
    logic i_pb_hit;      // ITLB lookup missed the bank, hit the prefetch buffer
    logic d_bank_hit;    // DTLB lookup hit in the current bank
    logic d_pb_hit;      // DTLB lookup missed the bank, hit the prefetch buffer
    logic demand_walk;   // miss handler sent a page-table request
    logic fill_case2;    // miss filled into an existing current bank
    logic fill_match;    // no current bank; task tag matched a valid bank
    logic fill_alloc;    // no current bank, no match: victim bank flushed and taken
    logic evict_valid;   // the victim bank taken above held another task
    logic fault;         // page-table request answered "not present"
    logic pf_issue;      // a prefetcher sent a page-table request
    logic pf_fill;       // a prefetched translation was written to a prefetch buffer
  } tlb_events_t;

  // Miss-handler states.
  typedef enum logic [1:0] {
    MC_IDLE = 2'd0,  // watching for a miss
    MC_REQ  = 2'd1,  // page-table request waiting for acceptance
    MC_WAIT = 2'd2,  // waiting for the page-table response
    MC_FILL = 2'd3   // choose the bank and write the translation
  } mc_state_e;

endpackage
