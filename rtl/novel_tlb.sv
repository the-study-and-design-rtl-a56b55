// novel_tlb: banked, task-tagged ITLB/DTLB pair with sequential prefetching.
//
// Idea: instead of one large TLB that is thrown away (or slowly overwritten)
// at every context switch, each side keeps NBANKS banks, and each bank holds
// the translations of one task, named by a task tag in a shared bank-tag
// register. A context switch only clears the current bits; when the next
// task misses with no current bank, its task tag is matched against the
// bank tags and, if found, its old bank becomes current again with all its
// translations intact. A prefetch buffer per side, filled by sequential
// prefetching around each miss, hides the misses of the pages a task has not
// yet touched.
//
// Structure: two tlb_side instances (ITLB, DTLB), each with NBANKS tlb_bank
// CAMs, a prefetch_buffer, translation_select and sp_prefetch_logic; one
// bank_tag_file shared by both sides (ITLB and DTLB bank b belong to the
// same task); one mmu_ctrl miss handler; a walk_arbiter that shares the
// single page-table request port among the miss handler (highest priority),
// the ITLB prefetcher and the DTLB prefetcher.
//
// Interface and timing:
//  * i_req/i_vaddr -> i_hit/i_paddr (same for d_*): combinational. A request
//    that sees hit low is stalled; the requester holds it until hit is high.
//    Bank or prefetch-buffer hits answer in the request cycle. A demand miss
//    answers L+3 cycles after it was first seen, L being the cycles from the
//    memory accepting the request to its response, if the port is free.
//    i_fault/d_fault pulse when the page table reports the page absent.
//  * ctx_switch (one cycle): clears the current bits and flushes both
//    prefetch buffers. clear_tlb (one cycle; to be raised by the operating
//    system on page swap-out or page-frame release): clears the valid and
//    current bits of all bank tags and flushes both prefetch buffers.
//  * mem_*: page-table requests to the memory system, one outstanding,
//    valid/ready request and a response pulse carrying ok and the PPN.
//    An unaccepted request may change or drop (arbitration, prefetch
//    restart); the memory samples mem_req_vpn in the cycle it gives ready.
//  * PF_MODE: sequential prefetching (default, as recommended for this
//    structure) or distance prefetching with a DP_ROWS x DP_SLOTS distance
//    table and a DP_PF_ENTRIES-entry prefetch buffer.
//  * pid: task tag used when USE_PID is set; otherwise the PPN of the access
//    that found no current bank serves as task tag.
//  * events: one-cycle pulses for performance counting.
// Sizes, the bank/tag organisation, the select rule and the OS signals
// follow the published design; the handshakes, priorities and the
// 32-bit physical address are this design's own.
module novel_tlb #(
  parameter int unsigned NBANKS       = tlb_pkg::NBANKS,
  parameter int unsigned BANK_ENTRIES = tlb_pkg::BANK_ENTRIES,
  parameter int unsigned PF_ENTRIES   = tlb_pkg::PF_ENTRIES,
  parameter int unsigned SP_FWD       = tlb_pkg::SP_FWD,
  parameter int unsigned SP_BWD       = tlb_pkg::SP_BWD,
  parameter int unsigned VA_W         = tlb_pkg::VA_W,
  parameter int unsigned PA_W         = tlb_pkg::PA_W,
  parameter int unsigned OFFSET_W     = tlb_pkg::PAGE_OFFSET_W,
  parameter bit          USE_PID      = 1'b0,
  parameter tlb_pkg::pf_mode_e PF_MODE = tlb_pkg::PF_SP,
  parameter int unsigned DP_ROWS      = tlb_pkg::DP_ROWS,
  parameter int unsigned DP_SLOTS     = tlb_pkg::DP_SLOTS,
  parameter int unsigned DP_PF_ENTRIES = tlb_pkg::DP_PF_ENTRIES,
  localparam int unsigned VPN_W       = VA_W - OFFSET_W,
  localparam int unsigned PPN_W       = PA_W - OFFSET_W,
  localparam int unsigned TAG_W       = PPN_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // instruction side
  input  logic                 i_req,
  input  logic [VA_W-1:0]      i_vaddr,
  output logic                 i_hit,
  output logic [PA_W-1:0]      i_paddr,
  output logic                 i_fault,
  // data side
  input  logic                 d_req,
  input  logic [VA_W-1:0]      d_vaddr,
  output logic                 d_hit,
  output logic [PA_W-1:0]      d_paddr,
  output logic                 d_fault,
  // operating-system signals
  input  logic                 ctx_switch,
  input  logic                 clear_tlb,
  input  logic [TAG_W-1:0]     pid,
  // memory system (page table)
  output logic                 mem_req_valid,
  input  logic                 mem_req_ready,
  output logic [VPN_W-1:0]     mem_req_vpn,
  input  logic                 mem_resp_valid,
  input  logic                 mem_resp_ok,
  input  logic [PPN_W-1:0]     mem_resp_ppn,
  output tlb_pkg::tlb_events_t events
);
  localparam int unsigned BIW = $clog2(NBANKS);

  // bank-tag file
  logic [NBANKS-1:0] cur_onehot;
  logic              cur_valid, match_hit, victim_was_valid;
  logic [BIW-1:0]    cur_idx, match_idx, victim_idx, act_idx;
  logic [TAG_W-1:0]  match_tag, act_tag;
  logic              activate, act_set_tag;

  // miss handler
  logic              fill_i, fill_d, flush_bank, pf_trig_i, pf_trig_d;
  logic [BIW-1:0]    fill_idx, flush_idx;
  logic [VPN_W-1:0]  fill_vpn;
  logic [PPN_W-1:0]  fill_ppn;
  logic              pb_flush;
  logic              ev_walk, ev_case2, ev_match, ev_alloc, ev_evict;

  // arbiter: 0 = miss handler, 1 = ITLB prefetch, 2 = DTLB prefetch
  logic [2:0]        arb_req_valid, arb_req_ready, arb_resp_valid;
  logic [VPN_W-1:0]  arb_req_vpn [3];

  logic              i_bank_hit, i_pb_hit, d_bank_hit, d_pb_hit;
  logic              i_pf_fill, d_pf_fill;

  assign pb_flush = ctx_switch || clear_tlb;

  bank_tag_file #(.NBANKS(NBANKS), .TAG_W(TAG_W)) u_tags (
    .clk, .rst_n,
    .cur_onehot, .cur_valid, .cur_idx,
    .match_tag, .match_hit, .match_idx,
    .victim_idx, .victim_was_valid,
    .activate, .act_idx, .act_set_tag, .act_tag,
    .ctx_switch, .clear_tlb
  );

  tlb_side #(
    .NBANKS(NBANKS), .BANK_ENTRIES(BANK_ENTRIES), .PF_ENTRIES(PF_ENTRIES),
    .SP_FWD(SP_FWD), .SP_BWD(SP_BWD), .VA_W(VA_W), .PA_W(PA_W), .OFFSET_W(OFFSET_W),
    .PF_MODE(PF_MODE), .DP_ROWS(DP_ROWS), .DP_SLOTS(DP_SLOTS), .DP_PF_ENTRIES(DP_PF_ENTRIES)
  ) u_itlb (
    .clk, .rst_n,
    .lk_req (i_req), .lk_vaddr (i_vaddr), .lk_hit (i_hit), .lk_paddr (i_paddr),
    .lk_bank_hit (i_bank_hit), .lk_pb_hit (i_pb_hit),
    .cur_onehot,
    .fill_en (fill_i), .fill_idx, .fill_vpn, .fill_ppn,
    .flush_bank, .flush_idx, .pb_flush,
    .pf_trig (pf_trig_i), .pf_trig_vpn (fill_vpn),
    .pf_req_valid (arb_req_valid[1]), .pf_req_ready (arb_req_ready[1]),
    .pf_req_vpn (arb_req_vpn[1]),
    .pf_resp_valid (arb_resp_valid[1]), .pf_resp_ok (mem_resp_ok), .pf_resp_ppn (mem_resp_ppn),
    .pf_fill (i_pf_fill), .pf_busy ()
  );

  tlb_side #(
    .NBANKS(NBANKS), .BANK_ENTRIES(BANK_ENTRIES), .PF_ENTRIES(PF_ENTRIES),
    .SP_FWD(SP_FWD), .SP_BWD(SP_BWD), .VA_W(VA_W), .PA_W(PA_W), .OFFSET_W(OFFSET_W),
    .PF_MODE(PF_MODE), .DP_ROWS(DP_ROWS), .DP_SLOTS(DP_SLOTS), .DP_PF_ENTRIES(DP_PF_ENTRIES)
  ) u_dtlb (
    .clk, .rst_n,
    .lk_req (d_req), .lk_vaddr (d_vaddr), .lk_hit (d_hit), .lk_paddr (d_paddr),
    .lk_bank_hit (d_bank_hit), .lk_pb_hit (d_pb_hit),
    .cur_onehot,
    .fill_en (fill_d), .fill_idx, .fill_vpn, .fill_ppn,
    .flush_bank, .flush_idx, .pb_flush,
    .pf_trig (pf_trig_d), .pf_trig_vpn (fill_vpn),
    .pf_req_valid (arb_req_valid[2]), .pf_req_ready (arb_req_ready[2]),
    .pf_req_vpn (arb_req_vpn[2]),
    .pf_resp_valid (arb_resp_valid[2]), .pf_resp_ok (mem_resp_ok), .pf_resp_ppn (mem_resp_ppn),
    .pf_fill (d_pf_fill), .pf_busy ()
  );

  mmu_ctrl #(
    .NBANKS(NBANKS), .VPN_W(VPN_W), .PPN_W(PPN_W), .TAG_W(TAG_W), .USE_PID(USE_PID)
  ) u_ctrl (
    .clk, .rst_n,
    .i_req, .i_vpn (i_vaddr[VA_W-1:OFFSET_W]), .i_hit,
    .d_req, .d_vpn (d_vaddr[VA_W-1:OFFSET_W]), .d_hit,
    .ctx_switch, .clear_tlb, .pid,
    .cur_valid, .cur_idx, .match_tag, .match_hit, .match_idx,
    .victim_idx, .victim_was_valid,
    .activate, .act_idx, .act_set_tag, .act_tag,
    .walk_req_valid (arb_req_valid[0]), .walk_req_ready (arb_req_ready[0]),
    .walk_req_vpn (arb_req_vpn[0]),
    .walk_resp_valid (arb_resp_valid[0]), .walk_resp_ok (mem_resp_ok),
    .walk_resp_ppn (mem_resp_ppn),
    .fill_i, .fill_d, .fill_idx, .fill_vpn, .fill_ppn,
    .flush_bank, .flush_idx, .pf_trig_i, .pf_trig_d,
    .i_fault, .d_fault,
    .ev_walk, .ev_case2, .ev_match, .ev_alloc, .ev_evict
  );

  walk_arbiter #(.N(3), .VPN_W(VPN_W)) u_arb (
    .clk, .rst_n,
    .req_valid (arb_req_valid), .req_vpn (arb_req_vpn),
    .req_ready (arb_req_ready), .resp_valid (arb_resp_valid),
    .mem_req_valid, .mem_req_ready, .mem_req_vpn, .mem_resp_valid
  );

  always_comb begin
    events             = '0;
    events.i_bank_hit  = i_bank_hit;
    events.i_pb_hit    = i_pb_hit;
    events.d_bank_hit  = d_bank_hit;
    events.d_pb_hit    = d_pb_hit;
    events.demand_walk = ev_walk;
    events.fill_case2  = ev_case2;
    events.fill_match  = ev_match;
    events.fill_alloc  = ev_alloc;
    events.evict_valid = ev_evict;
    events.fault       = i_fault || d_fault;
    events.pf_issue    = (arb_req_ready[1] || arb_req_ready[2]);
    events.pf_fill     = i_pf_fill || d_pf_fill;
  end

endmodule
