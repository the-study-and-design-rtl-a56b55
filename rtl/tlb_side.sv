// tlb_side: one translation side (the ITLB or the DTLB) of the banked TLB.
//
// The VPN of the lookup goes to all NBANKS tlb_bank instances and to the
// prefetch buffer in parallel. translation_select keeps only the hit of the
// current bank (current bit AND hit), or else the prefetch buffer's hit, and
// forms the physical address; lk_hit/lk_paddr answer in the same cycle.
//
// When a real lookup (lk_req) misses the current bank but hits the prefetch
// buffer, the translation is copied into the current bank at the clock edge
// and the prefetch logic is restarted from that VPN. A miss in both goes to
// the shared miss handler, which writes the walked translation through the
// fill port (bank fill_idx) and restarts the prefetch logic through
// pf_trig. The fill port has priority over the prefetch-buffer copy, and a
// handler trigger over the copy's trigger. flush_bank invalidates every
// entry of bank flush_idx (used when a bank is taken for a new task);
// pb_flush empties the prefetch buffer and aborts the prefetch run.
//
// The prefetch logic is sequential prefetching (PF_MODE = PF_SP, default,
// prefetch buffer of PF_ENTRIES) or distance prefetching (PF_DP, prefetch
// buffer of DP_PF_ENTRIES).
//
// Structure (banks, multiplexer, prefetch buffer, prefetch logic) and the
// prefetch-buffer-hit behaviour follow the published design; the port
// timing and priorities are this design's choices.
module tlb_side #(
  parameter int unsigned NBANKS       = tlb_pkg::NBANKS,
  parameter int unsigned BANK_ENTRIES = tlb_pkg::BANK_ENTRIES,
  parameter int unsigned PF_ENTRIES   = tlb_pkg::PF_ENTRIES,
  parameter int unsigned SP_FWD       = tlb_pkg::SP_FWD,
  parameter int unsigned SP_BWD       = tlb_pkg::SP_BWD,
  parameter int unsigned VA_W         = tlb_pkg::VA_W,
  parameter int unsigned PA_W         = tlb_pkg::PA_W,
  parameter int unsigned OFFSET_W     = tlb_pkg::PAGE_OFFSET_W,
  parameter tlb_pkg::pf_mode_e PF_MODE = tlb_pkg::PF_SP,
  parameter int unsigned DP_ROWS      = tlb_pkg::DP_ROWS,
  parameter int unsigned DP_SLOTS     = tlb_pkg::DP_SLOTS,
  parameter int unsigned DP_PF_ENTRIES = tlb_pkg::DP_PF_ENTRIES,
  localparam int unsigned PB_ENTRIES  = (PF_MODE == tlb_pkg::PF_DP) ? DP_PF_ENTRIES : PF_ENTRIES,
  localparam int unsigned VPN_W       = VA_W - OFFSET_W,
  localparam int unsigned PPN_W       = PA_W - OFFSET_W,
  localparam int unsigned BIW         = $clog2(NBANKS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup from the pipeline
  input  logic             lk_req,
  input  logic [VA_W-1:0]  lk_vaddr,
  output logic             lk_hit,
  output logic [PA_W-1:0]  lk_paddr,
  output logic             lk_bank_hit,
  output logic             lk_pb_hit,
  // current bank, from the bank-tag file
  input  logic [NBANKS-1:0] cur_onehot,
  // fill from the miss handler
  input  logic             fill_en,
  input  logic [BIW-1:0]   fill_idx,
  input  logic [VPN_W-1:0] fill_vpn,
  input  logic [PPN_W-1:0] fill_ppn,
  input  logic             flush_bank,
  input  logic [BIW-1:0]   flush_idx,
  input  logic             pb_flush,
  input  logic             pf_trig,
  input  logic [VPN_W-1:0] pf_trig_vpn,
  // prefetch page-table request port
  output logic             pf_req_valid,
  input  logic             pf_req_ready,
  output logic [VPN_W-1:0] pf_req_vpn,
  input  logic             pf_resp_valid,
  input  logic             pf_resp_ok,
  input  logic [PPN_W-1:0] pf_resp_ppn,
  output logic             pf_fill,
  output logic             pf_busy
);
  logic [VPN_W-1:0]  vpn;
  logic [OFFSET_W-1:0] offset;
  assign vpn    = lk_vaddr[VA_W-1:OFFSET_W];
  assign offset = lk_vaddr[OFFSET_W-1:0];

  logic [NBANKS-1:0] bank_hit, bank_wr, bank_flush;
  logic [PPN_W-1:0]  bank_ppn [NBANKS];
  logic              pb_hit, pb_sel, cur_bank_hit, sel_hit;
  logic [PPN_W-1:0]  pb_ppn;
  logic              pb_copy;          // prefetch-buffer hit copied into current bank
  logic [VPN_W-1:0]  wr_vpn;
  logic [PPN_W-1:0]  wr_ppn;
  logic              pb_wr_en;
  logic [VPN_W-1:0]  pb_wr_vpn;
  logic [PPN_W-1:0]  pb_wr_ppn;
  logic              trig;
  logic [VPN_W-1:0]  trig_vpn;

  assign pb_copy = lk_req && pb_sel;
  assign wr_vpn  = fill_en ? fill_vpn : vpn;
  assign wr_ppn  = fill_en ? fill_ppn : pb_ppn;

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    assign bank_wr[b]    = fill_en ? (fill_idx == BIW'(b)) : (pb_copy && cur_onehot[b]);
    assign bank_flush[b] = flush_bank && (flush_idx == BIW'(b));
    tlb_bank #(
      .ENTRIES(BANK_ENTRIES), .VPN_W(VPN_W), .PPN_W(PPN_W)
    ) u_bank (
      .clk, .rst_n,
      .lk_vpn (vpn),
      .lk_hit (bank_hit[b]),
      .lk_ppn (bank_ppn[b]),
      .touch  (lk_req && cur_onehot[b]),
      .wr_en  (bank_wr[b]),
      .wr_vpn (wr_vpn),
      .wr_ppn (wr_ppn),
      .flush  (bank_flush[b])
    );
  end

  prefetch_buffer #(
    .ENTRIES(PB_ENTRIES), .VPN_W(VPN_W), .PPN_W(PPN_W)
  ) u_pb (
    .clk, .rst_n,
    .lk_vpn (vpn),
    .lk_hit (pb_hit),
    .lk_ppn (pb_ppn),
    .wr_en  (pb_wr_en),
    .wr_vpn (pb_wr_vpn),
    .wr_ppn (pb_wr_ppn),
    .flush  (pb_flush)
  );

  translation_select #(
    .NBANKS(NBANKS), .PPN_W(PPN_W), .OFFSET_W(OFFSET_W)
  ) u_sel (
    .bank_hit     (bank_hit),
    .bank_cur     (cur_onehot),
    .bank_ppn     (bank_ppn),
    .pb_hit       (pb_hit),
    .pb_ppn       (pb_ppn),
    .offset       (offset),
    .bank_sel     (),
    .cur_bank_hit (cur_bank_hit),
    .pb_sel       (pb_sel),
    .hit          (sel_hit),
    .ppn          (),
    .paddr        (lk_paddr)
  );

  assign lk_hit      = lk_req && sel_hit;
  assign lk_bank_hit = lk_req && cur_bank_hit;
  assign lk_pb_hit   = lk_req && pb_sel;

  assign trig     = pf_trig || pb_copy;
  assign trig_vpn = pf_trig ? pf_trig_vpn : vpn;

  if (PF_MODE == tlb_pkg::PF_DP) begin : g_dp
    dp_prefetch_logic #(
      .VPN_W(VPN_W), .PPN_W(PPN_W), .ROWS(DP_ROWS), .SLOTS(DP_SLOTS)
    ) u_pf (
      .clk, .rst_n,
      .trig       (trig),
      .trig_vpn   (trig_vpn),
      .pf_abort   (pb_flush),
      .req_valid  (pf_req_valid),
      .req_ready  (pf_req_ready),
      .req_vpn    (pf_req_vpn),
      .resp_valid (pf_resp_valid),
      .resp_ok    (pf_resp_ok),
      .resp_ppn   (pf_resp_ppn),
      .pb_wr_en   (pb_wr_en),
      .pb_wr_vpn  (pb_wr_vpn),
      .pb_wr_ppn  (pb_wr_ppn),
      .busy       (pf_busy)
    );
  end else begin : g_sp
    sp_prefetch_logic #(
      .VPN_W(VPN_W), .PPN_W(PPN_W), .FWD(SP_FWD), .BWD(SP_BWD)
    ) u_pf (
      .clk, .rst_n,
      .trig       (trig),
      .trig_vpn   (trig_vpn),
      .pf_abort   (pb_flush),
      .req_valid  (pf_req_valid),
      .req_ready  (pf_req_ready),
      .req_vpn    (pf_req_vpn),
      .resp_valid (pf_resp_valid),
      .resp_ok    (pf_resp_ok),
      .resp_ppn   (pf_resp_ppn),
      .pb_wr_en   (pb_wr_en),
      .pb_wr_vpn  (pb_wr_vpn),
      .pb_wr_ppn  (pb_wr_ppn),
      .busy       (pf_busy)
    );
  end

  assign pf_fill = pb_wr_en && !pb_flush;

endmodule
