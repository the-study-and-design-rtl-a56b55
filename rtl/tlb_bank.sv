// tlb_bank: one bank of the banked TLB, a fully associative (CAM) store of
// ENTRIES virtual-to-physical page translations with true-LRU replacement.
//
// Lookup is combinational: every valid entry compares its VPN with lk_vpn
// and the matching entry's PPN appears on lk_ppn with lk_hit in the same
// cycle. Recency is kept as an age per entry (0 = most recent, ENTRIES-1 =
// least recent; the ages are always a permutation of 0..ENTRIES-1). A write
// goes to the entry already holding wr_vpn if there is one, else to the
// lowest-numbered invalid entry, else to the entry of age ENTRIES-1; the
// written entry becomes most recent. A lookup hit with `touch` set (the bank
// is the current one and the request is real) also makes the hit entry most
// recent; a write in the same cycle takes precedence for the LRU update.
// `flush` invalidates every entry at the clock edge; a write in the same
// cycle still lands, so "flush then insert" is one cycle.
//
// The bank size (32), full associativity and LRU replacement follow the
// published design; the age encoding of LRU, the write-over-touch priority
// and the duplicate check on writes are this design's own choices.
module tlb_bank #(
  parameter int unsigned ENTRIES = tlb_pkg::BANK_ENTRIES,
  parameter int unsigned VPN_W   = tlb_pkg::VPN_W,
  parameter int unsigned PPN_W   = tlb_pkg::PPN_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup
  input  logic [VPN_W-1:0] lk_vpn,
  output logic             lk_hit,
  output logic [PPN_W-1:0] lk_ppn,
  input  logic             touch,
  // insert
  input  logic             wr_en,
  input  logic [VPN_W-1:0] wr_vpn,
  input  logic [PPN_W-1:0] wr_ppn,
  // invalidate all entries
  input  logic             flush
);
  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  typedef logic [IW-1:0] idx_t;

  logic [ENTRIES-1:0] valid_q;
  logic [VPN_W-1:0]   vpn_q [ENTRIES];
  logic [PPN_W-1:0]   ppn_q [ENTRIES];
  idx_t               age_q [ENTRIES];

  idx_t hit_idx, wr_idx, touch_idx;
  logic do_touch;

  // Lookup match (at most one entry matches, writes are deduplicated).
  always_comb begin
    lk_hit  = 1'b0;
    hit_idx = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (!lk_hit && valid_q[i] && vpn_q[i] == lk_vpn) begin
        lk_hit  = 1'b1;
        hit_idx = idx_t'(i);
      end
    end
    lk_ppn = ppn_q[hit_idx];
  end

  // Write target: same VPN, else first invalid, else least recently used.
  always_comb begin
    logic found_dup, found_inv;
    idx_t dup_idx, inv_idx, lru_idx;
    found_dup = 1'b0;
    found_inv = 1'b0;
    dup_idx   = '0;
    inv_idx   = '0;
    lru_idx   = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (!found_dup && valid_q[i] && vpn_q[i] == wr_vpn) begin
        found_dup = 1'b1;
        dup_idx   = idx_t'(i);
      end
      if (!found_inv && !valid_q[i]) begin
        found_inv = 1'b1;
        inv_idx   = idx_t'(i);
      end
      if (age_q[i] == idx_t'(ENTRIES - 1)) lru_idx = idx_t'(i);
    end
    wr_idx = found_dup ? dup_idx : (found_inv ? inv_idx : lru_idx);
  end

  assign do_touch  = wr_en || (touch && lk_hit);
  assign touch_idx = wr_en ? wr_idx : hit_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int unsigned i = 0; i < ENTRIES; i++) begin
        vpn_q[i] <= '0;
        ppn_q[i] <= '0;
        age_q[i] <= idx_t'(i);
      end
    end else begin
      if (flush) valid_q <= '0;
      if (wr_en) begin
        valid_q[wr_idx] <= 1'b1;
        vpn_q[wr_idx]   <= wr_vpn;
        ppn_q[wr_idx]   <= wr_ppn;
      end
      if (do_touch) begin
        for (int unsigned i = 0; i < ENTRIES; i++) begin
          if (idx_t'(i) == touch_idx) age_q[i] <= '0;
          else if (age_q[i] < age_q[touch_idx]) age_q[i] <= age_q[i] + 1'b1;
        end
      end
    end
  end

endmodule
