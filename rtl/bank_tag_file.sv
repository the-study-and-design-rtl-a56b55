// bank_tag_file: the bank-tag registers ("group tags") of the banked TLB,
// one per bank, shared by the ITLB and DTLB.
//
// Each register holds a task tag naming the task whose translations the
// bank stores, a current bit (the bank of the running task), a valid bit
// and LRU bits used to pick a victim bank. At most one current bit is set.
//
//  * cur_onehot / cur_valid / cur_idx: the current bank, combinational.
//  * match_tag -> match_hit / match_idx: a valid bank whose task tag equals
//    match_tag (combinational).
//  * victim_idx: lowest-numbered invalid bank, else the least recently
//    activated bank (combinational).
//  * activate: at the clock edge bank act_idx becomes the only current bank,
//    is marked valid, takes act_tag as its task tag when act_set_tag is set,
//    and becomes the most recently used bank.
//  * ctx_switch: clears every current bit.
//  * clear_tlb: clears every valid bit and every current bit.
//  ctx_switch and clear_tlb win over an activate in the same cycle.
//
// The register contents, the victim rule (invalid first, else LRU) and the
// reactions to a context switch and to the clear-TLB signal follow the
// published design. That clear-TLB also drops the current bit, the age
// encoding of the LRU bits and that a re-activated bank also becomes most
// recent are this design's reading.
module bank_tag_file #(
  parameter int unsigned NBANKS = tlb_pkg::NBANKS,
  parameter int unsigned TAG_W  = tlb_pkg::PPN_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  output logic [NBANKS-1:0]         cur_onehot,
  output logic                      cur_valid,
  output logic [$clog2(NBANKS)-1:0] cur_idx,
  input  logic [TAG_W-1:0]          match_tag,
  output logic                      match_hit,
  output logic [$clog2(NBANKS)-1:0] match_idx,
  output logic [$clog2(NBANKS)-1:0] victim_idx,
  output logic                      victim_was_valid,
  input  logic                      activate,
  input  logic [$clog2(NBANKS)-1:0] act_idx,
  input  logic                      act_set_tag,
  input  logic [TAG_W-1:0]          act_tag,
  input  logic                      ctx_switch,
  input  logic                      clear_tlb
);
  localparam int unsigned IW = $clog2(NBANKS);
  typedef logic [IW-1:0] idx_t;

  logic [TAG_W-1:0]  tag_q [NBANKS];
  logic [NBANKS-1:0] cur_q, valid_q;
  idx_t              age_q [NBANKS];

  assign cur_onehot = cur_q;
  assign cur_valid  = |cur_q;

  always_comb begin
    logic found_inv;
    idx_t inv_idx, lru_idx;
    cur_idx   = '0;
    match_hit = 1'b0;
    match_idx = '0;
    found_inv = 1'b0;
    inv_idx   = '0;
    lru_idx   = '0;
    for (int unsigned b = 0; b < NBANKS; b++) begin
      if (cur_q[b]) cur_idx = idx_t'(b);
      if (!match_hit && valid_q[b] && tag_q[b] == match_tag) begin
        match_hit = 1'b1;
        match_idx = idx_t'(b);
      end
      if (!found_inv && !valid_q[b]) begin
        found_inv = 1'b1;
        inv_idx   = idx_t'(b);
      end
      if (age_q[b] == idx_t'(NBANKS - 1)) lru_idx = idx_t'(b);
    end
    victim_idx       = found_inv ? inv_idx : lru_idx;
    victim_was_valid = !found_inv;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q   <= '0;
      valid_q <= '0;
      for (int unsigned b = 0; b < NBANKS; b++) begin
        tag_q[b] <= '0;
        age_q[b] <= idx_t'(b);
      end
    end else if (clear_tlb) begin
      cur_q   <= '0;
      valid_q <= '0;
    end else if (ctx_switch) begin
      cur_q <= '0;
    end else if (activate) begin
      cur_q            <= '0;
      cur_q[act_idx]   <= 1'b1;
      valid_q[act_idx] <= 1'b1;
      if (act_set_tag) tag_q[act_idx] <= act_tag;
      for (int unsigned b = 0; b < NBANKS; b++) begin
        if (idx_t'(b) == act_idx) age_q[b] <= '0;
        else if (age_q[b] < age_q[act_idx]) age_q[b] <= age_q[b] + 1'b1;
      end
    end
  end

  // At most one bank is current.
  a_one_current: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(cur_q));

endmodule
