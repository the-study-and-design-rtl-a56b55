// dp_prefetch_logic: distance prefetching (DP) into the prefetch buffer, the
// alternative to sequential prefetching (selected in tlb_side with
// PF_MODE = PF_DP; sequential prefetching is the default).
//
// The logic learns which page distance tends to follow which. On every
// trigger (a miss in the current bank) at VPN v it forms the distance
// d = v - p to the previous trigger's VPN p. The distance-table row of the
// previous distance is then updated with d: a row holds a tag and up to
// SLOTS predicted distances in most-recent-first order; a row whose tag
// differs is taken over. At the same time the row of d (as it stood before
// this update) is read, and each predicted distance s gives a prefetch
// candidate v + s. Candidates are requested one at a time on the same
// valid/ready port as the sequential prefetcher and present pages are
// written to the prefetch buffer. A new trigger replaces the pending
// candidates; a response in flight is kept. pf_abort (context switch or
// clear-TLB) drops the pending candidates and the response in flight and
// clears the table and the history, so learning starts again for the next
// task.
//
// The table is ROWS rows, indexed by the low bits of the distance, the
// remaining distance bits forming the tag. 64 rows and 2 slots per row,
// with a 16-entry prefetch buffer, follow the published configuration; the
// indexing, tag, slot order, update rule and clearing on abort are this
// design's choices.
module dp_prefetch_logic #(
  parameter int unsigned VPN_W = tlb_pkg::VPN_W,
  parameter int unsigned PPN_W = tlb_pkg::PPN_W,
  parameter int unsigned ROWS  = tlb_pkg::DP_ROWS,
  parameter int unsigned SLOTS = tlb_pkg::DP_SLOTS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             trig,
  input  logic [VPN_W-1:0] trig_vpn,
  input  logic             pf_abort,
  output logic             req_valid,
  input  logic             req_ready,
  output logic [VPN_W-1:0] req_vpn,
  input  logic             resp_valid,
  input  logic             resp_ok,
  input  logic [PPN_W-1:0] resp_ppn,
  output logic             pb_wr_en,
  output logic [VPN_W-1:0] pb_wr_vpn,
  output logic [PPN_W-1:0] pb_wr_ppn,
  output logic             busy
);
  localparam int unsigned DW = VPN_W + 1;                 // signed distance
  localparam int unsigned RW = $clog2(ROWS);
  localparam int unsigned TW = DW - RW;
  localparam int unsigned SW = (SLOTS > 1) ? $clog2(SLOTS) : 1;
  typedef logic signed [DW-1:0] dist_t;
  typedef logic [RW-1:0]        row_t;
  typedef logic [TW-1:0]        tag_t;

  // distance table
  logic [ROWS-1:0]  row_valid_q;
  tag_t             row_tag_q  [ROWS];
  dist_t            slot_q     [ROWS][SLOTS];
  logic [SLOTS-1:0] slot_valid_q [ROWS];

  // history
  logic             have_prev_q, have_dist_q;
  logic [VPN_W-1:0] prev_vpn_q;
  dist_t            prev_dist_q;

  // pending candidates
  logic [SLOTS-1:0] cand_valid_q;
  logic [VPN_W-1:0] cand_q [SLOTS];
  logic             waiting_q, discard_q;
  logic [VPN_W-1:0] issued_q;

  // distance of this trigger and its table row (read before the update)
  dist_t d;
  row_t  d_row, p_row;
  tag_t  d_tag, p_tag;
  logic  d_row_hit;
  assign d      = dist_t'({1'b0, trig_vpn}) - dist_t'({1'b0, prev_vpn_q});
  assign d_row  = d[RW-1:0];
  assign d_tag  = d[DW-1:RW];
  assign p_row  = prev_dist_q[RW-1:0];
  assign p_tag  = prev_dist_q[DW-1:RW];
  assign d_row_hit = have_prev_q && row_valid_q[d_row] && row_tag_q[d_row] == d_tag;

  // new candidates: v + s for every valid slot of row d, inside the VPN range
  logic [SLOTS-1:0] new_valid;
  logic [VPN_W-1:0] new_cand [SLOTS];
  always_comb begin
    for (int unsigned s = 0; s < SLOTS; s++) begin
      logic signed [DW:0] sum;
      sum = (DW+1)'(signed'({1'b0, trig_vpn})) + (DW+1)'(slot_q[d_row][s]);
      new_cand[s]  = sum[VPN_W-1:0];
      new_valid[s] = d_row_hit && slot_valid_q[d_row][s] && slot_q[d_row][s] != '0
                     && sum >= 0 && sum < (DW+1)'(2 ** VPN_W);
    end
  end

  // first pending candidate
  logic             any_cand;
  logic [SW-1:0]    first;
  always_comb begin
    any_cand = 1'b0;
    first    = 0;
    for (int s = SLOTS - 1; s >= 0; s--) begin
      if (cand_valid_q[s]) begin
        any_cand = 1'b1;
        first    = SW'(s);
      end
    end
  end

  assign req_valid = any_cand && !waiting_q;
  assign req_vpn   = cand_q[first];
  assign busy      = any_cand || waiting_q;
  assign pb_wr_en  = resp_valid && waiting_q && resp_ok && !discard_q && !pf_abort;
  assign pb_wr_vpn = issued_q;
  assign pb_wr_ppn = resp_ppn;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_valid_q  <= '0;
      have_prev_q  <= 1'b0;
      have_dist_q  <= 1'b0;
      prev_vpn_q   <= '0;
      prev_dist_q  <= '0;
      cand_valid_q <= '0;
      waiting_q    <= 1'b0;
      discard_q    <= 1'b0;
      issued_q     <= '0;
      for (int unsigned r = 0; r < ROWS; r++) begin
        row_tag_q[r]    <= '0;
        slot_valid_q[r] <= '0;
        for (int unsigned s = 0; s < SLOTS; s++) slot_q[r][s] <= '0;
      end
      for (int unsigned s = 0; s < SLOTS; s++) cand_q[s] <= '0;
    end else begin
      if (waiting_q && resp_valid) begin
        waiting_q <= 1'b0;
        discard_q <= 1'b0;
      end
      if (req_valid && req_ready) begin
        waiting_q           <= 1'b1;
        issued_q            <= cand_q[first];
        cand_valid_q[first] <= 1'b0;
      end
      if (pf_abort) begin
        row_valid_q  <= '0;
        have_prev_q  <= 1'b0;
        have_dist_q  <= 1'b0;
        cand_valid_q <= '0;
        if ((waiting_q && !resp_valid) || (req_valid && req_ready)) discard_q <= 1'b1;
      end else if (trig) begin
        // learn: the previous distance was followed by d
        if (have_dist_q) begin
          if (!row_valid_q[p_row] || row_tag_q[p_row] != p_tag) begin
            row_valid_q[p_row]     <= 1'b1;
            row_tag_q[p_row]       <= p_tag;
            slot_valid_q[p_row]    <= '0;
            slot_valid_q[p_row][0] <= 1'b1;
            slot_q[p_row][0]       <= d;
          end else begin
            // move d to the front, shifting the more recent slots down
            slot_q[p_row][0]       <= d;
            slot_valid_q[p_row][0] <= 1'b1;
            for (int unsigned s = 1; s < SLOTS; s++) begin
              logic keep_below;
              // slot s takes slot s-1 unless d sat at or above s-1
              keep_below = 1'b0;
              for (int unsigned k = 0; k < s; k++)
                if (slot_valid_q[p_row][k] && slot_q[p_row][k] == d) keep_below = 1'b1;
              if (!keep_below) begin
                slot_q[p_row][s]       <= slot_q[p_row][s-1];
                slot_valid_q[p_row][s] <= slot_valid_q[p_row][s-1];
              end
            end
          end
        end
        if (have_prev_q) begin
          prev_dist_q <= d;
          have_dist_q <= 1'b1;
        end
        prev_vpn_q   <= trig_vpn;
        have_prev_q  <= 1'b1;
        cand_valid_q <= new_valid;
        for (int unsigned s = 0; s < SLOTS; s++) cand_q[s] <= new_cand[s];
      end
    end
  end

endmodule
