// mmu_ctrl: miss handler shared by the ITLB and DTLB sides.
//
// In MC_IDLE it watches both sides; a real lookup that hits neither the
// current bank nor the prefetch buffer is a miss (ITLB first when both
// miss). The VPN is latched and a page-table request is raised (MC_REQ)
// and, once accepted, its response awaited (MC_WAIT). With the PPN in hand,
// MC_FILL chooses the bank that receives the translation:
//   * a bank is current  -> that bank (the plain miss case; no tag change);
//   * no bank is current and a valid bank's task tag equals the task tag
//     -> that bank is made current again (the task's earlier translations
//     are reused);
//   * no match -> the victim bank (first invalid, else LRU) is flushed on
//     both sides, made current and given the task tag.
// The task tag is the walked PPN (the PPN of the access that found no
// current bank), or the `pid` input when USE_PID is set. The translation is
// written into the chosen bank of the missing side and that side's
// prefetch logic is started from the VPN; the handler returns to MC_IDLE
// and the stalled lookup hits in the next cycle.
// A context switch or clear-TLB arriving while a miss is being handled
// drops that miss (the walked translation belongs to the old state); the
// requester then misses again and is handled afresh. A response with ok
// low (page not present) drops the miss and pulses fault for the side.
// Latency of a demand miss, with a memory that accepts at once and answers
// L cycles after acceptance: the lookup hits L+3 cycles after it first
// missed.
//
// The three fill cases, the flush of both sides' banks on allocation, the
// LRU update and the task-tag choice (PPN by default, PID where available)
// follow the published design. The handshake, the fault pulse, the
// dropping of a miss overlapped by a context switch and using the data
// access's PPN as task tag when a DTLB miss finds no current bank are this
// design's choices.
module mmu_ctrl #(
  parameter int unsigned NBANKS  = tlb_pkg::NBANKS,
  parameter int unsigned VPN_W   = tlb_pkg::VPN_W,
  parameter int unsigned PPN_W   = tlb_pkg::PPN_W,
  parameter int unsigned TAG_W   = tlb_pkg::PPN_W,
  parameter bit          USE_PID = 1'b0,
  localparam int unsigned BIW    = $clog2(NBANKS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup status of the two sides
  input  logic             i_req,
  input  logic [VPN_W-1:0] i_vpn,
  input  logic             i_hit,
  input  logic             d_req,
  input  logic [VPN_W-1:0] d_vpn,
  input  logic             d_hit,
  // operating-system signals
  input  logic             ctx_switch,
  input  logic             clear_tlb,
  input  logic [TAG_W-1:0] pid,
  // bank-tag file
  input  logic             cur_valid,
  input  logic [BIW-1:0]   cur_idx,
  output logic [TAG_W-1:0] match_tag,
  input  logic             match_hit,
  input  logic [BIW-1:0]   match_idx,
  input  logic [BIW-1:0]   victim_idx,
  input  logic             victim_was_valid,
  output logic             activate,
  output logic [BIW-1:0]   act_idx,
  output logic             act_set_tag,
  output logic [TAG_W-1:0] act_tag,
  // page-table request port
  output logic             walk_req_valid,
  input  logic             walk_req_ready,
  output logic [VPN_W-1:0] walk_req_vpn,
  input  logic             walk_resp_valid,
  input  logic             walk_resp_ok,
  input  logic [PPN_W-1:0] walk_resp_ppn,
  // to the sides
  output logic             fill_i,
  output logic             fill_d,
  output logic [BIW-1:0]   fill_idx,
  output logic [VPN_W-1:0] fill_vpn,
  output logic [PPN_W-1:0] fill_ppn,
  output logic             flush_bank,
  output logic [BIW-1:0]   flush_idx,
  output logic             pf_trig_i,
  output logic             pf_trig_d,
  output logic             i_fault,
  output logic             d_fault,
  // event pulses
  output logic             ev_walk,
  output logic             ev_case2,
  output logic             ev_match,
  output logic             ev_alloc,
  output logic             ev_evict
);
  import tlb_pkg::*;

  mc_state_e        state_q;
  logic             side_d_q;   // 0: ITLB miss, 1: DTLB miss
  logic             stale_q;
  logic [VPN_W-1:0] vpn_q;
  logic [PPN_W-1:0] ppn_q;
  logic             os_evt;

  assign os_evt = ctx_switch || clear_tlb;

  // Task tag offered to the bank-tag file for matching.
  always_comb begin
    if (USE_PID) match_tag = pid;
    else         match_tag = TAG_W'(ppn_q);
  end

  assign walk_req_valid = (state_q == MC_REQ);
  assign walk_req_vpn   = vpn_q;
  assign fill_vpn       = vpn_q;
  assign fill_ppn       = ppn_q;
  assign act_tag        = match_tag;

  logic do_fill;
  assign do_fill = (state_q == MC_FILL) && !os_evt;

  always_comb begin
    activate    = 1'b0;
    act_idx     = victim_idx;
    act_set_tag = 1'b0;
    flush_bank  = 1'b0;
    flush_idx   = victim_idx;
    fill_idx    = victim_idx;
    ev_case2    = 1'b0;
    ev_match    = 1'b0;
    ev_alloc    = 1'b0;
    ev_evict    = 1'b0;
    if (do_fill) begin
      if (cur_valid) begin
        fill_idx = cur_idx;
        ev_case2 = 1'b1;
      end else if (match_hit) begin
        activate = 1'b1;
        act_idx  = match_idx;
        fill_idx = match_idx;
        ev_match = 1'b1;
      end else begin
        activate    = 1'b1;
        act_set_tag = 1'b1;
        flush_bank  = 1'b1;
        ev_alloc    = 1'b1;
        ev_evict    = victim_was_valid;
      end
    end
  end

  assign fill_i    = do_fill && !side_d_q;
  assign fill_d    = do_fill &&  side_d_q;
  assign pf_trig_i = fill_i;
  assign pf_trig_d = fill_d;
  assign ev_walk   = walk_req_valid && walk_req_ready;

  logic resp_fault;
  assign resp_fault = (state_q == MC_WAIT) && walk_resp_valid && !walk_resp_ok
                      && !stale_q && !os_evt;
  assign i_fault = resp_fault && !side_d_q;
  assign d_fault = resp_fault &&  side_d_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= MC_IDLE;
      side_d_q <= 1'b0;
      stale_q  <= 1'b0;
      vpn_q    <= '0;
      ppn_q    <= '0;
    end else begin
      unique case (state_q)
        MC_IDLE: begin
          stale_q <= 1'b0;
          if (!os_evt) begin
            if (i_req && !i_hit) begin
              side_d_q <= 1'b0;
              vpn_q    <= i_vpn;
              state_q  <= MC_REQ;
            end else if (d_req && !d_hit) begin
              side_d_q <= 1'b1;
              vpn_q    <= d_vpn;
              state_q  <= MC_REQ;
            end
          end
        end
        MC_REQ: begin
          if (os_evt) stale_q <= 1'b1;
          if (walk_req_ready) state_q <= MC_WAIT;
        end
        MC_WAIT: begin
          if (os_evt) stale_q <= 1'b1;
          if (walk_resp_valid) begin
            ppn_q <= walk_resp_ppn;
            if (walk_resp_ok && !stale_q && !os_evt) state_q <= MC_FILL;
            else                                      state_q <= MC_IDLE;
          end
        end
        MC_FILL: state_q <= MC_IDLE;
        default: state_q <= MC_IDLE;
      endcase
    end
  end

endmodule
