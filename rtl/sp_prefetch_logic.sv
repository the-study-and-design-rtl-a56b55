// sp_prefetch_logic: sequential prefetching (SP) into the prefetch buffer.
//
// A trigger with VPN v (a miss in the current bank, whether it then hit the
// prefetch buffer or needed a page-table walk) starts a run of FWD+BWD
// page-table requests for the neighbouring pages, in the order
// v+1, v+2, ..., v+FWD, v-1, v-2, ..., v-BWD. Candidates that fall outside
// the VPN range are skipped. Each request goes out on a valid/ready port;
// one is outstanding at a time. When its response returns with ok set, the
// translation is written to the prefetch buffer (pb_wr_*) in that cycle.
//
// A new trigger restarts the run from its own VPN; a response still in
// flight is kept, as it belongs to the same task. `pf_abort` (context switch or
// clear-TLB) ends the run and discards the response of a request in flight.
// Timing: the first request is raised the cycle after the trigger; with a
// memory that accepts at once and answers L cycles later, a full run of 17
// candidates takes 17*(L+1) cycles.
//
// The distances (+9 and -8, 17 entries) and the trigger condition follow
// the published design; the candidate order, restart behaviour and
// handshake are this design's choices.
module sp_prefetch_logic #(
  parameter int unsigned VPN_W = tlb_pkg::VPN_W,
  parameter int unsigned PPN_W = tlb_pkg::PPN_W,
  parameter int unsigned FWD   = tlb_pkg::SP_FWD,
  parameter int unsigned BWD   = tlb_pkg::SP_BWD
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             trig,
  input  logic [VPN_W-1:0] trig_vpn,
  input  logic             pf_abort,
  // page-table request port
  output logic             req_valid,
  input  logic             req_ready,
  output logic [VPN_W-1:0] req_vpn,
  input  logic             resp_valid,
  input  logic             resp_ok,
  input  logic [PPN_W-1:0] resp_ppn,
  // prefetch-buffer write
  output logic             pb_wr_en,
  output logic [VPN_W-1:0] pb_wr_vpn,
  output logic [PPN_W-1:0] pb_wr_ppn,
  output logic             busy
);
  localparam int unsigned N  = FWD + BWD;
  localparam int unsigned SW = $clog2(N + 1);
  typedef logic [SW-1:0] step_t;

  logic             active_q, waiting_q, discard_q;
  logic [VPN_W-1:0] base_q, issued_q;
  step_t            step_q;

  // Candidate for the current step, computed one bit wider to see overflow.
  logic [VPN_W:0] cand;
  logic           cand_ok;
  always_comb begin
    if (step_q < step_t'(FWD)) begin
      cand    = {1'b0, base_q} + (VPN_W+1)'(step_q) + 1'b1;
      cand_ok = !cand[VPN_W];
    end else begin
      cand    = {1'b0, base_q} - (VPN_W+1)'(step_q - step_t'(FWD)) - 1'b1;
      cand_ok = !cand[VPN_W];
    end
  end

  assign req_valid = active_q && !waiting_q && cand_ok;
  assign req_vpn   = cand[VPN_W-1:0];
  assign busy      = active_q || waiting_q;

  assign pb_wr_en  = resp_valid && waiting_q && resp_ok && !discard_q && !pf_abort;
  assign pb_wr_vpn = issued_q;
  assign pb_wr_ppn = resp_ppn;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q  <= 1'b0;
      waiting_q <= 1'b0;
      discard_q <= 1'b0;
      base_q    <= '0;
      issued_q  <= '0;
      step_q    <= '0;
    end else begin
      // response of the outstanding request
      if (waiting_q && resp_valid) begin
        waiting_q <= 1'b0;
        discard_q <= 1'b0;
      end
      // issue or skip the current candidate
      if (active_q && !waiting_q) begin
        if (!cand_ok || req_ready) begin
          if (cand_ok) begin
            waiting_q <= 1'b1;
            issued_q  <= cand[VPN_W-1:0];
          end
          step_q <= step_q + 1'b1;
          if (step_q == step_t'(N - 1)) active_q <= 1'b0;
        end
      end
      if (pf_abort) begin
        active_q <= 1'b0;
        step_q   <= '0;
        // a request in flight (or accepted this cycle) will be dropped
        if ((waiting_q && !resp_valid) || req_valid && req_ready) discard_q <= 1'b1;
      end else if (trig) begin
        active_q <= 1'b1;
        base_q   <= trig_vpn;
        step_q   <= '0;
      end
    end
  end

  a_no_req_while_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    waiting_q |-> !req_valid);

endmodule
