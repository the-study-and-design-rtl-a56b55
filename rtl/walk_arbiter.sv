// walk_arbiter: shares the single page-table request port ("request to the
// memory system") among N requesters with fixed priority, index 0 highest.
//
// Only one request is outstanding. While idle, the highest-priority raised
// req_valid is forwarded to the memory port; the handshake completes for
// that requester when mem_req_ready is high, and the arbiter then waits for
// mem_resp_valid, which it routes to that requester only (resp_valid[g]).
// The ok flag and the PPN are broadcast. A new request can be accepted in
// the cycle after the response.
//
// The document names the memory request and the PTE it returns; the
// arbitration, priority order (demand miss before prefetch) and handshake
// are this design's choices.
module walk_arbiter #(
  parameter int unsigned N     = 3,
  parameter int unsigned VPN_W = tlb_pkg::VPN_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     req_valid,
  input  logic [VPN_W-1:0] req_vpn [N],
  output logic [N-1:0]     req_ready,
  output logic [N-1:0]     resp_valid,
  output logic             mem_req_valid,
  input  logic             mem_req_ready,
  output logic [VPN_W-1:0] mem_req_vpn,
  input  logic             mem_resp_valid
);
  localparam int unsigned GW = (N > 1) ? $clog2(N) : 1;

  logic          busy_q;
  logic [GW-1:0] owner_q, grant;
  logic          any_req;

  always_comb begin
    any_req = 1'b0;
    grant   = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req_valid[i]) begin
        any_req = 1'b1;
        grant   = GW'(i);
      end
    end
    mem_req_valid = !busy_q && any_req;
    mem_req_vpn   = req_vpn[grant];
    req_ready     = '0;
    resp_valid    = '0;
    if (mem_req_valid && mem_req_ready) req_ready[grant] = 1'b1;
    if (busy_q && mem_resp_valid) resp_valid[owner_q] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      owner_q <= '0;
    end else if (!busy_q) begin
      if (mem_req_valid && mem_req_ready) begin
        busy_q  <= 1'b1;
        owner_q <= grant;
      end
    end else if (mem_resp_valid) begin
      busy_q <= 1'b0;
    end
  end

  a_resp_only_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    mem_resp_valid |-> busy_q);

endmodule
