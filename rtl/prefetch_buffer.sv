// prefetch_buffer: small fully associative buffer of prefetched
// translations, looked up in parallel with the TLB banks.
//
// Lookup is combinational (lk_hit/lk_ppn in the same cycle as lk_vpn). The
// prefetch logic writes one translation per cycle at most: a VPN already
// present is overwritten in place, otherwise the entry at the round-robin
// (FIFO) pointer is replaced and the pointer advances. `flush` empties the
// buffer at the clock edge and wins over a write in the same cycle, because
// a flush marks a context switch or a clear-TLB request and anything
// fetched before it belongs to the old state.
//
// The buffer's role, its flush on context switch and clear-TLB and its size
// (17, one entry per sequential-prefetch candidate) follow the published
// design; FIFO replacement and flush priority are this design's choices.
module prefetch_buffer #(
  parameter int unsigned ENTRIES = tlb_pkg::PF_ENTRIES,
  parameter int unsigned VPN_W   = tlb_pkg::VPN_W,
  parameter int unsigned PPN_W   = tlb_pkg::PPN_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [VPN_W-1:0] lk_vpn,
  output logic             lk_hit,
  output logic [PPN_W-1:0] lk_ppn,
  input  logic             wr_en,
  input  logic [VPN_W-1:0] wr_vpn,
  input  logic [PPN_W-1:0] wr_ppn,
  input  logic             flush
);
  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  typedef logic [IW-1:0] idx_t;

  logic [ENTRIES-1:0] valid_q;
  logic [VPN_W-1:0]   vpn_q [ENTRIES];
  logic [PPN_W-1:0]   ppn_q [ENTRIES];
  idx_t               ptr_q;
  idx_t               hit_idx, dup_idx;
  logic               dup;

  always_comb begin
    lk_hit  = 1'b0;
    hit_idx = '0;
    dup     = 1'b0;
    dup_idx = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (!lk_hit && valid_q[i] && vpn_q[i] == lk_vpn) begin
        lk_hit  = 1'b1;
        hit_idx = idx_t'(i);
      end
      if (!dup && valid_q[i] && vpn_q[i] == wr_vpn) begin
        dup     = 1'b1;
        dup_idx = idx_t'(i);
      end
    end
    lk_ppn = ppn_q[hit_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      ptr_q   <= '0;
      for (int unsigned i = 0; i < ENTRIES; i++) begin
        vpn_q[i] <= '0;
        ppn_q[i] <= '0;
      end
    end else if (flush) begin
      valid_q <= '0;
      ptr_q   <= '0;
    end else if (wr_en) begin
      if (dup) begin
        ppn_q[dup_idx] <= wr_ppn;
      end else begin
        valid_q[ptr_q] <= 1'b1;
        vpn_q[ptr_q]   <= wr_vpn;
        ppn_q[ptr_q]   <= wr_ppn;
        ptr_q          <= (ptr_q == idx_t'(ENTRIES - 1)) ? '0 : ptr_q + 1'b1;
      end
    end
  end

endmodule
