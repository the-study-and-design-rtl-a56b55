// tb_novel_tlb_small: end-to-end test of the banked TLB at non-default
// sizes: 4 banks of 4 entries, 36-bit virtual addresses (VPN [35:15]),
// 40-bit physical addresses (21-bit VPN, 25-bit PPN), a 3-entry prefetch
// buffer filled with v+1, v+2, v-1, and process IDs as task tags
// (USE_PID = 1).
//
// Six tasks run in a random order of time slices, so the 4 banks are
// shared and often evicted. All tasks use the same virtual pages, mapped to
// different physical pages. In each slice a task fetches its code page c
// and, at once, c+1, then later c+2. It then reads its three data pages,
// which lie above 32-bit addresses (VA bit 35 set). Fetching c+1 before its prefetch has returned
// would hit a stale prefetch-buffer entry of the previous task if the
// buffer were not flushed at the switch. c+2 is found in the prefetch
// buffer, and must have been copied into the bank for the task's next
// slice. A reference model of the bank tags (match on PID, else first
// invalid bank, else least recently activated) predicts for each slice
// whether the task gets its old bank back. If it does, the data pages must
// hit with no stall; if not, they must miss. The fill-case and eviction
// events must agree with the model. At the end, a prefetch-buffer hit on
// v+1 and a page fault are checked. Every translation is checked against
// the testbench's page table: PPN = {PID[3:0], VPN}.
module tb_novel_tlb_small;
  import tlb_pkg::*;

  localparam int unsigned NB    = 4;
  localparam int unsigned VA    = 36;
  localparam int unsigned PA    = 40;
  localparam int unsigned OFF   = 15;
  localparam int unsigned VPNW  = VA - OFF;
  localparam int unsigned PPNW  = PA - OFF;
  localparam int unsigned LAT   = 3;
  localparam int unsigned NTASK = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic            i_req = 1'b0, d_req = 1'b0;
  logic [VA-1:0]   i_vaddr = '0, d_vaddr = '0;
  logic            i_hit, d_hit, i_fault, d_fault;
  logic [PA-1:0]   i_paddr, d_paddr;
  logic            ctx_switch = 1'b0, clear_tlb = 1'b0;
  logic [PPNW-1:0] pid = '0;
  logic            mem_req_valid, mem_req_ready, mem_resp_valid, mem_resp_ok;
  logic [VPNW-1:0] mem_req_vpn;
  logic [PPNW-1:0] mem_resp_ppn;
  tlb_events_t     events;

  novel_tlb #(
    .NBANKS(NB), .BANK_ENTRIES(4), .PF_ENTRIES(3), .SP_FWD(2), .SP_BWD(1),
    .VA_W(VA), .PA_W(PA), .OFFSET_W(OFF), .USE_PID(1'b1)
  ) dut (
    .clk, .rst_n,
    .i_req, .i_vaddr, .i_hit, .i_paddr, .i_fault,
    .d_req, .d_vaddr, .d_hit, .d_paddr, .d_fault,
    .ctx_switch, .clear_tlb, .pid,
    .mem_req_valid, .mem_req_ready, .mem_req_vpn,
    .mem_resp_valid, .mem_resp_ok, .mem_resp_ppn,
    .events
  );

  // page table: PPN = {pid[3:0], vpn}; pages whose top 4 VPN bits are 'hf are absent
  function automatic logic [PPNW-1:0] ppn_of(input logic [PPNW-1:0] p,
                                             input logic [VPNW-1:0] v);
    return {p[3:0], v};
  endfunction

  // memory: one request at a time, answers LAT+1 cycles after acceptance
  logic        m_busy;
  int unsigned m_cnt;
  assign mem_req_ready = !m_busy;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_busy <= 1'b0; m_cnt <= 0;
      mem_resp_valid <= 1'b0; mem_resp_ok <= 1'b0; mem_resp_ppn <= '0;
    end else begin
      mem_resp_valid <= 1'b0;
      if (!m_busy && mem_req_valid) begin
        m_busy       <= 1'b1;
        m_cnt        <= LAT - 1;
        mem_resp_ok  <= (mem_req_vpn[VPNW-1 -: 4] != 4'hf);
        mem_resp_ppn <= ppn_of(pid, mem_req_vpn);
      end else if (m_busy) begin
        if (m_cnt == 0) begin m_busy <= 1'b0; mem_resp_valid <= 1'b1; end
        else m_cnt <= m_cnt - 1;
      end
    end
  end

  int n_match = 0, n_alloc = 0, n_evict = 0, n_pb = 0, n_ipb = 0, n_fault = 0;
  always @(posedge clk) if (rst_n) begin
    n_match += int'(events.fill_match);
    n_alloc += int'(events.fill_alloc);
    n_evict += int'(events.evict_valid);
    n_pb    += int'(events.d_pb_hit);
    n_ipb   += int'(events.i_pb_hit);
    n_fault += int'(events.fault);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t pid=%0d: %s", $time, pid, what);
    end
  endtask

  // One lookup held until it hits (lat = stall cycles) or faults (lat = -1).
  task automatic access(input bit is_d, input logic [VPNW-1:0] vpn, output int lat);
    logic [VA-1:0] va;
    int cyc = 0;
    bit flt = 0;
    va = {vpn, OFF'($urandom)};
    @(negedge clk);
    if (is_d) begin d_req = 1; d_vaddr = va; end
    else      begin i_req = 1; i_vaddr = va; end
    lat = -2;
    while (cyc < 500) begin
      #1;
      if (is_d ? d_hit : i_hit) begin
        check((is_d ? d_paddr : i_paddr) == {ppn_of(pid, vpn), va[OFF-1:0]},
              "translation");
        lat = cyc; break;
      end
      @(negedge clk);
      cyc++;
      if (is_d ? d_fault : i_fault) flt = 1;
      if (flt) begin lat = -1; break; end
    end
    check(lat != -2, "lookup answered");
    @(negedge clk);
    i_req = 0; d_req = 0;
  endtask

  localparam logic [VPNW-1:0] CODE = VPNW'(32'h000100);
  function automatic logic [VPNW-1:0] data_vpn(input int k);
    return VPNW'(32'h100000 + k * 8);   // VA bit 35 set
  endfunction

  // reference model of the bank tags
  bit     r_valid [NB];
  int     r_tag [NB];
  longint r_ts [NB];
  longint r_now = 1;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int lat, t, mb, vic, e_match, e_alloc, e_evict, e_pf, slices_kept;
    bit inv;
    for (int b = 0; b < NB; b++) begin r_valid[b] = 0; r_tag[b] = 0; r_ts[b] = 0; end
    slices_kept = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 60; s++) begin
      t = (s < NB) ? s + 1 : $urandom_range(1, NTASK);
      if (s > 0) begin
        @(negedge clk); ctx_switch = 1; @(negedge clk); ctx_switch = 0;
      end
      pid = PPNW'(t);
      // model: which bank will this task get?
      mb = -1; inv = 0; vic = 0;
      for (int b = 0; b < NB; b++) if (mb < 0 && r_valid[b] && r_tag[b] == t) mb = b;
      for (int b = 0; b < NB; b++) if (!inv && !r_valid[b]) begin inv = 1; vic = b; end
      if (!inv) for (int b = 1; b < NB; b++) if (r_ts[b] < r_ts[vic]) vic = b;
      e_match = n_match; e_alloc = n_alloc; e_evict = n_evict;
      access(1'b0, CODE, lat);
      check(lat > 0, "first fetch after a switch walks the page table");
      e_pf = n_ipb;
      access(1'b0, CODE + 1, lat);
      if (mb >= 0) check(lat == 0 && n_ipb == e_pf, "kept code page c+1 hits in the bank");
      // c+2 after the prefetches have landed: a pure prefetch-buffer hit
      // the first time, which must have been copied into the bank
      repeat (30) @(negedge clk);
      e_pf = n_ipb;
      access(1'b0, CODE + 2, lat);
      check(lat == 0, "code page c+2 answers with no stall");
      if (mb >= 0) check(n_ipb == e_pf, "kept code page c+2 hits in the bank");
      else         check(n_ipb == e_pf + 1, "code page c+2 found in the prefetch buffer");
      if (mb >= 0) begin
        check(n_match == e_match + 1 && n_alloc == e_alloc, "returning task matches its bank");
        r_ts[mb] = r_now++;
        slices_kept++;
      end else begin
        check(n_alloc == e_alloc + 1 && n_match == e_match, "new or evicted task allocates");
        check(n_evict == e_evict + int'(!inv), "live bank evicted only when none is free");
        r_valid[vic] = 1; r_tag[vic] = t; r_ts[vic] = r_now++;
      end
      for (int k = 0; k < 3; k++) begin
        access(1'b1, data_vpn(k), lat);
        if (mb >= 0) check(lat == 0, "kept data page hits with no stall");
        else         check(lat > 0, "data page of a fresh bank misses");
      end
      repeat (20) @(negedge clk);
    end
    // prefetch buffer: the miss on a new page v prefetches v+1
    access(1'b1, data_vpn(5), lat);
    check(lat > 0, "new page misses");
    repeat (40) @(negedge clk);
    begin
      int pb0;
      pb0 = n_pb;
      access(1'b1, data_vpn(5) + 1, lat);
      check(lat == 0 && n_pb == pb0 + 1, "v+1 hits in the prefetch buffer");
    end
    // page fault
    access(1'b1, {4'hf, (VPNW-4)'(0)}, lat);
    check(lat == -1 && n_fault == 1, "absent page faults");
    $display("match=%0d alloc=%0d evict=%0d kept_slices=%0d ipb=%0d dpb=%0d",
             n_match, n_alloc, n_evict, slices_kept, n_ipb, n_pb);
    check(n_ipb > 10, "code page c+1 found in the prefetch buffer");
    check(n_match > 10 && n_alloc > 10 && n_evict > 5, "match, allocate and evict all exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
