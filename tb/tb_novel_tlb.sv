// tb_novel_tlb: end-to-end test of the banked TLB at its default size
// (32 banks x 32 entries per side, 17-entry prefetch buffers).
//
// A small processor model runs tasks in time slices separated by context
// switches. Every slice starts with an instruction fetch alone (its page's
// PPN becomes the task tag), then issues instruction and data lookups, often
// both in the same cycle, and holds each until it hits. Every translation is
// compared with the page table (tb_pt_pkg). A reference model of the bank
// tags (which task owns which bank, LRU order) predicts whether the first
// miss of a slice re-uses the task's bank or takes a victim bank, and the
// testbench checks that pages a task touched before are still translated
// with no stall when its bank survived. Also checked: the demand-miss
// latency (LAT+4 cycles with this memory model), zero-stall hits, the
// clear-TLB signal, a task larger than one bank, and a page fault. Each
// mechanism (bank hit, prefetch-buffer hit on each side, plain miss fill,
// bank re-use, bank allocation, eviction of a valid bank, context switch,
// clear-TLB, prefetch fill, simultaneous I/D miss, fault) must occur.
module tb_novel_tlb;
  import tlb_pkg::*;
  import tb_pt_pkg::pt_ppn;

  localparam int unsigned LAT = 4;
  localparam logic [16:0] CODE_VPN = 17'h040;   // first code page of every task
  localparam logic [16:0] DATA_VPN = 17'h200;   // base of every task's data pages

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        i_req = 1'b0, d_req = 1'b0;
  logic [31:0] i_vaddr = '0, d_vaddr = '0;
  logic        i_hit, d_hit, i_fault, d_fault;
  logic [31:0] i_paddr, d_paddr;
  logic        ctx_switch = 1'b0, clear_tlb = 1'b0;
  logic        mem_req_valid, mem_req_ready, mem_resp_valid, mem_resp_ok;
  logic [16:0] mem_req_vpn, mem_resp_ppn;
  tlb_events_t events;
  int unsigned cur_task = 1;
  int unsigned n_mem;

  page_table_model #(.LATENCY(LAT)) u_mem (
    .clk, .rst_n, .task_id (cur_task),
    .req_valid (mem_req_valid), .req_ready (mem_req_ready), .req_vpn (mem_req_vpn),
    .resp_valid (mem_resp_valid), .resp_ok (mem_resp_ok), .resp_ppn (mem_resp_ppn),
    .n_req (n_mem)
  );

  novel_tlb dut (
    .clk, .rst_n,
    .i_req, .i_vaddr, .i_hit, .i_paddr, .i_fault,
    .d_req, .d_vaddr, .d_hit, .d_paddr, .d_fault,
    .ctx_switch, .clear_tlb, .pid ('0),
    .mem_req_valid, .mem_req_ready, .mem_req_vpn,
    .mem_resp_valid, .mem_resp_ok, .mem_resp_ppn,
    .events
  );

  // ---- mechanism counters ----
  int n_ibank, n_ipb, n_dbank, n_dpb, n_case2, n_match, n_alloc, n_evict;
  int n_fault, n_pfill, n_ctx, n_clear, n_both_miss, n_retained;
  always @(posedge clk) if (rst_n) begin
    n_ibank += int'(events.i_bank_hit);
    n_ipb   += int'(events.i_pb_hit);
    n_dbank += int'(events.d_bank_hit);
    n_dpb   += int'(events.d_pb_hit);
    n_case2 += int'(events.fill_case2);
    n_match += int'(events.fill_match);
    n_alloc += int'(events.fill_alloc);
    n_evict += int'(events.evict_valid);
    n_fault += int'(events.fault);
    n_pfill += int'(events.pf_fill);
    n_ctx   += int'(ctx_switch);
    n_clear += int'(clear_tlb);
    if (i_req && !i_hit && d_req && !d_hit) n_both_miss++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t task=%0d: %s", $time, cur_task, what);
    end
  endtask

  // ---- reference model of the bank tags ----
  int unsigned owner [32];     // task owning each bank, 0 = none
  int unsigned stamp [32];
  int unsigned now_stamp = 1;
  bit          touched [64][1024];   // pages a task translated while its bank survives
  bit          retain_ok [64];

  // Expected outcome of the first miss of a slice: 1 = re-use, 0 = allocate.
  function automatic bit model_switch_in(input int unsigned t);
    int unsigned victim;
    bit found_inv;
    for (int b = 0; b < 32; b++) if (owner[b] == t) begin
      stamp[b] = now_stamp++;
      return 1'b1;
    end
    found_inv = 1'b0;
    victim = 0;
    for (int b = 0; b < 32; b++) if (!found_inv && owner[b] == 0) begin
      found_inv = 1'b1;
      victim = b;
    end
    if (!found_inv) begin
      victim = 0;
      for (int b = 1; b < 32; b++) if (stamp[b] < stamp[victim]) victim = b;
      for (int v = 0; v < 1024; v++) touched[owner[victim]][v] = 1'b0;
    end
    owner[victim] = t;
    stamp[victim] = now_stamp++;
    return 1'b0;
  endfunction

  // ---- processor model: one I and/or D lookup, held until hit ----
  task automatic access(input bit do_i, input logic [31:0] iva,
                        input bit do_d, input logic [31:0] dva,
                        output int ilat, output int dlat);
    bit idone, ddone;
    int cyc;
    @(negedge clk);
    i_req = do_i; i_vaddr = iva;
    d_req = do_d; d_vaddr = dva;
    idone = !do_i; ddone = !do_d;
    ilat = -1; dlat = -1;
    cyc = 0;
    while (!(idone && ddone)) begin
      #1;
      if (!idone && i_hit) begin
        check(i_paddr == {pt_ppn(cur_task, iva[31:15]), iva[14:0]}, "ITLB translation");
        ilat = cyc; idone = 1'b1;
      end
      if (!ddone && d_hit) begin
        check(d_paddr == {pt_ppn(cur_task, dva[31:15]), dva[14:0]}, "DTLB translation");
        dlat = cyc; ddone = 1'b1;
      end
      if (!idone && i_fault) begin ilat = -2; idone = 1'b1; end
      if (!ddone && d_fault) begin dlat = -2; ddone = 1'b1; end
      @(negedge clk);
      if (idone) i_req = 1'b0;
      if (ddone) d_req = 1'b0;
      cyc++;
      if (cyc > 5000) begin
        check(1'b0, "lookup never answered");
        i_req = 1'b0; d_req = 1'b0;
        break;
      end
    end
  endtask

  task automatic pulse_ctx();
    @(negedge clk); ctx_switch = 1'b1;
    @(negedge clk); ctx_switch = 1'b0;
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  function automatic logic [31:0] va(input logic [16:0] vpn);
    return {vpn, 15'($urandom)};
  endfunction

  // One time slice of task t with n paired lookups over ndata data pages.
  task automatic run_slice(input int unsigned t, input int n, input int ndata,
                           input bit first);
    int il, dl, m0, a0;
    bit expect_match;
    logic [16:0] iv, dv;
    if (!first) pulse_ctx();
    cur_task = t;
    expect_match = model_switch_in(t);
    m0 = n_match; a0 = n_alloc;
    access(1'b1, va(CODE_VPN), 1'b0, '0, il, dl);
    check(il > 0, "first fetch of a slice must miss (no current bank)");
    if (expect_match) check(n_match == m0 + 1 && n_alloc == a0, "slice start re-uses the task's bank");
    else              check(n_alloc == a0 + 1 && n_match == m0, "slice start allocates a bank");
    touched[t][CODE_VPN[9:0]] = 1'b1;
    for (int k = 0; k < n; k++) begin
      iv = CODE_VPN + 17'((k / 6) % 4);
      dv = DATA_VPN + 17'(3 * $urandom_range(0, ndata - 1));
      access(1'b1, va(iv), 1'b1, va(dv), il, dl);
      if (retain_ok[t] && touched[t][iv[9:0]]) begin
        check(il == 0, "page kept in the task's bank hits with no stall (I)");
        n_retained++;
      end
      if (retain_ok[t] && touched[t][dv[9:0]]) begin
        check(dl == 0, "page kept in the task's bank hits with no stall (D)");
        n_retained++;
      end
      touched[t][iv[9:0]] = 1'b1;
      touched[t][dv[9:0]] = 1'b1;
      if ($urandom_range(0, 3) == 0) idle($urandom_range(1, 20));
    end
  endtask

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int il, dl, w0;
    for (int b = 0; b < 32; b++) begin owner[b] = 0; stamp[b] = 0; end
    for (int t = 0; t < 64; t++) retain_ok[t] = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Latency: first fetch after reset (no current bank, idle memory port).
    cur_task = 1;
    void'(model_switch_in(1));
    access(1'b1, va(CODE_VPN), 1'b0, '0, il, dl);
    check(il == int'(LAT) + 4, $sformatf("demand miss latency %0d, expected %0d", il, LAT + 4));
    access(1'b1, va(CODE_VPN), 1'b0, '0, il, dl);
    check(il == 0, "bank hit has no stall");
    touched[1][CODE_VPN[9:0]] = 1'b1;
    idle(200);   // let the sequential prefetch run finish
    w0 = n_mem;
    access(1'b1, va(CODE_VPN + 17'd5), 1'b0, '0, il, dl);
    check(il == 0 && n_ipb > 0, "prefetched page hits in the prefetch buffer");
    access(1'b1, va(CODE_VPN - 17'd8), 1'b0, '0, il, dl);
    check(il == 0, "page v-8 was prefetched");
    access(1'b1, va(CODE_VPN + 17'd10), 1'b0, '0, il, dl);
    check(il > 0, "page v+10 lies outside the prefetch window");
    check(n_mem > w0, "misses reach the memory system");
    // Both sides miss in the same cycle: the ITLB miss is served first.
    w0 = n_both_miss;
    access(1'b1, va(CODE_VPN + 17'd40), 1'b1, va(DATA_VPN + 17'd100), il, dl);
    check(n_both_miss > w0 && il > 0 && dl > il, "simultaneous misses: ITLB served before DTLB");
    touched[1][10'(CODE_VPN + 17'd40)] = 1'b1;
    touched[1][10'(DATA_VPN + 17'd100)] = 1'b1;
    touched[1][10'(CODE_VPN + 17'd5)] = 1'b1;
    touched[1][10'(CODE_VPN - 17'd8)] = 1'b1;
    touched[1][10'(CODE_VPN + 17'd10)] = 1'b1;

    // Phase 1: eight tasks, three rounds; banks are re-used on return.
    for (int r = 0; r < 3; r++)
      for (int t = 1; t <= 8; t++)
        run_slice(t, 30, 12, 1'b0);

    // Phase 2: forty tasks; tasks 33..40 evict the least recently used banks.
    for (int t = 1; t <= 40; t++) run_slice(t, 12, 8, 1'b0);
    run_slice(1, 12, 8, 1'b0);

    // Phase 3: clear-TLB invalidates every bank tag.
    @(negedge clk); clear_tlb = 1'b1;
    @(negedge clk); clear_tlb = 1'b0;
    for (int b = 0; b < 32; b++) owner[b] = 0;
    for (int t = 0; t < 64; t++) for (int v = 0; v < 1024; v++) touched[t][v] = 1'b0;
    run_slice(2, 12, 8, 1'b0);
    check(n_evict > 0, "valid banks were evicted in phase 2");

    // Phase 4: a task with more pages than a bank holds (in-bank LRU).
    retain_ok[50] = 1'b0;
    run_slice(50, 120, 45, 1'b0);

    // Phase 5: a page that is not present raises a fault.
    w0 = n_fault;
    access(1'b0, '0, 1'b1, va(17'h1f800), il, dl);
    check(dl == -2 && n_fault == w0 + 1, "absent page reports a fault");
    idle(400);

    $display("events: ibank=%0d ipb=%0d dbank=%0d dpb=%0d case2=%0d match=%0d alloc=%0d evict=%0d",
             n_ibank, n_ipb, n_dbank, n_dpb, n_case2, n_match, n_alloc, n_evict);
    $display("events: fault=%0d pf_fill=%0d ctx=%0d clear=%0d both_miss=%0d retained=%0d mem=%0d",
             n_fault, n_pfill, n_ctx, n_clear, n_both_miss, n_retained, n_mem);
    check(n_ibank > 0, "ITLB bank hit happened");
    check(n_ipb > 0, "ITLB prefetch-buffer hit happened");
    check(n_dbank > 0, "DTLB bank hit happened");
    check(n_dpb > 0, "DTLB prefetch-buffer hit happened");
    check(n_case2 > 0, "miss with a current bank happened");
    check(n_match > 0, "bank re-use on task return happened");
    check(n_alloc > 0, "bank allocation happened");
    check(n_evict > 0, "eviction of a valid bank happened");
    check(n_fault > 0, "fault happened");
    check(n_pfill > 0, "prefetch fill happened");
    check(n_ctx > 0, "context switch happened");
    check(n_clear > 0, "clear-TLB happened");
    check(n_both_miss > 0, "simultaneous ITLB and DTLB miss happened");
    check(n_retained > 0, "pages kept across context switches were used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
