// tb_tlb_side: directed test of one TLB side (32 banks, prefetch buffer,
// selection and sequential prefetcher) with a page-table model on the
// prefetch port. Checked: a fill lands in the named bank and answers only
// while that bank is current; a fill's prefetch trigger fills the prefetch
// buffer with v+1..v+9 and v-1..v-8; a prefetch-buffer hit answers in the
// same cycle, is copied into the current bank and restarts prefetching
// from its VPN; flushing a bank and flushing the prefetch buffer remove
// their translations; bank hits leave the memory port alone. Then a random
// run with the prefetcher idle: fills into random banks, bank flushes and
// changes of the current bank (or none), with a lookup every cycle checked
// against a per-bank model (30 pages, so no bank ever replaces an entry).
module tb_tlb_side;
  localparam int unsigned LAT = 2;
  localparam int unsigned TASK = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        lk_req = 0, lk_hit, lk_bank_hit, lk_pb_hit;
  logic [31:0] lk_vaddr = '0, lk_paddr;
  logic [31:0] cur_onehot = '0;
  logic        fill_en = 0, flush_bank = 0, pb_flush = 0, pf_trig = 0;
  logic [4:0]  fill_idx = '0, flush_idx = '0;
  logic [16:0] fill_vpn = '0, fill_ppn = '0, pf_trig_vpn = '0;
  logic        pf_req_valid, pf_req_ready, pf_resp_valid, pf_resp_ok, pf_fill, pf_busy;
  logic [16:0] pf_req_vpn, pf_resp_ppn;
  int unsigned n_mem;

  tlb_side dut (.clk, .rst_n, .lk_req, .lk_vaddr, .lk_hit, .lk_paddr, .lk_bank_hit,
    .lk_pb_hit, .cur_onehot, .fill_en, .fill_idx, .fill_vpn, .fill_ppn,
    .flush_bank, .flush_idx, .pb_flush, .pf_trig, .pf_trig_vpn,
    .pf_req_valid, .pf_req_ready, .pf_req_vpn, .pf_resp_valid, .pf_resp_ok,
    .pf_resp_ppn, .pf_fill, .pf_busy);

  page_table_model #(.LATENCY(LAT)) u_mem (.clk, .rst_n, .task_id (TASK),
    .req_valid (pf_req_valid), .req_ready (pf_req_ready), .req_vpn (pf_req_vpn),
    .resp_valid (pf_resp_valid), .resp_ok (pf_resp_ok), .resp_ppn (pf_resp_ppn), .n_req (n_mem));

  logic [16:0] reqs[$];
  always @(posedge clk) if (rst_n && pf_req_valid && pf_req_ready) reqs.push_back(pf_req_vpn);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  function automatic logic [31:0] exp_pa(input logic [31:0] va);
    return {tb_pt_pkg::pt_ppn(TASK, va[31:15]), va[14:0]};
  endfunction

  // One lookup cycle; returns hit flags sampled before the clock edge.
  task automatic look(input logic [16:0] vpn, output bit hit, output bit bhit, output bit pbhit);
    @(negedge clk);
    lk_req = 1; lk_vaddr = {vpn, 15'($urandom)};
    #1;
    hit = lk_hit; bhit = lk_bank_hit; pbhit = lk_pb_hit;
    if (hit) check(lk_paddr == exp_pa(lk_vaddr), "physical address");
    @(negedge clk);
    lk_req = 0;
  endtask

  task automatic wait_pf();
    int n = 0;
    @(negedge clk);
    while (pf_busy && n < 500) begin @(negedge clk); n++; end
    check(!pf_busy, "prefetch run ends");
  endtask

  task automatic random_run();
    bit          m_has [32][30];
    logic [16:0] m_ppn [32][30];
    int cur, n_hit = 0, n_fill = 0, n_flush = 0, n_cur = 0;
    logic [31:0] va;
    // start from empty banks and an idle, empty prefetch buffer
    wait_pf();
    @(negedge clk); pb_flush = 1; @(negedge clk); pb_flush = 0;
    for (int b = 0; b < 32; b++) begin
      @(negedge clk); flush_bank = 1; flush_idx = 5'(b);
      for (int v = 0; v < 30; v++) m_has[b][v] = 0;
    end
    @(negedge clk); flush_bank = 0;
    reqs.delete();
    cur = 3; cur_onehot = 32'h1 << cur;
    for (int it = 0; it < 4000; it++) begin
      int op, b, v;
      @(negedge clk);
      fill_en = 0; flush_bank = 0;
      op = $urandom_range(0, 19);
      b = $urandom_range(0, 31);
      if (op == 0) begin
        cur = ($urandom_range(0, 7) == 0) ? -1 : $urandom_range(0, 31);
        cur_onehot = (cur < 0) ? '0 : (32'h1 << cur);
        n_cur++;
      end
      v = $urandom_range(0, 29);
      va = {17'(v), 15'($urandom)};
      lk_req = 1; lk_vaddr = va;
      if (op >= 1 && op <= 8) begin
        fill_en = 1; fill_idx = 5'(b); fill_vpn = 17'($urandom_range(0, 29));
        fill_ppn = 17'($urandom);
      end else if (op == 9) begin
        flush_bank = 1; flush_idx = 5'(b);
      end
      #1;
      if (cur >= 0 && m_has[cur][v]) begin
        check(lk_hit && lk_bank_hit && !lk_pb_hit && lk_paddr == {m_ppn[cur][v], va[14:0]},
              "random: current bank answers with its translation");
        n_hit++;
      end else begin
        check(!lk_hit && !lk_bank_hit && !lk_pb_hit, "random: miss when the current bank lacks the page");
      end
      if (fill_en) begin
        m_has[b][int'(fill_vpn)] = 1; m_ppn[b][int'(fill_vpn)] = fill_ppn; n_fill++;
      end
      if (flush_bank) begin
        for (int k = 0; k < 30; k++) m_has[b][k] = 0;
        n_flush++;
      end
    end
    @(negedge clk); lk_req = 0; fill_en = 0; flush_bank = 0;
    check(reqs.size() == 0, "random: no prefetch requests without a trigger");
    $display("random: hits=%0d fills=%0d flushes=%0d current changes=%0d", n_hit, n_fill, n_flush, n_cur);
    check(n_hit > 200 && n_flush > 50 && n_cur > 50, "random: hits, flushes and bank changes seen");
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    bit h, bh, ph;
    int m0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cur_onehot = 32'h1 << 3;

    look(17'd100, h, bh, ph);
    check(!h, "empty TLB misses");

    // fill VPN 100 into bank 3 and start prefetching around it
    @(negedge clk);
    fill_en = 1; fill_idx = 5'd3; fill_vpn = 17'd100; fill_ppn = tb_pt_pkg::pt_ppn(TASK, 17'd100);
    pf_trig = 1; pf_trig_vpn = 17'd100;
    @(negedge clk);
    fill_en = 0; pf_trig = 0;
    look(17'd100, h, bh, ph);
    check(h && bh && !ph, "filled page hits in the current bank");

    // another bank current: bank 3 must not answer
    cur_onehot = 32'h1 << 5;
    look(17'd100, h, bh, ph);
    check(!h, "a bank that is not current does not answer");
    cur_onehot = 32'h1 << 3;

    wait_pf();
    check(reqs.size() == 17 && reqs[0] == 17'd101 && reqs[8] == 17'd109 && reqs[9] == 17'd99
          && reqs[16] == 17'd92, "prefetch order around the fill");
    reqs.delete();

    // prefetch-buffer hit: same-cycle answer, copy to bank, new run
    look(17'd105, h, bh, ph);
    check(h && ph && !bh, "prefetched page hits in the prefetch buffer");
    look(17'd105, h, bh, ph);
    check(h && bh && !ph, "prefetch-buffer hit was copied into the current bank");
    wait_pf();
    check(reqs.size() == 17 && reqs[0] == 17'd106 && reqs[16] == 17'd97,
          "prefetch-buffer hit restarts prefetching from its VPN");

    // bank hits do not use the memory port
    m0 = int'(n_mem);
    repeat (10) look(17'd100, h, bh, ph);
    check(int'(n_mem) == m0 && h, "bank hits need no page-table access");

    // pb_flush empties the prefetch buffer
    look(17'd114, h, bh, ph);
    check(h && ph, "page 114 is in the prefetch buffer");
    @(negedge clk); pb_flush = 1; @(negedge clk); pb_flush = 0;
    look(17'd113, h, bh, ph);
    check(!h, "prefetch buffer empty after flush");
    look(17'd114, h, bh, ph);
    check(h && bh, "copied page still in the bank after the buffer flush");

    // flush bank 3
    @(negedge clk); flush_bank = 1; flush_idx = 5'd3; @(negedge clk); flush_bank = 0;
    look(17'd100, h, bh, ph);
    check(!h, "flushed bank misses");

    random_run();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
