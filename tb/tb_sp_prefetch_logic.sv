// tb_sp_prefetch_logic: directed tests of the sequential prefetcher with a
// page-table model of latency LAT. Checked: the request order v+1..v+9,
// v-1..v-8; every present page written to the prefetch buffer with the
// page table's PPN; absent pages not written; candidates beyond either end
// of the VPN range skipped; a new trigger restarting the run; an abort
// dropping the run and its in-flight response; and the length of a full
// run, 17*(LAT+2) cycles from trigger to last write with this memory.
// A second instance (FWD = 4, BWD = 3) runs against a memory that stalls
// at random, with random triggers and aborts. A monitor checks that each
// accepted request is the next in-range candidate of the latest trigger,
// that nothing is requested after a run ends or is aborted, and that each
// response is written to the buffer exactly when it is present and no
// abort came while it was in flight or in its own cycle.
module tb_sp_prefetch_logic;
  localparam int unsigned LAT = 3;
  localparam longint RUN_CYCLES = 17 * (longint'(LAT) + 2);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        trig = 0, pf_abort = 0;
  logic [16:0] trig_vpn = '0;
  logic        req_valid, req_ready, resp_valid, resp_ok, pb_wr_en, busy;
  logic [16:0] req_vpn, resp_ppn, pb_wr_vpn, pb_wr_ppn;
  int unsigned n_mem;

  sp_prefetch_logic dut (.clk, .rst_n, .trig, .trig_vpn, .pf_abort,
    .req_valid, .req_ready, .req_vpn, .resp_valid, .resp_ok, .resp_ppn,
    .pb_wr_en, .pb_wr_vpn, .pb_wr_ppn, .busy);

  page_table_model #(.LATENCY(LAT)) u_mem (.clk, .rst_n, .task_id (3),
    .req_valid, .req_ready, .req_vpn, .resp_valid, .resp_ok, .resp_ppn, .n_req (n_mem));

  // second instance: small window, stalling memory, random stimulus
  localparam int unsigned F2 = 4, B2 = 3;
  logic        r_trig = 0, r_abort = 0;
  logic [16:0] r_trig_vpn = '0;
  logic        r_req_valid, r_req_ready, r_resp_valid, r_resp_ok, r_wr_en, r_busy;
  logic [16:0] r_req_vpn, r_resp_ppn, r_wr_vpn, r_wr_ppn;
  int unsigned r_n_mem;

  sp_prefetch_logic #(.FWD(F2), .BWD(B2)) dut_small (.clk, .rst_n, .trig (r_trig),
    .trig_vpn (r_trig_vpn), .pf_abort (r_abort), .req_valid (r_req_valid),
    .req_ready (r_req_ready), .req_vpn (r_req_vpn), .resp_valid (r_resp_valid),
    .resp_ok (r_resp_ok), .resp_ppn (r_resp_ppn), .pb_wr_en (r_wr_en),
    .pb_wr_vpn (r_wr_vpn), .pb_wr_ppn (r_wr_ppn), .busy (r_busy));

  page_table_model #(.LATENCY(2), .STALL(1'b1)) u_mem2 (.clk, .rst_n, .task_id (9),
    .req_valid (r_req_valid), .req_ready (r_req_ready), .req_vpn (r_req_vpn),
    .resp_valid (r_resp_valid), .resp_ok (r_resp_ok), .resp_ppn (r_resp_ppn),
    .n_req (r_n_mem));

  // the in-range candidates of a run from v, in request order
  function automatic void cands(input logic [16:0] v, ref logic [16:0] q[$]);
    q.delete();
    for (int k = 1; k <= F2; k++) if (int'(v) + k <= 'h1ffff) q.push_back(17'(int'(v) + k));
    for (int k = 1; k <= B2; k++) if (int'(v) - k >= 0) q.push_back(17'(int'(v) - k));
  endfunction

  logic [16:0] m_cand[$];
  logic [16:0] m_fly_vpn;
  bit          m_active = 0, m_fly = 0, m_discard = 0;
  int          m_j = 0, n_rreq = 0, n_rwr = 0, n_rdrop = 0, n_rskip = 0;
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (r_resp_valid) begin
      if (r_wr_en != (m_fly && !m_discard && !r_abort && r_resp_ok)) begin
        failures++; $display("FAIL t=%0t random run: buffer write on response", $time);
      end
      if (r_wr_en) begin
        n_rwr++;
        if (r_wr_vpn != m_fly_vpn || r_wr_ppn != tb_pt_pkg::pt_ppn(9, m_fly_vpn)) begin
          failures++; $display("FAIL t=%0t random run: written translation", $time);
        end
      end
      if (m_discard || r_abort) n_rdrop++;
      m_fly = 0; m_discard = 0;
    end else if (r_wr_en) begin
      failures++; $display("FAIL t=%0t random run: write without a response", $time);
    end
    if (r_req_valid && r_req_ready) begin
      n_rreq++;
      if (!m_active || m_j >= m_cand.size() || r_req_vpn != m_cand[m_j]) begin
        failures++;
        $display("FAIL t=%0t random run: request %h, not the next candidate", $time, r_req_vpn);
      end
      m_j++; m_fly = 1; m_fly_vpn = r_req_vpn;
    end
    if (r_abort) begin m_active = 0; if (m_fly) m_discard = 1; end
    if (r_trig) begin
      cands(r_trig_vpn, m_cand); m_j = 0; m_active = 1;
      if (m_cand.size() < F2 + B2) n_rskip++;
    end
  end

  logic [16:0] reqs[$], wrs[$];
  longint      cyc = 0, last_wr = 0;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (req_valid && req_ready) reqs.push_back(req_vpn);
    if (pb_wr_en) begin
      wrs.push_back(pb_wr_vpn);
      last_wr <= cyc;
      if (pb_wr_ppn != tb_pt_pkg::pt_ppn(3, pb_wr_vpn)) begin
        failures++; $display("FAIL wrong PPN written for %h", pb_wr_vpn);
      end
      checks++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  task automatic fire(input logic [16:0] v);
    @(negedge clk); trig = 1; trig_vpn = v;
    @(negedge clk); trig = 0;
  endtask

  task automatic wait_idle();
    int n = 0;
    @(negedge clk);
    while (busy && n < 1000) begin @(negedge clk); n++; end
    check(!busy, "run ends");
  endtask

  function automatic bit same(input logic [16:0] a[$], input logic [16:0] b[$]);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [16:0] exp[$];
    longint t0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // 1. full run and its length
    reqs.delete(); wrs.delete(); exp.delete();
    for (int k = 1; k <= 9; k++) exp.push_back(17'(1000 + k));
    for (int k = 1; k <= 8; k++) exp.push_back(17'(1000 - k));
    @(negedge clk); trig = 1; trig_vpn = 17'd1000; t0 = cyc;
    @(negedge clk); trig = 0;
    wait_idle();
    check(same(reqs, exp), "request order v+1..v+9, v-1..v-8");
    check(same(wrs, exp), "all 17 written to the prefetch buffer");
    check(last_wr - t0 == RUN_CYCLES, $sformatf("run length %0d, expected %0d", last_wr - t0, RUN_CYCLES));

    // 2. low end of the VPN range: v-4.. skipped
    reqs.delete(); wrs.delete(); exp.delete();
    for (int k = 1; k <= 9; k++) exp.push_back(17'(3 + k));
    for (int k = 1; k <= 3; k++) exp.push_back(17'(3 - k));
    fire(17'd3); wait_idle();
    check(same(reqs, exp), "candidates below zero skipped");

    // 3. high end of the VPN range
    reqs.delete(); wrs.delete(); exp.delete();
    exp.push_back(17'h1fffe); exp.push_back(17'h1ffff);
    for (int k = 1; k <= 8; k++) exp.push_back(17'(17'h1fffd - k));
    fire(17'h1fffd); wait_idle();
    check(same(reqs, exp), "candidates above the top skipped");
    check(wrs.size() == 0, "absent pages are not written");

    // 4. partly absent pages
    reqs.delete(); wrs.delete();
    fire(17'h1effc); wait_idle();
    check(reqs.size() == 17 && wrs.size() == 3 + 8, "only present pages written");

    // 5. restart: a second trigger mid-run
    reqs.delete(); wrs.delete(); exp.delete();
    fire(17'd500);
    repeat (2 * (LAT + 2)) @(negedge clk);
    fire(17'd2000);
    wait_idle();
    check(reqs.size() >= 17 && reqs[reqs.size() - 17] == 17'd2001 && reqs[$] == 17'd1992,
          "a new trigger restarts the run from its VPN");
    check(wrs.size() == reqs.size(), "responses in flight at the restart are kept");

    // 6. abort in flight
    reqs.delete(); wrs.delete();
    fire(17'd3000);
    repeat (LAT + 4) @(negedge clk);      // second request in flight
    pf_abort = 1; @(negedge clk); pf_abort = 0;
    repeat (4 * LAT) @(negedge clk);
    check(!busy, "abort ends the run");
    check(reqs.size() == 2 && wrs.size() == 1, "abort drops the in-flight response");

    // 7. random triggers and aborts on the small instance
    for (int it = 0; it < 6000; it++) begin
      @(negedge clk);
      r_trig = 0; r_abort = 0;
      case ($urandom_range(0, 19))
        0, 1: begin
          r_trig = 1;
          case ($urandom_range(0, 3))
            0: r_trig_vpn = 17'($urandom_range(0, 3));
            1: r_trig_vpn = 17'($urandom_range('h1fffc, 'h1ffff));
            2: r_trig_vpn = 17'($urandom_range('h1effa, 'h1f002));
            default: r_trig_vpn = 17'($urandom);
          endcase
        end
        2: r_abort = 1;
        default: ;
      endcase
    end
    @(negedge clk); r_trig = 0; r_abort = 0;
    repeat (100) @(negedge clk);
    check(!r_busy, "random run: idle at the end");
    $display("random run: requests=%0d writes=%0d dropped=%0d clipped_runs=%0d",
             n_rreq, n_rwr, n_rdrop, n_rskip);
    check(n_rreq > 500 && n_rwr > 300 && n_rdrop > 10 && n_rskip > 10,
          "random run: requests, writes, dropped responses and clipped runs all seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
