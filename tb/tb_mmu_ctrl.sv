// tb_mmu_ctrl: directed tests of the miss handler with the bank-tag file
// and the memory port driven by the testbench. Checked for each fill case:
// the page-table request (VPN, issued the cycle after the miss), and in the
// fill cycle the bank chosen, activation, tag write, victim flush, fill and
// prefetch trigger on the right side:
//   no current bank, no tag match -> victim bank flushed, tagged, activated;
//   no current bank, tag match    -> matching bank re-activated;
//   current bank                  -> fill into it, no tag change.
// Also: ITLB served before DTLB when both miss, a context switch during a
// walk drops the miss, an absent page pulses the side's fault, and with
// USE_PID the pid input is the task tag. Then 400 random misses: random
// side, bank-tag state (current bank, tag match, victim and whether it was
// live), PPN, memory stalls and latency, absent pages, and context
// switches or clear-TLB during the walk. A reference predicts every output
// of the fill cycle and the request timing (the request the cycle after
// the miss, held while the memory is not ready; the fill the cycle after
// the response); counters check that no fill, activation or flush happens
// outside it.
module tb_mmu_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        i_req = 0, d_req = 0, i_hit = 0, d_hit = 0;
  logic [16:0] i_vpn = '0, d_vpn = '0;
  logic        ctx_switch = 0, clear_tlb = 0;
  logic [16:0] pid = '0;
  logic        cur_valid = 0, match_hit, victim_was_valid = 0;
  logic [4:0]  cur_idx = '0, match_idx = '0, victim_idx = '0;
  logic [16:0] match_tag, act_tag, match_tag_p, act_tag_p;
  logic        activate, act_set_tag;
  logic [4:0]  act_idx;
  logic        walk_req_valid, walk_req_ready = 1, walk_resp_valid = 0, walk_resp_ok = 1;
  logic [16:0] walk_req_vpn, walk_resp_ppn = '0;
  logic        fill_i, fill_d, flush_bank, pf_trig_i, pf_trig_d, i_fault, d_fault;
  logic [4:0]  fill_idx, flush_idx;
  logic [16:0] fill_vpn, fill_ppn;
  logic        ev_walk, ev_case2, ev_match, ev_alloc, ev_evict;
  logic [16:0] known_tag = 17'h1abcd;

  assign match_hit = (match_tag == known_tag);

  int n_fill = 0, n_act = 0, n_flush = 0, n_walk = 0;
  always @(posedge clk) if (rst_n) begin
    n_fill  += int'(fill_i) + int'(fill_d);
    n_act   += int'(activate);
    n_flush += int'(flush_bank);
    n_walk  += int'(ev_walk);
  end

  mmu_ctrl dut (.*);

  // second instance: task tag from the pid input
  logic p_walk_req_valid, p_activate, p_act_set_tag;
  mmu_ctrl #(.USE_PID(1'b1)) dut_pid (
    .clk, .rst_n, .i_req, .i_vpn, .i_hit, .d_req, .d_vpn, .d_hit,
    .ctx_switch, .clear_tlb, .pid, .cur_valid, .cur_idx,
    .match_tag (match_tag_p), .match_hit (1'b0), .match_idx, .victim_idx,
    .victim_was_valid, .activate (p_activate), .act_idx (), .act_set_tag (p_act_set_tag),
    .act_tag (act_tag_p), .walk_req_valid (p_walk_req_valid), .walk_req_ready,
    .walk_req_vpn (), .walk_resp_valid, .walk_resp_ok, .walk_resp_ppn,
    .fill_i (), .fill_d (), .fill_idx (), .fill_vpn (), .fill_ppn (),
    .flush_bank (), .flush_idx (), .pf_trig_i (), .pf_trig_d (),
    .i_fault (), .d_fault (), .ev_walk (), .ev_case2 (), .ev_match (),
    .ev_alloc (), .ev_evict ());

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  // Serve one page-table request: expect it, answer after lat cycles.
  task automatic serve(input logic [16:0] vpn, input logic [16:0] ppn,
                       input bit ok, input int lat);
    int n = 0;
    while (!walk_req_valid && n < 20) begin @(negedge clk); n++; end
    check(walk_req_valid && walk_req_vpn == vpn, $sformatf("walk request for %h", vpn));
    @(negedge clk);
    repeat (lat) @(negedge clk);
    walk_resp_valid = 1; walk_resp_ppn = ppn; walk_resp_ok = ok;
    #1;
    if (!ok) check(i_fault || d_fault, "fault pulse");
    @(negedge clk);
    walk_resp_valid = 0;
    #1;
  endtask

  task automatic random_misses();
    int e_fill = n_fill, e_act = n_act, e_flush = n_flush, e_walk = n_walk;
    int n_c2 = 0, n_m = 0, n_a = 0, n_drop = 0, n_flt = 0, n_stall = 0;
    for (int it = 0; it < 400; it++) begin
      bit side_d, ok, is_match, drop, os_clear;
      int stall, lat, drop_at;
      logic [16:0] vpn, ppn;
      side_d = 1'($urandom_range(0, 1));
      ok = ($urandom_range(0, 7) != 0);
      drop = ($urandom_range(0, 7) == 0);
      os_clear = 1'($urandom_range(0, 1));
      is_match = 1'($urandom_range(0, 1));
      stall = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 3) : 0;
      lat = $urandom_range(0, 4);
      drop_at = $urandom_range(0, lat);
      vpn = 17'($urandom);
      ppn = is_match ? known_tag : 17'($urandom_range(0, 'h1a000));
      @(negedge clk);
      cur_valid = 1'($urandom_range(0, 1));
      cur_idx = 5'($urandom); match_idx = 5'($urandom); victim_idx = 5'($urandom);
      victim_was_valid = 1'($urandom_range(0, 1));
      walk_req_ready = (stall == 0);
      if (side_d) begin d_req = 1; d_vpn = vpn; end
      else        begin i_req = 1; i_vpn = vpn; end
      #1; check(!walk_req_valid, "random: no request in the miss cycle");
      @(negedge clk); #1;
      check(walk_req_valid && walk_req_vpn == vpn, "random: request the cycle after the miss");
      for (int k = stall; k > 0; k--) begin
        @(negedge clk); #1;
        check(walk_req_valid && walk_req_vpn == vpn, "random: request held while not ready");
        n_stall++;
        if (k == 1) walk_req_ready = 1;
      end
      // accepted at the next edge; the response comes lat cycles after it
      @(negedge clk);
      for (int k = 0; k < lat; k++) begin
        if (drop && k == drop_at) begin
          if (os_clear) clear_tlb = 1; else ctx_switch = 1;
          i_req = 0; d_req = 0;
        end
        @(negedge clk); ctx_switch = 0; clear_tlb = 0;
      end
      if (drop && drop_at == lat) begin
        if (os_clear) clear_tlb = 1; else ctx_switch = 1;
        i_req = 0; d_req = 0;
      end
      walk_resp_valid = 1; walk_resp_ppn = ppn; walk_resp_ok = ok;
      #1;
      check(i_fault == (!ok && !drop && !side_d) && d_fault == (!ok && !drop && side_d),
            "random: fault pulse only for a live miss to an absent page");
      if (!ok && !drop) n_flt++;
      @(negedge clk);
      walk_resp_valid = 0; ctx_switch = 0; clear_tlb = 0;
      #1;
      if (ok && !drop) begin
        check(fill_i == !side_d && fill_d == side_d && fill_vpn == vpn && fill_ppn == ppn,
              "random: fill on the missing side");
        check(pf_trig_i == !side_d && pf_trig_d == side_d, "random: prefetch started on that side");
        if (cur_valid) begin
          check(fill_idx == cur_idx && !activate && !flush_bank && ev_case2 && !ev_match && !ev_alloc,
                "random: current bank filled, no tag change");
          n_c2++;
        end else if (is_match) begin
          check(fill_idx == match_idx && activate && act_idx == match_idx && !act_set_tag &&
                !flush_bank && ev_match && !ev_alloc, "random: matching bank re-activated");
          n_m++;
        end else begin
          check(fill_idx == victim_idx && activate && act_idx == victim_idx && act_set_tag &&
                act_tag == ppn && flush_bank && flush_idx == victim_idx && ev_alloc &&
                ev_evict == victim_was_valid && !ev_match, "random: victim flushed, tagged, activated");
          n_a++;
          e_flush++;
        end
        if (!cur_valid) e_act++;
        e_fill++;
        if (side_d) d_hit = 1; else i_hit = 1;
        @(negedge clk);
      end else begin
        check(!fill_i && !fill_d && !activate && !flush_bank, "random: dropped or faulted miss fills nothing");
        if (drop) n_drop++;
      end
      i_req = 0; d_req = 0; i_hit = 0; d_hit = 0;
      e_walk++;
      @(negedge clk); #1;
      check(!walk_req_valid, "random: handler idle again");
    end
    check(n_fill == e_fill && n_act == e_act && n_flush == e_flush,
          "random: fills, activations and flushes only in fill cycles");
    check(n_walk == e_walk, "random: one accepted request per miss");
    $display("random: case2=%0d match=%0d alloc=%0d dropped=%0d faults=%0d stalls=%0d",
             n_c2, n_m, n_a, n_drop, n_flt, n_stall);
    check(n_c2 > 0 && n_m > 0 && n_a > 0 && n_drop > 0 && n_flt > 0 && n_stall > 0,
          "random: all cases exercised");
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // Case 1, no match: allocate victim bank 7 (which held another task).
    @(negedge clk);
    i_req = 1; i_vpn = 17'h00123; victim_idx = 5'd7; victim_was_valid = 1;
    #1; check(!walk_req_valid, "request starts the cycle after the miss");
    @(negedge clk); #1;
    check(walk_req_valid && walk_req_vpn == 17'h00123, "walk request issued");
    serve(17'h00123, 17'h00777, 1, 2);
    check(fill_i && !fill_d && fill_idx == 5'd7 && fill_vpn == 17'h00123 && fill_ppn == 17'h00777,
          "alloc: fill ITLB bank 7");
    check(activate && act_idx == 5'd7 && act_set_tag && act_tag == 17'h00777, "alloc: activate and tag with PPN");
    check(flush_bank && flush_idx == 5'd7, "alloc: victim bank flushed");
    check(pf_trig_i && !pf_trig_d && ev_alloc && ev_evict && !ev_match && !ev_case2, "alloc: prefetch and events");
    i_hit = 1; @(negedge clk); i_req = 0; i_hit = 0;

    // Case 1, match: the PPN equals a stored task tag in bank 4.
    match_idx = 5'd4;
    @(negedge clk); i_req = 1; i_vpn = 17'h00200;
    @(negedge clk);
    serve(17'h00200, known_tag, 1, 1);
    check(fill_i && fill_idx == 5'd4 && activate && act_idx == 5'd4 && !act_set_tag && !flush_bank,
          "match: bank 4 re-activated, no flush");
    check(ev_match && !ev_alloc, "match event");
    i_hit = 1; @(negedge clk); i_req = 0; i_hit = 0;

    // Case 2: a current bank exists.
    cur_valid = 1; cur_idx = 5'd4;
    @(negedge clk); d_req = 1; d_vpn = 17'h00999;
    @(negedge clk);
    serve(17'h00999, 17'h00111, 1, 0);
    check(fill_d && !fill_i && fill_idx == 5'd4 && !activate && !flush_bank && pf_trig_d && ev_case2,
          "case 2: fill DTLB current bank");
    d_hit = 1; @(negedge clk); d_req = 0; d_hit = 0;

    // Both miss: ITLB first.
    @(negedge clk); i_req = 1; i_vpn = 17'h00010; d_req = 1; d_vpn = 17'h00020;
    @(negedge clk);
    serve(17'h00010, 17'h00001, 1, 1);
    check(fill_i && !fill_d, "ITLB miss served first");
    i_hit = 1; @(negedge clk); i_req = 0; i_hit = 0;
    serve(17'h00020, 17'h00002, 1, 1);
    check(fill_d && !fill_i, "then the DTLB miss");
    d_hit = 1; @(negedge clk); d_req = 0; d_hit = 0;

    // Context switch during the walk: the miss is dropped.
    @(negedge clk); d_req = 1; d_vpn = 17'h00030;
    @(negedge clk); @(negedge clk);
    ctx_switch = 1; d_req = 0;
    @(negedge clk); ctx_switch = 0;
    walk_resp_valid = 1; walk_resp_ppn = 17'h00003;
    @(negedge clk); walk_resp_valid = 0;
    #1; check(!fill_d && !fill_i && !activate, "stale walk dropped");
    @(negedge clk); #1; check(!walk_req_valid && !fill_d, "handler idle again");

    // Absent page: fault, no fill.
    @(negedge clk); d_req = 1; d_vpn = 17'h1f000;
    @(negedge clk);
    serve(17'h1f000, 17'h0, 0, 1);
    check(!fill_d, "no fill after a fault");
    d_req = 0;

    // USE_PID: task tag from pid.
    cur_valid = 0; pid = 17'h0beef;
    @(negedge clk); i_req = 1; i_vpn = 17'h00400;
    @(negedge clk);
    serve(17'h00400, 17'h00555, 1, 1);
    check(p_activate && p_act_set_tag && act_tag_p == 17'h0beef, "USE_PID: pid is the task tag");
    check(activate && act_tag == 17'h00555, "default: PPN is the task tag");
    i_hit = 1; @(negedge clk); i_req = 0; i_hit = 0;

    random_misses();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
