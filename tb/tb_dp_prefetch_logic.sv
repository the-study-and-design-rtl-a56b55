// tb_dp_prefetch_logic: test of the distance prefetcher against a reference
// model of the distance table (64 rows indexed by the low 6 bits of the
// distance, tag = the other bits, two distances per row, most recent
// first). Trigger streams: a constant stride, an alternating pair of
// strides, a random walk over a few strides, and far jumps that collide in
// the table. For every trigger the requests issued must be exactly the
// model's predictions, in slot order, and present pages must reach the
// prefetch buffer with the page table's PPN. An abort must clear the
// learned table and drop the response in flight.
module tb_dp_prefetch_logic;
  localparam int unsigned LAT = 2;
  localparam int ROWS = 64, SLOTS = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        trig = 0, pf_abort = 0;
  logic [16:0] trig_vpn = '0;
  logic        req_valid, req_ready, resp_valid, resp_ok, pb_wr_en, busy;
  logic [16:0] req_vpn, resp_ppn, pb_wr_vpn, pb_wr_ppn;
  int unsigned n_mem;

  dp_prefetch_logic dut (.clk, .rst_n, .trig, .trig_vpn, .pf_abort,
    .req_valid, .req_ready, .req_vpn, .resp_valid, .resp_ok, .resp_ppn,
    .pb_wr_en, .pb_wr_vpn, .pb_wr_ppn, .busy);

  page_table_model #(.LATENCY(LAT)) u_mem (.clk, .rst_n, .task_id (9),
    .req_valid, .req_ready, .req_vpn, .resp_valid, .resp_ok, .resp_ppn, .n_req (n_mem));

  logic [16:0] reqs[$], wrs[$];
  always @(posedge clk) if (rst_n) begin
    if (req_valid && req_ready) reqs.push_back(req_vpn);
    if (pb_wr_en) begin
      wrs.push_back(pb_wr_vpn);
      checks++;
      if (pb_wr_ppn != tb_pt_pkg::pt_ppn(9, pb_wr_vpn)) begin
        failures++; $display("FAIL wrong PPN for %h", pb_wr_vpn);
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  // ---- reference model ----
  bit     m_rv [ROWS];
  longint m_tag [ROWS];
  longint m_slot [ROWS][$];
  bit     m_hp = 0, m_hd = 0;
  longint m_prev = 0, m_pd = 0;
  int     n_pred = 0;

  function automatic int rowof(input longint dd); return int'(dd & 63); endfunction
  function automatic longint tagof(input longint dd); return dd >>> 6; endfunction

  function automatic void m_clear();
    for (int r = 0; r < ROWS; r++) begin m_rv[r] = 0; m_slot[r].delete(); end
    m_hp = 0; m_hd = 0;
  endfunction

  // Returns the predicted VPNs for a trigger at v and updates the model.
  function automatic void m_trigger(input longint v, ref longint pred[$]);
    longint dd, s;
    int r, pr;
    pred.delete();
    dd = v - m_prev;
    if (m_hp) begin
      r = rowof(dd);
      if (m_rv[r] && m_tag[r] == tagof(dd))
        foreach (m_slot[r][i]) begin
          s = v + m_slot[r][i];
          if (m_slot[r][i] != 0 && s >= 0 && s < (1 << 17)) pred.push_back(s);
        end
    end
    if (m_hd) begin
      pr = rowof(m_pd);
      if (!m_rv[pr] || m_tag[pr] != tagof(m_pd)) begin
        m_rv[pr] = 1; m_tag[pr] = tagof(m_pd); m_slot[pr].delete(); m_slot[pr].push_back(dd);
      end else begin
        foreach (m_slot[pr][i]) if (m_slot[pr][i] == dd) begin m_slot[pr].delete(i); break; end
        m_slot[pr].push_front(dd);
        if (m_slot[pr].size() > SLOTS) void'(m_slot[pr].pop_back());
      end
    end
    if (m_hp) begin m_pd = dd; m_hd = 1; end
    m_prev = v; m_hp = 1;
  endfunction

  task automatic fire_and_check(input longint v);
    longint pred[$];
    int n = 0;
    reqs.delete();
    m_trigger(v, pred);
    @(negedge clk); trig = 1; trig_vpn = 17'(v);
    @(negedge clk); trig = 0;
    while (busy && n < 200) begin @(negedge clk); n++; end
    check(reqs.size() == pred.size(), $sformatf("number of predictions at %0d: %0d vs %0d", v, reqs.size(), pred.size()));
    foreach (pred[i]) if (i < reqs.size()) check(reqs[i] == 17'(pred[i]), "predicted VPN");
    n_pred += pred.size();
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    longint v;
    static int strides [4] = '{1, 5, -3, 70};
    m_clear();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // constant stride: from the fourth trigger on, v+3 is predicted
    v = 1000;
    for (int k = 0; k < 8; k++) begin fire_and_check(v); v += 3; end
    check(n_pred >= 4, "constant stride learned");
    // alternating strides 1, 5
    for (int k = 0; k < 12; k++) begin fire_and_check(v); v += ((k % 2) != 0) ? 5 : 1; end
    // random walk over four strides (two-slot rows get full)
    for (int k = 0; k < 400; k++) begin
      fire_and_check(v);
      v += longint'(strides[$urandom_range(0, 3)]);
      if (v < 100 || v > 60000) v = 5000;
    end
    // far jumps: distances that share a row index but not a tag
    for (int k = 0; k < 100; k++) begin
      fire_and_check(v);
      v += ($urandom_range(0, 1) != 0) ? longint'(64 * $urandom_range(1, 4)) : 3;
      if (v > 60000) v = 5000;
    end
    check(wrs.size() == n_pred, "every predicted present page written");
    $display("predictions=%0d", n_pred);

    // abort: table cleared, response in flight dropped
    v = 20000;
    for (int k = 0; k < 5; k++) begin fire_and_check(v); v += 2; end
    reqs.delete(); wrs.delete();
    @(negedge clk); trig = 1; trig_vpn = 17'(v);
    @(negedge clk); trig = 0;
    @(negedge clk); @(negedge clk);
    check(reqs.size() == 1, "prediction in flight before the abort");
    pf_abort = 1; @(negedge clk); pf_abort = 0;
    repeat (10) @(negedge clk);
    check(wrs.size() == 0 && !busy, "abort drops the response in flight");
    m_clear();
    v += 2;
    fire_and_check(v); v += 2;
    fire_and_check(v); v += 2;
    check(reqs.size() == 0, "nothing predicted right after the abort: table relearns");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
