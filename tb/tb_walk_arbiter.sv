// tb_walk_arbiter: three requesters with random request timing share one
// memory port (page_table_model with random back-pressure). Checks: fixed
// priority (index 0 first) among requesters waiting together, one request
// outstanding, each response routed only to the requester that issued it
// and carrying that request's translation, and every request answered.
module tb_walk_arbiter;
  localparam int N = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] req_valid, req_ready, resp_valid;
  logic [16:0]  req_vpn [N];
  logic         mem_req_valid, mem_req_ready, mem_resp_valid, mem_resp_ok;
  logic [16:0]  mem_req_vpn, mem_resp_ppn;
  int unsigned  n_mem;

  walk_arbiter dut (.clk, .rst_n, .req_valid, .req_vpn, .req_ready, .resp_valid,
                    .mem_req_valid, .mem_req_ready, .mem_req_vpn, .mem_resp_valid);

  page_table_model #(.LATENCY(3), .STALL(1'b1)) u_mem (
    .clk, .rst_n, .task_id (7), .req_valid (mem_req_valid), .req_ready (mem_req_ready),
    .req_vpn (mem_req_vpn), .resp_valid (mem_resp_valid), .resp_ok (mem_resp_ok),
    .resp_ppn (mem_resp_ppn), .n_req (n_mem));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  // requester state: 0 idle, 1 requesting, 2 waiting for the response
  int          st [N];
  int          n_done [N];
  int          n_contend = 0;
  int          outstanding = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    #1;
    // priority: the granted requester is the lowest-numbered one requesting
    for (int i = 0; i < N; i++) if (req_ready[i]) begin
      for (int j = 0; j < i; j++) check(!req_valid[j], "fixed priority");
      check(req_valid[i] && mem_req_vpn == req_vpn[i], "granted request forwarded");
      check(outstanding == 0, "one request outstanding");
    end
    check($countones(req_ready) <= 1 && $countones(resp_valid) <= 1, "one grant, one response");
    if ($countones(req_valid) > 1) n_contend++;
    for (int i = 0; i < N; i++) if (resp_valid[i]) begin
      check(st[i] == 2, "response goes to the issuing requester");
      check(mem_resp_ppn == tb_pt_pkg::pt_ppn(7, req_vpn[i]), "response belongs to the request");
    end
  end

  for (genvar g = 0; g < N; g++) begin : g_req
    always @(posedge clk) if (rst_n) begin
      if (st[g] == 1 && req_ready[g]) begin st[g] <= 2; outstanding <= outstanding + 1; end
      else if (st[g] == 2 && resp_valid[g]) begin
        st[g] <= 0; n_done[g] <= n_done[g] + 1; outstanding <= outstanding - 1;
      end
      else if (st[g] == 0 && $urandom_range(0, 2) == 0) begin
        st[g] <= 1; req_vpn[g] <= 17'($urandom_range(0, 4000));
      end
    end
    assign req_valid[g] = (st[g] == 1);
  end

  initial begin : main
    for (int i = 0; i < N; i++) begin st[i] = 0; n_done[i] = 0; req_vpn[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (20000) @(posedge clk);
    $display("done: %0d %0d %0d contention cycles %0d mem %0d", n_done[0], n_done[1], n_done[2], n_contend, n_mem);
    for (int i = 0; i < N; i++) check(n_done[i] > 0, "every requester served");
    check(n_done[0] + n_done[1] + n_done[2] + outstanding == int'(n_mem), "responses match requests");
    check(n_contend > 0, "contention exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
