// tb_novel_tlb_dp: end-to-end test of the banked TLB built with distance
// prefetching (PF_MODE = PF_DP: 64-row, 2-slot distance table, 16-entry
// prefetch buffers), other sizes at their defaults.
//
// Two tasks alternate in time slices. Each slice fetches its code page, then
// walks a data array with a constant stride of 2 pages, one new page per
// access, with idle time between accesses. The distance table is cleared at
// every context switch, so in each slice the first four data pages must
// stall (the prefetcher is learning: it needs two distances, and a table
// row, before it predicts), and every later page must be found in the
// prefetch buffer with no stall. All translations are checked against the
// page table.
module tb_novel_tlb_dp;
  import tlb_pkg::*;
  import tb_pt_pkg::pt_ppn;

  localparam int unsigned LAT = 4;
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

  novel_tlb #(.PF_MODE(PF_DP)) dut (
    .clk, .rst_n,
    .i_req, .i_vaddr, .i_hit, .i_paddr, .i_fault,
    .d_req, .d_vaddr, .d_hit, .d_paddr, .d_fault,
    .ctx_switch, .clear_tlb, .pid ('0),
    .mem_req_valid, .mem_req_ready, .mem_req_vpn,
    .mem_resp_valid, .mem_resp_ok, .mem_resp_ppn,
    .events
  );

  int n_dpb = 0, n_learn = 0, n_pred = 0;
  always @(posedge clk) if (rst_n) n_dpb += int'(events.d_pb_hit);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t task=%0d: %s", $time, cur_task, what);
    end
  endtask

  task automatic access(input bit is_d, input logic [16:0] vpn, output int lat);
    logic [31:0] va;
    int cyc = 0;
    va = {vpn, 15'($urandom)};
    @(negedge clk);
    if (is_d) begin d_req = 1; d_vaddr = va; end
    else      begin i_req = 1; i_vaddr = va; end
    lat = -1;
    while (cyc < 2000) begin
      #1;
      if (is_d && d_hit) begin
        check(d_paddr == {pt_ppn(cur_task, vpn), va[14:0]}, "DTLB translation");
        lat = cyc; break;
      end
      if (!is_d && i_hit) begin
        check(i_paddr == {pt_ppn(cur_task, vpn), va[14:0]}, "ITLB translation");
        lat = cyc; break;
      end
      @(negedge clk);
      cyc++;
    end
    check(lat >= 0, "lookup answered");
    @(negedge clk);
    i_req = 0; d_req = 0;
  endtask

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int lat;
    logic [16:0] v;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 8; s++) begin
      if (s > 0) begin
        @(negedge clk); ctx_switch = 1; @(negedge clk); ctx_switch = 0;
      end
      cur_task = 1 + (s % 2);
      access(1'b0, 17'h040, lat);
      v = 17'h300 + 17'(s * 64);
      for (int k = 0; k < 12; k++) begin
        access(1'b1, v, lat);
        if (k < 4) begin
          check(lat > 0, "no prediction while the distance table learns");
          n_learn++;
        end else begin
          check(lat == 0, "strided page predicted into the prefetch buffer");
          n_pred++;
        end
        v += 17'd2;
        repeat (30) @(negedge clk);
      end
    end
    $display("dpb=%0d learn=%0d predicted=%0d mem=%0d", n_dpb, n_learn, n_pred, n_mem);
    check(n_dpb >= n_pred && n_pred > 0, "DTLB prefetch-buffer hits happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
