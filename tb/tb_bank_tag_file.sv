// tb_bank_tag_file: random test of the 32 bank-tag registers against a
// reference model. Each step offers a task tag from a pool of 48 tasks
// (more than the banks); the testbench acts like the miss handler:
// re-activate the matching bank, or take the victim and write the tag.
// Context switches and clear-TLB pulses are mixed in. Checked each cycle:
// current bank, task-tag match, victim (first invalid, else least recently
// activated) and victim_was_valid.
module tb_bank_tag_file;
  localparam int NB = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NB-1:0] cur_onehot;
  logic          cur_valid, match_hit, victim_was_valid;
  logic [4:0]    cur_idx, match_idx, victim_idx, act_idx;
  logic [16:0]   match_tag, act_tag;
  logic          activate, act_set_tag, ctx_switch, clear_tlb;

  bank_tag_file dut (.clk, .rst_n, .cur_onehot, .cur_valid, .cur_idx,
                     .match_tag, .match_hit, .match_idx, .victim_idx,
                     .victim_was_valid, .activate, .act_idx, .act_set_tag,
                     .act_tag, .ctx_switch, .clear_tlb);

  bit          m_valid [NB], m_cur [NB];
  logic [16:0] m_tag [NB];
  longint      m_ts [NB];
  longint      now = 1;
  int n_match = 0, n_alloc = 0, n_evict = 0, n_ctx = 0, n_clear = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int mh, vic, cur;
    bit inv;
    for (int b = 0; b < NB; b++) begin m_valid[b] = 0; m_cur[b] = 0; m_ts[b] = 0; end
    activate = 0; act_idx = '0; act_set_tag = 0; act_tag = '0;
    ctx_switch = 0; clear_tlb = 0; match_tag = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 20000; it++) begin
      @(negedge clk);
      activate = 0; act_set_tag = 0; ctx_switch = 0; clear_tlb = 0;
      match_tag = 17'(1000 + $urandom_range(0, 47));
      #1;
      // reference
      cur = -1; mh = -1; inv = 0; vic = 0;
      for (int b = 0; b < NB; b++) begin
        if (m_cur[b]) cur = b;
        if (mh < 0 && m_valid[b] && m_tag[b] == match_tag) mh = b;
      end
      for (int b = 0; b < NB; b++) if (!inv && !m_valid[b]) begin inv = 1; vic = b; end
      if (!inv) for (int b = 1; b < NB; b++) if (m_ts[b] < m_ts[vic]) vic = b;
      check(cur_valid == (cur >= 0), "current bit present");
      if (cur >= 0) check(cur_idx == 5'(cur) && cur_onehot == (NB'(1) << cur), "current bank");
      check(match_hit == (mh >= 0), "task-tag match");
      if (mh >= 0) check(match_idx == 5'(mh), "matching bank");
      check(victim_idx == 5'(vic), "victim bank");
      check(victim_was_valid == !inv, "victim valid flag");
      // stimulus, like the miss handler
      case ($urandom_range(0, 599) < 150 ? ($urandom_range(0, 599) == 0 ? 0 : 1) : 2)
        0: begin clear_tlb = 1; n_clear++;
             for (int b = 0; b < NB; b++) begin m_valid[b] = 0; m_cur[b] = 0; end end
        1: begin ctx_switch = 1; n_ctx++;
             for (int b = 0; b < NB; b++) m_cur[b] = 0; end
        default: if (cur < 0) begin
          activate = 1;
          if (mh >= 0) begin act_idx = 5'(mh); n_match++; end
          else begin
            act_idx = 5'(vic); act_set_tag = 1; act_tag = match_tag; n_alloc++;
            if (!inv) n_evict++;
            m_tag[vic] = match_tag;
          end
          for (int b = 0; b < NB; b++) m_cur[b] = 0;
          m_cur[act_idx] = 1; m_valid[act_idx] = 1; m_ts[act_idx] = now++;
        end
      endcase
    end
    $display("match=%0d alloc=%0d evict=%0d ctx=%0d clear=%0d", n_match, n_alloc, n_evict, n_ctx, n_clear);
    check(n_match > 0 && n_alloc > 0 && n_evict > 0 && n_ctx > 0 && n_clear > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
