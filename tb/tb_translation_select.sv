// tb_translation_select: random test of the bank/prefetch-buffer selection
// and physical-address forming: only a bank that is both current and hit is
// selected, the prefetch buffer answers only when the current bank misses
// and some bank is current, and paddr = {PPN, offset}. A second instance
// with 8 banks, a 25-bit PPN and a 12-bit offset gets its own random run.
module tb_translation_select;
  localparam int NB = 32;
  int checks = 0, failures = 0;

  logic [NB-1:0] bank_hit, bank_cur, bank_sel;
  logic [16:0]   bank_ppn [NB];
  logic          pb_hit, cur_bank_hit, pb_sel, hit;
  logic [16:0]   pb_ppn, ppn;
  logic [14:0]   offset;
  logic [31:0]   paddr;

  translation_select dut (.bank_hit, .bank_cur, .bank_ppn, .pb_hit, .pb_ppn,
                          .offset, .bank_sel, .cur_bank_hit, .pb_sel, .hit,
                          .ppn, .paddr);

  localparam int NS = 8;
  logic [NS-1:0] s_bank_hit, s_bank_cur, s_bank_sel;
  logic [24:0]   s_bank_ppn [NS];
  logic          s_pb_hit, s_cur_bank_hit, s_pb_sel, s_hit;
  logic [24:0]   s_pb_ppn, s_ppn;
  logic [11:0]   s_offset;
  logic [36:0]   s_paddr;

  translation_select #(.NBANKS(NS), .PPN_W(25), .OFFSET_W(12)) dut_small (
    .bank_hit (s_bank_hit), .bank_cur (s_bank_cur), .bank_ppn (s_bank_ppn),
    .pb_hit (s_pb_hit), .pb_ppn (s_pb_ppn), .offset (s_offset),
    .bank_sel (s_bank_sel), .cur_bank_hit (s_cur_bank_hit), .pb_sel (s_pb_sel),
    .hit (s_hit), .ppn (s_ppn), .paddr (s_paddr));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    static int cur, n_bank = 0, n_pb = 0, n_none = 0, n_nocur = 0;
    logic [16:0] exp_ppn;
    bit exp_hit;
    for (int it = 0; it < 5000; it++) begin
      cur = $urandom_range(0, NB);            // NB means no current bank
      bank_cur = '0;
      if (cur < NB) bank_cur[cur] = 1'b1;
      bank_hit = $urandom;
      // a bank hit in the current bank about half of the time
      if (cur < NB) bank_hit[cur] = 1'($urandom_range(0, 1));
      for (int b = 0; b < NB; b++) bank_ppn[b] = 17'($urandom);
      pb_hit = 1'($urandom_range(0, 1));
      pb_ppn = 17'($urandom);
      offset = 15'($urandom);
      #1;
      exp_hit = 1'b0; exp_ppn = '0;
      if (cur < NB && bank_hit[cur]) begin exp_hit = 1; exp_ppn = bank_ppn[cur]; n_bank++; end
      else if (cur < NB && pb_hit) begin exp_hit = 1; exp_ppn = pb_ppn; n_pb++; end
      else if (cur == NB) n_nocur++;
      else n_none++;
      check(hit == exp_hit, "hit");
      check(bank_sel == (bank_hit & bank_cur), "select = current AND hit");
      if (exp_hit) check(paddr == {exp_ppn, offset}, "physical address");
      check(pb_sel == (exp_hit && !(cur < NB && bank_hit[cur])), "prefetch-buffer select");
    end
    check(n_bank > 0 && n_pb > 0 && n_none > 0 && n_nocur > 0, "all selection cases exercised");
    for (int it = 0; it < 2000; it++) begin
      logic [24:0] e_ppn;
      bit e_hit;
      cur = $urandom_range(0, NS);
      s_bank_cur = '0;
      if (cur < NS) s_bank_cur[cur] = 1'b1;
      s_bank_hit = NS'($urandom);
      for (int b = 0; b < NS; b++) s_bank_ppn[b] = 25'($urandom);
      s_pb_hit = 1'($urandom_range(0, 1));
      s_pb_ppn = 25'($urandom);
      s_offset = 12'($urandom);
      #1;
      e_hit = 1'b0; e_ppn = '0;
      if (cur < NS && s_bank_hit[cur]) begin e_hit = 1; e_ppn = s_bank_ppn[cur]; end
      else if (cur < NS && s_pb_hit) begin e_hit = 1; e_ppn = s_pb_ppn; end
      check(s_hit == e_hit, "hit, 8 banks");
      check(s_bank_sel == (s_bank_hit & s_bank_cur), "select, 8 banks");
      if (e_hit) check(s_paddr == {e_ppn, s_offset} && s_ppn == e_ppn, "physical address, 8 banks");
      check(s_pb_sel == (e_hit && !(cur < NS && s_bank_hit[cur])), "prefetch-buffer select, 8 banks");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
