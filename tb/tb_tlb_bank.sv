// tb_tlb_bank: random test of one 32-entry CAM bank against a reference
// model with per-entry valid, VPN, PPN and last-use time. Each cycle does a
// lookup (with or without touch), often a write, and rarely a flush; the
// VPN space (48 pages) is larger than the bank so replacement happens. The
// model predicts hit/PPN for every lookup, and the victim of a write (same
// VPN, else first invalid, else least recently used), which is checked by
// looking the evicted page up afterwards. A second, 8-entry bank gets the
// same stimulus and its own model, so the ENTRIES parameter is tested too.
module tb_tlb_bank;
  localparam int N = 32;
  localparam int NB = 2;
  localparam int SIZE [NB] = '{32, 8};
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [16:0] lk_vpn, wr_vpn;
  logic [16:0] wr_ppn;
  logic [16:0] lk_ppn [NB];
  logic        lk_hit [NB];
  logic        touch, wr_en, flush;

  tlb_bank dut (.clk, .rst_n, .lk_vpn, .lk_hit(lk_hit[0]), .lk_ppn(lk_ppn[0]),
                .touch, .wr_en, .wr_vpn, .wr_ppn, .flush);
  tlb_bank #(.ENTRIES(8)) dut_small (.clk, .rst_n, .lk_vpn, .lk_hit(lk_hit[1]),
                .lk_ppn(lk_ppn[1]), .touch, .wr_en, .wr_vpn, .wr_ppn, .flush);

  bit          m_valid [NB][N];
  logic [16:0] m_vpn [NB][N], m_ppn [NB][N];
  longint      m_ts [NB][N];
  longint      now = 1;
  int          n_evict [NB] = '{0, 0};
  int          n_flush = 0, n_hit = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  function automatic int m_find(input int k, input logic [16:0] v);
    for (int i = 0; i < SIZE[k]; i++) if (m_valid[k][i] && m_vpn[k][i] == v) return i;
    return -1;
  endfunction

  function automatic int m_victim(input int k, input logic [16:0] v);
    int d, lru;
    d = m_find(k, v);
    if (d >= 0) return d;
    for (int i = 0; i < SIZE[k]; i++) if (!m_valid[k][i]) return i;
    lru = 0;
    for (int i = 1; i < SIZE[k]; i++) if (m_ts[k][i] < m_ts[k][lru]) lru = i;
    return lru;
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int h, vic;
    for (int k = 0; k < NB; k++)
      for (int i = 0; i < N; i++) begin m_valid[k][i] = 0; m_ts[k][i] = 0; end
    lk_vpn = '0; wr_vpn = '0; wr_ppn = '0; touch = 0; wr_en = 0; flush = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      lk_vpn = 17'($urandom_range(0, 47));
      touch  = 1'($urandom_range(0, 1));
      wr_en  = ($urandom_range(0, 2) == 0);
      wr_vpn = 17'($urandom_range(0, 47));
      wr_ppn = 17'($urandom);
      flush  = ($urandom_range(0, 999) == 0);
      #1;
      if (flush) n_flush++;
      for (int k = 0; k < NB; k++) begin
        h = m_find(k, lk_vpn);
        check(lk_hit[k] == (h >= 0), $sformatf("lookup hit, %0d entries", SIZE[k]));
        if (h >= 0) begin
          check(lk_ppn[k] == m_ppn[k][h], $sformatf("lookup ppn, %0d entries", SIZE[k]));
          n_hit++;
        end
        // model update, same order as the bank: flush, write, LRU
        vic = m_victim(k, wr_vpn);
        if (flush)
          for (int i = 0; i < N; i++) m_valid[k][i] = 0;
        if (wr_en) begin
          if (m_valid[k][vic] && m_vpn[k][vic] != wr_vpn && !flush) n_evict[k]++;
          m_valid[k][vic] = 1; m_vpn[k][vic] = wr_vpn; m_ppn[k][vic] = wr_ppn;
          m_ts[k][vic] = now;
        end else if (touch && h >= 0) begin
          m_ts[k][h] = now;
        end
      end
      now++;
    end
    $display("hits=%0d evictions=%0d/%0d flushes=%0d", n_hit, n_evict[0], n_evict[1],
             n_flush);
    check(n_evict[0] > 100 && n_evict[1] > 100, "LRU replacement exercised");
    check(n_flush > 0, "flush exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
