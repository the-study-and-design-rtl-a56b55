// tb_prefetch_buffer: random test of the 17-entry prefetch buffer against a
// FIFO reference model (write of a present VPN updates in place, otherwise
// the oldest slot is replaced; flush empties the buffer and wins over a
// write in the same cycle). A 16-entry copy, the size used with distance
// prefetching, gets the same stimulus and its own model.
module tb_prefetch_buffer;
  localparam int N = 17;
  localparam int NB = 2;
  localparam int SIZE [NB] = '{17, 16};
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [16:0] lk_vpn, wr_vpn, wr_ppn;
  logic [16:0] lk_ppn [NB];
  logic        lk_hit [NB];
  logic        wr_en, flush;

  prefetch_buffer dut (.clk, .rst_n, .lk_vpn, .lk_hit(lk_hit[0]), .lk_ppn(lk_ppn[0]),
                       .wr_en, .wr_vpn, .wr_ppn, .flush);
  prefetch_buffer #(.ENTRIES(16)) dut_16 (.clk, .rst_n, .lk_vpn, .lk_hit(lk_hit[1]),
                       .lk_ppn(lk_ppn[1]), .wr_en, .wr_vpn, .wr_ppn, .flush);

  bit          m_valid [NB][N];
  logic [16:0] m_vpn [NB][N], m_ppn [NB][N];
  int          m_ptr [NB] = '{0, 0};
  int          n_hit = 0, n_repl = 0, n_upd = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  function automatic int m_find(input int k, input logic [16:0] v);
    for (int i = 0; i < SIZE[k]; i++) if (m_valid[k][i] && m_vpn[k][i] == v) return i;
    return -1;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int h, d;
    for (int k = 0; k < NB; k++) for (int i = 0; i < N; i++) m_valid[k][i] = 0;
    lk_vpn = '0; wr_vpn = '0; wr_ppn = '0; wr_en = 0; flush = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 10000; cyc++) begin
      @(negedge clk);
      lk_vpn = 17'($urandom_range(100, 140));
      wr_en  = 1'($urandom_range(0, 1));
      wr_vpn = 17'($urandom_range(100, 140));
      wr_ppn = 17'($urandom);
      flush  = ($urandom_range(0, 199) == 0);
      #1;
      for (int k = 0; k < NB; k++) begin
        h = m_find(k, lk_vpn);
        check(lk_hit[k] == (h >= 0), $sformatf("lookup hit, %0d entries", SIZE[k]));
        if (h >= 0) begin
          check(lk_ppn[k] == m_ppn[k][h], $sformatf("lookup ppn, %0d entries", SIZE[k]));
          n_hit++;
        end
        if (flush) begin
          for (int i = 0; i < N; i++) m_valid[k][i] = 0;
          m_ptr[k] = 0;
        end else if (wr_en) begin
          d = m_find(k, wr_vpn);
          if (d >= 0) begin m_ppn[k][d] = wr_ppn; n_upd++; end
          else begin
            if (m_valid[k][m_ptr[k]]) n_repl++;
            m_valid[k][m_ptr[k]] = 1; m_vpn[k][m_ptr[k]] = wr_vpn;
            m_ppn[k][m_ptr[k]] = wr_ppn;
            m_ptr[k] = (m_ptr[k] + 1) % SIZE[k];
          end
        end
      end
    end
    check(n_repl > 100 && n_upd > 100, "replacement and in-place update exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
