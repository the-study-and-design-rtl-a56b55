// page_table_model: behavioural model of the memory system that answers
// page-table requests (not synthesizable logic of the TLB; a stand-in for
// the processor's conventional page-table walk and main memory).
//
// Accepts one request at a time (req_ready high while idle, optionally
// withheld at random when STALL is set) and answers LATENCY cycles after
// acceptance with a one-cycle resp_valid, resp_ok = page present and the
// PPN of the page in the task given by task_id at acceptance time
// (tb_pt_pkg). Counts the requests it accepted.
module page_table_model #(
  parameter int unsigned LATENCY = 4,
  parameter bit          STALL   = 1'b0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  int unsigned                task_id,
  input  logic                       req_valid,
  output logic                       req_ready,
  input  logic [tb_pt_pkg::VPN_W-1:0] req_vpn,
  output logic                       resp_valid,
  output logic                       resp_ok,
  output logic [tb_pt_pkg::PPN_W-1:0] resp_ppn,
  output int unsigned                n_req
);
  logic        busy;
  int unsigned cnt;
  logic        gate;

  assign req_ready = !busy && gate;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      cnt        <= 0;
      resp_valid <= 1'b0;
      resp_ok    <= 1'b0;
      resp_ppn   <= '0;
      n_req      <= 0;
      gate       <= 1'b1;
    end else begin
      gate       <= STALL ? ($urandom_range(0, 3) != 0) : 1'b1;
      resp_valid <= 1'b0;
      if (!busy && req_valid && req_ready) begin
        busy     <= 1'b1;
        cnt      <= LATENCY - 1;
        n_req    <= n_req + 1;
        resp_ok  <= tb_pt_pkg::pt_present(req_vpn);
        resp_ppn <= tb_pt_pkg::pt_ppn(task_id, req_vpn);
      end else if (busy) begin
        if (cnt == 0) begin
          busy       <= 1'b0;
          resp_valid <= 1'b1;
        end else begin
          cnt <= cnt - 1;
        end
      end
    end
  end
endmodule
