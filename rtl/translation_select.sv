// translation_select: the selection multiplexer and physical-address former.
//
// Every bank looks the VPN up in parallel; a bank's select line is the AND
// of its current bit and its hit signal, so only the running task's bank can
// answer. If no current bank hits, the prefetch buffer's hit selects its
// PPN. The PPN chosen is joined with the page offset of the virtual address
// into the physical address. Purely combinational.
//
// The AND-of-current-and-hit select and the offset concatenation follow the
// published design; giving the current bank priority over the prefetch
// buffer, and ignoring a prefetch-buffer hit while no bank is current, are
// this design's choices.
module translation_select #(
  parameter int unsigned NBANKS   = tlb_pkg::NBANKS,
  parameter int unsigned PPN_W    = tlb_pkg::PPN_W,
  parameter int unsigned OFFSET_W = tlb_pkg::PAGE_OFFSET_W
) (
  input  logic [NBANKS-1:0]         bank_hit,
  input  logic [NBANKS-1:0]         bank_cur,
  input  logic [PPN_W-1:0]          bank_ppn [NBANKS],
  input  logic                      pb_hit,
  input  logic [PPN_W-1:0]          pb_ppn,
  input  logic [OFFSET_W-1:0]       offset,
  output logic [NBANKS-1:0]         bank_sel,
  output logic                      cur_bank_hit,
  output logic                      pb_sel,
  output logic                      hit,
  output logic [PPN_W-1:0]          ppn,
  output logic [PPN_W+OFFSET_W-1:0] paddr
);
  always_comb begin
    bank_sel     = bank_hit & bank_cur;
    cur_bank_hit = |bank_sel;
    pb_sel       = !cur_bank_hit && pb_hit && (|bank_cur);
    hit          = cur_bank_hit || pb_sel;
    ppn          = '0;
    for (int unsigned b = 0; b < NBANKS; b++) begin
      if (bank_sel[b]) ppn = ppn | bank_ppn[b];
    end
    if (pb_sel) ppn = pb_ppn;
    paddr = {ppn, offset};
  end

endmodule
