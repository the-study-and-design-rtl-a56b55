// tb_pt_pkg: the page table used by the testbenches.
//
// Task t maps virtual page v to physical page {t[6:0], v[9:0] ^ 10'h2a5}:
// distinct tasks never share a physical page, so the PPN of a task's first
// code page works as a unique task tag. Pages with VPN >= 'h1f000 are not
// present (they return a fault).
package tb_pt_pkg;
  localparam int unsigned VPN_W = 17;
  localparam int unsigned PPN_W = 17;

  function automatic logic [PPN_W-1:0] pt_ppn(input int unsigned task_id,
                                              input logic [VPN_W-1:0] vpn);
    logic [6:0] t;
    t = 7'(task_id);
    return {t, vpn[9:0] ^ 10'h2a5};
  endfunction

  function automatic bit pt_present(input logic [VPN_W-1:0] vpn);
    return vpn < 17'h1f000;
  endfunction
endpackage
