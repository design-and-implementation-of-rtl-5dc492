// nhtl_tb_pkg: helpers shared by the NHTL testbenches.
//
// Builds EXTOLL packets as a list of 128-bit network-port beats: beat 0
// carries the SOP cell (low half) and the descriptor header (high half);
// the following beats carry the remaining cells two at a time, low half
// first; eop marks the half that holds the last cell.
package nhtl_tb_pkg;
  import nhtl_pkg::*;

  typedef struct packed {
    logic [127:0] data;
    logic         sop;
    logic [1:0]   eop;
  } beat_t;

  typedef beat_t       beats_t[$];
  typedef logic [63:0] cells_t[$];

  function automatic logic [63:0] mk_sop(input logic [15:0] dest, input logic [9:0] vpid);
    sop_t s;
    s = '0;
    s.cell_type = SOP_TYPE_RMA;
    s.dest_node = dest;
    s.dest_vpid = vpid;
    return 64'(s);
  endfunction

  function automatic logic [63:0] mk_desc(input logic [3:0] cmd, input logic [5:0] mode,
                                          input logic [1:0] noti, input logic [15:0] node,
                                          input logic [7:0] vpid, input logic [15:0] pdid,
                                          input logic [9:0] tspec);
    desc_t d;
    d = '0;
    d.cmd = cmd; d.mode = mode; d.noti = noti; d.src_node = node;
    d.src_vpid = vpid; d.pdid = pdid; d.tspec = tspec;
    return 64'(d);
  endfunction

  // cells after the header (address / notification cell, payload words)
  function automatic beats_t build(input logic [63:0] sop, input logic [63:0] desc,
                                   input cells_t cells);
    beats_t q;
    beat_t  b;
    int     n;
    n = cells.size();
    b.data = {desc, sop}; b.sop = 1'b1; b.eop = 2'b00;
    q.push_back(b);
    for (int i = 0; i < n; i += 2) begin
      b.sop = 1'b0;
      b.data[63:0]   = cells[i];
      b.data[127:64] = (i + 1 < n) ? cells[i+1] : 64'h0;
      b.eop = (i + 1 == n - 1) ? 2'b10 : (i == n - 1) ? 2'b01 : 2'b00;
      q.push_back(b);
    end
    return q;
  endfunction
endpackage
