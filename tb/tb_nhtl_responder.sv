// tb_nhtl_responder: NHTL responder (send side).  Queues stand in for the
// NOTI-FIFO, RRA-response FIFO, packet-information FIFO and payload FIFO;
// a simple model stands in for the two ring-buffer controllers (address,
// acknowledge after a random delay, address advance, almost-full).  The
// network port applies random full and stop.  Sent packets are parsed from
// the 128-bit beats and compared per kind with the expected completion
// notifications, GET_BYTE_RSP responses, payload notifications and PUT
// payload packets (destination, header fields, ring-buffer address and
// words).  Also checks that nothing is sent before the host is configured
// (with the error event), that no trace packet starts while the trace ring
// buffer is almost full, and that every increment carries the packet size.
module tb_nhtl_responder;
  import nhtl_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] my_node;
  nhtl_cfg_t cfg;
  logic cfg_complete;
  noti_req_t noti_data; logic noti_empty, noti_pop;
  rra_rsp_t rsp_data;   logic rsp_empty, rsp_pop;
  pinfo_t pi_data;      logic pi_empty, pi_pop;
  data_entry_t dt_data; logic dt_empty, dt_pop;
  logic [63:0] t_addr, h_addr;
  logic t_addr_valid, t_afull, t_inc_valid, t_inc_ack;
  logic h_addr_valid, h_afull, h_inc_valid, h_inc_ack;
  logic [LEVEL_W-1:0] inc_qw;
  logic [127:0] np_tx_data; logic np_tx_sop; logic [1:0] np_tx_eop;
  logic np_tx_valid, np_tx_full, np_tx_stop, err_undef_host;
  int checks = 0, failures = 0;

  nhtl_responder dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [15:0] HOST = 16'h0042;
  localparam logic [63:0] TBASE = 64'h0000_1000_0000_0000, HBASE = 64'h0000_2000_0000_0000;

  noti_req_t   noti_q[$];
  rra_rsp_t    rsp_q[$];
  pinfo_t      pi_q[$];
  data_entry_t dt_q[$];
  assign noti_empty = noti_q.size() == 0; assign noti_data = noti_empty ? '0 : noti_q[0];
  assign rsp_empty  = rsp_q.size() == 0;  assign rsp_data  = rsp_empty  ? '0 : rsp_q[0];
  assign pi_empty   = pi_q.size() == 0;   assign pi_data   = pi_empty   ? '0 : pi_q[0];
  assign dt_empty   = dt_q.size() == 0;   assign dt_data   = dt_empty   ? '0 : dt_q[0];

  // expected packets per kind: {sop, desc} and cells
  typedef logic [63:0] cq_t[$];
  logic [127:0] e_hdr[4][$];
  cq_t          e_cells[4][$];
  int n_pkts[4], n_drop = 0, n_full = 0, n_stop = 0, n_afull_wait = 0, n_inc = 0;

  // ring-buffer models
  logic [63:0] t_next, h_next;
  int t_dly, h_dly;
  bit p_noti, p_rsp, p_pi, p_dt;
  bit afull_phase = 0;
  always @(negedge clk) if (rst_n) begin
    if (p_noti) void'(noti_q.pop_front());
    if (p_rsp)  void'(rsp_q.pop_front());
    if (p_pi)   void'(pi_q.pop_front());
    if (p_dt)   void'(dt_q.pop_front());
    p_noti = 0; p_rsp = 0; p_pi = 0; p_dt = 0;
    np_tx_full = ($urandom % 4) == 0;
    np_tx_stop = ($urandom % 8) == 0;
    t_afull = afull_phase && ($urandom % 2);
    if (np_tx_full) n_full++;
    if (np_tx_stop) n_stop++;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_addr <= TBASE; h_addr <= HBASE; t_addr_valid <= 1; h_addr_valid <= 1;
      t_inc_ack <= 0; h_inc_ack <= 0; t_dly <= 0; h_dly <= 0;
    end else begin
      t_inc_ack <= 0; h_inc_ack <= 0;
      if (t_inc_valid && !t_inc_ack) begin
        t_addr_valid <= 0;
        if (t_dly == 3) begin t_inc_ack <= 1; t_dly <= 0; t_addr <= t_addr + 64'(inc_qw) * 8; end
        else t_dly <= t_dly + 1;
      end else t_addr_valid <= 1;
      if (h_inc_valid && !h_inc_ack) begin
        h_addr_valid <= 0;
        if (h_dly == 2) begin h_inc_ack <= 1; h_dly <= 0; h_addr <= h_addr + 64'(inc_qw) * 8; end
        else h_dly <= h_dly + 1;
      end else h_addr_valid <= 1;
    end
  end

  logic [127:0] cur_hdr;
  logic [63:0]  cur_cells[$];
  bit           in_pkt = 0;
  always @(posedge clk) if (rst_n) begin
    if (noti_pop) p_noti = 1;
    if (rsp_pop)  p_rsp = 1;
    if (pi_pop)   p_pi = 1;
    if (dt_pop)   p_dt = 1;
    if (err_undef_host) n_drop++;
    if (t_inc_valid && t_inc_ack) n_inc++;
    if (pi_pop && !pi_data.noti_pkt && dt_data.ptype == PT_TRACE && t_afull) begin
      failures++; $display("trace packet started while almost full");
    end
    if (afull_phase && t_afull && !pi_empty && !pi_data.noti_pkt && dt_data.ptype == PT_TRACE)
      n_afull_wait++;
    if (np_tx_valid && !np_tx_full) begin
      if (np_tx_sop) begin
        checks++;
        if (in_pkt) begin failures++; $display("sop inside a packet"); end
        cur_hdr = np_tx_data; cur_cells.delete(); in_pkt = 1;
      end else begin
        cur_cells.push_back(np_tx_data[63:0]);
        if (np_tx_eop != 2'b01) cur_cells.push_back(np_tx_data[127:64]);
        if (np_tx_eop != 2'b00) begin
          int k;
          desc_t d; sop_t s;
          s = sop_t'(cur_hdr[63:0]); d = desc_t'(cur_hdr[127:64]);
          in_pkt = 0;
          k = (d.cmd == CMD_GET_BYTE_RSP) ? 1 : (d.cmd == CMD_PUT_QW) ? 3 :
              (s.dest_node == HOST) ? 2 : 0;
          n_pkts[k]++;
          checks++;
          if (e_hdr[k].size() == 0) begin failures++; $display("unexpected packet kind %0d", k); end
          else begin
            if (cur_hdr !== e_hdr[k][0] || cur_cells != e_cells[k][0]) begin
              failures++;
              $display("kind %0d packet: hdr %h exp %h, %0d cells exp %0d (first %h exp %h)", k,
                       cur_hdr, e_hdr[k][0], cur_cells.size(), e_cells[k][0].size(),
                       cur_cells[0], e_cells[k][0][0]);
            end
            void'(e_hdr[k].pop_front()); void'(e_cells[k].pop_front());
          end
        end
      end
    end
  end

  function automatic logic [127:0] hdr(input logic [15:0] dn, input logic [9:0] dv,
                                       input logic [15:0] pdid, input logic [3:0] cmd,
                                       input logic [5:0] mode, input logic [1:0] noti,
                                       input logic [9:0] tspec);
    sop_t s; desc_t d;
    s = '0; s.cell_type = SOP_TYPE_RMA; s.tu = TU_COMPLETER; s.dest_node = dn; s.dest_vpid = dv;
    d = '0; d.src_node = 16'h0001; d.pdid = pdid; d.cmd = cmd; d.mode = mode; d.noti = noti;
    d.tspec = tspec;
    return {64'(d), 64'(s)};
  endfunction

  logic [63:0] t_exp, h_exp;
  int rra_n = 0;
  task automatic add_data(input logic [15:0] t, input int n, input bit nbit, input bit expect_out);
    pinfo_t p;
    cq_t c;
    p = '0; p.noti_bit = nbit; p.count = 29'(n);
    pi_q.push_back(p);
    if (t == PT_TRACE) begin c.push_back(t_exp); if (expect_out) t_exp += 64'(n) * 8; end
    else if (t == PT_HICANN_CFG) begin c.push_back(h_exp); if (expect_out) h_exp += 64'(n) * 8; end
    else c.push_back(cfg.fpga_cfg_addr);
    for (int i = 0; i < n; i += 2) begin
      data_entry_t e;
      e.ptype = t; e.lsw = {$urandom, $urandom}; e.msw = {$urandom, $urandom};
      e.eop = (i + 1 == n) ? 2'b01 : (i + 2 == n) ? 2'b10 : 2'b00;
      c.push_back(e.lsw); if (i + 1 < n) c.push_back(e.msw);
      dt_q.push_back(e);
    end
    if (expect_out) begin
      e_hdr[3].push_back(hdr(HOST, cfg.host_vpid, cfg.host_pdid, CMD_PUT_QW, 6'b000100, {nbit, 1'b0},
                             {1'b0, 6'(n - 1), 3'b111}));
      e_cells[3].push_back(c);
    end
  endtask

  task automatic add_pnoti(input logic [15:0] t, input logic [28:0] cnt, input bit expect_out);
    pinfo_t p;
    cq_t c;
    p = '0; p.noti_pkt = 1; p.noti_type = t; p.count = cnt;
    pi_q.push_back(p);
    if (expect_out) begin
      c.push_back({t, (t == PT_TRACE) ? {cfg.trace_addr_acks, cfg.trace_space_acks}
                                      : {cfg.hicann_addr_acks, cfg.hicann_space_acks}, 3'b0, cnt});
      e_hdr[2].push_back(hdr(HOST, cfg.host_vpid, cfg.host_pdid, CMD_PUT_NOTI, 6'b000100, 2'b10, 10'd0));
      e_cells[2].push_back(c);
    end
  endtask

  initial begin
    logic [15:0] types[5];
    types = '{PT_TRACE, PT_HICANN_CFG, PT_FPGA_CFG, PT_PLAYBACK, PT_JTAG};
    my_node = 16'h0001;
    cfg = '0; cfg.host_node = HOST; cfg.host_vpid = 10'h2A; cfg.host_pdid = 16'h7777; cfg.host_te = 1;
    cfg.fpga_cfg_addr = 64'h0000_3000_0000_0000;
    cfg.trace_addr_acks = 8'd3; cfg.trace_space_acks = 8'd2;
    cfg.hicann_addr_acks = 8'd5; cfg.hicann_space_acks = 8'd4;
    cfg_complete = 0; np_tx_full = 0; np_tx_stop = 0; t_afull = 0; h_afull = 0;
    t_exp = TBASE; h_exp = HBASE;
    repeat (3) @(posedge clk); rst_n = 1;
    // host not configured: packets are dropped
    @(negedge clk); #1;
    add_data(PT_TRACE, 5, 0, 0); add_data(PT_PLAYBACK, 1, 0, 0); add_pnoti(PT_TRACE, 29'd7, 0);
    while (pi_q.size() > 0 || dt_q.size() > 0) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++;
    if (n_drop != 3 || in_pkt) begin failures++; $display("drops %0d exp 3", n_drop); end
    cfg_complete = 1;
    for (int i = 0; i < 500; i++) begin
      int k;
      k = $urandom % 8;
      @(negedge clk); #1;
      afull_phase = (i >= 200 && i < 260);
      if (k == 0) begin
        noti_req_t r;
        r.dest_node = 16'h0100 + 16'($urandom % 256); r.dest_vpid = 8'($urandom); r.pdid = 16'($urandom);
        noti_q.push_back(r);
        e_hdr[0].push_back(hdr(r.dest_node, 10'(r.dest_vpid), r.pdid, CMD_PUT_NOTI, 6'h0, 2'b10, 10'd0));
        e_cells[0].push_back('{64'h0});
      end else if (k == 1) begin
        rra_rsp_t r;
        r.rdata = {$urandom, $urandom}; r.resp_addr = {$urandom, $urandom};
        r.dest_node = 16'h0100 + 16'($urandom % 256); r.dest_vpid = 8'($urandom); r.pdid = 16'($urandom);
        r.te = 1'($urandom); r.noti1 = 1'($urandom);
        rsp_q.push_back(r);
        e_hdr[1].push_back(hdr(r.dest_node, 10'(r.dest_vpid), r.pdid, CMD_GET_BYTE_RSP,
                               {3'b0, r.te, 1'b0, 1'b1}, {r.noti1, 1'b0}, 10'd7));
        e_cells[1].push_back('{r.resp_addr, r.rdata});
      end else if (k == 2) begin
        add_pnoti(($urandom % 2) ? PT_TRACE : PT_HICANN_CFG, 29'($urandom % 100000), 1);
      end else begin
        logic [15:0] t;
        t = types[$urandom % 5];
        add_data(t, (t == PT_TRACE) ? 1 + $urandom % 62 : 1, t == PT_FPGA_CFG, 1);
      end
      while (pi_q.size() > 20) @(negedge clk);
    end
    while (pi_q.size() > 0 || dt_q.size() > 0 || noti_q.size() > 0 || rsp_q.size() > 0 || in_pkt) @(negedge clk);
    repeat (20) @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (e_hdr[k].size() != 0) begin failures++; $display("kind %0d: %0d packets missing", k, e_hdr[k].size()); end
    end
    checks++;
    if (n_drop != 3) begin failures++; $display("undefined-host events %0d", n_drop); end
    $display("packets: noti=%0d rra=%0d pnoti=%0d data=%0d  full=%0d stop=%0d afull_wait=%0d inc=%0d",
             n_pkts[0], n_pkts[1], n_pkts[2], n_pkts[3], n_full, n_stop, n_afull_wait, n_inc);
    checks++;
    if (n_afull_wait == 0) begin failures++; $display("almost-full never stalled a packet"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
