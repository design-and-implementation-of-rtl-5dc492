// tb_bss_extoll_fpga_top: end-to-end test of the communication-FPGA network
// interface (NHTL, top registerfile and JTAG master) at its default size.
//
// A host model on the EXTOLL side (210 MHz) talks RMA: it configures the NHTL
// through remote registerfile writes, reads registers back, sends payload to
// the core logic and acknowledges the notifications it receives by PUT
// notifications.  A core-logic model on the AL side (125 MHz) writes trace,
// HICANN configuration and FPGA configuration words and consumes the
// payload it is sent.  A behavioural TAP hangs on the JTAG pins.
//
// Checked: every payload word reaches the core logic in order with its type;
// every AL word reaches host memory in order, at the right ring-buffer
// address, and wraps at the end of each ring buffer; every notified count adds
// up to the words sent; RRA reads return the register contents; an unmapped
// RRA read returns 0 and counts an error; data written before configuration is
// dropped and counted; the performance and error counters agree with the
// traffic.  Each mechanism is counted and must happen at least once: network
// stall, stop, receive gaps, AL back-pressure, almost-full, wrap, completion
// notification, trace notifications by EOT, period and timeout, HICANN
// notifications by period and timeout, host acknowledges, RRA reads, writes
// and invalid address, undefined host, wrong payload type, JTAG scans.
`timescale 1ns/1ps
module tb_bss_extoll_fpga_top;
  import nhtl_pkg::*;
  import nhtl_tb_pkg::*;

  logic clk_ext = 0, clk_hmf = 0, rst_ext_n = 0, rst_hmf_n = 0;
  logic [15:0] my_node = 16'h0001;
  logic [127:0] np_rx_data, np_tx_data;
  logic np_rx_sop, np_rx_empty, np_rx_shiftout, np_tx_sop, np_tx_valid, np_tx_full, np_tx_stop;
  logic [1:0] np_rx_eop, np_tx_eop;
  logic [63:0] al_rd_data, al_wr_data;
  logic [15:0] al_rd_type, al_wr_type;
  logic al_rd_valid, al_rd_next, al_wr_valid, al_wr_next;
  logic jtag_tck, jtag_tms, jtag_tdi, jtag_tdo;
  logic trace_afull, hicann_afull;
  logic [3:0] tap_state; logic [7:0] tap_ir; logic [99:0] tap_dr; int tap_idle;
  int checks = 0, failures = 0;

  bss_extoll_fpga_top dut (.*);
  jtag_tap_model u_tap (.tck(jtag_tck), .tms(jtag_tms), .tdi(jtag_tdi), .tdo(jtag_tdo),
                        .state(tap_state), .ir(tap_ir), .dr(tap_dr), .idle_clocks(tap_idle));

  always #2.38 clk_ext = ~clk_ext;       // 210 MHz
  always #4.0  clk_hmf = ~clk_hmf;       // 125 MHz

  initial begin
    #3ms;
    failures++;
    $display("watchdog: exp_rd=%0d rxq=%0d ack_q=%0d wr_q=%0d rsp_q=%0d afull=%0d t_next=%h", exp_rd.size(), rxq.size(),
             ack_q.size(), wr_q.size(), rsp_q.size(), m_afull, t_next);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  localparam logic [15:0] HOST = 16'h0042;
  localparam logic [63:0] TB_ADDR = 64'h0000_0100_0000_0000, HB_ADDR = 64'h0000_0200_0000_0000;
  localparam logic [63:0] FPGA_ADDR = 64'h0000_0300_0000_0000;
  localparam int TSZ = 8192, HSZ = 4096;          // ring-buffer sizes in bytes
  localparam int T_PER = 2, H_PER = 3;            // notification periods (packets)
  localparam int T_TO = 3000, H_TO = 2000;        // notification timeouts (HMF cycles)

  // mechanism counters
  int m_stall, m_stop, m_rx_gap, m_al_bp, m_afull, m_hafull, m_twrap, m_hwrap, m_cnoti;
  int m_teot, m_tper, m_tto, m_hper, m_hto, m_ack, m_rra_rd, m_rra_wr, m_rra_inv, m_undef;
  int m_type, m_jtag, m_puts;

  // ------------------------------------------------------------ host side
  beat_t rxq[$];
  assign np_rx_empty = rxq.size() == 0;
  assign {np_rx_data, np_rx_sop, np_rx_eop} = np_rx_empty ? '0 : rxq[0];
  bit rx_pop = 0, rx_hold = 0;
  always @(negedge clk_ext) begin
    if (rx_pop) void'(rxq.pop_front());
    rx_pop = 0;
    np_tx_full = ($urandom % 5) == 0;
    np_tx_stop = ($urandom % 16) == 0;
  end

  task automatic send(input logic [63:0] desc, input cells_t c);
    beats_t b;
    b = build(mk_sop(my_node, 10'h0), desc, c);
    foreach (b[i]) rxq.push_back(b[i]);
  endtask

  logic [127:0] rsp_q[$];        // {resp_addr, data} of GET_BYTE_RSP packets
  logic [63:0]  ack_q[$];        // host acknowledges still to send
  int t_noti_sum = 0, h_noti_sum = 0;
  logic [63:0] t_next = TB_ADDR, h_next = HB_ADDR;
  logic [79:0] host_t[$], host_h[$], host_f[$];
  bit last_trace_eot = 0;
  int t_pkts_since = 0, h_pkts_since = 0;

  logic [127:0] cur_hdr;
  logic [63:0]  cur[$];
  always @(posedge clk_ext) if (rst_ext_n) begin
    if (np_rx_shiftout) rx_pop = 1;
    if (np_rx_empty) m_rx_gap++;
    if (np_tx_valid && np_tx_full) m_stall++;
    if (np_tx_stop) m_stop++;
    if (np_tx_valid && !np_tx_full) begin
      if (np_tx_sop) begin cur_hdr = np_tx_data; cur.delete(); end
      else begin
        cur.push_back(np_tx_data[63:0]);
        if (np_tx_eop != 2'b01) cur.push_back(np_tx_data[127:64]);
        if (np_tx_eop != 2'b00) host_packet();
      end
    end
  end

  function automatic void host_packet();
    desc_t d; sop_t s;
    s = sop_t'(cur_hdr[63:0]); d = desc_t'(cur_hdr[127:64]);
    checks++;
    if (s.dest_node != HOST || d.src_node != my_node || s.cell_type != SOP_TYPE_RMA) begin
      failures++; $display("packet header %h", cur_hdr);
    end
    unique case (d.cmd)
      CMD_GET_BYTE_RSP: begin rsp_q.push_back({cur[0], cur[1]}); end
      CMD_PUT_NOTI: begin
        if (cur[0] == 64'h0) m_cnoti++;
        else if (cur[0][63:48] == PT_TRACE) begin
          t_noti_sum += int'(cur[0][28:0]);
          if (last_trace_eot) m_teot++; else if (t_pkts_since == T_PER) m_tper++; else m_tto++;
          last_trace_eot = 0; t_pkts_since = 0;
          ack_q.push_back(cur[0]);
        end else if (cur[0][63:48] == PT_HICANN_CFG) begin
          h_noti_sum += int'(cur[0][28:0]);
          if (h_pkts_since == H_PER) m_hper++; else m_hto++;
          h_pkts_since = 0;
          ack_q.push_back(cur[0]);
        end else begin failures++; $display("bad notification %h", cur[0]); end
      end
      CMD_PUT_QW: begin
        int n;
        logic [63:0] a;
        n = cur.size() - 1; a = cur[0];
        checks++;
        if (d.tspec != 10'(n * 8 - 1)) begin failures++; $display("size field %0d for %0d", d.tspec, n); end
        if (a >= TB_ADDR && a < TB_ADDR + TSZ) begin
          checks++;
          if (a != t_next || a + 64'(n * 8) > TB_ADDR + TSZ) begin
            failures++; $display("trace address %h exp %h (n=%0d)", a, t_next, n);
          end
          t_next = a + 64'(n * 8);
          if (t_next == TB_ADDR + TSZ) begin t_next = TB_ADDR; m_twrap++; end
          for (int i = 1; i <= n; i++) host_t.push_back({PT_TRACE, cur[i]});
          last_trace_eot = (cur[n][15:0] == EOT_MARKER);
          t_pkts_since++;
        end else if (a >= HB_ADDR && a < HB_ADDR + HSZ) begin
          checks++;
          if (a != h_next || n != 1) begin failures++; $display("hicann address %h exp %h", a, h_next); end
          h_next = a + 64'(n * 8);
          if (h_next == HB_ADDR + HSZ) begin h_next = HB_ADDR; m_hwrap++; end
          host_h.push_back({PT_HICANN_CFG, cur[1]});
          h_pkts_since++;
        end else begin
          checks++;
          if (a != FPGA_ADDR || !d.noti[1]) begin failures++; $display("fpga config address %h", a); end
          host_f.push_back({PT_FPGA_CFG, cur[1]});
        end
      end
      default: begin failures++; $display("unexpected command %h", d.cmd); end
    endcase
  endfunction

  bit acks_on = 1;
  // the host returns acknowledges (PUT notifications) for received notifications
  initial forever begin
    @(negedge clk_ext);
    if (acks_on && ack_q.size() > 0 && rxq.size() < 8) begin
      logic [63:0] c;
      c = ack_q.pop_front();
      send(mk_desc(CMD_PUT_NOTI, 6'h0, 2'b00, HOST, 8'h0, 16'h0, 10'd7), '{{c[63:48], 19'h0, c[28:0]}});
      m_ack++;
    end
  end

  // remote registerfile access
  task automatic rra_wr(input logic [15:0] a, input logic [63:0] v);
    @(negedge clk_ext);
    send(mk_desc(CMD_PUT_BYTE, 6'b000001, 2'b10, HOST, 8'h0, 16'h0, 10'd7), '{{48'h0, a}, v});
    m_rra_wr++;
  endtask
  logic [63:0] rd;
  task automatic rra_rd(input logic [15:0] a);
    logic [63:0] ra;
    ra = {$urandom, $urandom};
    @(negedge clk_ext);
    send(mk_desc(CMD_GET_BYTE, 6'b000001, 2'b00, HOST, 8'h0, 16'h0, 10'd7), '{{48'h0, a}, ra});
    while (rsp_q.size() == 0) @(negedge clk_ext);
    chk("response address", rsp_q[0][127:64], ra);
    rd = rsp_q[0][63:0];
    void'(rsp_q.pop_front());
    m_rra_rd++;
  endtask

  // payload towards the core logic
  logic [79:0] exp_rd[$];
  task automatic put(input logic [15:0] t, input int n, input bit good);
    cells_t c;
    c.push_back({t, 48'h0});
    for (int i = 0; i < n; i++) begin
      logic [63:0] w;
      w = {$urandom, $urandom};
      c.push_back(w);
      if (good) exp_rd.push_back({t, w});
    end
    @(negedge clk_ext);
    send(mk_desc(CMD_PUT_QW, 6'h0, 2'b00, HOST, 8'h0, 16'h0, 10'(n * 8 - 1)), c);
    m_puts++;
  endtask

  // ------------------------------------------------------ core-logic side
  logic [79:0] wr_q[$], sent_t[$], sent_h[$], sent_f[$];
  bit wr_gate;
  assign al_wr_valid = wr_gate && wr_q.size() > 0;
  assign {al_wr_type, al_wr_data} = wr_q.size() > 0 ? wr_q[0] : '0;
  bit wr_pop = 0, rd_pop = 0;
  int n_rd = 0;
  always @(negedge clk_hmf) begin
    if (wr_pop) begin
      logic [79:0] w;
      w = wr_q.pop_front();
      if (w[79:64] == PT_TRACE) sent_t.push_back(w);
      else if (w[79:64] == PT_HICANN_CFG) sent_h.push_back(w);
      else sent_f.push_back(w);
    end
    wr_pop = 0;
    wr_gate = ($urandom % 6) != 0;
    #0.5;
    al_rd_next = al_rd_valid && ($urandom % 4) != 0;
    if (al_rd_valid && !al_rd_next) m_al_bp++;
    if (al_rd_valid && al_rd_next) begin
      checks++;
      n_rd++;
      if (exp_rd.size() == 0 || {al_rd_type, al_rd_data} !== exp_rd[0]) begin
        failures++; $display("AL read %h exp %h", {al_rd_type, al_rd_data}, exp_rd[0]);
      end
      void'(exp_rd.pop_front());
    end
  end
  always @(posedge clk_hmf) if (al_wr_next) wr_pop = 1;
  always @(posedge clk_ext) begin
    if (trace_afull) m_afull++;
    if (hicann_afull) m_hafull++;
  end

  task automatic al_words(input logic [15:0] t, input int n, input bit eot);
    for (int i = 0; i < n; i++) begin
      logic [63:0] w;
      w = {$urandom, $urandom};
      if (w[15:0] == EOT_MARKER) w[0] = ~w[0];
      if (eot && i == n - 1) w[15:0] = EOT_MARKER;
      wr_q.push_back({t, w});
    end
  endtask

  task automatic wait_wr_drain();
    while (wr_q.size() > 0) @(negedge clk_hmf);
  endtask

  // ------------------------------------------------------------ sequence
  initial begin
    al_rd_next = 0; wr_gate = 0; np_tx_full = 0; np_tx_stop = 0;
    #50; rst_ext_n = 1; rst_hmf_n = 1;
    // HICANN configuration data before the host is known: dropped
    al_words(PT_HICANN_CFG, 3, 0);
    wait_wr_drain();
    #2us;
    // configuration of the NHTL by remote registerfile writes
    rra_wr(A_CFG_HOST_1, {16'h0, 6'b000100, 10'h0, 16'h0, HOST});
    rra_wr(A_CFG_HOST_2, TB_ADDR);
    rra_wr(A_CFG_HOST_3, (64'h1 << 48) | 64'(TSZ));
    rra_wr(A_CFG_HOST_4, FPGA_ADDR);
    rra_wr(A_CFG_HOST_5, HB_ADDR);
    rra_wr(A_CFG_HOST_6, (64'h1 << 48) | 64'(HSZ));
    rra_wr(A_CFG_TRACE_NOTI, {3'b0, 29'(T_PER), 32'(T_TO)});
    rra_wr(A_CFG_HIC_NOTI, {3'b0, 29'(H_PER), 32'(H_TO)});
    rra_rd(A_CFG_HOST_2); chk("read back host_2", rd, TB_ADDR);
    rra_rd(A_CFG_HOST_3); chk("host_3 size and acknowledge counters", rd, {16'h0, 8'd1, 8'd1, 32'(TSZ)});
    rra_rd(16'h3000);     chk("unmapped RRA read", rd, 0); m_rra_inv++;
    rra_rd(A_ERR_RRA_ADR); chk("RRA address error counter", rd, 1);
    rra_rd(A_ERR_UNDEF_HOST); checks++; if (rd == 0) begin failures++; $display("no undefined-host error"); end
    else m_undef++;
    // payload from the host to the core logic
    for (int i = 0; i < 40; i++) begin
      logic [15:0] types[4];
      types = '{PT_PLAYBACK, PT_FPGA_CFG, PT_HICANN_CFG, PT_JTAG};
      put(types[i % 4], 1 + $urandom % 62, 1);
    end
    put(16'h0BAD, 4, 0); m_type++;
    // traffic from the core logic: trace with EOT, HICANN and FPGA configuration
    fork
      begin
        for (int s = 0; s < 30; s++) begin
          al_words(PT_TRACE, 20 + $urandom % 200, s % 3 == 0);
          al_words(PT_HICANN_CFG, 1 + $urandom % 40, 0);
          if (s % 5 == 0) al_words(PT_FPGA_CFG, 1 + $urandom % 3, 0);
          while (wr_q.size() > 100) @(negedge clk_hmf);
          if (s == 10) begin
            // the host stops acknowledging for a while: the trace buffer runs almost full
            fork begin acks_on = 0; #40us; acks_on = 1; end join_none
            al_words(PT_TRACE, 900, 0);   // more than the 1024-QW buffer minus the 248-QW margin
          end
          if (s % 7 == 6) begin wait_wr_drain(); #30us; end   // longer than the timeouts
        end
        wait_wr_drain();
      end
      begin
        // JTAG: reset, 8-bit instruction scan, read the captured bits back
        rra_wr(16'h2080, 64'h11);
        rra_wr(16'h2000, 64'h8000_0000);
        do rra_rd(16'h2000); while (rd[31]);
        rra_wr(16'h2000, 64'h8000_0071);
        do rra_rd(16'h2000); while (rd[31]);
        chk("TAP instruction", 64'(tap_ir), 64'h11);
        chk("TAP idle", 64'(tap_state), 1);
        rra_rd(16'h2100); chk("JTAG captured bits", rd[7:0], 8'h01);
        m_jtag++;
      end
    join
    // a short trace burst without EOT: closed and notified by the timeout
    al_words(PT_TRACE, 10, 0);
    wait_wr_drain();
    #60us;
    wait (exp_rd.size() == 0 && rxq.size() == 0 && ack_q.size() == 0);
    #20us;
    // stream checks
    chk("trace words", host_t.size(), sent_t.size());
    foreach (sent_t[i]) if (i < host_t.size()) chk("trace word", host_t[i], sent_t[i]);
    chk("hicann words", host_h.size() + 3, sent_h.size());
    foreach (host_h[i]) chk("hicann word", host_h[i], sent_h[i + 3]);
    chk("fpga words", host_f.size(), sent_f.size());
    foreach (sent_f[i]) if (i < host_f.size()) chk("fpga word", host_f[i], sent_f[i]);
    chk("trace notified", t_noti_sum, sent_t.size());
    chk("hicann notified", h_noti_sum, host_h.size());
    chk("all payload read", exp_rd.size(), 0);
    // counters
    rra_rd(A_PERF_PLAYB);   chk("playback packets", rd, 10);
    rra_rd(A_PERF_JTAG);    chk("jtag packets", rd, 10);
    rra_rd(A_ERR_TYPE);     chk("wrong type", rd, 1);
    rra_rd(A_PERF_NOTI_PUT); chk("host acknowledges", rd, m_ack);
    rra_rd(A_PERF_RRA_PUT); chk("rra writes", rd, m_rra_wr);
    rra_rd(A_CNT_REINIT);
    rra_wr(A_CNT_REINIT, 64'h1);
    rra_rd(A_PERF_PLAYB);   chk("counters cleared", rd, 0);
    $display("mechanisms: stall=%0d stop=%0d rx_gap=%0d al_backpressure=%0d trace_afull=%0d hicann_afull=%0d",
             m_stall, m_stop, m_rx_gap, m_al_bp, m_afull, m_hafull);
    $display("  trace_wrap=%0d hicann_wrap=%0d completion_noti=%0d trace_noti eot=%0d period=%0d timeout=%0d",
             m_twrap, m_hwrap, m_cnoti, m_teot, m_tper, m_tto);
    $display("  hicann_noti period=%0d timeout=%0d host_acks=%0d rra_rd=%0d rra_wr=%0d rra_invalid=%0d",
             m_hper, m_hto, m_ack, m_rra_rd, m_rra_wr, m_rra_inv);
    $display("  undefined_host=%0d wrong_type=%0d jtag=%0d puts=%0d al_read_words=%0d",
             m_undef, m_type, m_jtag, m_puts, n_rd);
    begin
      int ms[19];
      ms = '{m_stall, m_stop, m_rx_gap, m_al_bp, m_afull, m_twrap, m_hwrap, m_cnoti, m_teot,
             m_tper, m_tto, m_hper, m_hto, m_ack, m_rra_rd, m_rra_inv, m_undef, m_type, m_jtag};
      foreach (ms[i]) begin
        checks++;
        if (ms[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
