// tb_nhtl_completer: NHTL completer (receive side).  Random RMA packets are
// fed as 128-bit network-port beats with random back-pressure from all
// downstream FIFOs: payload puts of 1..62 QWs for every AL payload type,
// immediate puts, RRA writes and reads, host acknowledges (PUT notifications
// for the trace and HICANN ring buffers), packets with an unknown payload
// type and packets with an unknown command.  Checks the RRA-FIFO entries,
// NOTI-FIFO entries, the payload word stream with its type, the ring-buffer
// decrements and the counter events.
module tb_nhtl_completer;
  import nhtl_pkg::*;
  import nhtl_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [127:0] np_rx_data;
  logic np_rx_sop, np_rx_empty, np_rx_shiftout;
  logic [1:0] np_rx_eop;
  logic rra_push, rra_full, noti_push, noti_full, pl_push, pl_full;
  rra_req_t rra_data;
  noti_req_t noti_data;
  data_entry_t pl_data;
  logic tdec_valid, hdec_valid, tdec_full, hdec_full;
  logic [LEVEL_W-1:0] dec_qw;
  nhtl_events_t ev;
  int checks = 0, failures = 0;

  nhtl_completer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  beat_t      beats[$];
  rra_req_t   exp_rra[$];
  noti_req_t  exp_noti[$];
  logic [79:0] exp_w[$];
  logic [29:0] exp_dec[$];              // {is_hicann, qw}
  int exp_ev[16], got_ev[16];

  assign np_rx_empty = (beats.size() == 0);
  assign {np_rx_data, np_rx_sop, np_rx_eop} = np_rx_empty ? '0 : beats[0];

  bit pop_pending = 0;
  always @(negedge clk) if (rst_n) begin
    if (pop_pending) void'(beats.pop_front());
    pop_pending = 0;
    rra_full  = ($urandom % 8) == 0;
    noti_full = ($urandom % 8) == 0;
    pl_full   = ($urandom % 5) == 0;
    tdec_full = ($urandom % 10) == 0;
    hdec_full = ($urandom % 10) == 0;
  end

  always @(posedge clk) if (rst_n) begin
    if (np_rx_shiftout) pop_pending = 1;
    for (int i = 0; i < 16; i++) if (ev[15-i]) got_ev[i]++;
    if (rra_push) begin
      checks++;
      if (rra_full) begin failures++; $display("push into full RRA-FIFO"); end
      if (rra_data !== exp_rra[0]) begin failures++; $display("rra %h exp %h", rra_data, exp_rra[0]); end
      void'(exp_rra.pop_front());
    end
    if (noti_push) begin
      checks++;
      if (noti_data !== exp_noti[0]) begin failures++; $display("noti %h exp %h", noti_data, exp_noti[0]); end
      void'(exp_noti.pop_front());
    end
    if (tdec_valid || hdec_valid) begin
      checks++;
      if ({hdec_valid, dec_qw} !== exp_dec[0] || (tdec_valid && hdec_valid)) begin
        failures++; $display("dec %h exp %h", {hdec_valid, dec_qw}, exp_dec[0]);
      end
      void'(exp_dec.pop_front());
    end
    if (pl_push) begin
      checks++;
      if (pl_full) begin failures++; $display("push into full payload FIFO"); end
      if ({pl_data.ptype, pl_data.lsw} !== exp_w[0]) begin
        failures++; $display("lsw %h exp %h", {pl_data.ptype, pl_data.lsw}, exp_w[0]);
      end
      void'(exp_w.pop_front());
      checks++;
      if (pl_data.eop != 2'b01) begin
        if ({pl_data.ptype, pl_data.msw} !== exp_w[0]) begin
          failures++; $display("msw %h exp %h", {pl_data.ptype, pl_data.msw}, exp_w[0]);
        end
        void'(exp_w.pop_front());
      end
    end
  end

  // event index (MSB first in nhtl_events_t)
  localparam int E_RRA_PUT = 0, E_RRA_GET = 1, E_RMA_PUT = 2, E_NOTI_PUT = 3, E_PLAYB = 4,
                 E_FPGA = 5, E_HIC = 6, E_JTAG = 7, E_CMD = 9, E_TYPE = 10;

  initial begin
    logic [15:0] types[4];
    types = '{PT_PLAYBACK, PT_FPGA_CFG, PT_HICANN_CFG, PT_JTAG};
    rra_full = 0; noti_full = 0; pl_full = 0; tdec_full = 0; hdec_full = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int p = 0; p < 400; p++) begin
      cells_t c;
      logic [63:0] sop, desc;
      logic [1:0] noti;
      logic [15:0] node, pdid;
      logic [7:0] vpid;
      logic te;
      int kind;
      kind = $urandom % 8;
      noti = 2'($urandom); node = 16'($urandom); pdid = 16'($urandom); vpid = 8'($urandom);
      te = 1'($urandom);
      sop = mk_sop(16'h0001, 10'h0);
      c.delete();
      if (kind <= 2 || kind == 7) begin                 // payload put
        int n;
        logic [15:0] t;
        logic [3:0] cmd;
        t = (kind == 7) ? 16'h1234 : types[$urandom % 4];
        n = ($urandom % 4 == 0) ? 1 : 1 + $urandom % 62;
        cmd = (n == 1 && $urandom % 2) ? CMD_PUT_IMM : CMD_PUT_QW;
        desc = mk_desc(cmd, 6'(te) << M_TE, noti, node, vpid, pdid, 10'(n * 8 - 1));
        c.push_back({t, 48'($urandom)});
        for (int i = 0; i < n; i++) begin
          logic [63:0] w;
          w = {$urandom, $urandom};
          c.push_back(w);
          if (kind != 7) exp_w.push_back({t, w});
        end
        if (noti[1]) exp_noti.push_back('{dest_node: node, dest_vpid: vpid, pdid: pdid});
        exp_ev[E_RMA_PUT]++;
        if (kind == 7) exp_ev[E_TYPE]++;
        else exp_ev[t == PT_PLAYBACK ? E_PLAYB : t == PT_FPGA_CFG ? E_FPGA :
                    t == PT_HICANN_CFG ? E_HIC : E_JTAG]++;
      end else if (kind <= 4) begin                     // RRA write / read
        rra_req_t r;
        logic rd;
        rd = (kind == 4);
        r.is_read = rd; r.addr = {48'h0, 16'h1000 + 16'($urandom % 26) * 8};
        r.wdata = {$urandom, $urandom}; r.dest_node = node; r.dest_vpid = vpid;
        r.pdid = pdid; r.te = te; r.noti1 = noti[1];
        desc = mk_desc(rd ? CMD_GET_BYTE : CMD_PUT_BYTE, (6'(te) << M_TE) | 6'b1, noti,
                       node, vpid, pdid, 10'd7);
        c.push_back(r.addr); c.push_back(r.wdata);
        exp_rra.push_back(r);
        if ((rd && noti[0]) || (!rd && noti[1]))
          exp_noti.push_back('{dest_node: node, dest_vpid: vpid, pdid: pdid});
        exp_ev[rd ? E_RRA_GET : E_RRA_PUT]++;
        if (!rd) exp_ev[E_RMA_PUT]++;
      end else if (kind <= 5) begin                     // host acknowledge
        logic h;
        logic [28:0] q;
        h = 1'($urandom); q = 29'($urandom % 5000);
        desc = mk_desc(CMD_PUT_NOTI, 6'h0, 2'b00, node, vpid, pdid, 10'd7);
        c.push_back({h ? PT_HICANN_CFG : PT_TRACE, 19'h0, q});
        exp_dec.push_back({h, q});
        exp_ev[E_NOTI_PUT]++;
      end else begin                                    // unknown command
        desc = mk_desc(4'b1111, 6'h0, 2'b00, node, vpid, pdid, 10'd7);
        c.push_back(64'h0); c.push_back(64'h0);
        exp_ev[E_CMD]++;
      end
      begin
        beats_t b;
        b = build(sop, desc, c);
        @(negedge clk); #1;
        foreach (b[i]) beats.push_back(b[i]);
      end
      while (beats.size() > 40) @(negedge clk);
    end
    while (beats.size() > 0) @(negedge clk);
    repeat (10) @(negedge clk);
    checks++;
    if (exp_w.size() || exp_rra.size() || exp_noti.size() || exp_dec.size()) begin
      failures++;
      $display("left: w %0d rra %0d noti %0d dec %0d", exp_w.size(), exp_rra.size(),
               exp_noti.size(), exp_dec.size());
    end
    foreach (exp_ev[i]) if (i <= E_TYPE && i != 8) begin
      checks++;
      if (exp_ev[i] != got_ev[i]) begin failures++; $display("event %0d: %0d exp %0d", i, got_ev[i], exp_ev[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
