// tb_nhtl_al_write_demux: AL-write side of the NHTL.  A random stream of
// trace words (with occasional end-of-trace markers and idle gaps longer than
// the trace timeout), HICANN configuration, FPGA configuration, playback and
// JTAG words is written with random valid and random back-pressure on both
// FIFOs.  The payload and packet-information FIFO outputs are reassembled into
// packets and checked (the packet length comes from the packet-information
// entry; an end flag may only sit on a packet's last word): the word stream is unchanged, trace packets hold at most
// 62 QWs and end at an EOT marker, at the ring-buffer wrap point or at a
// timeout; every other type travels in 1-QW packets, FPGA configuration with
// the notification bit; trace and HICANN notifications come after EOT, after
// the configured number of packets or after the timeout and notify every QW
// exactly once; a ring-buffer re-initialisation toggle restarts the wrap count.
module tb_nhtl_al_write_demux;
  import nhtl_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [63:0] al_wr_data;
  logic [15:0] al_wr_type;
  logic al_wr_valid, al_wr_next;
  logic [LEVEL_W-1:0] trace_buf_qw;
  logic [31:0] trace_timeout, hicann_timeout;
  logic [28:0] trace_noti_pkts, hicann_noti_pkts;
  logic trace_rb_toggle;
  logic dt_push, dt_full, pi_push, pi_full;
  data_entry_t dt_data;
  pinfo_t pi_data;
  int checks = 0, failures = 0;

  nhtl_al_write_demux dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int TBUF = 300, TPKTS = 5, HPKTS = 7;

  logic [79:0] in_q[$];        // words still to write {type, data}
  logic [79:0] sent[$];        // words accepted by the DUT
  logic [79:0] dtw[$];         // words taken from the payload FIFO, not yet packed
  logic        dte[$];         // ... and whether the word carried end-of-packet
  logic [79:0] outw[$];        // reassembled stream
  bit gate;

  assign al_wr_valid = gate && in_q.size() > 0;
  assign {al_wr_type, al_wr_data} = in_q.size() > 0 ? in_q[0] : '0;

  bit pop_pending = 0;
  always @(negedge clk) if (rst_n) begin
    if (pop_pending) sent.push_back(in_q.pop_front());
    pop_pending = 0;
    gate    = ($urandom % 5) != 0;
    dt_full = ($urandom % 6) == 0;
    pi_full = ($urandom % 6) == 0;
  end

  // notification bookkeeping
  int t_qw_since = 0, t_pkts_since = 0, h_qw_since = 0, h_pkts_since = 0, tw = 0;
  int n_eot = 0, n_wrap = 0, n_tper = 0, n_hper = 0, n_tto = 0, n_hto = 0, n_fpga = 0;
  int n_tclose_to = 0;
  bit last_eot = 0;

  always @(posedge clk) if (rst_n) begin
    if (al_wr_next) begin
      pop_pending = 1;
      checks++;
      if (!al_wr_valid) begin failures++; $display("next without valid"); end
    end
    if (dt_push) begin
      checks++;
      if (dt_full) begin failures++; $display("push into full payload FIFO"); end
      dtw.push_back({dt_data.ptype, dt_data.lsw}); dte.push_back(dt_data.eop == 2'b01);
      if (dt_data.eop != 2'b01) begin
        dtw.push_back({dt_data.ptype, dt_data.msw}); dte.push_back(dt_data.eop == 2'b10);
      end
    end
    if (pi_push) begin
      checks++;
      if (pi_full) begin failures++; $display("push into full pinfo FIFO"); end
      checks++;
      if (last_eot && !(pi_data.noti_pkt && pi_data.noti_type == PT_TRACE)) begin
        failures++; $display("no trace notification right after an EOT packet");
      end
      if (!pi_data.noti_pkt) begin
        int n;
        logic [15:0] t;
        n = int'(pi_data.count);
        t = dtw[0][79:64];
        checks++;
        if (dtw.size() < n || n == 0) begin
          failures++; $display("packet of %0d words, only %0d words there", n, dtw.size());
        end else begin
          for (int i = 0; i < n; i++) begin
            checks++;
            if (dtw[0][79:64] != t || dte[0] != (i == n - 1)) begin
              failures++; $display("packet framing word %0d of %0d", i, n);
            end
            last_eot = (dtw[0][15:0] == EOT_MARKER);
            outw.push_back(dtw.pop_front()); void'(dte.pop_front());
          end
          checks++;
          if (pi_data.noti_bit != (t == PT_FPGA_CFG)) begin failures++; $display("noti bit"); end
          if (t == PT_FPGA_CFG) n_fpga++;
          if (t == PT_TRACE) begin
            checks++;
            if (n > MAX_PAYLOAD_QW || tw + n > TBUF) begin
              failures++; $display("trace packet of %0d at wrap count %0d", n, tw);
            end
            tw += n;
            if (tw == TBUF) begin tw = 0; n_wrap++; end
            else if (n < MAX_PAYLOAD_QW && !last_eot && !(in_q.size() > 0 && in_q[0][79:64] != PT_TRACE))
              n_tclose_to++;
            t_qw_since += n; t_pkts_since++;
            checks++;
            if (t_pkts_since > TPKTS) begin failures++; $display("trace notification missing"); end
          end else begin
            checks++;
            if (n != 1) begin failures++; $display("non-trace packet of %0d", n); end
            if (t == PT_HICANN_CFG) begin
              h_qw_since++; h_pkts_since++;
              checks++;
              if (h_pkts_since > HPKTS) begin failures++; $display("hicann notification missing"); end
            end
          end
        end
      end else if (pi_data.noti_type == PT_TRACE) begin
        checks++;
        if (int'(pi_data.count) != t_qw_since) begin
          failures++; $display("trace notification %0d exp %0d", pi_data.count, t_qw_since);
        end
        if (last_eot) n_eot++;
        else if (t_pkts_since == TPKTS) n_tper++;
        else n_tto++;
        t_qw_since = 0; t_pkts_since = 0; last_eot = 0;
      end else begin
        checks++;
        if (pi_data.noti_type != PT_HICANN_CFG || int'(pi_data.count) != h_qw_since) begin
          failures++; $display("hicann notification %0d exp %0d", pi_data.count, h_qw_since);
        end
        if (h_pkts_since == HPKTS) n_hper++; else n_hto++;
        h_qw_since = 0; h_pkts_since = 0;
      end
    end
  end

  task automatic gen(input int n);
    logic [15:0] types[5];
    types = '{PT_TRACE, PT_HICANN_CFG, PT_FPGA_CFG, PT_PLAYBACK, PT_JTAG};
    for (int s = 0; s < n; s++) begin
      logic [15:0] t;
      int len;
      t = ($urandom % 2) ? PT_TRACE : types[$urandom % 5];
      len = 1 + $urandom % (t == PT_TRACE ? 150 : 20);
      for (int i = 0; i < len; i++) begin
        logic [63:0] w;
        w = {$urandom, $urandom};
        if (w[15:0] == EOT_MARKER) w[0] = ~w[0];
        if (t == PT_TRACE && (i == len - 1) && ($urandom % 3 == 0)) w[15:0] = EOT_MARKER;
        in_q.push_back({t, w});
      end
      if ($urandom % 8 == 0) begin
        while (in_q.size() > 0) @(negedge clk);
        repeat (260) @(negedge clk);             // longer than both timeouts
      end
    end
  endtask

  initial begin
    trace_buf_qw = LEVEL_W'(TBUF); trace_timeout = 200; hicann_timeout = 150;
    trace_noti_pkts = TPKTS; hicann_noti_pkts = HPKTS; trace_rb_toggle = 0;
    gate = 0; dt_full = 0; pi_full = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    gen(60);
    // trace packet interrupted by a pause longer than the timeout
    for (int i = 0; i < 10; i++) in_q.push_back({PT_TRACE, 48'h0, 16'(i)});
    while (in_q.size() > 0) @(negedge clk);
    repeat (260) @(negedge clk);
    // re-initialised ring buffer: the wrap count starts again
    @(negedge clk); trace_rb_toggle = 1;
    repeat (10) @(negedge clk);
    tw = 0;
    gen(60);
    while (in_q.size() > 0) @(negedge clk);
    repeat (400) @(negedge clk);
    checks++;
    if (outw.size() != sent.size()) begin
      failures++; $display("%0d words out, %0d written", outw.size(), sent.size());
    end else foreach (sent[i]) begin
      checks++;
      if (outw[i] !== sent[i]) begin failures++; $display("word %0d: %h exp %h", i, outw[i], sent[i]); end
    end
    checks++;
    if (t_qw_since != 0 || h_qw_since != 0) begin
      failures++; $display("not notified: trace %0d hicann %0d", t_qw_since, h_qw_since);
    end
    $display("mechanisms: eot=%0d wrap=%0d trace_period=%0d trace_timeout=%0d hicann_period=%0d hicann_timeout=%0d fpga=%0d timeout_close=%0d",
             n_eot, n_wrap, n_tper, n_tto, n_hper, n_hto, n_fpga, n_tclose_to);
    checks++;
    if (n_eot == 0 || n_wrap == 0 || n_tper == 0 || n_tto == 0 || n_hper == 0 || n_hto == 0 ||
        n_fpga == 0 || n_tclose_to == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
