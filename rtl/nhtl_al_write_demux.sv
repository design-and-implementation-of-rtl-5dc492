// nhtl_al_write_demux: core-to-network side of the AL-interface.
//
// Packs the 64-bit words that the core logic offers on the AL-write interface
// into 128-bit payload-FIFO entries (two-state FSM WR_LSW / WR_MSW), decides
// where outgoing packets end, and decides when the host gets a payload
// notification.  All results are written into two asynchronous FIFOs towards
// the responder: the payload FIFO and the packet-information FIFO.
//
// Packet ends:
//   * trace data (0x0CA5) is collected into packets of up to 62 QWs; a packet
//     also ends at a word whose bits [15:0] hold the end-of-trace marker
//     0xE11D, and when the number of trace QWs since the last ring-buffer
//     wrap reaches the trace buffer size, so that no packet crosses the end
//     of the host ring buffer;
//   * every other type is a one-word packet (FPGA-configuration responses
//     are flagged to be sent with NOTI[1] set);
//   * an open trace packet is also closed when a word of another type
//     arrives or when the trace timeout expires.
// Notifications:
//   * trace: after the configured number of packets, at end of trace, or
//     when no trace word has arrived for the configured number of cycles
//     while un-notified QWs exist; carries the QW count since the last one;
//   * HICANN configuration: after the configured number of packets or on
//     the timeout; carries the packet (= QW) count.
// Every packet's last word carries its eop bit in the payload FIFO.  Since a
// trace packet may still be closed by a type change or a timeout, a complete
// pair of trace words is held back until the next trace word shows that the
// packet continues (the pair is then written without eop) or until the packet
// is closed (the pair is written with eop on the MSW).  When a held pair meets
// a packet-ending trace word, the pair is written first and the word is taken
// one cycle later.
// A packet-info request and up to two notification requests are held in
// registers and written one per cycle by a fixed-priority arbiter (packet,
// trace notification, HICANN notification).  While any request is pending
// the AL-write interface is stalled.
//
// AL-write handshake: the core logic drives al_wr_valid with data and type;
// a word is taken in a cycle where al_wr_valid and al_wr_next are both high.
// al_wr_next is only raised together with al_wr_valid.  Configuration inputs
// come from registers in the network clock domain that are only changed while
// no traffic runs; trace_rb_toggle changes on every trace ring-buffer
// initialisation and is synchronised here to restart the wrap counter.
//
// From the design description: the FSM, 62-QW packets, the EOT marker, the
// wrap trigger, notification conditions, the arbiter and the stall.  Own
// choices: closing an open trace packet on a type change or on timeout, the
// held pair that keeps the eop bits right for such packets, and the handshake
// reading noted above.
module nhtl_al_write_demux
  import nhtl_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // AL-write interface
  input  logic [63:0]  al_wr_data,
  input  logic [15:0]  al_wr_type,
  input  logic         al_wr_valid,
  output logic         al_wr_next,
  // configuration
  input  logic [LEVEL_W-1:0] trace_buf_qw,
  input  logic [31:0]  trace_timeout,
  input  logic [28:0]  trace_noti_pkts,
  input  logic [31:0]  hicann_timeout,
  input  logic [28:0]  hicann_noti_pkts,
  input  logic         trace_rb_toggle,
  // payload FIFO
  output logic         dt_push,
  output data_entry_t  dt_data,
  input  logic         dt_full,
  // packet-information FIFO
  output logic         pi_push,
  output pinfo_t       pi_data,
  input  logic         pi_full
);
  typedef enum logic {WR_LSW, WR_MSW} st_e;
  st_e st;

  logic [63:0] lsw_r, msw_r;
  logic        held;                    // {msw_r, lsw_r} is a full entry not yet written
  logic [5:0]  pkt_cnt;                 // words in the open trace packet
  logic [LEVEL_W-1:0] twrap;            // trace QWs since last wrap
  logic [28:0] t_pkts, t_qws, h_pkts;
  logic [31:0] t_idle, h_idle;
  logic        pend_pkt, pend_nbit, pend_tn, pend_hn;
  logic [5:0]  pend_size;
  logic [28:0] pend_tcnt, pend_hcnt;
  logic [2:0]  tog_s;

  wire pend_any  = pend_pkt || pend_tn || pend_hn;
  wire pkt_open  = (pkt_cnt != 6'd0);
  wire is_trace  = (al_wr_type == PT_TRACE);
  wire t_to      = (t_idle >= trace_timeout);
  wire h_to      = (h_idle >= hicann_timeout);
  wire close_req = pkt_open && ((al_wr_valid && !is_trace) || t_to);
  wire can_act   = !pend_any && !dt_full;
  wire do_close  = close_req && can_act;

  // trace word bookkeeping
  wire [5:0]  cnt_n  = pkt_cnt + 6'd1;
  wire [LEVEL_W-1:0] wrap_n = twrap + 1'b1;
  wire        eot    = (al_wr_data[15:0] == EOT_MARKER);
  wire        wrap   = (wrap_n >= trace_buf_qw);
  wire        t_end  = eot || (cnt_n == 6'(MAX_PAYLOAD_QW)) || wrap;
  wire        rb_restart = tog_s[2] ^ tog_s[1];

  // A held entry meeting a packet-ending trace word is written first (without
  // taking the word), so that the word then ends the packet in an entry of its own.
  wire flush_req = held && al_wr_valid && is_trace && t_end && !close_req;
  wire do_flush  = flush_req && can_act;

  assign al_wr_next = al_wr_valid && can_act && !close_req && !flush_req;
  wire take = al_wr_next;   // valid is implied

  // payload FIFO write
  always_comb begin
    dt_push = 1'b0;
    dt_data = '0;
    dt_data.ptype = (take && !is_trace) ? al_wr_type : PT_TRACE;
    if (do_close && st == WR_MSW) begin
      dt_push     = 1'b1;
      dt_data.lsw = lsw_r;
      dt_data.eop = 2'b01;
    end else if (do_close && held) begin
      dt_push     = 1'b1;
      dt_data.lsw = lsw_r;
      dt_data.msw = msw_r;
      dt_data.eop = 2'b10;
    end else if (do_flush) begin
      dt_push     = 1'b1;
      dt_data.lsw = lsw_r;
      dt_data.msw = msw_r;
    end else if (take) begin
      if (st == WR_MSW) begin          // only trace words reach WR_MSW
        dt_push     = t_end;            // otherwise held until the next word
        dt_data.lsw = lsw_r;
        dt_data.msw = al_wr_data;
        dt_data.eop = 2'b10;
      end else if (held) begin         // trace word continuing the packet
        dt_push     = 1'b1;
        dt_data.lsw = lsw_r;
        dt_data.msw = msw_r;
      end else if (!is_trace || t_end) begin
        dt_push     = 1'b1;
        dt_data.lsw = al_wr_data;
        dt_data.eop = 2'b01;
      end
    end
  end

  // packet-information arbiter
  always_comb begin
    pi_push = 1'b0;
    pi_data = '0;
    if (!pi_full) begin
      if (pend_pkt) begin
        pi_push          = 1'b1;
        pi_data.noti_bit = pend_nbit;
        pi_data.count    = 29'(pend_size);
      end else if (pend_tn) begin
        pi_push           = 1'b1;
        pi_data.noti_pkt  = 1'b1;
        pi_data.noti_type = PT_TRACE;
        pi_data.count     = pend_tcnt;
      end else if (pend_hn) begin
        pi_push           = 1'b1;
        pi_data.noti_pkt  = 1'b1;
        pi_data.noti_type = PT_HICANN_CFG;
        pi_data.count     = pend_hcnt;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= WR_LSW; lsw_r <= '0; msw_r <= '0; held <= 1'b0; pkt_cnt <= '0; twrap <= '0;
      t_pkts <= '0; t_qws <= '0; h_pkts <= '0; t_idle <= '0; h_idle <= '0;
      pend_pkt <= 1'b0; pend_nbit <= 1'b0; pend_tn <= 1'b0; pend_hn <= 1'b0;
      pend_size <= '0; pend_tcnt <= '0; pend_hcnt <= '0; tog_s <= '0;
    end else begin
      tog_s <= {tog_s[1:0], trace_rb_toggle};
      // arbiter grants
      if (!pi_full) begin
        if (pend_pkt)     pend_pkt <= 1'b0;
        else if (pend_tn) pend_tn  <= 1'b0;
        else if (pend_hn) pend_hn  <= 1'b0;
      end
      if (!(&t_idle)) t_idle <= t_idle + 1'b1;
      if (!(&h_idle)) h_idle <= h_idle + 1'b1;

      if (do_close) begin
        st        <= WR_LSW;
        held      <= 1'b0;
        pkt_cnt   <= '0;
        pend_pkt  <= 1'b1;
        pend_nbit <= 1'b0;
        pend_size <= pkt_cnt;
        if (t_pkts + 29'd1 >= trace_noti_pkts) begin
          pend_tn   <= 1'b1;
          pend_tcnt <= t_qws + 29'(pkt_cnt);
          t_pkts <= '0; t_qws <= '0;
        end else begin
          t_pkts <= t_pkts + 29'd1;
          t_qws  <= t_qws + 29'(pkt_cnt);
        end
      end else if (take && is_trace) begin
        t_idle <= '0;
        twrap  <= wrap ? '0 : wrap_n;
        held <= 1'b0;
        if (st == WR_LSW && !t_end) begin
          lsw_r <= al_wr_data;
          st    <= WR_MSW;
        end else begin
          st <= WR_LSW;
          if (st == WR_MSW && !t_end) begin
            msw_r <= al_wr_data;
            held  <= 1'b1;
          end
        end
        if (t_end) begin
          pkt_cnt   <= '0;
          pend_pkt  <= 1'b1;
          pend_nbit <= 1'b0;
          pend_size <= cnt_n;
          if (eot || t_pkts + 29'd1 >= trace_noti_pkts) begin
            pend_tn   <= 1'b1;
            pend_tcnt <= t_qws + 29'(cnt_n);
            t_pkts <= '0; t_qws <= '0;
          end else begin
            t_pkts <= t_pkts + 29'd1;
            t_qws  <= t_qws + 29'(cnt_n);
          end
        end else pkt_cnt <= cnt_n;
      end else if (take) begin
        pend_pkt  <= 1'b1;
        pend_nbit <= (al_wr_type == PT_FPGA_CFG);
        pend_size <= 6'd1;
        if (al_wr_type == PT_HICANN_CFG) begin
          h_idle <= '0;
          if (h_pkts + 29'd1 >= hicann_noti_pkts) begin
            pend_hn   <= 1'b1;
            pend_hcnt <= h_pkts + 29'd1;
            h_pkts    <= '0;
          end else h_pkts <= h_pkts + 29'd1;
        end
      end else if (do_flush) begin
        held <= 1'b0;
      end else if (!pend_any && !pkt_open) begin
        // timeout notifications for data already sent
        if (t_to && t_qws != '0) begin
          pend_tn <= 1'b1; pend_tcnt <= t_qws; t_qws <= '0; t_pkts <= '0;
        end
        if (h_to && h_pkts != '0) begin
          pend_hn <= 1'b1; pend_hcnt <= h_pkts; h_pkts <= '0;
        end
      end
      if (rb_restart) twrap <= '0;
    end
  end

  a_next_needs_valid: assert property (@(posedge clk) disable iff (!rst_n)
    al_wr_next |-> al_wr_valid);
endmodule
