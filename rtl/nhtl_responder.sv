// nhtl_responder: send side of the NHTL.
//
// Builds every outgoing EXTOLL packet and places it, 128 bit per beat, on the
// network port.  Sources, in priority order:
//   1. NOTI-FIFO            completion notification (RMA_PUT_NOTI, no payload)
//   2. RRA-response FIFO    RMA_GET_BYTE_RSP with the read data
//   3. packet-info FIFO     either a payload notification (trace or HICANN
//                           QW count, with the host's address/space acknowledge
//                           counters) or an RMA_PUT_QW data packet whose words
//                           come from the payload FIFO
// Data packets of type trace and HICANN-configuration go to the host ring
// buffer of their type: the responder waits until that ring-buffer controller
// shows a valid address and is not almost full, uses the address, and then
// requests an increment by the packet size (held until acknowledged).  FPGA-
// configuration responses (and any other type) go to the fixed address of
// config_partner_host_4 with NOTI[1] set when the packet-info entry says so.
//
// FSM (one packet at a time): SD_HEAD sends the SOP cell and the descriptor
// header; SD_ADDR sends the address (or notification cell) together with the
// first payload word; SD_DATA sends further payload words.  Payload words are
// re-paired on the way out: the high word of each payload-FIFO entry is held
// one beat and sent in the low half of the next beat.  The packet ends after
// the number of words given by the packet-info entry; the eop bits of the
// payload FIFO are not needed for that.  If the partner host is not fully
// configured, a packet from the core logic is read out and discarded, and
// err_undef_host is raised.
//
// Network-port timing: np_tx_* is an output register; a beat is taken when
// np_tx_valid is high and np_tx_full low.  np_tx_stop is only looked at before
// a new packet starts.
//
// From the design description: priorities, FSM, header contents, payload
// re-pairing, ring-buffer handshake.  Own choices: ending packets by count,
// discarding packets for an unconfigured host, source VPID 0.
module nhtl_responder
  import nhtl_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [15:0]   my_node,
  input  nhtl_cfg_t     cfg,
  input  logic          cfg_complete,
  // NOTI-FIFO
  input  noti_req_t     noti_data,
  input  logic          noti_empty,
  output logic          noti_pop,
  // RRA-response FIFO
  input  rra_rsp_t      rsp_data,
  input  logic          rsp_empty,
  output logic          rsp_pop,
  // packet-info FIFO
  input  pinfo_t        pi_data,
  input  logic          pi_empty,
  output logic          pi_pop,
  // payload FIFO
  input  data_entry_t   dt_data,
  input  logic          dt_empty,
  output logic          dt_pop,
  // ring buffers (trace, HICANN)
  input  logic [63:0]   t_addr,
  input  logic          t_addr_valid,
  input  logic          t_afull,
  output logic          t_inc_valid,
  input  logic          t_inc_ack,
  input  logic [63:0]   h_addr,
  input  logic          h_addr_valid,
  input  logic          h_afull,
  output logic          h_inc_valid,
  input  logic          h_inc_ack,
  output logic [LEVEL_W-1:0] inc_qw,
  // network port, send direction
  output logic [127:0]  np_tx_data,
  output logic          np_tx_sop,
  output logic [1:0]    np_tx_eop,
  output logic          np_tx_valid,
  input  logic          np_tx_full,
  input  logic          np_tx_stop,
  // event
  output logic          err_undef_host
);
  typedef enum logic [1:0] {SD_HEAD, SD_ADDR, SD_DATA} st_e;
  typedef enum logic [1:0] {S_NOTI, S_RRA, S_PNOTI, S_DATA} src_e;

  st_e        st;
  src_e       src;
  logic       drop;
  logic [5:0] rem;            // payload words still to send
  logic [63:0] msw_hold;
  logic [63:0] cell1;         // address or notification cell for SD_ADDR
  logic [63:0] rsp_data_r;    // read data of an RRA response

  wire ld = !np_tx_valid || !np_tx_full;   // output register can take a beat

  // --------------------------------------------------- source selection
  wire [15:0] dtype    = dt_data.ptype;
  wire        to_trace = (dtype == PT_TRACE);
  wire        to_hic   = (dtype == PT_HICANN_CFG);
  wire        inc_busy = t_inc_valid || h_inc_valid;
  wire        data_ok  = !dt_empty &&
                         (!cfg_complete ||
                          (!inc_busy &&
                           (to_trace ? (t_addr_valid && !t_afull) :
                            to_hic   ? (h_addr_valid && !h_afull) : 1'b1)));
  wire        pn_go    = !pi_empty && pi_data.noti_pkt;
  wire        pd_go    = !pi_empty && !pi_data.noti_pkt && data_ok;

  logic start;
  src_e nsrc;
  always_comb begin
    nsrc  = S_NOTI;
    start = 1'b0;
    if (st == SD_HEAD && ld && !np_tx_stop) begin
      if (!noti_empty)     begin nsrc = S_NOTI;  start = 1'b1; end
      else if (!rsp_empty) begin nsrc = S_RRA;   start = 1'b1; end
      else if (pn_go)      begin nsrc = S_PNOTI; start = 1'b1; end
      else if (pd_go)      begin nsrc = S_DATA;  start = 1'b1; end
    end
  end
  wire ndrop = (nsrc == S_PNOTI || nsrc == S_DATA) && !cfg_complete;

  // ----------------------------------------------------- header building
  sop_t  sop;
  desc_t dsc;
  logic [63:0] c1;
  logic [5:0]  nwords;
  always_comb begin
    sop = '0;
    sop.cell_type = SOP_TYPE_RMA;
    sop.tu        = TU_COMPLETER;
    dsc = '0;
    dsc.src_node  = my_node;
    c1 = '0;
    nwords = pi_data.count[5:0];
    unique case (nsrc)
      S_NOTI: begin
        sop.dest_node = noti_data.dest_node;
        sop.dest_vpid = 10'(noti_data.dest_vpid);
        dsc.pdid      = noti_data.pdid;
        dsc.cmd       = CMD_PUT_NOTI;
        dsc.noti      = 2'b10;
      end
      S_RRA: begin
        sop.dest_node = rsp_data.dest_node;
        sop.dest_vpid = 10'(rsp_data.dest_vpid);
        dsc.pdid      = rsp_data.pdid;
        dsc.cmd       = CMD_GET_BYTE_RSP;
        dsc.mode[M_RRA] = 1'b1;
        dsc.mode[M_TE]  = rsp_data.te;
        dsc.noti      = {rsp_data.noti1, 1'b0};
        dsc.tspec     = 10'd7;
        c1            = rsp_data.resp_addr;
      end
      S_PNOTI: begin
        sop.dest_node = cfg.host_node;
        sop.dest_vpid = cfg.host_vpid;
        dsc.pdid      = cfg.host_pdid;
        dsc.cmd       = CMD_PUT_NOTI;
        dsc.mode[M_TE] = cfg.host_te;
        dsc.noti      = 2'b10;
        c1[28:0]      = pi_data.count;
        c1[63:48]     = pi_data.noti_type;
        if (pi_data.noti_type == PT_TRACE)
          c1[47:32] = {cfg.trace_addr_acks, cfg.trace_space_acks};
        else
          c1[47:32] = {cfg.hicann_addr_acks, cfg.hicann_space_acks};
      end
      default: begin // S_DATA
        sop.dest_node = cfg.host_node;
        sop.dest_vpid = cfg.host_vpid;
        dsc.pdid      = cfg.host_pdid;
        dsc.cmd       = CMD_PUT_QW;
        dsc.mode[M_TE] = cfg.host_te;
        dsc.noti      = {pi_data.noti_bit, 1'b0};
        dsc.tspec     = {1'b0, nwords - 6'd1, 3'b111};   // payload bytes - 1
        c1            = to_trace ? t_addr : to_hic ? h_addr : cfg.fpga_cfg_addr;
      end
    endcase
  end

  // ------------------------------------------------- beats after the header
  // SD_ADDR: {first word, cell1}; SD_DATA: {next entry lsw, held msw}
  wire need_entry = (src == S_DATA) && ((st == SD_ADDR) || (st == SD_DATA && rem >= 6'd2));
  wire addr_go = (st == SD_ADDR) && ld && (!need_entry || !dt_empty);
  wire data_go = (st == SD_DATA) && ld && (!need_entry || !dt_empty);

  assign noti_pop = start && nsrc == S_NOTI;
  assign rsp_pop  = start && nsrc == S_RRA;
  assign pi_pop   = start && (nsrc == S_PNOTI || nsrc == S_DATA);
  assign dt_pop   = (addr_go || data_go) && need_entry;
  assign err_undef_host = start && ndrop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= SD_HEAD; src <= S_NOTI; drop <= 1'b0; rem <= '0;
      msw_hold <= '0; cell1 <= '0;
      np_tx_data <= '0; np_tx_sop <= 1'b0; np_tx_eop <= '0; np_tx_valid <= 1'b0;
      t_inc_valid <= 1'b0; h_inc_valid <= 1'b0; inc_qw <= '0;
    end else begin
      if (ld) np_tx_valid <= 1'b0;
      if (t_inc_ack) t_inc_valid <= 1'b0;
      if (h_inc_ack) h_inc_valid <= 1'b0;
      unique case (st)
        SD_HEAD: if (start) begin
          src   <= nsrc;
          drop  <= ndrop;
          cell1 <= c1;
          rem   <= (nsrc == S_DATA) ? nwords : 6'd0;
          np_tx_data  <= {64'(dsc), 64'(sop)};
          np_tx_sop   <= 1'b1;
          np_tx_eop   <= 2'b00;
          np_tx_valid <= !ndrop;
          if (nsrc == S_DATA && !ndrop) begin
            inc_qw      <= LEVEL_W'(nwords);
            t_inc_valid <= to_trace;
            h_inc_valid <= to_hic;
          end
          st <= SD_ADDR;
        end
        SD_ADDR: if (addr_go) begin
          np_tx_sop   <= 1'b0;
          np_tx_valid <= !drop;
          if (src == S_DATA) begin
            np_tx_data <= {dt_data.lsw, cell1};
            msw_hold   <= dt_data.msw;
            rem        <= rem - 6'd1;
            np_tx_eop  <= (rem == 6'd1) ? 2'b10 : 2'b00;
            st         <= (rem == 6'd1) ? SD_HEAD : SD_DATA;
          end else if (src == S_RRA) begin
            np_tx_data <= {rsp_data_r, cell1};
            np_tx_eop  <= 2'b10;
            st         <= SD_HEAD;
          end else begin
            np_tx_data <= {64'h0, cell1};
            np_tx_eop  <= 2'b01;
            st         <= SD_HEAD;
          end
        end
        SD_DATA: if (data_go) begin
          np_tx_valid <= !drop;
          if (rem == 6'd1) begin
            np_tx_data <= {64'h0, msw_hold};
            np_tx_eop  <= 2'b01;
            rem        <= '0;
            st         <= SD_HEAD;
          end else begin
            np_tx_data <= {dt_data.lsw, msw_hold};
            msw_hold   <= dt_data.msw;
            np_tx_eop  <= (rem == 6'd2) ? 2'b10 : 2'b00;
            rem        <= rem - 6'd2;
            if (rem == 6'd2) st <= SD_HEAD;
          end
        end
        default: st <= SD_HEAD;
      endcase
    end
  end

  // read data of the RRA response, captured with the header
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rsp_data_r <= '0;
    else if (start && nsrc == S_RRA) rsp_data_r <= rsp_data.rdata;
  end

  a_sop_only_in_head: assert property (@(posedge clk) disable iff (!rst_n)
    (np_tx_valid && np_tx_sop) |-> (np_tx_eop == 2'b00));
endmodule
