// nhtl_top: Network HMF Transaction Layer, the EXTOLL network interface of
// the BrainScaleS communication FPGA.
//
// Connects the EXTOLL network port (128-bit FIFO-like interface, network clock
// 210 MHz) with the application-layer (AL) interface of the HMF core logic
// (64-bit word plus 16-bit payload type in each direction, core clock 125 MHz).
//
// Receive path (network clock): the completer decodes each RMA packet.
// Registerfile accesses go through the RRA-FIFO to the RRA engine, which runs
// them on the registerfile bus (rf_m_*) towards the top registerfile; reads
// come back through the RRA-response FIFO.  Requested completion
// notifications go to the NOTI-FIFO.  Host acknowledges lower the fill level
// of the trace or HICANN ring-buffer controller.  Payload for the core logic
// crosses into the core clock domain in an asynchronous FIFO (128 bit + type
// + eop bits per entry) and is handed out word by word by the AL-read mux.
//
// Send path: the AL-write demux (core clock) packs words into entries of a
// second asynchronous payload FIFO, closes packets and triggers payload
// notifications through an asynchronous packet-information FIFO.  The
// responder (network clock) merges notifications, registerfile responses and
// core-logic packets onto the network port, taking write addresses for trace
// data and HICANN responses from the two ring-buffer controllers.
//
// The NHTL's own registerfile (configuration, counters) is a sub-
// registerfile reached from outside through rf_s_* (the top registerfile
// routes the NHTL address range there).  The configuration values used in the
// core clock domain (buffer size, notification period and timeout) are taken
// directly from registers of the network domain: they must only be changed
// while no traffic runs, as the register descriptions require for the ring
// buffers.  The ring-buffer initialisation is passed over as a toggle that is
// synchronised in the core domain.
//
// From the design description: the module structure, the FIFOs and their
// formats, the clock domains.  Own choices: FIFO depths (parameters) and the
// handling of the quasi-static configuration noted above.
module nhtl_top
  import nhtl_pkg::*;
#(
  parameter int unsigned ASYNC_DEPTH = 16,
  parameter int unsigned TX_DEPTH    = 32,   // holds one 62-QW packet (31 entries)
  parameter int unsigned SYNC_DEPTH  = 4
) (
  input  logic          clk_ext,        // EXTOLL network clock
  input  logic          rst_ext_n,
  input  logic          clk_hmf,        // HMF core-logic clock
  input  logic          rst_hmf_n,
  input  logic [15:0]   my_node,        // own EXTOLL node id
  // network port, receive
  input  logic [127:0]  np_rx_data,
  input  logic          np_rx_sop,
  input  logic [1:0]    np_rx_eop,
  input  logic          np_rx_empty,
  output logic          np_rx_shiftout,
  // network port, send
  output logic [127:0]  np_tx_data,
  output logic          np_tx_sop,
  output logic [1:0]    np_tx_eop,
  output logic          np_tx_valid,
  input  logic          np_tx_full,
  input  logic          np_tx_stop,
  // AL-read (network -> core)
  output logic [63:0]   al_rd_data,
  output logic [15:0]   al_rd_type,
  output logic          al_rd_valid,
  input  logic          al_rd_next,
  // AL-write (core -> network)
  input  logic [63:0]   al_wr_data,
  input  logic [15:0]   al_wr_type,
  input  logic          al_wr_valid,
  output logic          al_wr_next,
  // registerfile bus towards the top registerfile (master)
  output rf_req_t       rf_m_req,
  input  rf_rsp_t       rf_m_rsp,
  // NHTL sub-registerfile (slave)
  input  rf_req_t       rf_s_req,
  output rf_rsp_t       rf_s_rsp,
  // ring-buffer status
  output logic          trace_afull,
  output logic          hicann_afull
);
  // ------------------------------------------------------------ signals
  rra_req_t    rra_in, rra_out;
  logic        rra_push, rra_full, rra_empty, rra_pop;
  noti_req_t   noti_in, noti_out;
  logic        noti_push, noti_full, noti_empty, noti_pop;
  rra_rsp_t    rsp_in, rsp_out;
  logic        rsp_push, rsp_full, rsp_empty, rsp_pop;
  data_entry_t rxq_in, rxq_out, txq_in, txq_out;
  logic        rxq_push, rxq_full, rxq_empty, rxq_pop;
  logic        txq_push, txq_full, txq_empty, txq_pop;
  pinfo_t      piq_in, piq_out;
  logic        piq_push, piq_full, piq_empty, piq_pop;
  logic        tdec_valid, hdec_valid, tdec_full, hdec_full;
  logic [LEVEL_W-1:0] dec_qw, inc_qw;
  nhtl_events_t ev_c, ev;
  logic        err_rra_adr, err_undef_host;
  nhtl_cfg_t   cfg;
  logic        cfg_complete;
  logic        t_init, h_init, t_init_done, h_init_done;
  logic [63:0] t_start, h_start, t_addr, h_addr;
  logic [LEVEL_W-1:0] t_space, h_space, afull_qw, t_level, h_level;
  logic        t_addr_valid, h_addr_valid, t_afull, h_afull;
  logic        t_inc_valid, h_inc_valid, t_inc_ack, h_inc_ack;
  logic        t_initd, h_initd;
  logic        t_tog;

  // ------------------------------------------------------- receive path
  nhtl_completer u_completer (
    .clk(clk_ext), .rst_n(rst_ext_n),
    .np_rx_data, .np_rx_sop, .np_rx_eop, .np_rx_empty, .np_rx_shiftout,
    .rra_push, .rra_data(rra_in), .rra_full,
    .noti_push, .noti_data(noti_in), .noti_full,
    .pl_push(rxq_push), .pl_data(rxq_in), .pl_full(rxq_full),
    .tdec_valid, .hdec_valid, .dec_qw, .tdec_full, .hdec_full,
    .ev(ev_c)
  );

  nhtl_sync_fifo #(.WIDTH($bits(rra_req_t)), .DEPTH(SYNC_DEPTH)) u_rra_fifo (
    .clk(clk_ext), .rst_n(rst_ext_n),
    .wr_en(rra_push), .wr_data(rra_in), .full(rra_full),
    .rd_en(rra_pop), .rd_data(rra_out), .empty(rra_empty), .count()
  );

  nhtl_sync_fifo #(.WIDTH($bits(noti_req_t)), .DEPTH(SYNC_DEPTH)) u_noti_fifo (
    .clk(clk_ext), .rst_n(rst_ext_n),
    .wr_en(noti_push), .wr_data(noti_in), .full(noti_full),
    .rd_en(noti_pop), .rd_data(noti_out), .empty(noti_empty), .count()
  );

  nhtl_rra u_rra (
    .clk(clk_ext), .rst_n(rst_ext_n),
    .req_data(rra_out), .req_empty(rra_empty), .req_pop(rra_pop),
    .rf_req(rf_m_req), .rf_rsp(rf_m_rsp),
    .rsp_push, .rsp_data(rsp_in), .rsp_full,
    .err_rra_adr
  );

  nhtl_sync_fifo #(.WIDTH($bits(rra_rsp_t)), .DEPTH(SYNC_DEPTH)) u_rsp_fifo (
    .clk(clk_ext), .rst_n(rst_ext_n),
    .wr_en(rsp_push), .wr_data(rsp_in), .full(rsp_full),
    .rd_en(rsp_pop), .rd_data(rsp_out), .empty(rsp_empty), .count()
  );

  nhtl_async_fifo #(.WIDTH($bits(data_entry_t)), .DEPTH(ASYNC_DEPTH)) u_rx_fifo (
    .wclk(clk_ext), .wrst_n(rst_ext_n), .wr_en(rxq_push), .wr_data(rxq_in), .wfull(rxq_full),
    .rclk(clk_hmf), .rrst_n(rst_hmf_n), .rd_en(rxq_pop), .rd_data(rxq_out), .rempty(rxq_empty)
  );

  nhtl_al_read_mux u_al_rd (
    .clk(clk_hmf), .rst_n(rst_hmf_n),
    .fifo_data(rxq_out), .fifo_empty(rxq_empty), .fifo_pop(rxq_pop),
    .al_rd_data, .al_rd_type, .al_rd_valid, .al_rd_next
  );

  // ---------------------------------------------------------- send path
  nhtl_al_write_demux u_al_wr (
    .clk(clk_hmf), .rst_n(rst_hmf_n),
    .al_wr_data, .al_wr_type, .al_wr_valid, .al_wr_next,
    .trace_buf_qw(t_space),
    .trace_timeout(cfg.trace_timeout), .trace_noti_pkts(cfg.trace_noti_pkts),
    .hicann_timeout(cfg.hicann_timeout), .hicann_noti_pkts(cfg.hicann_noti_pkts),
    .trace_rb_toggle(t_tog),
    .dt_push(txq_push), .dt_data(txq_in), .dt_full(txq_full),
    .pi_push(piq_push), .pi_data(piq_in), .pi_full(piq_full)
  );

  nhtl_async_fifo #(.WIDTH($bits(data_entry_t)), .DEPTH(TX_DEPTH)) u_tx_fifo (
    .wclk(clk_hmf), .wrst_n(rst_hmf_n), .wr_en(txq_push), .wr_data(txq_in), .wfull(txq_full),
    .rclk(clk_ext), .rrst_n(rst_ext_n), .rd_en(txq_pop), .rd_data(txq_out), .rempty(txq_empty)
  );

  nhtl_async_fifo #(.WIDTH($bits(pinfo_t)), .DEPTH(ASYNC_DEPTH)) u_pinfo_fifo (
    .wclk(clk_hmf), .wrst_n(rst_hmf_n), .wr_en(piq_push), .wr_data(piq_in), .wfull(piq_full),
    .rclk(clk_ext), .rrst_n(rst_ext_n), .rd_en(piq_pop), .rd_data(piq_out), .rempty(piq_empty)
  );

  nhtl_responder u_responder (
    .clk(clk_ext), .rst_n(rst_ext_n), .my_node, .cfg, .cfg_complete,
    .noti_data(noti_out), .noti_empty, .noti_pop,
    .rsp_data(rsp_out), .rsp_empty, .rsp_pop,
    .pi_data(piq_out), .pi_empty(piq_empty), .pi_pop(piq_pop),
    .dt_data(txq_out), .dt_empty(txq_empty), .dt_pop(txq_pop),
    .t_addr, .t_addr_valid, .t_afull, .t_inc_valid, .t_inc_ack,
    .h_addr, .h_addr_valid, .h_afull, .h_inc_valid, .h_inc_ack,
    .inc_qw,
    .np_tx_data, .np_tx_sop, .np_tx_eop, .np_tx_valid, .np_tx_full, .np_tx_stop,
    .err_undef_host
  );

  // -------------------------------------------------------- ring buffers
  nhtl_ringbuffer_cntrl u_rb_trace (
    .clk(clk_ext), .rst_n(rst_ext_n),
    .init_start(t_init), .init_start_addr(t_start), .init_space_qw(t_space),
    .init_afull_qw(afull_qw), .init_done(t_init_done),
    .inc_valid(t_inc_valid), .inc_qw, .inc_ack(t_inc_ack),
    .wr_addr(t_addr), .addr_valid(t_addr_valid), .buffer_afull(t_afull),
    .dec_valid(tdec_valid), .dec_qw, .dec_full(tdec_full),
    .level(t_level), .initialised(t_initd)
  );

  nhtl_ringbuffer_cntrl u_rb_hicann (
    .clk(clk_ext), .rst_n(rst_ext_n),
    .init_start(h_init), .init_start_addr(h_start), .init_space_qw(h_space),
    .init_afull_qw(afull_qw), .init_done(h_init_done),
    .inc_valid(h_inc_valid), .inc_qw, .inc_ack(h_inc_ack),
    .wr_addr(h_addr), .addr_valid(h_addr_valid), .buffer_afull(h_afull),
    .dec_valid(hdec_valid), .dec_qw, .dec_full(hdec_full),
    .level(h_level), .initialised(h_initd)
  );

  assign trace_afull  = t_afull;
  assign hicann_afull = h_afull;

  always_ff @(posedge clk_ext or negedge rst_ext_n) begin
    if (!rst_ext_n) t_tog <= 1'b0;
    else if (t_init_done) t_tog <= ~t_tog;
  end

  // ------------------------------------------------------- registerfile
  always_comb begin
    ev = ev_c;
    ev.err_rra_adr    = err_rra_adr;
    ev.err_undef_host = err_undef_host;
  end

  nhtl_rf u_rf (
    .clk(clk_ext), .rst_n(rst_ext_n),
    .rf_req(rf_s_req), .rf_rsp(rf_s_rsp), .ev, .cfg, .cfg_complete,
    .trace_init(t_init), .trace_start(t_start), .trace_space_qw(t_space),
    .trace_init_done(t_init_done),
    .hicann_init(h_init), .hicann_start(h_start), .hicann_space_qw(h_space),
    .hicann_init_done(h_init_done),
    .afull_qw
  );

  wire unused = &{1'b0, t_level, h_level, t_initd, h_initd, h_init_done};
endmodule
