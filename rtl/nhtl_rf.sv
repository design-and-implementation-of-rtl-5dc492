// nhtl_rf: NHTL sub-registerfile (configuration registers and counters).
//
// Holds the eight configuration registers that describe the partner host
// (node, PDID, VPID, translate-enable), the host-memory ring buffers for trace
// data and HICANN-configuration responses, the fixed address for FPGA-
// configuration responses and the notification behaviour, plus nine
// performance counters and eight error counters.  A write of any value to the
// reinit register (0x1048) clears all counters.
//
// Ring-buffer initialisation: writing config_partner_host_3 (trace) or
// config_partner_host_6 (HICANN) with bit 48 set requests an init.  The
// request is passed to the ring-buffer controller as a one-cycle pulse as soon
// as all eight configuration registers have been written at least once.
// Each completed init increments a read-only "address acknowledged" counter if
// the start address was changed since the previous init and a "space
// acknowledged" counter if the size was changed; both are sent to the host in
// every payload notification.
//
// Bus: one request per rf_req.valid; the response (rdata, invalid flag) comes
// exactly one cycle later for reads and writes alike.  Counters read as
// CNT_W-bit values, zero-extended.
//
// From the design description: register names, addresses, the counter set,
// the reinit register, bit 48 as init bit, MODE[2] as translate enable, the
// byte-unit sizes and the 4 x 62 QW almost-full margin.  Own choices: the bit
// positions of fields whose figures are not legible (noted below), the
// counter width and the exact acknowledge counting rule.
//   host_1 : [15:0] node, [31:16] PDID, [41:32] VPID, [47:42] MODE
//   host_3/6 : [31:0] size in bytes, [39:32] addr acks (RO),
//              [47:40] space acks (RO), [48] init (write-only, reads 0)
//   *_noti_behav : [31:0] timeout in 125 MHz cycles, [60:32] period in packets
module nhtl_rf
  import nhtl_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  rf_req_t       rf_req,
  output rf_rsp_t       rf_rsp,
  input  nhtl_events_t  ev,
  output nhtl_cfg_t     cfg,
  output logic          cfg_complete,    // all eight registers written
  // ring-buffer controller initialisation
  output logic          trace_init,
  output logic [63:0]   trace_start,
  output logic [LEVEL_W-1:0] trace_space_qw,
  input  logic          trace_init_done,
  output logic          hicann_init,
  output logic [63:0]   hicann_start,
  output logic [LEVEL_W-1:0] hicann_space_qw,
  input  logic          hicann_init_done,
  output logic [LEVEL_W-1:0] afull_qw
);
  logic [63:0] host1, host2, host4, host5;
  logic [31:0] size3, size6;
  logic [63:0] tnoti, hnoti;
  logic [7:0]  written;
  logic        treq, hreq;                  // pending init requests
  logic        t_addr_chg, t_size_chg, h_addr_chg, h_size_chg;
  logic [7:0]  t_aack, t_sack, h_aack, h_sack;

  localparam int unsigned NCNT = 17;
  logic [CNT_W-1:0] cnt [NCNT];
  logic [NCNT-1:0]  inc;
  logic             cfg_reinit_err;

  // counter order follows the address map: 0x1000.. (9 perf), 0x1050.. (8 err)
  assign inc = {ev.rra_put, ev.rra_get, ev.rma_put, ev.noti_put, ev.playb,
                ev.fpga_conf, ev.hicann_conf, ev.jtag, ev.ngbr,
                ev.err_cmd, ev.err_type, ev.err_psize, ev.err_ferror,
                ev.err_fmode, ev.err_rra_adr, ev.err_undef_host, cfg_reinit_err};

  wire wr = rf_req.valid && rf_req.we;
  wire [RF_AW-1:0] a = rf_req.addr;

  assign cfg_reinit_err = wr && (a == A_CFG_HOST_4) && written[3];
  assign cfg_complete   = &written;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      host1 <= '0; host2 <= '0; host4 <= '0; host5 <= '0;
      size3 <= '0; size6 <= '0; tnoti <= '0; hnoti <= '0;
      written <= '0; treq <= 1'b0; hreq <= 1'b0;
      t_addr_chg <= 1'b0; t_size_chg <= 1'b0; h_addr_chg <= 1'b0; h_size_chg <= 1'b0;
      t_aack <= '0; t_sack <= '0; h_aack <= '0; h_sack <= '0;
    end else begin
      if (wr) begin
        unique case (a)
          A_CFG_HOST_1: begin host1 <= rf_req.wdata; written[0] <= 1'b1; end
          A_CFG_HOST_2: begin
            if (rf_req.wdata != host2) t_addr_chg <= 1'b1;
            host2 <= rf_req.wdata; written[1] <= 1'b1;
          end
          A_CFG_HOST_3: begin
            if (rf_req.wdata[31:0] != size3) t_size_chg <= 1'b1;
            size3 <= rf_req.wdata[31:0]; written[2] <= 1'b1;
            if (rf_req.wdata[48]) treq <= 1'b1;
          end
          A_CFG_HOST_4: begin host4 <= rf_req.wdata; written[3] <= 1'b1; end
          A_CFG_HOST_5: begin
            if (rf_req.wdata != host5) h_addr_chg <= 1'b1;
            host5 <= rf_req.wdata; written[4] <= 1'b1;
          end
          A_CFG_HOST_6: begin
            if (rf_req.wdata[31:0] != size6) h_size_chg <= 1'b1;
            size6 <= rf_req.wdata[31:0]; written[5] <= 1'b1;
            if (rf_req.wdata[48]) hreq <= 1'b1;
          end
          A_CFG_TRACE_NOTI: begin tnoti <= rf_req.wdata; written[6] <= 1'b1; end
          A_CFG_HIC_NOTI:   begin hnoti <= rf_req.wdata; written[7] <= 1'b1; end
          default: ;
        endcase
      end
      if (trace_init)  treq <= 1'b0;
      if (hicann_init) hreq <= 1'b0;
      if (trace_init_done) begin
        if (t_addr_chg) t_aack <= t_aack + 1'b1;
        if (t_size_chg) t_sack <= t_sack + 1'b1;
        t_addr_chg <= 1'b0; t_size_chg <= 1'b0;
      end
      if (hicann_init_done) begin
        if (h_addr_chg) h_aack <= h_aack + 1'b1;
        if (h_size_chg) h_sack <= h_sack + 1'b1;
        h_addr_chg <= 1'b0; h_size_chg <= 1'b0;
      end
    end
  end

  // init pulses: request pending and every register written once
  assign trace_init  = treq && cfg_complete;
  assign hicann_init = hreq && cfg_complete;

  assign trace_start     = host2;
  assign trace_space_qw  = LEVEL_W'(size3 >> 3);
  assign hicann_start    = host5;
  assign hicann_space_qw = LEVEL_W'(size6 >> 3);
  assign afull_qw        = LEVEL_W'(AFULL_QW);

  // counters
  wire reinit = wr && (a == A_CNT_REINIT);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCNT; i++) cnt[i] <= '0;
    end else begin
      for (int i = 0; i < NCNT; i++) begin
        if (reinit)                cnt[i] <= '0;
        else if (inc[NCNT-1-i])    cnt[i] <= cnt[i] + 1'b1;
      end
    end
  end

  // read mux and response, one cycle after the request
  logic [63:0] rdata;
  logic        hit;
  always_comb begin
    rdata = '0;
    hit   = 1'b1;
    if (a >= A_PERF_RRA_PUT && a <= A_PERF_NGBR && a[2:0] == 3'b000)
      rdata = 64'(cnt[5'((a - A_PERF_RRA_PUT) >> 3)]);
    else if (a >= A_ERR_CMD && a <= A_ERR_CFG_REINIT && a[2:0] == 3'b000)
      rdata = 64'(cnt[5'd9 + 5'((a - A_ERR_CMD) >> 3)]);
    else begin
      unique case (a)
        A_CNT_REINIT:     rdata = '0;
        A_CFG_HOST_1:     rdata = host1;
        A_CFG_HOST_2:     rdata = host2;
        A_CFG_HOST_3:     rdata = {16'h0, t_sack, t_aack, size3};
        A_CFG_HOST_4:     rdata = host4;
        A_CFG_HOST_5:     rdata = host5;
        A_CFG_HOST_6:     rdata = {16'h0, h_sack, h_aack, size6};
        A_CFG_TRACE_NOTI: rdata = tnoti;
        A_CFG_HIC_NOTI:   rdata = hnoti;
        default:          hit = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rf_rsp <= '0;
    else begin
      rf_rsp.valid   <= rf_req.valid;
      rf_rsp.invalid <= rf_req.valid && !hit;
      rf_rsp.rdata   <= rf_req.we ? 64'h0 : rdata;
    end
  end

  // decoded configuration
  always_comb begin
    cfg = '0;
    cfg.host_node         = host1[15:0];
    cfg.host_pdid         = host1[31:16];
    cfg.host_vpid         = host1[41:32];
    cfg.host_te           = host1[32 + 10 + M_TE];
    cfg.fpga_cfg_addr     = host4;
    cfg.trace_buf_bytes   = size3;
    cfg.trace_timeout     = tnoti[31:0];
    cfg.trace_noti_pkts   = tnoti[60:32];
    cfg.hicann_timeout    = hnoti[31:0];
    cfg.hicann_noti_pkts  = hnoti[60:32];
    cfg.trace_addr_acks   = t_aack;
    cfg.trace_space_acks  = t_sack;
    cfg.hicann_addr_acks  = h_aack;
    cfg.hicann_space_acks = h_sack;
  end
endmodule
