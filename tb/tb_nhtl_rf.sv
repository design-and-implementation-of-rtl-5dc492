// tb_nhtl_rf: NHTL registerfile.  Writes and reads back the configuration
// registers, checks that a ring-buffer init request waits until all eight
// registers were written, checks the decoded configuration, counter events,
// the reinit register, the config_partner_host_4 re-write error, the
// acknowledge counters and the invalid-address flag.
module tb_nhtl_rf;
  import nhtl_pkg::*;
  logic clk = 0, rst_n = 0;
  rf_req_t rf_req;
  rf_rsp_t rf_rsp;
  nhtl_events_t ev;
  nhtl_cfg_t cfg;
  logic cfg_complete, trace_init, hicann_init, trace_init_done, hicann_init_done;
  logic [63:0] trace_start, hicann_start;
  logic [LEVEL_W-1:0] trace_space_qw, hicann_space_qw, afull_qw;
  int checks = 0, failures = 0, tinit_pulses = 0;

  nhtl_rf dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (trace_init) tinit_pulses++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  logic [63:0] rd;
  logic        rd_inv;
  task automatic acc(input logic we, input logic [15:0] a, input logic [63:0] d);
    @(negedge clk);
    rf_req = '{valid: 1'b1, we: we, addr: a, wdata: d};
    @(negedge clk);
    rf_req = '0;
    checks++;
    if (!rf_rsp.valid) begin failures++; $display("no response for %h", a); end
    rd = rf_rsp.rdata; rd_inv = rf_rsp.invalid;
  endtask

  initial begin
    rf_req = '0; ev = '0; trace_init_done = 0; hicann_init_done = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    acc(1, A_CFG_HOST_1, {16'h0, 6'b000100, 10'h155, 16'hBEEF, 16'h0042});
    acc(1, A_CFG_HOST_2, 64'h0000_1000_0000_0000);
    acc(1, A_CFG_HOST_3, (64'h1 << 48) | 64'd65536);       // init requested early
    acc(1, A_CFG_HOST_4, 64'h0000_2000_0000_0040);
    acc(1, A_CFG_HOST_5, 64'h0000_3000_0000_0000);
    acc(1, A_CFG_HOST_6, 64'd8192);
    acc(1, A_CFG_TRACE_NOTI, {3'b0, 29'd10, 32'd1000});
    chk("no init before all written", 64'(tinit_pulses), 0);
    acc(1, A_CFG_HIC_NOTI, {3'b0, 29'd4, 32'd500});
    @(negedge clk);
    chk("one trace init pulse", 64'(tinit_pulses), 1);
    chk("cfg complete", 64'(cfg_complete), 1);
    chk("host node", 64'(cfg.host_node), 64'h0042);
    chk("host pdid", 64'(cfg.host_pdid), 64'hBEEF);
    chk("host vpid", 64'(cfg.host_vpid), 64'h155);
    chk("host te", 64'(cfg.host_te), 1);
    chk("trace space qw", 64'(trace_space_qw), 8192);
    chk("hicann space qw", 64'(hicann_space_qw), 1024);
    chk("afull", 64'(afull_qw), 248);
    chk("trace start", trace_start, 64'h0000_1000_0000_0000);
    chk("noti pkts", 64'(cfg.trace_noti_pkts), 10);
    chk("noti timeout", 64'(cfg.hicann_timeout), 500);
    acc(0, A_CFG_HOST_4, 0);  chk("read host4", rd, 64'h0000_2000_0000_0040);
    acc(0, A_CFG_HIC_NOTI, 0); chk("read hic noti", rd, {3'b0, 29'd4, 32'd500});
    // acknowledge counters after init done
    @(negedge clk); trace_init_done = 1; @(negedge clk); trace_init_done = 0;
    acc(0, A_CFG_HOST_3, 0); chk("host3 acks", rd, {16'h0, 8'd1, 8'd1, 32'd65536});
    // a new start address only: the address acknowledge counter alone advances
    acc(1, A_CFG_HOST_2, 64'h0000_1000_0000_8000);
    @(negedge clk); trace_init_done = 1; @(negedge clk); trace_init_done = 0;
    acc(0, A_CFG_HOST_3, 0); chk("host3 address ack only", rd, {16'h0, 8'd1, 8'd2, 32'd65536});
    // hicann init only on request
    acc(1, A_CFG_HOST_6, (64'h1 << 48) | 64'd8192);
    @(negedge clk);
    // counter events
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); ev = '0; ev.rra_put = 1; ev.err_type = 1; ev.ngbr = (i == 0);
    end
    @(negedge clk); ev = '0;
    acc(0, A_PERF_RRA_PUT, 0); chk("perf rra put", rd, 3);
    acc(0, A_PERF_NGBR, 0);    chk("perf ngbr", rd, 1);
    acc(0, A_ERR_TYPE, 0);     chk("err type", rd, 3);
    acc(1, A_CFG_HOST_4, 64'h55);   // second write: error
    acc(0, A_ERR_CFG_REINIT, 0); chk("cfg reinit err", rd, 1);
    acc(1, A_CNT_REINIT, 64'h1);
    acc(0, A_PERF_RRA_PUT, 0); chk("reinit clears", rd, 0);
    acc(0, A_ERR_TYPE, 0);     chk("reinit clears err", rd, 0);
    acc(0, 16'h10d0, 0);       chk("invalid flag", 64'(rd_inv), 1);
    acc(0, A_CFG_HOST_1, 0);   chk("valid flag", 64'(rd_inv), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
