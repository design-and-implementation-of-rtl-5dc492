// tb_nhtl_rra: Remote Registerfile Access unit.  A queue stands in for the
// RRA-FIFO and a small registerfile model answers one cycle after each
// request (addresses at or above 0x2000 are answered as invalid).  Random
// reads and writes, with random back-pressure on the response FIFO, are
// checked against the expected registerfile traffic, the GET_BYTE_RSP
// entries and the invalid-address error pulse.
module tb_nhtl_rra;
  import nhtl_pkg::*;
  logic clk = 0, rst_n = 0;
  rra_req_t req_data;
  logic req_empty, req_pop, rsp_push, rsp_full, err_rra_adr;
  rf_req_t rf_req;
  rf_rsp_t rf_rsp;
  rra_rsp_t rsp_data;
  int checks = 0, failures = 0;
  rra_req_t reqs[$], exp_rf[$];
  rra_rsp_t exp_rsp[$];
  int exp_err = 0, got_err = 0;

  nhtl_rra dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign req_empty = (reqs.size() == 0);
  assign req_data  = req_empty ? '0 : reqs[0];

  // registerfile model: read data is a function of the address
  function automatic logic [63:0] rf_val(input logic [15:0] a);
    return {a, ~a, a ^ 16'h5A5A, 16'h1234};
  endfunction
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rf_rsp <= '0;
    else begin
      rf_rsp.valid   <= rf_req.valid;
      rf_rsp.invalid <= rf_req.valid && rf_req.addr >= 16'h2000;
      rf_rsp.rdata   <= rf_req.we ? 64'h0 : rf_val(rf_req.addr);
    end
  end

  bit pop_pending = 0;
  always @(negedge clk) if (rst_n) begin
    if (pop_pending) void'(reqs.pop_front());
    pop_pending = 0;
    rsp_full = ($urandom % 4) == 0;
    #1;
    if (rf_req.valid) begin
      rra_req_t e;
      checks++;
      e = exp_rf.pop_front();
      if (rf_req.we !== !e.is_read || rf_req.addr !== e.addr[15:0] ||
          (!e.is_read && rf_req.wdata !== e.wdata)) begin
        failures++; $display("rf access mismatch addr %h exp %h", rf_req.addr, e.addr[15:0]);
      end
    end
    if (rsp_push) begin
      rra_rsp_t r;
      checks++;
      r = exp_rsp.pop_front();
      if (rsp_data !== r) begin failures++; $display("response %h exp %h", rsp_data, r); end
    end
    if (err_rra_adr) got_err++;
  end
  always @(posedge clk) if (req_pop) pop_pending = 1;   // value before the edge

  initial begin
    rsp_full = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      rra_req_t q;
      q.is_read   = $urandom % 2;
      q.addr      = {48'h0, ($urandom % 8 == 0) ? 16'h2000 + 16'($urandom % 64) * 8
                                                : 16'h1000 + 16'($urandom % 26) * 8};
      q.wdata     = {$urandom, $urandom};
      q.dest_node = 16'($urandom);
      q.dest_vpid = 8'($urandom);
      q.pdid      = 16'($urandom);
      q.te        = 1'($urandom);
      q.noti1     = 1'($urandom);
      exp_rf.push_back(q);
      if (q.is_read) begin
        rra_rsp_t r;
        r.rdata = q.addr[15:0] >= 16'h2000 ? 64'h0 : rf_val(q.addr[15:0]);
        r.resp_addr = q.wdata; r.dest_node = q.dest_node; r.dest_vpid = q.dest_vpid;
        r.pdid = q.pdid; r.te = q.te; r.noti1 = q.noti1;
        exp_rsp.push_back(r);
      end
      if (q.addr[15:0] >= 16'h2000) exp_err++;
      @(negedge clk); #3;                  // after the consumer above
      reqs.push_back(q);
      repeat ($urandom % 3) @(negedge clk);
    end
    while (reqs.size() > 0) @(negedge clk);
    repeat (10) @(negedge clk);
    checks++;
    if (exp_rf.size() != 0 || exp_rsp.size() != 0) begin
      failures++; $display("left over: %0d rf, %0d rsp", exp_rf.size(), exp_rsp.size());
    end
    checks++;
    if (got_err != exp_err) begin failures++; $display("errors %0d exp %0d", got_err, exp_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
