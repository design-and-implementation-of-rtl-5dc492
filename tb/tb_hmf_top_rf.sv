// tb_hmf_top_rf: top-level registerfile address decoder.  Two slave models
// (NHTL window 0x1000-0x10FF, JTAG window 0x2000-0x21FF) answer one cycle
// later with data tagged by the slave; random accesses check routing, the
// returned data and the invalid answer for unmapped addresses.
module tb_hmf_top_rf;
  import nhtl_pkg::*;
  logic clk = 0, rst_n = 0;
  rf_req_t m_req, nhtl_req, jtag_req;
  rf_rsp_t m_rsp, nhtl_rsp, jtag_rsp;
  int checks = 0, failures = 0;

  hmf_top_rf dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin nhtl_rsp <= '0; jtag_rsp <= '0; end
    else begin
      nhtl_rsp <= '{valid: nhtl_req.valid, invalid: 1'b0, rdata: {16'hAAAA, 32'h0, nhtl_req.addr}};
      jtag_rsp <= '{valid: jtag_req.valid, invalid: 1'b0, rdata: {16'hBBBB, 32'h0, jtag_req.addr}};
    end
  end

  initial begin
    m_req = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      logic [15:0] a;
      int k;
      k = $urandom % 3;
      a = k == 0 ? 16'h1000 + 16'($urandom % 256) : k == 1 ? 16'h2000 + 16'($urandom % 512)
                 : 16'($urandom);
      @(negedge clk);
      m_req = '{valid: 1'b1, we: 1'($urandom), addr: a, wdata: {$urandom, $urandom}};
      #1;
      checks++;
      if (nhtl_req.valid !== (a[15:8] == 8'h10) || jtag_req.valid !== (a[15:9] == 7'h10)) begin
        failures++; $display("routing %h", a);
      end
      @(negedge clk);
      m_req = '0;
      checks++;
      if (!m_rsp.valid) begin failures++; $display("no answer %h", a); end
      else if (a[15:8] == 8'h10) begin
        if (m_rsp.invalid || m_rsp.rdata !== {16'hAAAA, 32'h0, a}) begin failures++; $display("nhtl data %h", a); end
      end else if (a[15:9] == 7'h10) begin
        if (m_rsp.invalid || m_rsp.rdata !== {16'hBBBB, 32'h0, a}) begin failures++; $display("jtag data %h", a); end
      end else if (!m_rsp.invalid) begin failures++; $display("missing invalid %h", a); end
      @(negedge clk);
      checks++;
      if (m_rsp.valid) begin failures++; $display("extra answer %h", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
