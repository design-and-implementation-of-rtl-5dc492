// hmf_top_rf: top of the registerfile hierarchy of the communication FPGA.
//
// Registerfile requests from the NHTL's RRA engine enter here and are routed
// by address to a sub-registerfile: the NHTL registerfile (0x1000-0x10FF) or
// the JTAG-master registerfile (0x2000-0x21FF).  The response of the selected
// sub-registerfile is passed back unchanged.  A request to any other address
// is answered one cycle later with the invalid flag set, which the NHTL
// counts as err_cnt_invalid_rra_adr.
//
// Timing: the request is forwarded combinationally; sub-registerfiles answer
// with any latency, one request at a time.  The real top registerfile holds
// further sub-registerfiles of the core logic that are not part of this
// design; the two address windows are this design's own choice (the NHTL
// window follows the NHTL register addresses).
module hmf_top_rf
  import nhtl_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  rf_req_t m_req,
  output rf_rsp_t m_rsp,
  output rf_req_t nhtl_req,
  input  rf_rsp_t nhtl_rsp,
  output rf_req_t jtag_req,
  input  rf_rsp_t jtag_rsp
);
  wire sel_nhtl = (m_req.addr[RF_AW-1:8] == 8'h10);
  wire sel_jtag = (m_req.addr[RF_AW-1:9] == 7'h10);

  always_comb begin
    nhtl_req = m_req;
    jtag_req = m_req;
    nhtl_req.valid = m_req.valid && sel_nhtl;
    jtag_req.valid = m_req.valid && sel_jtag;
  end

  logic miss;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) miss <= 1'b0;
    else        miss <= m_req.valid && !sel_nhtl && !sel_jtag;
  end

  always_comb begin
    m_rsp = '0;
    if (nhtl_rsp.valid)      m_rsp = nhtl_rsp;
    else if (jtag_rsp.valid) m_rsp = jtag_rsp;
    else if (miss)           m_rsp = '{valid: 1'b1, invalid: 1'b1, rdata: 64'h0};
  end
endmodule
