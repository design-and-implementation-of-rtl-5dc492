// bss_extoll_fpga_top: network side of the BrainScaleS communication FPGA
// for EXTOLL.
//
// Puts together the parts that sit between the EXTOLL network port and the
// HMF core logic:
//   * nhtl_top     - the NHTL network interface (completer, responder,
//                    ring-buffer controllers, AL-interface, NHTL registers),
//   * hmf_top_rf   - the top of the registerfile hierarchy that the NHTL's
//                    remote registerfile accesses walk through,
//   * jtag_master  - the registerfile-driven JTAG master for the chain of the
//                    FPGA and its HICANN chips.
// The EXTOLL link/network port, the core logic behind the AL-interface, the
// clock generation and the DDR3 memories are not part of this module; their
// signals are the ports below.  clk_ext is the 210 MHz network clock (NHTL
// network side, registerfiles, JTAG master), clk_hmf the 125 MHz core clock.
// Placing the JTAG master on the registerfile rather than behind the AL-
// interface follows the design description.
module bss_extoll_fpga_top
  import nhtl_pkg::*;
(
  input  logic          clk_ext,
  input  logic          rst_ext_n,
  input  logic          clk_hmf,
  input  logic          rst_hmf_n,
  input  logic [15:0]   my_node,
  // EXTOLL network port
  input  logic [127:0]  np_rx_data,
  input  logic          np_rx_sop,
  input  logic [1:0]    np_rx_eop,
  input  logic          np_rx_empty,
  output logic          np_rx_shiftout,
  output logic [127:0]  np_tx_data,
  output logic          np_tx_sop,
  output logic [1:0]    np_tx_eop,
  output logic          np_tx_valid,
  input  logic          np_tx_full,
  input  logic          np_tx_stop,
  // AL-interface to the core logic
  output logic [63:0]   al_rd_data,
  output logic [15:0]   al_rd_type,
  output logic          al_rd_valid,
  input  logic          al_rd_next,
  input  logic [63:0]   al_wr_data,
  input  logic [15:0]   al_wr_type,
  input  logic          al_wr_valid,
  output logic          al_wr_next,
  // JTAG chain
  output logic          jtag_tck,
  output logic          jtag_tms,
  output logic          jtag_tdi,
  input  logic          jtag_tdo,
  // status
  output logic          trace_afull,
  output logic          hicann_afull
);
  rf_req_t m_req, nhtl_req, jtag_req;
  rf_rsp_t m_rsp, nhtl_rsp, jtag_rsp;

  nhtl_top u_nhtl (
    .clk_ext, .rst_ext_n, .clk_hmf, .rst_hmf_n, .my_node,
    .np_rx_data, .np_rx_sop, .np_rx_eop, .np_rx_empty, .np_rx_shiftout,
    .np_tx_data, .np_tx_sop, .np_tx_eop, .np_tx_valid, .np_tx_full, .np_tx_stop,
    .al_rd_data, .al_rd_type, .al_rd_valid, .al_rd_next,
    .al_wr_data, .al_wr_type, .al_wr_valid, .al_wr_next,
    .rf_m_req(m_req), .rf_m_rsp(m_rsp),
    .rf_s_req(nhtl_req), .rf_s_rsp(nhtl_rsp),
    .trace_afull, .hicann_afull
  );

  hmf_top_rf u_top_rf (
    .clk(clk_ext), .rst_n(rst_ext_n),
    .m_req, .m_rsp, .nhtl_req, .nhtl_rsp, .jtag_req, .jtag_rsp
  );

  jtag_master u_jtag (
    .clk(clk_ext), .rst_n(rst_ext_n),
    .rf_req(jtag_req), .rf_rsp(jtag_rsp),
    .tck(jtag_tck), .tms(jtag_tms), .tdi(jtag_tdi), .tdo(jtag_tdo)
  );
endmodule
