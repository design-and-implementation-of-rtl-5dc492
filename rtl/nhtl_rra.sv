// nhtl_rra: remote registerfile access engine.
//
// Executes the registerfile requests that the completer placed in the
// RRA-FIFO, one at a time, on the registerfile bus towards the top
// registerfile (which routes them down to the addressed sub-registerfile).
// For a read, the returned data is combined with the header fields copied
// from the request and queued in the RRA-response FIFO, from which the
// responder builds an RMA_GET_BYTE_RSP packet.  A response flagged invalid
// (address outside every registerfile) raises the err_rra_adr event; a read
// then still answers, with data 0, so the host is not left waiting.
//
// Timing: IDLE -> request (one-cycle rf_req.valid) -> wait for rf_rsp.valid
// (any latency) -> IDLE.  A read request is only issued when the response
// FIFO has room.  The RF address is the low RF_AW bits of the 64-bit request
// address.
//
// From the design description: the forwarding of PUT_BYTE/GET_BYTE requests
// through the registerfile hierarchy and the response path via a FIFO to the
// responder.  Own choices: the bus protocol, one outstanding request, and the
// answer to invalid reads.
module nhtl_rra
  import nhtl_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // RRA-FIFO (show-ahead)
  input  rra_req_t  req_data,
  input  logic      req_empty,
  output logic      req_pop,
  // registerfile bus
  output rf_req_t   rf_req,
  input  rf_rsp_t   rf_rsp,
  // RRA-response FIFO
  output logic      rsp_push,
  output rra_rsp_t  rsp_data,
  input  logic      rsp_full,
  // event
  output logic      err_rra_adr
);
  typedef enum logic [1:0] {R_IDLE, R_REQ, R_WAIT} st_e;
  st_e      st;
  rra_req_t cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= R_IDLE;
      cur <= '0;
    end else begin
      unique case (st)
        R_IDLE: if (!req_empty && !(req_data.is_read && rsp_full)) begin
          cur <= req_data;
          st  <= R_REQ;
        end
        R_REQ:  st <= R_WAIT;
        R_WAIT: if (rf_rsp.valid) st <= R_IDLE;
        default: st <= R_IDLE;
      endcase
    end
  end

  assign req_pop = (st == R_IDLE) && !req_empty && !(req_data.is_read && rsp_full);

  always_comb begin
    rf_req       = '0;
    rf_req.valid = (st == R_REQ);
    rf_req.we    = !cur.is_read;
    rf_req.addr  = cur.addr[RF_AW-1:0];
    rf_req.wdata = cur.wdata;
  end

  wire done = (st == R_WAIT) && rf_rsp.valid;
  assign err_rra_adr = done && rf_rsp.invalid;
  assign rsp_push    = done && cur.is_read;
  always_comb begin
    rsp_data           = '0;
    rsp_data.rdata     = rf_rsp.invalid ? 64'h0 : rf_rsp.rdata;
    rsp_data.resp_addr = cur.wdata;
    rsp_data.dest_node = cur.dest_node;
    rsp_data.dest_vpid = cur.dest_vpid;
    rsp_data.pdid      = cur.pdid;
    rsp_data.te        = cur.te;
    rsp_data.noti1     = cur.noti1;
  end
endmodule
