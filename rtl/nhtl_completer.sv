// nhtl_completer: receive side of the NHTL.
//
// Takes EXTOLL RMA packets from the network port, 128 bit (two cells) per
// shift-out, and sorts them:
//   RMA_PUT_QW / RMA_PUT_IMM    payload for the core logic -> payload FIFO,
//                               the payload type comes from address bits
//                               [63:48]; a completion notification is
//                               requested when NOTI[1] is set
//   RMA_PUT_BYTE with RRA       registerfile write  -> RRA-FIFO
//   RMA_GET_BYTE with RRA       registerfile read   -> RRA-FIFO
//   RMA_PUT_NOTI                host acknowledge    -> ring-buffer decrement
//                               (trace or HICANN, chosen by the notification
//                               type), QW count in bits [28:0] of the cell
// and raises one-cycle counter events for the registerfile.
//
// A three-state FSM drives it.  LD_HEAD waits for a shift-out with sop and
// stores the SOP cell and the descriptor header.  LD_ADDR takes the next
// beat: the address cell in the low half and the first payload cell (or the
// write data / response address) in the high half.  LD_DATA takes further
// payload beats until eop.  Because the first payload word arrives in the high
// half of a beat, payload words are re-paired ("payload shifting"): the high
// half is held one beat and written to the FIFO as the low word together with
// the low half of the next beat.  When a packet ends in the high half of its
// last beat, the held word is written alone (eop on the low word) in the next
// cycle, in parallel with the next header beat.
//
// Interface timing: np_rx_data/sop/eop are valid while np_rx_empty is low
// (show-ahead); np_rx_shiftout consumes them.  The completer shifts out only
// when every FIFO it may write has room, so no packet part is ever lost.
//
// From the design description: FSM, field usage, command and type decoding,
// payload shifting and counter events.  Own choices: the decisions on faulty
// packets (a wrong payload type drops the payload, an RRA access with a
// payload size other than 8 bytes is dropped, all other faults are only
// counted) and issuing the completion notification at the address beat.
module nhtl_completer
  import nhtl_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // EXTOLL network port, receive direction
  input  logic [127:0]  np_rx_data,
  input  logic          np_rx_sop,
  input  logic [1:0]    np_rx_eop,
  input  logic          np_rx_empty,
  output logic          np_rx_shiftout,
  // RRA-FIFO
  output logic          rra_push,
  output rra_req_t      rra_data,
  input  logic          rra_full,
  // NOTI-FIFO
  output logic          noti_push,
  output noti_req_t     noti_data,
  input  logic          noti_full,
  // payload FIFO towards the AL-read interface
  output logic          pl_push,
  output data_entry_t   pl_data,
  input  logic          pl_full,
  // ring-buffer decrement interfaces
  output logic          tdec_valid,
  output logic          hdec_valid,
  output logic [LEVEL_W-1:0] dec_qw,
  input  logic          tdec_full,
  input  logic          hdec_full,
  // counter events
  output nhtl_events_t  ev
);
  typedef enum logic [1:0] {LD_HEAD, LD_ADDR, LD_DATA} st_e;
  st_e st;

  desc_t       hdr;
  logic        pass;          // payload of this packet goes to the FIFO
  logic [15:0] ptype;
  logic [63:0] hold;          // delayed payload word
  logic        flush;         // held word still to be written alone

  wire room = !rra_full && !noti_full && !pl_full && !tdec_full && !hdec_full;
  assign np_rx_shiftout = !np_rx_empty && room;
  wire beat = np_rx_shiftout;

  wire [63:0] lo = np_rx_data[63:0];
  wire [63:0] hi = np_rx_data[127:64];
  wire        last = |np_rx_eop;

  // ---------------------------------------------- decode at the address beat
  logic is_put, is_get_rra, is_put_rra, is_noti, bad_cmd, type_ok, size_ok;
  logic [15:0] atype;
  always_comb begin
    atype      = lo[63:48];
    is_put     = (hdr.cmd == CMD_PUT_QW) || (hdr.cmd == CMD_PUT_IMM);
    is_put_rra = (hdr.cmd == CMD_PUT_BYTE) && hdr.mode[M_RRA];
    is_get_rra = (hdr.cmd == CMD_GET_BYTE) && hdr.mode[M_RRA];
    is_noti    = (hdr.cmd == CMD_PUT_NOTI);
    bad_cmd    = !(is_put || is_put_rra || is_get_rra || is_noti);
    type_ok    = (atype == PT_PLAYBACK) || (atype == PT_FPGA_CFG) ||
                 (atype == PT_HICANN_CFG) || (atype == PT_JTAG);
    size_ok    = (is_put_rra || is_get_rra) ? (hdr.tspec == 10'd7)
                                            : (hdr.tspec[2:0] == 3'b111);
  end

  wire addr_beat = beat && (st == LD_ADDR);
  wire data_beat = beat && (st == LD_DATA);

  // RRA-FIFO
  assign rra_push = addr_beat && (is_put_rra || is_get_rra) && size_ok;
  always_comb begin
    rra_data           = '0;
    rra_data.is_read   = is_get_rra;
    rra_data.addr      = lo;
    rra_data.wdata     = hi;
    rra_data.dest_node = hdr.src_node;
    rra_data.dest_vpid = hdr.src_vpid;
    rra_data.pdid      = hdr.pdid;
    rra_data.te        = hdr.mode[M_TE];
    rra_data.noti1     = hdr.noti[1];
  end

  // NOTI-FIFO: completer notification for puts, responder notification for gets
  assign noti_push = addr_beat &&
                     (((is_put || is_put_rra) && hdr.noti[1]) || (is_get_rra && hdr.noti[0]));
  assign noti_data = '{dest_node: hdr.src_node, dest_vpid: hdr.src_vpid, pdid: hdr.pdid};

  // host acknowledges
  assign dec_qw     = lo[LEVEL_W-1:0];
  assign tdec_valid = addr_beat && is_noti && (atype == PT_TRACE);
  assign hdec_valid = addr_beat && is_noti && (atype == PT_HICANN_CFG);

  // payload FIFO
  always_comb begin
    pl_push = 1'b0;
    pl_data = '0;
    pl_data.ptype = ptype;
    if (flush) begin
      pl_push     = !pl_full;
      pl_data.lsw = hold;
      pl_data.eop = 2'b01;
    end else if (addr_beat && is_put && type_ok && np_rx_eop[1]) begin
      pl_push       = 1'b1;           // single-word payload
      pl_data.ptype = atype;
      pl_data.lsw   = hi;
      pl_data.eop   = 2'b01;
    end else if (data_beat && pass) begin
      pl_push     = 1'b1;
      pl_data.lsw = hold;
      pl_data.msw = lo;
      pl_data.eop = np_rx_eop[0] ? 2'b10 : 2'b00;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= LD_HEAD; hdr <= '0; pass <= 1'b0; ptype <= '0; hold <= '0; flush <= 1'b0;
    end else begin
      if (flush && !pl_full) flush <= 1'b0;
      if (beat) begin
        unique case (st)
          LD_HEAD: if (np_rx_sop && !last) begin
            hdr <= desc_t'(hi);
            st  <= LD_ADDR;
          end
          LD_ADDR: begin
            pass  <= is_put && type_ok;
            ptype <= atype;
            hold  <= hi;
            st    <= last ? LD_HEAD : LD_DATA;
          end
          LD_DATA: begin
            hold <= hi;
            if (pass && np_rx_eop[1]) flush <= 1'b1;
            if (last) st <= LD_HEAD;
          end
          default: st <= LD_HEAD;
        endcase
      end
    end
  end

  // counter events
  always_comb begin
    ev = '0;
    if (addr_beat) begin
      ev.rra_put     = is_put_rra;
      ev.rra_get     = is_get_rra;
      ev.rma_put     = is_put || is_put_rra;
      ev.noti_put    = is_noti;
      ev.playb       = is_put && atype == PT_PLAYBACK;
      ev.fpga_conf   = is_put && atype == PT_FPGA_CFG;
      ev.hicann_conf = is_put && atype == PT_HICANN_CFG;
      ev.jtag        = is_put && atype == PT_JTAG;
      ev.err_cmd     = bad_cmd;
      ev.err_type    = is_put && !type_ok;
      ev.err_psize   = (is_put || is_put_rra || is_get_rra) && !size_ok;
      ev.err_ferror  = |hdr.error;
      ev.err_fmode   = hdr.mode[M_ERA] || hdr.mode[M_NTR] || hdr.mode[M_EWA] || hdr.mode[M_INT];
    end
  end
endmodule
