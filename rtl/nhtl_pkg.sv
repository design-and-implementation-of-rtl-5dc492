// nhtl_pkg: types and constants shared by the NHTL (Network HMF Transaction
// Layer), the EXTOLL network interface of the BrainScaleS communication FPGA.
//
// It holds the RMA command encodings, the application-layer payload types, the
// bit layout of the EXTOLL SOP cell and of the RMA network-descriptor header,
// the entry formats of the internal FIFOs and the registerfile bus types.
//
// Taken from the design description: command encodings, payload-type codes,
// the 62-QW maximum payload, the EOT marker 0xE11D, the SOP TYPE value 0x004,
// the completer target unit 3'b001, the descriptor field order of the first
// header quad-word (Error, MODE = {ERA,NTR,EWA,TE,INT,RRA}, Command, NOTI,
// Source VPID, type-specific bits, Source Node ID, PDID), the 146-bit data
// FIFO entry and the 47-bit packet-information FIFO entry, and all registerfile
// addresses.  Own choices: the SOP cell bit positions, the width of the VPID
// fields, the position of the EOT marker inside a QW and the registerfile bus.
package nhtl_pkg;

  // ---------------------------------------------------------------- RMA ---
  typedef enum logic [3:0] {
    CMD_GET_BYTE     = 4'b0000,
    CMD_PUT_BYTE     = 4'b0010,
    CMD_PUT_QW       = 4'b0011,
    CMD_PUT_NOTI     = 4'b0101,
    CMD_PUT_IMM      = 4'b0110,
    CMD_GET_BYTE_RSP = 4'b1010
  } rma_cmd_e;

  // AL payload types
  localparam logic [15:0] PT_PLAYBACK   = 16'h0C5A;
  localparam logic [15:0] PT_TRACE      = 16'h0CA5;
  localparam logic [15:0] PT_FPGA_CFG   = 16'h0C1B;
  localparam logic [15:0] PT_HICANN_CFG = 16'h2A1B;
  localparam logic [15:0] PT_JTAG       = 16'h06A4;

  // End-of-trace marker, compared with bits [15:0] of a trace QW
  localparam logic [15:0] EOT_MARKER = 16'hE11D;

  localparam int unsigned MAX_PAYLOAD_QW = 62;   // (512 B MTU - 16 B header) / 8
  localparam int unsigned AFULL_QW       = 4 * MAX_PAYLOAD_QW;  // almost-full margin

  localparam logic [11:0] SOP_TYPE_RMA = 12'h004;
  localparam logic [2:0]  TU_COMPLETER = 3'b001;

  // MODE bit indices inside the 6-bit modifier field
  localparam int unsigned M_RRA = 0;
  localparam int unsigned M_INT = 1;
  localparam int unsigned M_TE  = 2;
  localparam int unsigned M_EWA = 3;
  localparam int unsigned M_NTR = 4;
  localparam int unsigned M_ERA = 5;

  // EXTOLL SOP cell (64 bit).  The CRC field is filled by the network port.
  typedef struct packed {
    logic [11:0] cell_type;   // 12'h004 for RMA
    logic [15:0] crc;
    logic [1:0]  rsv;
    logic [1:0]  tc;
    logic [1:0]  vc;          // AVC/DVC
    logic        mc;
    logic [2:0]  tu;
    logic [9:0]  dest_vpid;
    logic [15:0] dest_node;
  } sop_t;

  // First QW of an RMA network descriptor: DW1 in [63:32], DW0 in [31:0]
  typedef struct packed {
    logic [1:0]  error;
    logic [5:0]  mode;        // {ERA,NTR,EWA,TE,INT,RRA}
    logic [3:0]  cmd;
    logic [1:0]  noti;        // [1] completer, [0] responder notification
    logic [7:0]  src_vpid;
    logic [9:0]  tspec;       // payload size (bytes-1) or payload[72:64]
    logic [15:0] src_node;
    logic [15:0] pdid;
  } desc_t;

  // ---------------------------------------------------- internal FIFOs ---
  // Payload data FIFO entry (146 bit)
  typedef struct packed {
    logic [1:0]  eop;         // [1] MSW is last word, [0] LSW is last word
    logic [15:0] ptype;
    logic [63:0] msw;
    logic [63:0] lsw;
  } data_entry_t;

  // Packet-information FIFO entry (47 bit)
  typedef struct packed {
    logic [15:0] noti_type;   // [46:31]
    logic        noti_pkt;    // [30] entry is a notification packet
    logic        noti_bit;    // [29] set NOTI[1] in the data packet
    logic [28:0] count;       // QWs notified, or payload QWs in [5:0]
  } pinfo_t;

  // NOTI-FIFO entry: header data for a completion notification
  typedef struct packed {
    logic [15:0] dest_node;
    logic [7:0]  dest_vpid;
    logic [15:0] pdid;
  } noti_req_t;

  // RRA-FIFO entry
  typedef struct packed {
    logic        is_read;
    logic [63:0] addr;
    logic [63:0] wdata;       // write data or response host write address
    logic [15:0] dest_node;
    logic [7:0]  dest_vpid;
    logic [15:0] pdid;
    logic        te;
    logic        noti1;
  } rra_req_t;

  // RRA-response FIFO entry (read data for a GET_BYTE_RSP packet)
  typedef struct packed {
    logic [63:0] rdata;
    logic [63:0] resp_addr;
    logic [15:0] dest_node;
    logic [7:0]  dest_vpid;
    logic [15:0] pdid;
    logic        te;
    logic        noti1;
  } rra_rsp_t;

  // Host acknowledge (decrement) forwarded to a ring-buffer controller
  localparam int unsigned LEVEL_W = 29;

  // ------------------------------------------------- registerfile bus ---
  localparam int unsigned RF_AW = 16;

  typedef struct packed {
    logic             valid;
    logic             we;
    logic [RF_AW-1:0] addr;
    logic [63:0]      wdata;
  } rf_req_t;

  typedef struct packed {
    logic        valid;
    logic        invalid;     // address outside the registerfile
    logic [63:0] rdata;
  } rf_rsp_t;

  // NHTL registerfile addresses
  localparam logic [RF_AW-1:0] A_PERF_RRA_PUT   = 16'h1000;
  localparam logic [RF_AW-1:0] A_PERF_RRA_GET   = 16'h1008;
  localparam logic [RF_AW-1:0] A_PERF_RMA_PUT   = 16'h1010;
  localparam logic [RF_AW-1:0] A_PERF_NOTI_PUT  = 16'h1018;
  localparam logic [RF_AW-1:0] A_PERF_PLAYB     = 16'h1020;
  localparam logic [RF_AW-1:0] A_PERF_FPGA_CONF = 16'h1028;
  localparam logic [RF_AW-1:0] A_PERF_HIC_CONF  = 16'h1030;
  localparam logic [RF_AW-1:0] A_PERF_JTAG      = 16'h1038;
  localparam logic [RF_AW-1:0] A_PERF_NGBR      = 16'h1040;
  localparam logic [RF_AW-1:0] A_CNT_REINIT     = 16'h1048;
  localparam logic [RF_AW-1:0] A_ERR_CMD        = 16'h1050;
  localparam logic [RF_AW-1:0] A_ERR_TYPE       = 16'h1058;
  localparam logic [RF_AW-1:0] A_ERR_PSIZE      = 16'h1060;
  localparam logic [RF_AW-1:0] A_ERR_FERROR     = 16'h1068;
  localparam logic [RF_AW-1:0] A_ERR_FMODE      = 16'h1070;
  localparam logic [RF_AW-1:0] A_ERR_RRA_ADR    = 16'h1078;
  localparam logic [RF_AW-1:0] A_ERR_UNDEF_HOST = 16'h1080;
  localparam logic [RF_AW-1:0] A_ERR_CFG_REINIT = 16'h1088;
  localparam logic [RF_AW-1:0] A_CFG_HOST_1     = 16'h1090;
  localparam logic [RF_AW-1:0] A_CFG_HOST_2     = 16'h1098;
  localparam logic [RF_AW-1:0] A_CFG_HOST_3     = 16'h10a0;
  localparam logic [RF_AW-1:0] A_CFG_HOST_4     = 16'h10a8;
  localparam logic [RF_AW-1:0] A_CFG_HOST_5     = 16'h10b0;
  localparam logic [RF_AW-1:0] A_CFG_HOST_6     = 16'h10b8;
  localparam logic [RF_AW-1:0] A_CFG_TRACE_NOTI = 16'h10c0;
  localparam logic [RF_AW-1:0] A_CFG_HIC_NOTI   = 16'h10c8;

  // Counter events raised by completer, RRA and responder (one bit each)
  typedef struct packed {
    logic rra_put;
    logic rra_get;
    logic rma_put;
    logic noti_put;
    logic playb;
    logic fpga_conf;
    logic hicann_conf;
    logic jtag;
    logic ngbr;
    logic err_cmd;
    logic err_type;
    logic err_psize;
    logic err_ferror;
    logic err_fmode;
    logic err_rra_adr;
    logic err_undef_host;
  } nhtl_events_t;

  // Decoded configuration handed from the registerfile to the datapath
  typedef struct packed {
    logic [15:0] host_node;
    logic [15:0] host_pdid;
    logic [9:0]  host_vpid;
    logic        host_te;
    logic [63:0] fpga_cfg_addr;
    logic [31:0] trace_buf_bytes;
    logic [31:0] trace_timeout;
    logic [28:0] trace_noti_pkts;
    logic [31:0] hicann_timeout;
    logic [28:0] hicann_noti_pkts;
    logic [7:0]  trace_addr_acks;
    logic [7:0]  trace_space_acks;
    logic [7:0]  hicann_addr_acks;
    logic [7:0]  hicann_space_acks;
  } nhtl_cfg_t;

endpackage
