// nhtl_ringbuffer_cntrl: write-address and fill-level keeper for one ring
// buffer in host memory (one instance for trace data, one for HICANN-
// configuration responses).
//
// After an initialisation the controller offers a valid write address (the
// buffer start).  The responder announces every packet it sends with an
// increment request (payload size in QWs) and holds it until inc_ack; the
// controller then adds the size to the fill level and 8 x size bytes to the
// write address, and reloads the start address when the address reaches the
// end address (start + size).  Host acknowledge notifications arrive through
// the decrement interface, are queued in a small FIFO and lower the fill level;
// a queued decrement is always served before a pending increment.  When the
// free space (size - level) drops below the almost-full margin, buffer_afull
// stops the responder from starting further packets into this buffer.
//
// Timing follows the two FSMs of the design description:
//   init : INIT_0 -> INIT_1 (capture, end address low 48 bit, level := 0)
//          -> INIT_2 (end address high 16 bit, address low 48 bit := start)
//          -> INIT_3 (address high 16 bit, address valid, init_done, afull := 0)
//   calc : CALC_0 (address invalid, operands captured) -> CALC_1 (level +/-,
//          address low 48 bit + carry) -> CALC_2 (free space, address high
//          16 bit, inc_ack or decrement pop) -> CALC_3 (afull, wrap test)
//          -> [CALC_4 (load start address on wrap)]
// Each non-idle state lasts one cycle, so an increment is acknowledged three
// cycles after it starts and the address is valid again after four (five on
// a wrap).  The original maps the adders to FPGA DSP slices; here they are
// plain adders split the same way (48 + 16 bit), which keeps the cycle
// behaviour.  A calculation has priority over a re-initialisation: an
// init_start pulse that arrives while a calculation is running or about to
// start is dropped, except for the very first one.
module nhtl_ringbuffer_cntrl
  import nhtl_pkg::*;
#(
  parameter int unsigned DEC_DEPTH = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // initialisation (from the registerfile)
  input  logic               init_start,
  input  logic [63:0]        init_start_addr,
  input  logic [LEVEL_W-1:0] init_space_qw,
  input  logic [LEVEL_W-1:0] init_afull_qw,
  output logic               init_done,
  // increment interface (responder)
  input  logic               inc_valid,
  input  logic [LEVEL_W-1:0] inc_qw,
  output logic               inc_ack,
  output logic [63:0]        wr_addr,
  output logic               addr_valid,
  output logic               buffer_afull,
  // decrement interface (completer)
  input  logic               dec_valid,
  input  logic [LEVEL_W-1:0] dec_qw,
  output logic               dec_full,
  // status
  output logic [LEVEL_W-1:0] level,
  output logic               initialised
);
  typedef enum logic [2:0] {INIT_IDLE, INIT_0, INIT_1, INIT_2, INIT_3} init_st_e;
  typedef enum logic [2:0] {CALC_IDLE, CALC_0, CALC_1, CALC_2, CALC_3, CALC_4} calc_st_e;

  init_st_e ist;
  calc_st_e cst;

  logic [63:0]        start_r, end_r;
  logic [LEVEL_W-1:0] space_r, afull_r, free_r, op_r;
  logic               end_c, addr_c, dec_mode;

  logic               dq_empty, dq_pop;
  logic [LEVEL_W-1:0] dq_data;

  nhtl_sync_fifo #(.WIDTH(LEVEL_W), .DEPTH(DEC_DEPTH)) u_dec_fifo (
    .clk, .rst_n,
    .wr_en(dec_valid), .wr_data(dec_qw), .full(dec_full),
    .rd_en(dq_pop), .rd_data(dq_data), .empty(dq_empty), .count()
  );

  wire calc_req   = initialised && (!dq_empty || inc_valid);
  wire calc_start = (ist == INIT_IDLE) && calc_req &&
                    (cst == CALC_IDLE || cst == CALC_3 || cst == CALC_4);
  wire calc_free  = (cst == CALC_IDLE);
  wire init_go    = init_start && (!initialised || (calc_free && !calc_req));

  assign dq_pop  = (cst == CALC_2) && dec_mode;
  assign inc_ack = (cst == CALC_2) && !dec_mode;

  wire [47:0] inc_bytes = {16'h0, op_r, 3'b000};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ist <= INIT_IDLE; cst <= CALC_IDLE;
      start_r <= '0; end_r <= '0; space_r <= '0; afull_r <= '0; free_r <= '0;
      op_r <= '0; end_c <= 1'b0; addr_c <= 1'b0; dec_mode <= 1'b0;
      wr_addr <= '0; addr_valid <= 1'b0; buffer_afull <= 1'b0; level <= '0;
      initialised <= 1'b0; init_done <= 1'b0;
    end else begin
      init_done <= 1'b0;
      // ------------------------------------------------ initialisation FSM
      unique case (ist)
        INIT_IDLE: if (init_go) ist <= INIT_0;
        INIT_0:    ist <= INIT_1;
        INIT_1: begin
          start_r <= init_start_addr;
          space_r <= init_space_qw;
          afull_r <= init_afull_qw;
          {end_c, end_r[47:0]} <= {1'b0, init_start_addr[47:0]} +
                                  {1'b0, 16'h0, init_space_qw, 3'b000};
          level <= '0;
          ist <= INIT_2;
        end
        INIT_2: begin
          end_r[63:48]   <= start_r[63:48] + 16'(end_c);
          wr_addr[47:0]  <= start_r[47:0];
          addr_valid     <= 1'b0;
          ist <= INIT_3;
        end
        INIT_3: begin
          wr_addr[63:48] <= start_r[63:48];
          addr_valid     <= 1'b1;
          init_done      <= 1'b1;
          initialised    <= 1'b1;
          buffer_afull   <= 1'b0;
          free_r         <= space_r;
          ist <= (init_start && !calc_req) ? INIT_0 : INIT_IDLE;
        end
        default: ist <= INIT_IDLE;
      endcase
      // -------------------------------------------------- calculation FSM
      unique case (cst)
        CALC_IDLE: if (calc_start) cst <= CALC_0;
        CALC_0: begin
          addr_valid <= 1'b0;
          dec_mode   <= !dq_empty;
          op_r       <= !dq_empty ? dq_data : inc_qw;
          cst <= CALC_1;
        end
        CALC_1: begin
          if (dec_mode) level <= level - op_r;
          else begin
            level <= level + op_r;
            {addr_c, wr_addr[47:0]} <= {1'b0, wr_addr[47:0]} + {1'b0, inc_bytes[47:0]};
          end
          cst <= CALC_2;
        end
        CALC_2: begin
          free_r <= space_r - level;
          if (!dec_mode) wr_addr[63:48] <= wr_addr[63:48] + 16'(addr_c);
          if (dec_mode || wr_addr[47:0] != end_r[47:0]) addr_valid <= 1'b1;
          cst <= CALC_3;
        end
        CALC_3: begin
          buffer_afull <= (free_r < afull_r);
          if (wr_addr == end_r) cst <= CALC_4;
          else begin
            addr_valid <= 1'b1;
            cst <= calc_start ? CALC_0 : CALC_IDLE;
          end
        end
        CALC_4: begin
          wr_addr    <= start_r;
          addr_valid <= 1'b1;
          cst <= calc_start ? CALC_0 : CALC_IDLE;
        end
        default: cst <= CALC_IDLE;
      endcase
    end
  end

  // the free space can never be negative: the responder stops on afull
  // before the level can pass the configured size
  property p_ack_only_when_requested;
    @(posedge clk) disable iff (!rst_n) inc_ack |-> inc_valid;
  endproperty
  a_ack_only_when_requested: assert property (p_ack_only_when_requested);
endmodule
