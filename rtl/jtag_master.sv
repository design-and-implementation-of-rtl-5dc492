// jtag_master: registerfile-driven JTAG master controller.
//
// Lets the host drive the JTAG chain of the FPGA and its eight HICANNs with a
// few registerfile accesses instead of streaming single JTAG pin states.  The
// registerfile (reached over the EXTOLL RRA path) holds
//   0x2000 cmd     [2:0] type, [13:4] length (bits - 1), [16] pause,
//                  [31] execute (cleared by the controller when done)
//   0x2008 status  [0] clk_gen_enabled, [1] paused (read only)
//   0x2080-0x20F8  send buffer, 16 x 64 bit (bit i of the scan is bit i%64
//                  of word i/64)
//   0x2100-0x2178  receive buffer, 16 x 64 bit (read only)
// Command types: 000 TAP reset (five TMS=1 clocks, then Run-Test/Idle),
// 001 shift the instruction register, 010 shift the selected data register,
// 100 / 101 enable / disable TCK generation while idle.
//
// A scan starts in Run-Test/Idle (or in a Pause state left by the previous
// scan), walks the TAP to Shift-IR/DR, shifts length+1 bits from the send
// buffer to TDI while capturing TDO into the receive buffer, leaves through
// Exit1 and either returns to Run-Test/Idle via Update or, with pause set,
// stops in Pause-IR/DR so that a following command can continue the shift
// with a reloaded buffer.
//
// Pin timing: every TAP step is two phases of TCK_HALF clocks each, TCK low
// (TMS and TDI change) and TCK high; TDO is sampled where TCK rises.
// Registerfile responses come one cycle after the request.
//
// From the design description: command types, the buffer sizes, the length,
// pause and execute fields, the status bits and the idle clock generation.
// The controller of the description is a separate, existing design; this one
// is written from its described function, and the register addresses and
// bit positions are this design's own choice.
module jtag_master
  import nhtl_pkg::*;
#(
  parameter int unsigned TCK_HALF = 2     // clocks per TCK half period
) (
  input  logic    clk,
  input  logic    rst_n,
  input  rf_req_t rf_req,
  output rf_rsp_t rf_rsp,
  output logic    tck,
  output logic    tms,
  output logic    tdi,
  input  logic    tdo
);
  localparam logic [RF_AW-1:0] A_CMD    = 16'h2000;
  localparam logic [RF_AW-1:0] A_STATUS = 16'h2008;
  localparam logic [RF_AW-1:0] A_SEND   = 16'h2080;
  localparam logic [RF_AW-1:0] A_RECV   = 16'h2100;

  typedef enum logic [2:0] {
    T_RESET = 3'b000, T_IR = 3'b001, T_DR = 3'b010,
    T_CLK_ON = 3'b100, T_CLK_OFF = 3'b101
  } jtype_e;
  typedef enum logic [1:0] {P_PRE, P_SHIFT, P_POST} ph_e;

  logic [63:0] send_buf [16];
  logic [63:0] recv_buf [16];
  logic [2:0]  c_type;
  logic [9:0]  c_len;
  logic        c_pause, c_exec;
  logic        clk_gen, paused, paused_ir;

  // sequencer
  logic        busy;
  ph_e         ph;
  logic [9:0]  cnt;
  logic [7:0]  pre_vec, post_vec;
  logic [2:0]  pre_len, post_len;       // number of steps - 1
  logic        do_shift;
  logic [$clog2(TCK_HALF+1)-1:0] div;

  wire wr = rf_req.valid && rf_req.we;
  wire [RF_AW-1:0] a = rf_req.addr;
  wire in_send = (a >= A_SEND) && (a < A_SEND + 16'h80);
  wire in_recv = (a >= A_RECV) && (a < A_RECV + 16'h80);
  wire [3:0] widx = a[6:3];

  // TMS/TDI of the step (ph, cnt)
  function automatic logic step_tms(input ph_e p, input logic [9:0] c);
    unique case (p)
      P_PRE:   return pre_vec[c[2:0]];
      P_SHIFT: return (c == c_len);
      default: return post_vec[c[2:0]];
    endcase
  endfunction

  // walk from the current TAP position to the shift state of the command
  logic [7:0] n_pre;  logic [2:0] n_pre_len;
  logic [7:0] n_post; logic [2:0] n_post_len;
  always_comb begin
    n_pre = 8'h0; n_pre_len = 3'd0;
    unique case (c_type)
      T_RESET: begin n_pre = 8'b0001_1111; n_pre_len = 3'd5; end      // 1,1,1,1,1,0
      T_IR: if (!paused)       begin n_pre = 8'b0000_0011; n_pre_len = 3'd3; end // 1,1,0,0
            else if (paused_ir) begin n_pre = 8'b0000_0001; n_pre_len = 3'd1; end // 1,0
            else               begin n_pre = 8'b0000_1111; n_pre_len = 3'd5; end // 1,1,1,1,0,0
      default: if (!paused)    begin n_pre = 8'b0000_0001; n_pre_len = 3'd2; end // 1,0,0
            else if (!paused_ir) begin n_pre = 8'b0000_0001; n_pre_len = 3'd1; end // 1,0
            else               begin n_pre = 8'b0000_0111; n_pre_len = 3'd4; end // 1,1,1,0,0
    endcase
    if (c_pause) begin n_post = 8'b0000_0000; n_post_len = 3'd0; end  // 0 -> Pause
    else         begin n_post = 8'b0000_0001; n_post_len = 3'd1; end  // 1,0 -> Update, Idle
  end

  wire start = c_exec && !busy;
  wire is_scan = (c_type == T_IR) || (c_type == T_DR);
  wire half = (div == ($bits(div))'(TCK_HALF - 1));

  logic [9:0] ncnt;
  ph_e        nph;
  logic       ndone;
  always_comb begin
    ncnt = cnt + 10'd1; nph = ph; ndone = 1'b0;
    unique case (ph)
      P_PRE:   if (cnt[2:0] == pre_len) begin
                 ncnt = '0;
                 if (do_shift) nph = P_SHIFT; else ndone = 1'b1;
               end
      P_SHIFT: if (cnt == c_len) begin ncnt = '0; nph = P_POST; end
      default: if (cnt[2:0] == post_len) ndone = 1'b1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_type <= '0; c_len <= '0; c_pause <= 1'b0; c_exec <= 1'b0;
      clk_gen <= 1'b0; paused <= 1'b0; paused_ir <= 1'b0;
      busy <= 1'b0; ph <= P_PRE; cnt <= '0; div <= '0;
      pre_vec <= '0; post_vec <= '0; pre_len <= '0; post_len <= '0; do_shift <= 1'b0;
      tck <= 1'b0; tms <= 1'b1; tdi <= 1'b0;
      for (int i = 0; i < 16; i++) begin send_buf[i] <= '0; recv_buf[i] <= '0; end
    end else begin
      // registerfile writes (the command register only while idle)
      if (wr && a == A_CMD && !c_exec) begin
        c_type  <= rf_req.wdata[2:0];
        c_len   <= rf_req.wdata[13:4];
        c_pause <= rf_req.wdata[16];
        c_exec  <= rf_req.wdata[31];
      end
      if (wr && in_send) send_buf[widx] <= rf_req.wdata;

      if (start) begin
        if (c_type == T_CLK_ON || c_type == T_CLK_OFF) begin
          clk_gen <= (c_type == T_CLK_ON);
          c_exec  <= 1'b0;
        end else if (c_type == T_RESET || is_scan) begin
          busy     <= 1'b1;
          ph       <= P_PRE;
          cnt      <= '0;
          pre_vec  <= n_pre;  pre_len  <= n_pre_len;
          post_vec <= n_post; post_len <= n_post_len;
          do_shift <= is_scan;
          div      <= '0;
          tck      <= 1'b0;
          tms      <= n_pre[0];
          tdi      <= 1'b0;
        end else c_exec <= 1'b0;             // unknown type: ignored
      end else if (busy) begin
        div <= half ? '0 : div + 1'b1;
        if (half) begin
          if (!tck) begin
            tck <= 1'b1;                      // rising edge: TAP samples
            if (ph == P_SHIFT) recv_buf[cnt[9:6]][cnt[5:0]] <= tdo;
          end else begin
            tck <= 1'b0;                      // falling edge: next step
            if (ndone) begin
              busy   <= 1'b0;
              c_exec <= 1'b0;
              tms    <= 1'b0;
              tdi    <= 1'b0;
              if (c_type == T_RESET) paused <= 1'b0;
              else begin
                paused    <= c_pause;
                paused_ir <= (c_type == T_IR);
              end
            end else begin
              ph  <= nph;
              cnt <= ncnt;
              tms <= step_tms(nph, ncnt);
              tdi <= (nph == P_SHIFT) ? send_buf[ncnt[9:6]][ncnt[5:0]] : 1'b0;
            end
          end
        end
      end else if (clk_gen && !paused) begin
        // free-running TCK in Run-Test/Idle
        tms <= 1'b0;
        div <= half ? '0 : div + 1'b1;
        if (half) tck <= ~tck;
      end else tck <= 1'b0;
    end
  end

  // registerfile read port
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rf_rsp <= '0;
    else begin
      rf_rsp.valid   <= rf_req.valid;
      rf_rsp.invalid <= rf_req.valid && !(a == A_CMD || a == A_STATUS || in_send || in_recv);
      rf_rsp.rdata   <= '0;
      if (!rf_req.we) begin
        if (a == A_CMD)         rf_rsp.rdata <= {32'h0, c_exec, 14'h0, c_pause, 2'b00, c_len, 1'b0, c_type};
        else if (a == A_STATUS) rf_rsp.rdata <= {62'h0, paused, clk_gen};
        else if (in_send)       rf_rsp.rdata <= send_buf[widx];
        else if (in_recv)       rf_rsp.rdata <= recv_buf[widx];
      end
    end
  end
endmodule
