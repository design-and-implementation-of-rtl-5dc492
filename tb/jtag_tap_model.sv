// jtag_tap_model: behavioural IEEE 1149.1 TAP used by the JTAG testbenches.
// Sixteen-state TAP controller clocked by TCK (state and shift on the rising
// edge, TDO driven on the falling edge), an 8-bit instruction register
// (Capture-IR loads 8'h01) and, for instruction 8'h11, a 100-bit data
// register; every other instruction selects a 1-bit bypass register.
// Counts the rising TCK edges spent in Run-Test/Idle so a free-running clock
// can be observed.
module jtag_tap_model (
  input  logic        tck,
  input  logic        tms,
  input  logic        tdi,
  output logic        tdo,
  output logic [3:0]  state,
  output logic [7:0]  ir,
  output logic [99:0] dr,
  output int          idle_clocks
);
  localparam logic [3:0] TLR = 4'h0, RTI = 4'h1, SDS = 4'h2, CDR = 4'h3, SDR = 4'h4,
                         E1D = 4'h5, PDR = 4'h6, E2D = 4'h7, UDR = 4'h8, SIS = 4'h9,
                         CIR = 4'hA, SIR = 4'hB, E1I = 4'hC, PIR = 4'hD, E2I = 4'hE,
                         UIR = 4'hF;
  logic [7:0]  ir_sr;
  logic [99:0] dr_sr;
  logic        byp;

  initial begin
    state = TLR; ir = 8'hFF; dr = '0; ir_sr = '0; dr_sr = '0; byp = 0; tdo = 0;
    idle_clocks = 0;
  end

  wire sel = (ir == 8'h11);

  always @(posedge tck) begin
    if (state == RTI) idle_clocks++;
    unique case (state)
      CIR: ir_sr = 8'h01;
      SIR: ir_sr = {tdi, ir_sr[7:1]};
      CDR: if (sel) dr_sr = dr; else byp = 1'b0;
      SDR: if (sel) dr_sr = {tdi, dr_sr[99:1]}; else byp = tdi;
      UIR: ;
      default: ;
    endcase
    unique case (state)
      TLR: state = tms ? TLR : RTI;
      RTI: state = tms ? SDS : RTI;
      SDS: state = tms ? SIS : CDR;
      CDR: state = tms ? E1D : SDR;
      SDR: state = tms ? E1D : SDR;
      E1D: state = tms ? UDR : PDR;
      PDR: state = tms ? E2D : PDR;
      E2D: state = tms ? UDR : SDR;
      UDR: state = tms ? SDS : RTI;
      SIS: state = tms ? TLR : CIR;
      CIR: state = tms ? E1I : SIR;
      SIR: state = tms ? E1I : SIR;
      E1I: state = tms ? UIR : PIR;
      PIR: state = tms ? E2I : PIR;
      E2I: state = tms ? UIR : SIR;
      default: state = tms ? SDS : RTI;   // UIR
    endcase
    if (state == TLR) ir = 8'hFF;
    if (state == UIR) ir = ir_sr;
    if (state == UDR && sel) dr = dr_sr;
  end

  always @(negedge tck) begin
    if (state == SIR) tdo = ir_sr[0];
    else if (state == SDR) tdo = sel ? dr_sr[0] : byp;
    else tdo = 1'b0;
  end
endmodule
