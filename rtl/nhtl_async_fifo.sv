// nhtl_async_fifo: dual-clock first-word-fall-through FIFO.
//
// Carries payload entries and packet-information entries across the border
// between the EXTOLL clock domain (210 MHz) and the HMF core-logic domain
// (125 MHz).  The design description asks for asynchronous FIFOs here; the
// construction (Gray-coded pointers, two-flop synchronisers in each
// direction) and the depth are this design's own choice.
//
// Write side (wclk): wr_en pushes wr_data unless wfull.  Read side (rclk):
// rd_data shows the oldest entry while rempty is low, rd_en pops it.  A push
// is seen on the read side two to three rclk cycles later; a pop frees space
// on the write side two to three wclk cycles later.  Each side has its own
// active-low reset; both must be applied together.
module nhtl_async_fifo #(
  parameter int unsigned WIDTH = 146,
  parameter int unsigned DEPTH = 16     // power of two
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             wfull,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rempty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer synchronised to wclk
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer synchronised to rclk

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  wire do_wr = wr_en && !wfull;
  wire do_rd = rd_en && !rempty;
  wire [AW:0] wbin_n = wbin + (AW+1)'(do_wr);
  wire [AW:0] rbin_n = rbin + (AW+1)'(do_rd);

  always_ff @(posedge wclk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_n;
      wgray    <= bin2gray(wbin_n);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_n;
      rgray    <= bin2gray(rbin_n);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  // Full: the synchronised read pointer equals the write pointer with the two
  // top Gray bits inverted.
  assign wfull   = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign rempty  = (rgray == wgray_r2);
  assign rd_data = mem[rbin[AW-1:0]];
endmodule
