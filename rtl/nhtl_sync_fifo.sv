// nhtl_sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used inside the NHTL as RRA-FIFO, RRA-response FIFO, NOTI-FIFO and as the
// decrement FIFO of the ring-buffer controllers.  The design description only
// names these FIFOs; depth, width and the show-ahead behaviour are this
// design's own choice.
//
// Interface: push with wr_en (ignored while full), pop with rd_en (ignored
// while empty).  rd_data shows the oldest entry whenever empty is low.  A push
// becomes visible at the output one cycle later.  Reset empties the FIFO.
module nhtl_sync_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 8      // power of two
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  assign count   = wptr - rptr;
  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (wptr == rptr);
  assign rd_data = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end
endmodule
