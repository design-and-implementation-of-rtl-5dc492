// nhtl_al_read_mux: network-to-core side of the AL-interface.
//
// Each payload-FIFO entry holds two payload words (LSW, MSW), their payload
// type and two eop bits.  A two-state FSM hands them to the 64-bit AL-read
// interface one word at a time: RD_LSW presents the low word, RD_MSW the high
// word.  If the low word carries eop the high word is not valid, the FSM stays
// in RD_LSW and the entry is popped right away; otherwise the entry is popped
// after its high word.  Both states wait for the core logic's next.
//
// AL-read handshake: al_rd_valid/al_rd_data/al_rd_type show a word; the core
// logic takes it by raising al_rd_next in the same cycle (next without valid
// is not allowed).  One word per clock at most.  Runs in the core clock
// domain, behind the asynchronous payload FIFO.
//
// Follows the design description (Figure 4.3a); the FIFO is show-ahead.
module nhtl_al_read_mux
  import nhtl_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  data_entry_t  fifo_data,
  input  logic         fifo_empty,
  output logic         fifo_pop,
  output logic [63:0]  al_rd_data,
  output logic [15:0]  al_rd_type,
  output logic         al_rd_valid,
  input  logic         al_rd_next
);
  typedef enum logic {RD_LSW, RD_MSW} st_e;
  st_e st;

  wire take = al_rd_valid && al_rd_next;

  assign al_rd_valid = !fifo_empty;
  assign al_rd_data  = (st == RD_LSW) ? fifo_data.lsw : fifo_data.msw;
  assign al_rd_type  = fifo_data.ptype;
  assign fifo_pop    = take && (st == RD_MSW || fifo_data.eop[0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st <= RD_LSW;
    else if (take) begin
      if (st == RD_LSW) st <= fifo_data.eop[0] ? RD_LSW : RD_MSW;
      else              st <= RD_LSW;
    end
  end

  a_no_next_without_valid: assert property (@(posedge clk) disable iff (!rst_n)
    al_rd_next |-> al_rd_valid);
endmodule
