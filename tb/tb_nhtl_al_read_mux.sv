// tb_nhtl_al_read_mux: splits 128-bit data-FIFO entries into 64-bit
// application-layer words.  Random packets with odd and even word counts are
// queued as FIFO entries; the consumer asserts al_rd_next at random and the
// word stream, its payload type and the FIFO pops are checked.
module tb_nhtl_al_read_mux;
  import nhtl_pkg::*;
  logic clk = 0, rst_n = 0;
  data_entry_t fifo_data;
  logic fifo_empty, fifo_pop, al_rd_valid, al_rd_next;
  logic [63:0] al_rd_data;
  logic [15:0] al_rd_type;
  int checks = 0, failures = 0;
  data_entry_t ents[$];
  logic [79:0] exp_w[$];       // {type, word}

  nhtl_al_read_mux dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign fifo_empty = (ents.size() == 0);
  assign fifo_data  = fifo_empty ? '0 : ents[0];

  bit pop_pending = 0;
  always @(negedge clk) if (rst_n) begin
    if (pop_pending) void'(ents.pop_front());
    #1;
    al_rd_next = al_rd_valid && ($urandom % 3 != 0);
    #1;
    if (al_rd_valid && al_rd_next) begin
      logic [79:0] e;
      checks++;
      e = exp_w.pop_front();
      if ({al_rd_type, al_rd_data} !== e) begin
        failures++; $display("word %h exp %h", {al_rd_type, al_rd_data}, e);
      end
    end
    pop_pending = fifo_pop;
  end

  initial begin
    al_rd_next = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int p = 0; p < 200; p++) begin
      int n;
      logic [15:0] t;
      n = 1 + $urandom % 62;
      t = (p % 3 == 0) ? PT_PLAYBACK : (p % 3 == 1) ? PT_HICANN_CFG : PT_JTAG;
      for (int i = 0; i < n; i += 2) begin
        data_entry_t d;
        d.ptype = t; d.lsw = {$urandom, $urandom}; d.msw = {$urandom, $urandom};
        d.eop = (i + 1 == n) ? 2'b01 : (i + 2 == n) ? 2'b10 : 2'b00;
        exp_w.push_back({t, d.lsw});
        if (i + 1 < n) exp_w.push_back({t, d.msw});
        ents.push_back(d);
      end
    end
    while (ents.size() > 0) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++;
    if (exp_w.size() != 0) begin failures++; $display("%0d words not read", exp_w.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
