// tb_nhtl_ringbuffer_cntrl: initialisation, increments (address += 8 x QWs,
// acknowledge three cycles after the calculation starts), wrap-around to the
// start address at start + size, decrement priority over increments, the
// almost-full stop and its release by host acknowledges.
module tb_nhtl_ringbuffer_cntrl;
  import nhtl_pkg::*;
  logic clk = 0, rst_n = 0;
  logic init_start, init_done, inc_valid, inc_ack, addr_valid, buffer_afull;
  logic dec_valid, dec_full, initialised;
  logic [63:0] init_start_addr, wr_addr;
  logic [LEVEL_W-1:0] init_space_qw, init_afull_qw, inc_qw, dec_qw, level;
  int checks = 0, failures = 0;

  nhtl_ringbuffer_cntrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  localparam logic [63:0] START = 64'h0012_FFFF_FFFF_FF00;   // carry into bit 48
  int lat;
  task automatic inc(input int qw);
    @(negedge clk);
    while (!addr_valid) @(negedge clk);
    inc_valid = 1; inc_qw = LEVEL_W'(qw); lat = 0;
    do begin @(negedge clk); lat++; end while (!inc_ack);
    @(negedge clk); inc_valid = 0;
  endtask

  initial begin
    init_start = 0; inc_valid = 0; dec_valid = 0; inc_qw = 0; dec_qw = 0;
    init_start_addr = START; init_space_qw = 29'd600; init_afull_qw = 29'd248;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); init_start = 1; @(negedge clk); init_start = 0;
    repeat (5) @(negedge clk);
    chk("init valid", 64'(addr_valid), 1);
    chk("init addr", wr_addr, START);
    chk("initialised", 64'(initialised), 1);
    inc(62);
    chk("ack latency", 64'(lat), 3);
    repeat (3) @(negedge clk);
    chk("addr after 62", wr_addr, START + 64'd496);
    chk("level", 64'(level), 62);
    chk("no afull", 64'(buffer_afull), 0);
    inc(62); inc(62); inc(62); inc(62);
    repeat (3) @(negedge clk);
    chk("level 310", 64'(level), 310);
    chk("afull at 290 free", 64'(buffer_afull), 0);
    inc(62);
    repeat (3) @(negedge clk);
    chk("afull at 228 free", 64'(buffer_afull), 1);
    // host acknowledges, decrement wins over a simultaneous increment
    @(negedge clk); dec_valid = 1; dec_qw = 29'd200; @(negedge clk); dec_valid = 0;
    inc_valid = 1; inc_qw = 29'd10;
    while (!inc_ack) begin
      @(negedge clk);
    end
    chk("decrement applied before the increment", 64'(level), 372 - 200 + 10);
    @(negedge clk); inc_valid = 0;
    repeat (4) @(negedge clk);
    chk("level after dec/inc", 64'(level), 372 - 200 + 10);
    chk("afull released", 64'(buffer_afull), 0);
    // fill to exactly the end: 600 - 382 = 218 QW more
    inc(200); inc(18);
    repeat (4) @(negedge clk);
    chk("wrapped to start", wr_addr, START);
    chk("valid after wrap", 64'(addr_valid), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
