// tb_jtag_master: JTAG master driven through its registerfile port against a
// behavioural TAP.  Runs a TAP reset, an instruction scan, data scans that end
// in Pause-DR and resume from it, a switch from Pause-DR to an instruction
// scan and from Pause-IR to a data scan, the free-running idle clock, the
// status register and an unmapped address; checks TAP state, the TAP's
// registers and the receive buffer.
module tb_jtag_master;
  import nhtl_pkg::*;
  logic clk = 0, rst_n = 0;
  rf_req_t rf_req;
  rf_rsp_t rf_rsp;
  logic tck, tms, tdi, tdo;
  logic [3:0] tap_state;
  logic [7:0] tap_ir;
  logic [99:0] tap_dr;
  int idle_clocks;
  int checks = 0, failures = 0;

  jtag_master dut (.*);
  jtag_tap_model u_tap (.tck, .tms, .tdi, .tdo, .state(tap_state), .ir(tap_ir), .dr(tap_dr),
                        .idle_clocks);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  logic [63:0] rd;
  logic        rd_inv;
  task automatic acc(input logic we, input logic [15:0] a, input logic [63:0] d);
    @(negedge clk);
    rf_req = '{valid: 1'b1, we: we, addr: a, wdata: d};
    @(negedge clk);
    rf_req = '0;
    rd = rf_rsp.rdata; rd_inv = rf_rsp.invalid;
  endtask

  task automatic run(input logic [2:0] t, input int bits, input logic pause);
    acc(1, 16'h2000, (64'h1 << 31) | (64'(pause) << 16) | (64'(bits - 1) << 4) | 64'(t));
    do acc(0, 16'h2000, 0); while (rd[31]);
  endtask

  task automatic load(input logic [127:0] v);
    acc(1, 16'h2080, v[63:0]);
    acc(1, 16'h2088, v[127:64]);
  endtask

  logic [127:0] rv;
  task automatic recv();
    acc(0, 16'h2100, 0); rv[63:0] = rd;
    acc(0, 16'h2108, 0); rv[127:64] = rd;
  endtask

  logic [99:0] d1, d2, d3;
  initial begin
    rf_req = '0;
    d1 = {$urandom, $urandom, $urandom, $urandom};
    d2 = {$urandom, $urandom, $urandom, $urandom};
    d3 = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(posedge clk); rst_n = 1;
    run(3'b000, 1, 0);
    chk("reset -> idle", 128'(tap_state), 1);
    load(128'h11);
    run(3'b001, 8, 0);
    chk("ir loaded", 128'(tap_ir), 128'h11);
    recv(); chk("ir capture", rv[7:0], 8'h01);
    chk("idle after ir", 128'(tap_state), 1);
    load(128'(d1));
    run(3'b010, 100, 1);
    chk("in pause-dr", 128'(tap_state), 6);
    acc(0, 16'h2008, 0); chk("status paused", rd[1:0], 2'b10);
    load(128'(d2));
    run(3'b010, 100, 0);
    recv(); chk("resume shifts out d1", rv[99:0], d1);
    chk("dr updated", 128'(tap_dr), 128'(d2));
    load(128'(d3));
    run(3'b010, 100, 0);
    recv(); chk("capture-dr returns d2", rv[99:0], d2);
    chk("dr updated d3", 128'(tap_dr), 128'(d3));
    // pause-DR -> IR scan, pause-IR -> DR scan
    load(128'(d1));
    run(3'b010, 100, 1);
    load(128'h11);
    run(3'b001, 8, 1);
    chk("in pause-ir", 128'(tap_state), 13);
    chk("ir not yet updated", 128'(tap_ir), 128'h11);
    load(128'(d2));
    run(3'b010, 100, 0);
    chk("pause-ir -> dr -> idle", 128'(tap_state), 1);
    chk("dr after switch", 128'(tap_dr), 128'(d2));
    // free-running clock
    run(3'b100, 1, 0);
    begin
      int c0;
      c0 = idle_clocks;
      repeat (100) @(posedge clk);
      chk("idle clock runs", 128'(idle_clocks - c0 > 10), 1);
      acc(0, 16'h2008, 0); chk("status clk_gen", rd[1:0], 2'b01);
      run(3'b101, 1, 0);
      c0 = idle_clocks;
      repeat (100) @(posedge clk);
      chk("idle clock stopped", 128'(idle_clocks - c0 <= 1), 1);
    end
    chk("still idle", 128'(tap_state), 1);
    acc(0, 16'h2040, 0); chk("unmapped invalid", 128'(rd_inv), 1);
    acc(0, 16'h2088, 0); chk("send buffer readback", rd, 64'(d2 >> 64));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
