// tb_nhtl_async_fifo: writer at 210 MHz and reader at 125 MHz with random
// pauses; every value must come out once, in order; the FIFO must fill up
// (full seen) and drain.
module tb_nhtl_async_fifo;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en, rd_en, wfull, rempty;
  logic [31:0] wr_data, rd_data;
  int checks = 0, failures = 0, nrd = 0, full_seen = 0;
  localparam int N = 600;

  nhtl_async_fifo #(.WIDTH(32), .DEPTH(8)) dut (.*);

  always #2.38ns wclk = ~wclk;
  always #4ns    rclk = ~rclk;

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    int i;
    wr_en = 0; wr_data = 0;
    #20ns; wrst_n = 1; rrst_n = 1;
    i = 0;
    while (i < N) begin
      @(negedge wclk);
      wr_en   = ($urandom % 4) != 0;
      wr_data = 32'(i) ^ 32'hA5A50000;
      @(posedge wclk);
      if (wfull) full_seen++;
      if (wr_en && !wfull) i++;
    end
    @(negedge wclk); wr_en = 0;
  end

  // reader: slow at first so the FIFO fills
  initial begin
    rd_en = 0;
    #30ns;
    while (nrd < N) begin
      @(negedge rclk);
      rd_en = (nrd < 200) ? (($urandom % 4) == 0) : (($urandom % 4) != 0);
      if (rd_en && !rempty) begin
        checks++;
        if (rd_data !== (32'(nrd) ^ 32'hA5A50000)) begin
          failures++; $display("read %0d got %h", nrd, rd_data);
        end
      end
      @(posedge rclk);
      if (rd_en && !rempty) nrd++;
    end
    @(negedge rclk); rd_en = 0;
    repeat (10) @(posedge rclk);
    checks++;
    if (!rempty) begin failures++; $display("not empty at end"); end
    checks++;
    if (full_seen == 0) begin failures++; $display("full never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
