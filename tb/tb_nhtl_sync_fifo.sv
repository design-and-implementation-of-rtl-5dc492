// tb_nhtl_sync_fifo: random push/pop against a queue model; checks order,
// full/empty flags and the occupancy count.
module tb_nhtl_sync_fifo;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, full, empty;
  logic [15:0] wr_data, rd_data;
  logic [3:0] count;
  int checks = 0, failures = 0;
  logic [15:0] model[$];

  nhtl_sync_fifo #(.WIDTH(16), .DEPTH(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (empty !== (model.size() == 0) || full !== (model.size() == 8) || count != 4'(model.size())) begin
        failures++; $display("flag mismatch size=%0d empty=%b full=%b", model.size(), empty, full);
      end
      if (!empty) begin
        checks++;
        if (rd_data !== model[0]) begin failures++; $display("data %h exp %h", rd_data, model[0]); end
      end
      wr_en = ($urandom % 100) < (i < 1000 ? 70 : 30);
      rd_en = ($urandom % 100) < (i < 1000 ? 30 : 70);
      wr_data = 16'($urandom);
      @(posedge clk);
      begin
        bit can_wr;
        can_wr = model.size() < 8;             // a full FIFO refuses writes
        if (rd_en && model.size() > 0) void'(model.pop_front());
        if (wr_en && can_wr) model.push_back(wr_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
