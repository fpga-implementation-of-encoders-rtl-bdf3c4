// tb_sync_fifo: random writes and reads on a 5-deep FIFO (not a power of
// two) compared with a queue model: data order, count, full and empty.
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic wr_en, rd_en, empty, full;
  logic [7:0] din, dout;
  logic [2:0] count;
  sync_fifo #(.W(8), .DEPTH(5)) dut (.*);

  logic [7:0] q [$];
  int checks = 0, failures = 0;
  initial begin
    wr_en = 0; rd_en = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      checks += 3;
      if (count != 3'(q.size())) failures++;
      if (empty != (q.size() == 0)) failures++;
      if (full != (q.size() == 5)) failures++;
      if (q.size() > 0) begin
        checks++;
        if (dout !== q[0]) failures++;
      end
      wr_en = ($urandom_range(0, 99) < ((c / 500) % 2 ? 70 : 30));
      rd_en = ($urandom_range(0, 99) < 50);
      din   = 8'($urandom);
      @(posedge clk);
      if (rd_en && q.size() > 0) void'(q.pop_front());
      if (wr_en && !full) q.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
