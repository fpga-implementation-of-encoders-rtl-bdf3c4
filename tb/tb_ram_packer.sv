// tb_ram_packer: sends random bytes with random spacing and occasional
// clears; every emitted word must be the next byte pair, first byte high,
// valid for one cycle; a clear must drop a pending half pair.
module tb_ram_packer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clear, rx_strobe, word_valid;
  logic [7:0] rx_data;
  logic [15:0] word;
  int checks = 0, failures = 0, nwords = 0;
  logic [15:0] q [$];
  logic [7:0] pend;
  bit have;

  ram_packer dut (.*);

  always @(posedge clk) if (rst_n && word_valid) begin
    checks++;
    nwords++;
    if (q.size() == 0 || word !== q[0]) begin
      failures++;
      $display("unexpected word %h", word);
    end
    if (q.size() != 0) void'(q.pop_front());
  end

  initial begin
    clear = 0; rx_strobe = 0; rx_data = 0; have = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      clear = ($urandom_range(0, 99) == 0);
      rx_strobe = !clear && ($urandom_range(0, 99) < 40);
      rx_data = 8'($urandom);
      if (clear) have = 0;
      else if (rx_strobe) begin
        if (have) begin q.push_back({pend, rx_data}); have = 0; end
        else begin pend = rx_data; have = 1; end
      end
    end
    @(negedge clk); clear = 0; rx_strobe = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (q.size() != 0 || nwords < 500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
