// tb_display_control: captures the characters sent to the transmitter (with
// a random transmit time per character) and compares the ready message and
// the result line with strings built here from random counts and signatures.
module tb_display_control;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic rdy, encode_fin, bcd_done, send_character, tx_complete, misr_reset;
  logic [23:0] cycles_bcd;
  logic [15:0] frames_bcd;
  logic [63:0] signature;
  logic [7:0]  txuart_data;
  int checks = 0, failures = 0, resets = 0;
  string got;

  display_control #(.CDIG(6), .FDIG(4)) dut (.*);

  // transmitter model
  initial begin
    tx_complete = 0;
    forever begin
      @(posedge clk);
      if (send_character) begin
        got = {got, string'(txuart_data)};
        repeat ($urandom_range(0, 4)) @(posedge clk);
        @(negedge clk) tx_complete = 1;
        @(negedge clk) tx_complete = 0;
      end
    end
  end
  always @(posedge clk) if (misr_reset) resets++;

  function automatic logic [23:0] bcd6(int v);
    for (int d = 0; d < 6; d++) begin bcd6[4*d +: 4] = 4'(v % 10); v /= 10; end
  endfunction

  task automatic expect_str(string e);
    int n = 0;
    while (got.len() < e.len() && n < 5000) begin @(posedge clk); n++; end
    repeat (20) @(posedge clk);
    checks++;
    if (got != e) begin
      failures++;
      $display("got      '%s'", got);
      $display("expected '%s'", e);
    end
    got = "";
  endtask

  initial begin
    int cyc, fr;
    string sig_hex;
    rdy = 0; encode_fin = 0; bcd_done = 0; cycles_bcd = 0; frames_bcd = 0; signature = 0;
    got = "";
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 12; k++) begin
      @(negedge clk) rdy = 1;
      @(negedge clk) rdy = 0;
      expect_str("RDY\r\n");
      checks++;
      if (resets != k + 1) failures++;
      cyc = (k == 0) ? 126780 : $urandom_range(0, 999999);
      fr  = (k == 0) ? 960 : (k == 1) ? 5 : (k == 2) ? 5000 : $urandom_range(1, 9999);
      cycles_bcd = bcd6(cyc);
      frames_bcd = 16'(bcd6(fr));
      signature = {$urandom, $urandom};
      @(negedge clk) encode_fin = 1;
      repeat (5) @(negedge clk);
      checks++;
      if (got.len() != 0) failures++;          // must wait for the digits
      sig_hex = $sformatf("%016h", signature);
      sig_hex = sig_hex.toupper();
      bcd_done = 1;
      expect_str($sformatf("CYCLES TO ENCODE %0d FRAMES : %06d SIGNATURE IS:%s\r\n",
                           fr, cyc, sig_hex));
      repeat (50) @(negedge clk);
      checks++;
      if (got.len() != 0) failures++;          // printed once only
      encode_fin = 0; bcd_done = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
