// tb_tf_lfsr: checks the word generator against a one-bit-per-step model of
// the LFSR x^32 + x^22 + x^2 + x + 1 started at all ones, with random gaps in
// lfsr_ce; also checks that the word holds while lfsr_ce is low.
module tb_tf_lfsr;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic lfsr_ce;
  logic [15:0] rnd, exp_w;
  logic [31:0] st;
  int checks = 0, failures = 0;

  tf_lfsr #(.W(16)) dut (.*);

  function automatic logic [15:0] next_word(ref logic [31:0] s);
    logic [15:0] w;
    for (int i = 0; i < 16; i++) begin
      logic b;
      b = s[31] ^ s[21] ^ s[1] ^ s[0];
      s = {s[30:0], b};
      w = {w[14:0], b};
    end
    return w;
  endfunction

  initial begin
    lfsr_ce = 0; st = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    exp_w = next_word(st);
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      lfsr_ce = ($urandom_range(0, 99) < 70);
      checks++;
      if (rnd !== exp_w) begin
        failures++;
        if (failures < 5) $display("cycle %0d: word %h expected %h", c, rnd, exp_w);
      end
      @(posedge clk);
      if (lfsr_ce) exp_w = next_word(st);
    end
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
