// tb_ldpc_misr: feeds random words with random enables and synchronous
// clears into the MISR and compares the signature every cycle with a
// bit-serial model: shift in the XOR of bits 63, 3, 2, 0, then add the word.
module tb_ldpc_misr;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic rst, ce;
  logic [15:0] misr_in;
  logic [63:0] sig, model;
  int checks = 0, failures = 0;

  ldpc_misr #(.W(16), .N(64)) dut (.*);

  initial begin
    rst = 0; ce = 0; misr_in = 0; model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      checks++;
      if (sig !== model) begin
        failures++;
        if (failures < 5) $display("cycle %0d: sig %h expected %h", c, sig, model);
      end
      rst = ($urandom_range(0, 199) == 0);
      ce = ($urandom_range(0, 99) < 80);
      misr_in = 16'($urandom);
      if (rst) model = '0;
      else if (ce) begin
        logic b;
        b = model[63] ^ model[3] ^ model[2] ^ model[0];
        model = {model[62:0], b};
        for (int i = 0; i < 16; i++) model[i] = model[i] ^ misr_in[i];
      end
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
