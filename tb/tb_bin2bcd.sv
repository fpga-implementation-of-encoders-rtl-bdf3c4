// tb_bin2bcd: converts random and edge values and compares each digit with
// the value's decimal digits; also checks the conversion time of BITS cycles.
module tb_bin2bcd;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start, done;
  logic [19:0] bin;
  logic [23:0] bcd;
  int checks = 0, failures = 0;

  bin2bcd #(.BITS(20), .DIGITS(6)) dut (.*);

  task automatic conv(int unsigned v);
    int n, x;
    @(negedge clk); start = 1; bin = 20'(v);
    @(negedge clk); start = 0;
    n = 0;
    while (!done && n < 100) begin @(negedge clk); n++; end
    x = v;
    checks += 2;
    for (int d = 0; d < 6; d++) begin
      if (bcd[4*d +: 4] != 4'(x % 10)) begin
        failures++;
        $display("value %0d: digit %0d is %0d", v, d, bcd[4*d +: 4]);
        break;
      end
      x /= 10;
    end
    if (n != 20) begin failures++; $display("value %0d took %0d cycles", v, n + 1); end
  endtask

  initial begin
    start = 0; bin = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    conv(0); conv(9); conv(10); conv(126780); conv(999999); conv(660059);
    for (int i = 0; i < 300; i++) conv($urandom_range(0, 999999));
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
