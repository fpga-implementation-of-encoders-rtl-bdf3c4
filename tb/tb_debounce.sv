// tb_debounce: presses with bounces shorter than STABLE cycles must give
// exactly one start pulse each, released after the level has been stable
// for STABLE cycles; pure glitches must give none.
module tb_debounce;
  localparam int STABLE = 20;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic btn, start_pulse;
  int checks = 0, failures = 0, pulses = 0, last_pulse = 0, cyc = 0, last_toggle = 0;

  debounce #(.STABLE(STABLE)) dut (.*);

  always @(posedge clk) begin
    cyc++;
    if (start_pulse) begin pulses++; last_pulse = cyc; end
  end

  task automatic bounce(int n);
    for (int i = 0; i < n; i++) begin
      btn = ~btn;
      last_toggle = cyc;
      repeat ($urandom_range(1, STABLE - 3)) @(negedge clk);
    end
  endtask

  initial begin
    int t0, p0;
    btn = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      // glitch: short high pulse only
      p0 = pulses;
      @(negedge clk); btn = 1;
      repeat ($urandom_range(1, STABLE - 3)) @(negedge clk);
      btn = 0;
      repeat (3 * STABLE) @(negedge clk);
      checks++;
      if (pulses != p0) begin failures++; $display("glitch gave a pulse"); end
      // press with bounces
      p0 = pulses;
      btn = 0;
      bounce(2 * $urandom_range(0, 3) + 1);   // odd count: ends high
      t0 = last_toggle;
      repeat (3 * STABLE) @(negedge clk);
      checks += 2;
      if (pulses != p0 + 1) begin failures++; $display("press gave %0d pulses", pulses - p0); end
      if (last_pulse - t0 < STABLE) begin failures++; $display("pulse %0d cycles after settling", last_pulse - t0); end
      // release with bounces: no pulse
      p0 = pulses;
      bounce(2 * $urandom_range(0, 3) + 1);
      repeat (3 * STABLE) @(negedge clk);
      checks++;
      if (pulses != p0) begin failures++; $display("release gave a pulse"); end
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
