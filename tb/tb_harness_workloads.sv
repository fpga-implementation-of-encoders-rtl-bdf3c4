// tb_harness_workloads: the hardware test runs of the reference design,
// at their full frame counts, on the test harness with the encoder
// configurations that were tested there beyond the default one:
//   serial input, 960 frames:    AR4JA rate 2/3 and 4/5, LA = 8, LM = 2
//   serial input, 127 frames:    C2
//   generated input, 5000 frames: AR4JA rate 4/5, LA = 16, LM = 1
//   generated input, 1000 frames: C2
// (rate 1/2 with LA = 8, LM = 2 is the default harness, run by the top
// testbench). Each run is checked by a ts_runner; the measured cycle counts
// are printed next to those of the reference hardware.
module tb_harness_workloads;
  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  // a real falling edge, so that the asynchronous resets take effect
  initial begin #1 rst_n = 1'b0; repeat (3) @(negedge clk); rst_n = 1'b1; end

  localparam int N = 5;
  logic [N-1:0] done;
  int checks [N], failures [N];

  ts_runner #(.RATE(ldpc_pkg::R23), .MODE(1'b0), .NTF(960), .REF_CYC(96032))
    u_r23 (.clk, .rst_n, .done(done[0]), .checks(checks[0]), .failures(failures[0]));
  ts_runner #(.RATE(ldpc_pkg::R45), .MODE(1'b0), .NTF(960), .REF_CYC(80658))
    u_r45 (.clk, .rst_n, .done(done[1]), .checks(checks[1]), .failures(failures[1]));
  ts_runner #(.USE_C2(1'b1), .MODE(1'b0), .NTF(127), .REF_CYC(65157))
    u_c2s (.clk, .rst_n, .done(done[2]), .checks(checks[2]), .failures(failures[2]));
  ts_runner #(.RATE(ldpc_pkg::R45), .LA(16), .LM(1), .MODE(1'b1), .NTF(5000), .REF_CYC(420032))
    u_r45g (.clk, .rst_n, .done(done[3]), .checks(checks[3]), .failures(failures[3]));
  ts_runner #(.USE_C2(1'b1), .MODE(1'b1), .NTF(1000), .REF_CYC(525317))
    u_c2g (.clk, .rst_n, .done(done[4]), .checks(checks[4]), .failures(failures[4]));

  initial begin
    int c, f;
    c = 0; f = 0;
    wait (&done);
    for (int i = 0; i < N; i++) begin c += checks[i]; f += failures[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
  initial begin
    int c, f;
    c = 0; f = 1;
    repeat (1200000) @(posedge clk);
    $display("watchdog expired");
    for (int i = 0; i < N; i++) begin c += checks[i]; f += failures[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
