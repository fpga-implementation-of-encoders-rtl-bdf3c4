// tb_ar4ja_encoder: self-checking test of the AR4JA encoder over the
// parallelism settings of the k = 1024 family members.
//
// Each instance encodes frames at full throttle (no idle output cycle allowed,
// systematic latency checked against (LA-1)*m/(LA*LM) + 2 cycles, including
// the input and output registers) and then with random stalls on both
// interfaces; every output word is compared with an independently computed
// CADU.
module tb_ar4ja_encoder;
  import ldpc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  initial begin repeat (3) @(posedge clk); rst_n = 1'b1; end

  localparam int NI = 6;
  logic [NI-1:0] done;
  int checks [NI], failures [NI], si [NI], so [NI];

  // one encoder + checker per configuration
`define AR4JA_CASE(IDX, KK, RR, LAV, LMV, RE, LATV)                                  \
  logic [LAV*LMV-1:0] d_sl_``IDX, d_ma_``IDX;                                        \
  logic v_sl_``IDX, r_sl_``IDX, v_ma_``IDX, r_ma_``IDX;                              \
  ar4ja_encoder #(.K_INFO(KK), .RATE(RR), .LA(LAV), .LM(LMV), .RAND_EN(RE)) u_dut_``IDX ( \
    .aclk(clk), .aresetn(rst_n), .tdata_sl(d_sl_``IDX), .tvalid_sl(v_sl_``IDX),     \
    .tready_sl(r_sl_``IDX), .tdata_ma(d_ma_``IDX), .tvalid_ma(v_ma_``IDX),          \
    .tready_ma(r_ma_``IDX));                                                         \
  ar4ja_checker #(.K_INFO(KK), .RATE(RR), .LA(LAV), .LM(LMV), .RAND_EN(RE),          \
                  .NTF_FULL(3), .NTF_RAND(3), .EXP_LAT(LATV)) u_chk_``IDX (         \
    .clk, .rst_n, .tdata_sl(d_sl_``IDX), .tvalid_sl(v_sl_``IDX),                     \
    .tready_sl(r_sl_``IDX), .tdata_ma(d_ma_``IDX), .tvalid_ma(v_ma_``IDX),          \
    .tready_ma(r_ma_``IDX), .done(done[IDX]), .checks(checks[IDX]),                  \
    .failures(failures[IDX]), .stalls_in(si[IDX]), .stalls_out(so[IDX]));

  `AR4JA_CASE(0, 1024, R12, 8, 2, 1'b1, 56)
  `AR4JA_CASE(1, 1024, R12, 1, 16, 1'b1, 3)
  `AR4JA_CASE(2, 1024, R12, 2, 8, 1'b0, 8)
  `AR4JA_CASE(3, 1024, R12, 4, 4, 1'b1, 24)
  `AR4JA_CASE(4, 1024, R23, 16, 1, 1'b1, 60)
  `AR4JA_CASE(5, 1024, R45, 2, 8, 1'b1, 3)

  int total_checks, total_failures;
  initial begin
    wait (&done);
    total_checks = 0; total_failures = 0;
    for (int i = 0; i < NI; i++) begin
      total_checks += checks[i];
      total_failures += failures[i];
      total_checks++;
      if (si[i] == 0 || so[i] == 0) begin
        total_failures++;
        $display("instance %0d: stalls never exercised", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    total_checks = 0; total_failures = 1;
    for (int i = 0; i < NI; i++) begin
      total_checks += checks[i];
      total_failures += failures[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end
endmodule
