// tb_c2_encoder: self-checking test of the C2 encoder, with and without
// randomization: CADU contents, the 513-cycle CADU period at full throttle
// and correct operation under random stalls on both interfaces.
module tb_c2_encoder;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  initial begin repeat (3) @(posedge clk); rst_n = 1'b1; end

  logic [1:0] done;
  int checks [2], failures [2], si [2], so [2];

  for (genvar i = 0; i < 2; i++) begin : g_inst
    logic [15:0] d_sl, d_ma;
    logic        v_sl, r_sl, v_ma, r_ma;
    c2_encoder #(.RAND_EN(i == 0)) u_dut (
      .aclk(clk), .aresetn(rst_n), .tdata_sl(d_sl), .tvalid_sl(v_sl), .tready_sl(r_sl),
      .tdata_ma(d_ma), .tvalid_ma(v_ma), .tready_ma(r_ma));
    c2_checker #(.RAND_EN(i == 0), .NTF_FULL(2), .NTF_RAND(2)) u_chk (
      .clk, .rst_n, .tdata_sl(d_sl), .tvalid_sl(v_sl), .tready_sl(r_sl),
      .tdata_ma(d_ma), .tvalid_ma(v_ma), .tready_ma(r_ma), .done(done[i]),
      .checks(checks[i]), .failures(failures[i]), .stalls_in(si[i]), .stalls_out(so[i]));
  end

  int tc, tf;
  initial begin
    wait (&done);
    tc = checks[0] + checks[1] + 1;
    tf = failures[0] + failures[1];
    if (si[0] == 0 || so[0] == 0) begin
      tf++;
      $display("stalls never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1] + 1);
    $finish;
  end
endmodule
