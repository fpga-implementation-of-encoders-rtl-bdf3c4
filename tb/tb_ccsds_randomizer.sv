// tb_ccsds_randomizer: checks the parallel randomizer at 16, 8 and 1 bits per
// cycle against the published start of the CCSDS pseudo-random sequence
// (FF 48 0E C0 9A 0D 70 BC), its 255-bit period, restart on init and hold
// when neither init nor adv is set.
module tb_ccsds_randomizer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam logic [63:0] REF = 64'hFF480EC09A0D70BC;
  int checks = 0, failures = 0;

  logic init, adv, ce;
  logic [15:0] r16;
  logic [7:0]  r8;
  logic [0:0]  r1;

  ccsds_randomizer #(.W(16)) u16 (.clk, .rst_n, .ce, .init, .adv, .rnd(r16));
  ccsds_randomizer #(.W(8))  u8  (.clk, .rst_n, .ce, .init, .adv, .rnd(r8));
  ccsds_randomizer #(.W(1))  u1  (.clk, .rst_n, .ce, .init, .adv, .rnd(r1));

  // sequence bits collected from each generator width
  logic s16 [2040], s8 [2040], s1 [2040];

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %b exp %b", what, got, exp);
    end
  endtask

  initial begin
    init = 0; adv = 0; ce = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // run 2040 bits on each generator (8 periods of 255)
    for (int c = 0; c < 2040; c++) begin
      if (c < 2040 / 16) for (int i = 0; i < 16; i++) s16[c*16 + i] = r16[15-i];
      if (c < 2040 / 8)  for (int i = 0; i < 8; i++)  s8[c*8 + i]   = r8[7-i];
      s1[c] = r1[0];
      adv = 1;
      @(negedge clk);
    end
    adv = 0;
    for (int i = 0; i < 64; i++) begin
      check("w16 start", s16[i], REF[63-i]);
      check("w8 start",  s8[i],  REF[63-i]);
      check("w1 start",  s1[i],  REF[63-i]);
    end
    for (int i = 0; i < 2040 - 255; i++) begin
      check("period", s1[i + 255], s1[i]);
      if (i < 1920) check("w16 vs w1", s16[i], s1[i]);
      check("w8 vs w1", s8[i], s1[i]);
    end
    // hold, then restart
    begin
      logic [15:0] h;
      h = r16;
      @(negedge clk);
      check("hold", r16 == h, 1'b1);
      ce = 0; adv = 1; @(negedge clk); ce = 1; adv = 0;
      check("ce freeze", r16 == h, 1'b1);
      init = 1; @(negedge clk); init = 0;
      check("restart", r16 == REF[63:48], 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
