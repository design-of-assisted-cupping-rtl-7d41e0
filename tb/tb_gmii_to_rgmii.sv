// tb_gmii_to_rgmii: self-checking test of gmii_to_rgmii.
// Random bytes with random TX_EN/TX_ER are presented before each rising
// edge. Each RGMII half-period is sampled 2 ns after the clock edge: the
// high phase must carry the low nibble and TX_EN, the low phase the high
// nibble and TX_EN xor TX_ER, one clock after the byte was presented.
// Also checks that rgmii_txc follows the clock and that reset clears the
// outputs.
`timescale 1ns/1ps
module tb_gmii_to_rgmii;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;
  logic [7:0] d = 0;
  logic en = 0, er = 0, txc, ctl;
  logic [3:0] txd;
  int checks = 0, failures = 0;
  gmii_to_rgmii dut (.clk, .rst_n, .gmii_txd(d), .gmii_tx_en(en), .gmii_tx_er(er),
                     .rgmii_txc(txc), .rgmii_txd(txd), .rgmii_tx_ctl(ctl));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    #100_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] pd;
    logic pen, per;
    repeat (2) @(negedge clk);
    #2 check(txd == 0 && ctl == 0, "outputs cleared in reset");
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      d = 8'($urandom); en = 1'($urandom); er = ($urandom % 8) == 0;
      pd = d; pen = en; per = er;
      @(posedge clk); @(posedge clk); #2;
      check(txc == 1, "txc high after rising edge");
      check(txd == pd[3:0], $sformatf("low nibble %h vs %h", txd, pd[3:0]));
      check(ctl == pen, "TX_CTL first half = TX_EN");
      @(negedge clk); #2;
      check(txc == 0, "txc low after falling edge");
      check(txd == pd[7:4], $sformatf("high nibble %h vs %h", txd, pd[7:4]));
      check(ctl == (pen ^ per), "TX_CTL second half = TX_EN ^ TX_ER");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
