// tb_temp_fusion: self-checking test of temp_fusion. For fixed and random
// temperatures compares t_fused with round(0.9412*T_BMP + 0.0588*(T_DHT - dT))
// computed in floating point (allowing 1 LSB for the Q0.16 weights), checks
// the calibrated DHT11 value exactly and the two-clock latency. Also checks
// the error-propagation figure: the fused error bound is about 0.485 C.
`timescale 1ns/1ps
module tb_temp_fusion;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic iv = 0, ov;
  logic signed [15:0] td = 0, tb = 0, dt = 0, tf, tcal;
  int checks = 0, failures = 0;
  temp_fusion dut (.clk, .rst_n, .in_valid(iv), .t_dht(td), .t_bmp(tb), .delta_t(dt),
                   .out_valid(ov), .t_fused(tf), .t_dht_cal(tcal));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    real e, sf;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      if (i == 0) begin td = 2600; tb = 2500; dt = 100; end
      else if (i == 1) begin td = -500; tb = -400; dt = -50; end
      else begin
        tb = 16'($urandom % 8000) - 16'sd2000;
        td = tb + 16'($urandom % 800) - 16'sd400;
        dt = 16'($urandom % 400) - 16'sd200;
      end
      @(negedge clk) iv = 1;
      @(negedge clk) iv = 0;
      check(!ov, "not valid after 1 clock");
      @(negedge clk);
      check(ov, "valid after 2 clocks");
      e = 0.9412 * tb + 0.0588 * (td - dt);
      check(tcal == td - dt, "calibrated DHT11 temperature");
      check(tf >= $rtoi(e + 0.5 - (e < -0.5 ? 1.0 : 0.0)) - 1 && tf <= $rtoi(e + 0.5) + 1,
            $sformatf("fused %0d, real %f", tf, e));
    end
    sf = $sqrt((0.9412 * 0.5) ** 2 + (0.0588 * 2.0) ** 2);
    check(sf > 0.48 && sf < 0.49, $sformatf("fused error bound %f", sf));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
