// tb_pressure_pid: self-checking test of pressure_pid. Checks each duty
// update against the PID formula evaluated here, saturation at 0 and at full
// scale, that pump_en low stops the pump and clears the state, and that the
// PWM high time per period equals the duty. Then closes the loop with a
// first-order model of the cup (the raw word rises with the pump's duty and
// leaks back) and checks that the raw word settles near the set point.
`timescale 1ns/1ps
module tb_pressure_pid;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 0, sv = 0, pwm;
  logic [19:0] p = 0, sp = 0;
  logic [9:0] duty;
  int checks = 0, failures = 0;
  pressure_pid #(.PWM_BITS(10)) dut (.clk, .rst_n, .pump_en(en), .sample_valid(sv),
    .press_raw(p), .setpoint(sp), .duty, .pump_pwm(pwm));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint integ = 0, eprev = 0;
  task automatic sample(input int val);
    longint e, u, d;
    e = longint'(sp) - longint'(val);
    integ += e;
    if (integ > (1 << 20)) integ = 1 << 20;
    if (integ < -(1 << 20)) integ = -(1 << 20);
    u = 64 * e + 4 * integ + 16 * (e - eprev);
    u = (u >= 0) ? u / 256 : -((-u + 255) / 256);
    eprev = e;
    d = u < 0 ? 0 : (u > 1023 ? 1023 : u);
    @(negedge clk) p = 20'(val); sv = 1;
    @(negedge clk) sv = 0;
    check(duty == 10'(d), $sformatf("duty %0d expected %0d (e=%0d)", duty, d, e));
  endtask

  initial begin
    #5_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int hi;
    real cup;
    repeat (3) @(negedge clk); rst_n = 1;
    sp = 20'd500000; en = 1;
    sample(499990); sample(499995); sample(500010); sample(490000);
    check(duty == 10'd1023, "saturates at full scale");
    sample(501000); sample(520000);
    check(duty == 10'd0, "saturates at zero");
    integ = 0; eprev = 0;
    en = 0; @(negedge clk); @(negedge clk);
    check(duty == 0 && dut.integ == 0, "disabled clears state");
    repeat (1100) begin @(negedge clk); check(!pwm, "pump off when disabled"); end
    en = 1;
    sample(499950);
    hi = 0;
    @(negedge clk); while (dut.pwm_cnt != 0) @(negedge clk);
    repeat (1024) begin @(negedge clk); hi += pwm; end
    check(hi == int'(duty), $sformatf("PWM high %0d of 1024, duty %0d", hi, duty));
    // closed loop: raw word moves towards 480000 + 40*duty, 1/16 of the gap per sample
    cup = 480000.0;
    repeat (400) begin
      cup = cup + (480000.0 + 40.0 * duty - cup) / 16.0;
      @(negedge clk) p = 20'($rtoi(cup)); sv = 1;
      @(negedge clk) sv = 0;
    end
    check(cup > 499000.0 && cup < 501000.0, $sformatf("settled at %f", cup));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
