// pressure_pid: negative-pressure control loop for the cup's air pump.
//
// Each new pressure sample updates a positional PID controller:
//   e   = setpoint - press_raw     (the raw BMP280 word rises as pressure
//                                   falls, so e > 0 means "not enough vacuum")
//   I   = clamp(I + e)
//   u   = (KP*e + KI*I + KD*(e - e_prev)) / 256
//   duty = clamp(u, 0, 2^PWM_BITS - 1)
// The duty drives a free-running PWM on pump_pwm. With pump_en low the
// output is off and the integrator and derivative memory are cleared.
// Interface: sample_valid with press_raw (20-bit raw word), setpoint in the
// same units; duty is updated the clock after a sample; pump_pwm period is
// 2^PWM_BITS clocks.
// The document only names the PID pressure module and the pump; the error
// sign, gains, scaling, clamps and PWM are this design's choices.
module pressure_pid #(
  parameter int signed KP       = 64,
  parameter int signed KI       = 4,
  parameter int signed KD       = 16,
  parameter int        PWM_BITS = 10,
  parameter int signed I_MAX    = 1 << 20
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                pump_en,
  input  logic                sample_valid,
  input  logic [19:0]         press_raw,
  input  logic [19:0]         setpoint,
  output logic [PWM_BITS-1:0] duty,
  output logic                pump_pwm
);
  localparam logic signed [47:0] DMAX = 48'((1 << PWM_BITS) - 1);

  logic signed [23:0] e, e_prev;
  logic signed [31:0] integ, integ_n;
  logic signed [47:0] u;
  logic [PWM_BITS-1:0] pwm_cnt;

  always_comb begin
    e = 24'(signed'({1'b0, setpoint})) - 24'(signed'({1'b0, press_raw}));
    integ_n = integ + 32'(e);
    if (integ_n > 32'(I_MAX)) integ_n = 32'(I_MAX);
    if (integ_n < -32'(I_MAX)) integ_n = -32'(I_MAX);
    u = (48'(KP) * 48'(e) + 48'(KI) * 48'(integ_n) + 48'(KD) * 48'(e - e_prev)) >>> 8;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_prev <= '0; integ <= '0; duty <= '0; pwm_cnt <= '0; pump_pwm <= 1'b0;
    end else begin
      pwm_cnt  <= pwm_cnt + 1'b1;
      pump_pwm <= pump_en && (pwm_cnt < duty);
      if (!pump_en) begin
        e_prev <= '0; integ <= '0; duty <= '0;
      end else if (sample_valid) begin
        e_prev <= e;
        integ  <= integ_n;
        if (u < 0) duty <= '0;
        else if (u > DMAX) duty <= '1;
        else duty <= PWM_BITS'(u);
      end
    end
  end
endmodule
