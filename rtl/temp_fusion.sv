// temp_fusion: DHT11 zero-bias compensation and weighted temperature fusion.
//   T_cal = T_DHT11 - dT
//   T_f   = w1 * T_BMP280 + w2 * T_cal
// All temperatures are signed 16-bit in 0.01 C. The weights are unsigned
// Q0.16 fractions; the defaults 61683 and 3853 are 0.9412 and 0.0588, the
// inverse-variance weights for sensor errors of 0.5 C (BMP280) and 2 C
// (DHT11), and they sum to exactly 1.0. The product sum is rounded to the
// nearest 0.01 C.
// Interface and timing: in_valid with the three inputs; out_valid and t_fused
// two clocks later (one clock for compensation, one for the weighted sum).
// Equations and weights follow the document; the fixed-point format is this
// design's choice.
module temp_fusion #(
  parameter logic [16:0] W1_Q16 = 17'd61683,
  parameter logic [16:0] W2_Q16 = 17'd3853
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic signed [15:0] t_dht,
  input  logic signed [15:0] t_bmp,
  input  logic signed [15:0] delta_t,
  output logic               out_valid,
  output logic signed [15:0] t_fused,
  output logic signed [15:0] t_dht_cal
);
  logic               v1;
  logic signed [15:0] tb1;
  logic signed [35:0] acc;

  always_comb
    acc = 36'(tb1) * 36'(signed'({1'b0, W1_Q16})) + 36'(t_dht_cal) * 36'(signed'({1'b0, W2_Q16}))
          + 36'sd32768;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; out_valid <= 1'b0; tb1 <= '0; t_dht_cal <= '0; t_fused <= '0;
    end else begin
      v1 <= in_valid;
      out_valid <= v1;
      if (in_valid) begin
        t_dht_cal <= t_dht - delta_t;
        tb1 <= t_bmp;
      end
      if (v1) t_fused <= 16'(acc >>> 16);
    end
  end
endmodule
