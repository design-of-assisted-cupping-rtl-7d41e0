// dht11_model: behavioural model of the DHT11 sensor's single-bus side.
// Not synthesizable. When the host has held the line low for at least 10 of
// the model's microseconds and releases it, the model waits 30 us, pulls the
// line low for 80 us, releases it for 80 us, then sends the 40 bits of
// 'frame' MSB first as 50 us low + 27 us (0) or 70 us (1) released, and a final
// 50 us low. US is the length of one microsecond in ns, so a testbench can run
// the controller with a scaled CLK_HZ. With 'mute' set the model never
// answers.
`timescale 1ns/1ps
module dht11_model #(
  parameter int US = 1000
) (
  input  logic        line,       // bus level
  input  logic [39:0] frame,
  input  logic        mute,
  output logic        dev_oe      // 1 = model pulls the line low
);
  realtime t_fall;
  int unsigned reads = 0;
  initial dev_oe = 1'b0;
  always @(negedge line) if (!dev_oe) t_fall = $realtime;
  always @(posedge line) begin
    if (!dev_oe && ($realtime - t_fall) >= 10.0 * US && !mute) begin
      reads++;
      #(30 * US);
      dev_oe = 1'b1; #(80 * US);
      dev_oe = 1'b0; #(80 * US);
      for (int i = 39; i >= 0; i--) begin
        dev_oe = 1'b1; #(50 * US);
        dev_oe = 1'b0;
        if (frame[i]) #(70 * US); else #(27 * US);
      end
      dev_oe = 1'b1; #(50 * US);
      dev_oe = 1'b0;
    end
  end
endmodule
