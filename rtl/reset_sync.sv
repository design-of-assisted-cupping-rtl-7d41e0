// reset_sync: reset synchroniser for one clock domain.
// The reset is asserted asynchronously and released two clocks after the
// external reset goes high, so every flip-flop of the domain leaves reset on
// the same edge.
module reset_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);
  logic [1:0] s;
  always_ff @(posedge clk or negedge rst_n_in)
    if (!rst_n_in) s <= '0;
    else           s <= {s[0], 1'b1};
  assign rst_n_out = s[1];
endmodule
