// sort3: three-input comparator cell of the median filter.
// Gives the maximum, median and minimum of three 8-bit values in one
// combinational stage built from three pairwise comparisons. It is the
// "comparator" box repeated in every level of the 3x3 median network.
module sort3 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic [7:0] c,
  output logic [7:0] max_o,
  output logic [7:0] med_o,
  output logic [7:0] min_o
);
  logic ab, bc, ac;
  always_comb begin
    ab = a >= b;
    bc = b >= c;
    ac = a >= c;
    max_o = (ab && ac) ? a : ((!ab && bc) ? b : c);
    min_o = (!ab && !ac) ? a : ((ab && !bc) ? b : c);
    if ((ab && !ac) || (!ab && ac)) med_o = a;
    else if ((ab && bc) || (!ab && !bc)) med_o = b;
    else med_o = c;
  end
endmodule
