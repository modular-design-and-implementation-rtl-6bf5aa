// sort_cmp_lower: tag cell of the parallel sorter (lower network).
//
// Two multiplexers that exchange tags c and d when the matching key
// comparator (sort_cmp_upper) reports a swap, so each tag follows its key.
// In the estimator the tags are the original tap positions. Combinational.
module sort_cmp_lower #(
  parameter int unsigned TAGW = 4
) (
  input  logic            swp,
  input  logic [TAGW-1:0] c,
  input  logic [TAGW-1:0] d,
  output logic [TAGW-1:0] yc,
  output logic [TAGW-1:0] yd
);
  always_comb begin
    yc = swp ? d : c;
    yd = swp ? c : d;
  end
endmodule
