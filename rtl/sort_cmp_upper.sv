// sort_cmp_upper: key comparator cell of the parallel sorter (upper network).
//
// Compares keys a and b and swaps them when they are out of order: with
// DESCENDING set the larger key goes to output A, otherwise the smaller one.
// Equal keys stay where they are, which keeps the sort stable. swp tells the
// matching tag cell (sort_cmp_lower) whether a swap took place.
// Purely combinational.
module sort_cmp_upper #(
  parameter int unsigned KW         = 32,
  parameter bit          DESCENDING = 1'b1
) (
  input  logic [KW-1:0] a,
  input  logic [KW-1:0] b,
  output logic          swp,
  output logic [KW-1:0] ya,
  output logic [KW-1:0] yb
);
  always_comb begin
    swp = DESCENDING ? (a < b) : (a > b);
    ya  = swp ? b : a;
    yb  = swp ? a : b;
  end
endmodule
