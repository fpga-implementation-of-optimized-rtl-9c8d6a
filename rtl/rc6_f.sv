// rc6_f: the RC6 round function f(x) = (x * (2x + 1) mod 2^w) <<< lg(w).
//
// The quadratic x(2x+1) is a bijection on w-bit words; rotating the product
// left by lg(w) moves its well-mixed high bits into the low lg(w) positions,
// which RC6 then uses as a data-dependent rotation amount. Two of these feed
// each RC6 round (t from B and u from D).
//
// Purely combinational. The product is formed as x*x*2 + x, so only one w x w
// multiplier (low half only) is needed; that is this design's choice.
module rc6_f #(
  parameter int unsigned W = 16   // word size in bits
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);

  localparam int unsigned LW = $clog2(W);

  logic [W-1:0] prod;
  always_comb begin
    prod = ((x * x) << 1) + x;              // x(2x+1) mod 2^w
    y    = (prod << LW) | (prod >> (W - LW));
  end

endmodule
