// mod_barrett: combinational reduction r = x mod MOD for an unsigned x of
// IN_W bits, by Barrett's method.
//
// With k = IN_W and m = floor(2^k / MOD), the quotient estimate
// t = floor(x*m / 2^k) is floor(x/MOD) or one less, so x - t*MOD lies in
// [0, 2*MOD) and a single conditional subtraction finishes the reduction.
// Used by the butterflies, the pointwise unit, the CRT unit and the final
// reduction. Purely combinational; the reduction method is this design's
// own choice (the source design only names a reducer).
module mod_barrett #(
  parameter int unsigned IN_W  = 28,
  parameter int unsigned MOD   = 15361,
  parameter int unsigned OUT_W = 14
) (
  input  logic [IN_W-1:0]  x,
  output logic [OUT_W-1:0] r
);
  localparam longint unsigned MCONST = ntt_pkg::barrett_m(IN_W, MOD);
  localparam int unsigned     M_W    = $clog2(MCONST + 1);
  localparam int unsigned     PROD_W = IN_W + M_W;

  logic [PROD_W-1:0] prod;
  logic [M_W-1:0]    t;
  logic [OUT_W:0]    r0;

  always_comb begin
    prod = PROD_W'(x) * PROD_W'(MCONST);
    t    = M_W'(prod >> IN_W);
    r0   = (OUT_W+1)'(x - IN_W'(t) * IN_W'(MOD));
    if (r0 >= (OUT_W+1)'(MOD)) r = OUT_W'(r0 - (OUT_W+1)'(MOD));
    else                       r = OUT_W'(r0);
  end
endmodule
