// butterfly: modular NTT butterfly for one prime QM, Cooley-Tukey or
// Gentleman-Sande.
//
//   gs = 0 (forward, Cooley-Tukey):   x = a + w*b,  y = a - w*b      (mod QM)
//   gs = 1 (inverse, Gentleman-Sande): x = a + b,    y = (a - b)*w    (mod QM)
//
// Operands a and b are residues in [0, QM); the twiddle w is the signed 14-bit
// centred value read from the twiddle ROM and is mapped to [0, QM) first.
// The single modular multiplication is a 14x14-bit product reduced by
// Barrett's method. Outputs are registered: x and y appear one clock after
// the inputs. The butterfly equations follow the source design; the
// unsigned residue representation and the reducer are this design's own.
module butterfly #(
  parameter int unsigned QM = 15361
) (
  input  logic                          clk,
  input  logic                          gs,
  input  logic [ntt_pkg::RES_W-1:0]     a,
  input  logic [ntt_pkg::RES_W-1:0]     b,
  input  logic signed [ntt_pkg::TW_W-1:0] w,
  output logic [ntt_pkg::RES_W-1:0]     x,
  output logic [ntt_pkg::RES_W-1:0]     y
);
  import ntt_pkg::*;

  localparam int unsigned PW = 2 * RES_W;

  logic [RES_W-1:0] wu;          // twiddle in [0, QM)
  logic [RES_W-1:0] mul_in;      // operand multiplied by the twiddle
  logic [PW-1:0]    prod;
  logic [RES_W-1:0] prod_r;      // (mul_in * wu) mod QM
  logic [RES_W-1:0] diff_ab;     // (a - b) mod QM
  logic [RES_W-1:0] s;
  logic [RES_W-1:0] x_n, y_n;

  function automatic logic [RES_W-1:0] add_mod(logic [RES_W-1:0] u, logic [RES_W-1:0] v);
    logic [RES_W:0] t;
    t = {1'b0, u} + {1'b0, v};
    if (t >= (RES_W+1)'(QM)) t = t - (RES_W+1)'(QM);
    return t[RES_W-1:0];
  endfunction

  function automatic logic [RES_W-1:0] sub_mod(logic [RES_W-1:0] u, logic [RES_W-1:0] v);
    logic [RES_W:0] t;
    t = {1'b0, u} + (RES_W+1)'(QM) - {1'b0, v};
    if (t >= (RES_W+1)'(QM)) t = t - (RES_W+1)'(QM);
    return t[RES_W-1:0];
  endfunction

  mod_barrett #(.IN_W(PW), .MOD(QM), .OUT_W(RES_W)) u_red (.x(prod), .r(prod_r));

  always_comb begin
    s       = RES_W'(w) + RES_W'(QM);   // w + QM (mod 2^14), used when w < 0
    wu      = w[TW_W-1] ? s[RES_W-1:0] : RES_W'(w);
    diff_ab = sub_mod(a, b);
    mul_in  = gs ? diff_ab : b;
    prod    = PW'(mul_in) * PW'(wu);
    if (gs) begin
      x_n = add_mod(a, b);
      y_n = prod_r;
    end else begin
      x_n = add_mod(a, prod_r);
      y_n = sub_mod(a, prod_r);
    end
  end

  always_ff @(posedge clk) begin
    x <= x_n;
    y <= y_n;
  end
endmodule
