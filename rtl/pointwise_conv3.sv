// pointwise_conv3: pointwise multiplication in the NTT domain for one prime.
//
// With Good's trick each NTT point holds, per operand, a polynomial of
// degree < 3 in y, and the pointwise product is a product modulo y^3 - 1
// (a cyclic convolution of length 3). This unit returns one output
// coefficient,
//     c_k = ninv * sum_{i=0..2} a_i * b_{(k-i) mod 3}   (mod QM),
// where ninv = 512^-1 mod QM folds the inverse NTT's scaling into this step.
// Inputs are residues in [0, QM). Purely combinational; the caller registers
// the result. The convolution follows from the source design's ring mapping;
// computing it one output at a time and folding in 1/512 are this design's
// choices.
module pointwise_conv3 #(
  parameter int unsigned QM = 15361
) (
  input  logic [2:0][ntt_pkg::RES_W-1:0] a,
  input  logic [2:0][ntt_pkg::RES_W-1:0] b,
  input  logic [1:0]                     k,
  output logic [ntt_pkg::RES_W-1:0]      c
);
  import ntt_pkg::*;

  localparam int unsigned PW   = 2 * RES_W;
  localparam int unsigned SW   = PW + 2;
  localparam logic [RES_W-1:0] NINV = RES_W'(modinv(N, QM));

  logic [SW-1:0]    acc;
  logic [RES_W-1:0] acc_r;
  logic [PW-1:0]    scaled;
  logic [1:0]       j;

  always_comb begin
    acc = '0;
    for (int i = 0; i < 3; i++) begin
      // j = (k - i) mod 3
      case ((4'(k) + 4'd3 - 4'(i)) % 4'd3)
        4'd0:    j = 2'd0;
        4'd1:    j = 2'd1;
        default: j = 2'd2;
      endcase
      acc = acc + SW'(PW'(a[i]) * PW'(b[j]));
    end
  end

  mod_barrett #(.IN_W(SW), .MOD(QM), .OUT_W(RES_W)) u_red0 (.x(acc), .r(acc_r));

  assign scaled = PW'(acc_r) * PW'(NINV);

  mod_barrett #(.IN_W(PW), .MOD(QM), .OUT_W(RES_W)) u_red1 (.x(scaled), .r(c));
endmodule
