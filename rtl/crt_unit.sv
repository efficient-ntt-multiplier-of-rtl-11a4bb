// crt_unit: Chinese-remainder reconstruction of one product coefficient.
//
// Inputs are the residues r0, r1, r2 of an integer coefficient X modulo the
// three NTT primes (15361, 12289, 7681). Garner's mixed-radix form gives
//     v0 = r0
//     v1 = (r1 - v0) * q0^-1                 mod q1
//     v2 = (r2 - v0 - q0*v1) * (q0*q1)^-1    mod q2
//     X  = v0 + q0*v1 + q0*q1*v2             in [0, Q), Q = q0*q1*q2
// X is read as a signed value in (-Q/2, Q/2) (the true convolution
// coefficient of two centred operands) and reduced modulo q = 4591. The mod-q
// value is computed from the small digits v0..v2 with pre-reduced constants,
// so no 41-bit division is needed; only the sign test uses the 41-bit X.
// Output: v in [0, q), registered, one clock after in_valid; the tag travels
// alongside unchanged. Using the CRT follows the source design; Garner's form
// and this datapath are this design's own.
module crt_unit #(
  parameter int unsigned TAG_W = 12
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [TAG_W-1:0]          in_tag,
  input  logic [ntt_pkg::RES_W-1:0] r0,
  input  logic [ntt_pkg::RES_W-1:0] r1,
  input  logic [ntt_pkg::RES_W-1:0] r2,
  output logic                      out_valid,
  output logic [TAG_W-1:0]          out_tag,
  output logic [12:0]               v
);
  import ntt_pkg::*;

  localparam longint unsigned QQ   = longint'(Q0) * Q1 * Q2;
  localparam longint unsigned HALF = (QQ - 1) / 2;
  localparam int unsigned     XW   = 41;
  // Garner constants
  localparam int unsigned     C1   = int'(modinv(Q0 % Q1, Q1));
  localparam int unsigned     C2   = int'(modinv((Q0 % Q2) * (Q1 % Q2) % Q2, Q2));
  localparam int unsigned     Q0M2 = Q0 % Q2;
  // mod-q constants
  localparam int unsigned     Q0MQ  = Q0 % Q;
  localparam int unsigned     Q01MQ = (Q0 % Q) * (Q1 % Q) % Q;
  localparam int unsigned     QQMQ  = Q01MQ * (Q2 % Q) % Q;

  logic [RES_W-1:0] v0_m1, d1, v1, d2, v2;
  logic [RES_W:0]   t1, t2;
  logic [27:0]      m1, m2;
  logic [26:0]      s2;
  logic [RES_W-1:0] s2_r;
  logic [XW-1:0]    x;
  logic [26:0]      sq;
  logic [12:0]      sq_r;
  logic [13:0]      vq;

  // v1 = (r1 - v0) * C1 mod q1
  always_comb begin
    v0_m1 = (r0 >= RES_W'(Q1)) ? r0 - RES_W'(Q1) : r0;
    t1    = (RES_W+1)'(r1) + (RES_W+1)'(Q1) - (RES_W+1)'(v0_m1);
    d1    = (t1 >= (RES_W+1)'(Q1)) ? RES_W'(t1 - (RES_W+1)'(Q1)) : RES_W'(t1);
    m1    = 28'(d1) * 28'(C1);
  end
  mod_barrett #(.IN_W(28), .MOD(Q1), .OUT_W(RES_W)) u_r1 (.x(m1), .r(v1));

  // v2 = (r2 - (v0 + q0*v1)) * C2 mod q2
  always_comb s2 = 27'(r0) + 27'(v1) * 27'(Q0M2);
  mod_barrett #(.IN_W(27), .MOD(Q2), .OUT_W(RES_W)) u_s2 (.x(s2), .r(s2_r));
  always_comb begin
    t2 = (RES_W+1)'(r2) + (RES_W+1)'(Q2) - (RES_W+1)'(s2_r);
    d2 = (t2 >= (RES_W+1)'(Q2)) ? RES_W'(t2 - (RES_W+1)'(Q2)) : RES_W'(t2);
    m2 = 28'(d2) * 28'(C2);
  end
  mod_barrett #(.IN_W(28), .MOD(Q2), .OUT_W(RES_W)) u_r2 (.x(m2), .r(v2));

  // Full value (for the sign only) and its residue mod q
  always_comb begin
    x  = XW'(r0) + XW'(v1) * XW'(Q0) + XW'(v2) * XW'(longint'(Q0) * Q1);
    sq = 27'(r0) + 27'(v1) * 27'(Q0MQ) + 27'(v2) * 27'(Q01MQ);
  end
  mod_barrett #(.IN_W(27), .MOD(Q), .OUT_W(13)) u_sq (.x(sq), .r(sq_r));

  // Negative lift: X - Q  ->  subtract Q mod q
  always_comb begin
    if (x > XW'(HALF)) vq = 14'(sq_r) + 14'(Q) - 14'(QQMQ);
    else               vq = 14'(sq_r);
    if (vq >= 14'(Q)) vq = vq - 14'(Q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      v         <= '0;
    end else begin
      out_valid <= in_valid;
      out_tag   <= in_tag;
      v         <= vq[12:0];
    end
  end
endmodule
