// poly_reduce: final reduction of the product modulo x^p - x - 1 and q.
//
// The cyclic convolution delivers coefficients C_k, k = 0..1520, already
// reduced mod q = 4591 by the CRT unit. Since x^p = x + 1, a term C_k with
// k >= p folds onto positions k-p and k-p+1; for the sntrup761 degrees one
// fold suffices, so output coefficient i is
//     c_i = C_i + C_{i+p} + C_{i+p-1} (the last only for i >= 1)   mod q.
// The unit accumulates the terms of one output index as they arrive
// (in_first starts a sum, in_last ends it) and on in_last emits c_i as a
// centred signed value in [-(q-1)/2, (q-1)/2] with its index, one clock
// later. Folding modulo x^p - x - 1 and the centred output range follow the
// source design; the streaming accumulator is this design's own.
module poly_reduce (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_first,
  input  logic                 in_last,
  input  logic [9:0]           in_idx,
  input  logic [12:0]          in_v,        // term in [0, q)
  output logic                 out_valid,
  output logic [9:0]           out_idx,
  output logic signed [12:0]   out_coef
);
  import ntt_pkg::*;

  logic [12:0] acc;
  logic [13:0] sum;
  logic [12:0] sum_r;

  always_comb begin
    sum   = in_first ? 14'(in_v) : 14'(acc) + 14'(in_v);
    sum_r = (sum >= 14'(Q)) ? 13'(sum - 14'(Q)) : sum[12:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_coef  <= '0;
    end else begin
      out_valid <= in_valid && in_last;
      if (in_valid) begin
        acc <= sum_r;
        if (in_last) begin
          out_idx  <= in_idx;
          out_coef <= (sum_r > 13'(Q / 2)) ? $signed(sum_r - 13'(Q)) : $signed(sum_r);
        end
      end
    end
  end
endmodule
