// tb_pointwise_conv3: random test of the length-3 cyclic convolution with
// 1/512 scaling, for all three primes and all three output indices. The
// expected c_k = 512^-1 * sum_i a_i b_{(k-i) mod 3} mod q is computed here
// with 64-bit arithmetic and an inverse found by search.
module tb_pointwise_conv3;
  localparam int unsigned QS[3] = '{15361, 12289, 7681};
  logic [2:0][13:0] a [3];
  logic [2:0][13:0] b [3];
  logic [1:0] k;
  logic [13:0] c [3];
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  pointwise_conv3 #(.QM(QS[0])) u0 (.a(a[0]), .b(b[0]), .k, .c(c[0]));
  pointwise_conv3 #(.QM(QS[1])) u1 (.a(a[1]), .b(b[1]), .k, .c(c[1]));
  pointwise_conv3 #(.QM(QS[2])) u2 (.a(a[2]), .b(b[2]), .k, .c(c[2]));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ninv[3], acc, q;
    for (int l = 0; l < 3; l++)
      for (longint v = 1; v < QS[l]; v++)
        if ((v * 512) % QS[l] == 1) ninv[l] = v;
    for (int it = 0; it < 6000; it++) begin
      k = 2'($urandom_range(2));
      for (int l = 0; l < 3; l++)
        for (int n = 0; n < 3; n++) begin
          a[l][n] = (it < 20) ? 14'(QS[l] - 1) : 14'($urandom_range(QS[l] - 1));
          b[l][n] = (it < 20) ? 14'(QS[l] - 1) : 14'($urandom_range(QS[l] - 1));
        end
      @(posedge clk);
      for (int l = 0; l < 3; l++) begin
        q = QS[l];
        acc = 0;
        for (int n = 0; n < 3; n++) acc += longint'(a[l][n]) * longint'(b[l][(int'(k) - n + 3) % 3]);
        acc = ((acc % q) * ninv[l]) % q;
        checks++;
        if (longint'(c[l]) != acc) begin
          failures++;
          if (failures < 10) $display("q=%0d k=%0d got %0d expected %0d", q, k, c[l], acc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
