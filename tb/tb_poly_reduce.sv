// tb_poly_reduce: feeds random groups of 1..3 terms in [0, 4591) with
// first/last tags and random idle clocks between terms, and checks that each
// group produces exactly one output, one clock after its last term, equal to
// the sum mod 4591 in the centred range [-2295, 2295] and carrying the index.
module tb_poly_reduce;
  localparam int Q = 4591;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_first, in_last, out_valid;
  logic [9:0] in_idx, out_idx;
  logic [12:0] in_v;
  logic signed [12:0] out_coef;
  int checks = 0, failures = 0, nout = 0;

  poly_reduce dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) nout++;

  initial begin
    int n, sum, e;
    in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0; in_idx = '0; in_v = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < 5000; g++) begin
      n = int'($urandom_range(1, 3));
      sum = 0;
      for (int t = 0; t < n; t++) begin
        @(negedge clk);
        in_valid = 1'b1; in_first = (t == 0); in_last = (t == n - 1);
        in_idx = 10'(g);
        in_v = (g < 10) ? 13'(Q - 1) : 13'($urandom_range(Q - 1));
        sum += int'(in_v);
        if ($urandom_range(3) == 0 && t != n - 1) begin
          @(negedge clk) in_valid = 1'b0;
        end
      end
      e = sum % Q;
      if (e > Q / 2) e -= Q;
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid || int'(out_coef) != e || out_idx != 10'(g)) begin
        failures++;
        if (failures < 10) $display("group %0d: got %0d (valid %0d) expected %0d", g, out_coef, out_valid, e);
      end
      @(negedge clk) in_valid = 1'b0;
    end
    repeat (3) @(posedge clk);
    checks++;
    if (nout != 5000) begin failures++; $display("%0d outputs for 5000 groups", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
