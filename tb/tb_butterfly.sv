// tb_butterfly: random test of the Cooley-Tukey and Gentleman-Sande
// butterflies for all three primes, including the operand extremes 0 and
// q-1 and twiddles +-1 and +-(q-1)/2. Expected values are computed with
// 64-bit integer arithmetic; outputs are checked one clock after the inputs.
module tb_butterfly;
  localparam int unsigned QS[3] = '{15361, 12289, 7681};
  logic clk = 1'b0;
  logic gs;
  logic [2:0][13:0] a, b, x, y;
  logic signed [13:0] w [3];
  int checks = 0, failures = 0;

  butterfly #(.QM(QS[0])) u0 (.clk, .gs, .a(a[0]), .b(b[0]), .w(w[0]), .x(x[0]), .y(y[0]));
  butterfly #(.QM(QS[1])) u1 (.clk, .gs, .a(a[1]), .b(b[1]), .w(w[1]), .x(x[1]), .y(y[1]));
  butterfly #(.QM(QS[2])) u2 (.clk, .gs, .a(a[2]), .b(b[2]), .w(w[2]), .x(x[2]), .y(y[2]));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint md(longint v, longint q);
    longint r;
    r = v % q;
    return (r < 0) ? r + q : r;
  endfunction

  function automatic longint pick(int sel, longint q, longint rnd);
    case (sel)
      0: return 0;
      1: return q - 1;
      default: return rnd % q;
    endcase
  endfunction

  initial begin
    longint ea, eb, ew, ex, ey, q;
    @(posedge clk);
    for (int it = 0; it < 8000; it++) begin
      gs <= (it % 2 == 1);
      for (int l = 0; l < 3; l++) begin
        q = QS[l];
        a[l] <= 14'(pick(int'($urandom_range(7)), q, longint'($urandom)));
        b[l] <= 14'(pick(int'($urandom_range(7)), q, longint'($urandom)));
        case ($urandom_range(7))
          0: w[l] <= 14'sd1;
          1: w[l] <= -14'sd1;
          2: w[l] <= 14'((q - 1) / 2);
          3: w[l] <= -14'((q - 1) / 2);
          default: w[l] <= 14'(longint'($urandom_range(32'(q - 1))) - (q - 1) / 2);
        endcase
      end
      @(posedge clk);
      #1;
      for (int l = 0; l < 3; l++) begin
        q  = QS[l];
        ea = longint'(a[l]); eb = longint'(b[l]); ew = md(longint'(w[l]), q);
        if (gs) begin ex = md(ea + eb, q); ey = md((ea - eb) * ew, q); end
        else    begin ex = md(ea + eb * ew, q); ey = md(ea - eb * ew, q); end
        checks++;
        if (longint'(x[l]) != ex || longint'(y[l]) != ey) begin
          failures++;
          if (failures < 10)
            $display("q=%0d gs=%0d a=%0d b=%0d w=%0d: got %0d,%0d expected %0d,%0d",
                     q, gs, ea, eb, w[l], x[l], y[l], ex, ey);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
