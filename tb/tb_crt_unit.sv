// tb_crt_unit: checks the CRT reconstruction. Random signed integers X in
// the open range (-Q/2, Q/2), Q = 15361*12289*7681, plus the range ends and
// small values, are split into their three residues; the unit must return
// X mod 4591 in [0, 4591) one clock later, with the tag passed through.
module tb_crt_unit;
  localparam longint QA = 15361, QB = 12289, QC = 7681, QQ = QA*QB*QC, QS = 4591;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  logic [11:0] in_tag, out_tag;
  logic [13:0] r0, r1, r2;
  logic [12:0] v;
  int checks = 0, failures = 0;

  crt_unit #(.TAG_W(12)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint md(longint x, longint q);
    longint r;
    r = x % q;
    return (r < 0) ? r + q : r;
  endfunction

  initial begin
    longint x, e;
    in_valid = 1'b0; in_tag = '0; r0 = '0; r1 = '0; r2 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 10000; it++) begin
      case (it)
        0: x = (QQ - 1) / 2;
        1: x = -(QQ - 1) / 2;
        2: x = 0;
        3: x = -1;
        4: x = 761 * 2295 * 2295;
        5: x = -761 * 2295 * 2295;
        default: begin
          x = (longint'($urandom) << 9) ^ longint'($urandom_range(511));
          x = md(x, QQ) - (QQ - 1) / 2;
          if (it % 4 == 0) x = x % 5000000000;
        end
      endcase
      @(negedge clk);
      in_valid = 1'b1; in_tag = 12'(it);
      r0 = 14'(md(x, QA)); r1 = 14'(md(x, QB)); r2 = 14'(md(x, QC));
      e = md(x, QS);
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid || out_tag != 12'(it) || longint'(v) != e) begin
        failures++;
        if (failures < 10) $display("X=%0d got %0d (valid %0d) expected %0d", x, v, out_valid, e);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    @(posedge clk) #1;
    checks++;
    if (out_valid) begin failures++; $display("out_valid stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
