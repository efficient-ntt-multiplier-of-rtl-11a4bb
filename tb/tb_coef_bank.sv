// tb_coef_bank: random test of the two-read, two-write coefficient bank.
//
// A reference array in the testbench tracks every write. Each clock issues
// random reads on both ports and random writes on both ports (never to the
// same word), and checks the data returned one clock after each read
// address, including the read-old-value rule when a word is read and written
// in the same clock. The bank is first filled so that every word is defined.
module tb_coef_bank;
  localparam int DEPTH = 3072;
  logic clk = 1'b0;
  logic [11:0] raddr0, raddr1, waddr0, waddr1;
  logic [13:0] rdata0, rdata1, wdata0, wdata1;
  logic we0, we1;
  logic [13:0] model [DEPTH];
  int checks = 0, failures = 0;

  coef_bank #(.DEPTH(DEPTH), .WIDTH(14)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [13:0] e0, e1;
    raddr0 = '0; raddr1 = '0; we0 = 1'b0; we1 = 1'b0; waddr0 = '0; waddr1 = '0;
    wdata0 = '0; wdata1 = '0;
    // fill
    for (int n = 0; n < DEPTH; n += 2) begin
      @(negedge clk);
      we0 = 1'b1; waddr0 = 12'(n);   wdata0 = 14'($urandom); model[n]   = wdata0;
      we1 = 1'b1; waddr1 = 12'(n+1); wdata1 = 14'($urandom); model[n+1] = wdata1;
    end
    // random traffic
    for (int it = 0; it < 10000; it++) begin
      @(negedge clk);
      raddr0 = 12'($urandom_range(DEPTH-1));
      raddr1 = (it % 5 == 0) ? waddr0 : 12'($urandom_range(DEPTH-1));
      e0 = model[raddr0]; e1 = model[raddr1];
      we0 = $urandom_range(1) != 0;
      we1 = $urandom_range(1) != 0;
      waddr0 = (it % 3 == 0) ? raddr0 : 12'($urandom_range(DEPTH-1));
      do waddr1 = 12'($urandom_range(DEPTH-1)); while (waddr1 == waddr0);
      wdata0 = 14'($urandom); wdata1 = 14'($urandom);
      if (we0) model[waddr0] = wdata0;
      if (we1) model[waddr1] = wdata1;
      @(posedge clk);
      #1;
      checks++;
      if (rdata0 !== e0 || rdata1 !== e1) begin
        failures++;
        if (failures < 10) $display("read %0d/%0d got %0d/%0d expected %0d/%0d",
                                    raddr0, raddr1, rdata0, rdata1, e0, e1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
