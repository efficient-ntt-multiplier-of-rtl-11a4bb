// tb_twiddle_rom: checks the merged twiddle ROM in both storage forms.
//
// Every address 0..511 is read from a full-depth and a half-depth instance.
// The expected word is built here by repeated modular multiplication by each
// lane's root (15361: 5301, 12289: 3400, 7681: 4055), centred into the signed
// 14-bit range, and packed {lane2, lane1, lane0}. The testbench also checks
// that each root has order exactly 512 (omega^256 = -1) and that data appears
// one clock after the address.
module tb_twiddle_rom;
  logic clk = 1'b0;
  logic [8:0] addr = '0;
  logic [41:0] rd_full, rd_half;
  int checks = 0, failures = 0;

  twiddle_rom #(.DEPTH(512), .HALF_STORE(1'b0)) u_full (.clk, .addr, .rdata(rd_full));
  twiddle_rom #(.DEPTH(512), .HALF_STORE(1'b1)) u_half (.clk, .addr, .rdata(rd_half));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam longint PR[3] = '{15361, 12289, 7681};
  localparam longint WR[3] = '{5301, 3400, 4055};

  function automatic logic [13:0] cen(longint v, longint q);
    longint r;
    r = v % q;
    if (r > q / 2) r -= q;
    return 14'(r);
  endfunction

  initial begin
    longint pw[3];
    logic [41:0] exp_w;
    for (int l = 0; l < 3; l++) pw[l] = 1;
    @(posedge clk);
    for (int n = 0; n < 512; n++) begin
      exp_w = {cen(pw[2], PR[2]), cen(pw[1], PR[1]), cen(pw[0], PR[0])};
      addr <= 9'(n);
      @(posedge clk);   // address registered by the ROM at this edge
      #1;
      checks++;
      if (rd_full !== exp_w) begin
        failures++;
        if (failures < 8) $display("full  n=%0d got %h expected %h", n, rd_full, exp_w);
      end
      checks++;
      if (rd_half !== exp_w) begin
        failures++;
        if (failures < 8) $display("half  n=%0d got %h expected %h", n, rd_half, exp_w);
      end
      if (n == 256) begin
        checks++;
        if (exp_w !== {3{14'h3fff}}) begin failures++; $display("omega^256 is not -1"); end
      end
      for (int l = 0; l < 3; l++) pw[l] = (pw[l] * WR[l]) % PR[l];
    end
    checks++;
    for (int l = 0; l < 3; l++) if (pw[l] != 1) begin failures++; $display("lane %0d: omega^512 != 1", l); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
