// tb_ntt_lane: drives one lane (prime 15361) with hand-built command
// streams and checks each operation against a model kept in the testbench.
//   1. OP_LOAD of all 3072 bank words with random signed coefficients.
//   2. OP_PWRD/OP_PWWR for all 512 points: the A words must become
//      512^-1 * (a * b mod y^3 - 1).
//   3. A forward NTT of the z-polynomial in words 0..511, generated here
//      block by block with twiddles omega^(bitrev_L(block) * len) supplied one
//      clock after each command; every output word b must equal the direct
//      evaluation f(omega^bitrev9(b)).
//   4. The inverse NTT with twiddles omega^-e; the words must return to 512
//      times the values before step 3.
// Reads use OP_OUTRD; rd_data is checked in the clock after the command.
module tb_ntt_lane;
  import ntt_pkg::*;
  localparam longint QL = 15361, WL = 5301;
  logic clk = 1'b0, rst_n = 1'b0;
  lane_cmd_t cmd;
  logic signed [13:0] tw_next, tw;
  logic [13:0] rd_data;
  longint model [3072];
  int checks = 0, failures = 0;
  logic       chk_v, chk_v_q;
  logic [11:0] chk_a, chk_a_q;
  longint     chk_e, chk_e_q;

  ntt_lane #(.QM(15361)) dut (.clk, .rst_n, .cmd, .tw, .rd_data);

  always #5 clk = ~clk;
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint md(longint x);
    longint r;
    r = x % QL;
    return (r < 0) ? r + QL : r;
  endfunction
  function automatic longint pw(longint b, longint e);
    longint r = 1;
    for (longint n = 0; n < e; n++) r = (r * b) % QL;
    return r;
  endfunction
  function automatic int brv(int v, int bits);
    int r = 0;
    for (int n = 0; n < bits; n++) if (v & (1 << n)) r |= 1 << (bits - 1 - n);
    return r;
  endfunction
  function automatic logic signed [13:0] cen(longint v);
    return (v > QL / 2) ? 14'(v - QL) : 14'(v);
  endfunction

  // pipeline of the read checks
  always @(posedge clk) begin
    tw <= tw_next;
    chk_v_q <= chk_v; chk_a_q <= chk_a; chk_e_q <= chk_e;
  end
  always @(negedge clk) if (rst_n && chk_v_q) begin
    checks++;
    if (longint'(rd_data) != chk_e_q) begin
      failures++;
      if (failures < 10) $display("word %0d: got %0d expected %0d", chk_a_q, rd_data, chk_e_q);
    end
  end

  task automatic issue(lane_op_e op, int a0, int a1, int k, longint coef, longint twv);
    cmd <= '{op: op, addr0: 12'(a0), addr1: 12'(a1), k: 2'(k), coef: 13'(coef)};
    tw_next <= cen(twv);
    chk_v <= 1'b0;
    @(posedge clk);
  endtask
  task automatic nop(int n);
    repeat (n) issue(OP_NOP, 0, 0, 0, 0, 0);
  endtask
  task automatic check_words(int base, int cnt);
    for (int n = 0; n < cnt; n++) begin
      cmd <= '{op: OP_OUTRD, addr0: 12'(base + n), default: '0};
      chk_v <= 1'b1; chk_a <= 12'(base + n); chk_e <= model[base + n];
      @(posedge clk);
    end
    chk_v <= 1'b0;
    nop(3);
  endtask

  initial begin
    longint c, ninv, acc, x, ev, w, orig [512], after [512];
    int len;
    cmd = '{op: OP_NOP, default: '0}; tw_next = '0; chk_v = 1'b0; chk_a = '0; chk_e = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // 1. load
    for (int n = 0; n < 3072; n++) begin
      c = longint'($urandom_range(4590)) - 2295;
      if (n < 4) c = (n % 2 == 0) ? 2295 : -2295;
      model[n] = md(c);
      issue(OP_LOAD, n, 0, 0, c, 0);
    end
    nop(3);
    check_words(0, 3072);
    // 2. pointwise
    ninv = 1;
    while ((ninv * 512) % QL != 1) ninv++;
    for (int t = 0; t < 512; t++) begin
      for (int kk = 0; kk < 3; kk++) issue(OP_PWRD, kk*512 + t, 1536 + kk*512 + t, kk, 0, 0);
      for (int kk = 0; kk < 3; kk++) issue(OP_PWWR, kk*512 + t, 0, kk, 0, 0);
      for (int kk = 0; kk < 3; kk++) begin
        acc = 0;
        for (int n = 0; n < 3; n++) acc += model[n*512 + t] * model[1536 + ((kk - n + 3) % 3)*512 + t];
        after[kk] = md(md(acc) * ninv);
      end
      for (int kk = 0; kk < 3; kk++) model[kk*512 + t] = after[kk];
    end
    nop(3);
    check_words(0, 1536);
    // 3. forward NTT of words 0..511
    for (int n = 0; n < 512; n++) orig[n] = model[n];
    for (int L = 0; L < 9; L++) begin
      len = 256 >> L;
      for (int blk = 0; blk < (1 << L); blk++) begin
        w = pw(WL, longint'(brv(blk, L) * len));
        for (int o = 0; o < len; o++) issue(OP_CT, blk*2*len + o, blk*2*len + o + len, 0, 0, w);
      end
      nop(2);
    end
    for (int b = 0; b < 512; b++) begin
      x = pw(WL, longint'(brv(b, 9)));
      ev = 0;
      for (int n = 511; n >= 0; n--) ev = md(ev * x + orig[n]);
      model[b] = ev;
    end
    nop(2);
    check_words(0, 512);
    // 4. inverse NTT
    for (int L = 8; L >= 0; L--) begin
      len = 256 >> L;
      for (int blk = 0; blk < (1 << L); blk++) begin
        w = pw(WL, longint'((512 - brv(blk, L) * len) % 512));
        for (int o = 0; o < len; o++) issue(OP_GS, blk*2*len + o, blk*2*len + o + len, 0, 0, w);
      end
      nop(2);
    end
    for (int n = 0; n < 512; n++) model[n] = md(orig[n] * 512);
    nop(2);
    check_words(0, 512);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
