// tb_ntt_ctrl: checks the controller's command stream against a schedule
// rebuilt independently in the testbench.
//
// The expected sequence of non-idle commands (operation, both addresses,
// twiddle address, pointwise index and the output tags) is generated here
// from the mathematical description: Good's map for loading, blocks and
// offsets with bit-reversed twiddle exponents for the NTT layers, the
// pointwise read/write pattern, and the three terms C_i, C_{i+761},
// C_{i+760} of each output. Each command the controller issues is compared
// in order. A hazard monitor checks that no word is read before the
// lanes' write-back (two clocks after issue) of an earlier command to it has
// happened. The input stream is throttled; zero padding, a single done pulse
// and the idle state after done are checked.
module tb_ntt_ctrl;
  import ntt_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, busy, done;
  logic in_valid = 1'b0, in_ready;
  logic signed [12:0] in_coef;
  lane_cmd_t cmd;
  logic [8:0] tw_addr;
  logic o_valid, o_first, o_last;
  logic [9:0] o_idx;
  int checks = 0, failures = 0;

  typedef struct {
    lane_op_e op; int a0; int a1; int tw; int k; int coef; int first; int last; int idx;
  } exp_t;
  exp_t q[$];
  longint wr_time [3072];
  longint cyc = 0;
  int ndone = 0, nsent = 0;

  ntt_ctrl dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog: %0d commands left", q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int brv(int v, int bits);
    int r = 0;
    for (int n = 0; n < bits; n++) if (v & (1 << n)) r |= 1 << (bits - 1 - n);
    return r;
  endfunction

  function automatic int coef_of(int n);   // input stream value n (a then b)
    return (n * 37 + 11) % 4591 - 2295;
  endfunction

  task automatic push(lane_op_e op, int a0, int a1, int tw, int k, int coef, int f, int l, int idx);
    exp_t e;
    e.op = op; e.a0 = a0; e.a1 = a1; e.tw = tw; e.k = k; e.coef = coef;
    e.first = f; e.last = l; e.idx = idx;
    q.push_back(e);
  endtask

  task automatic build();
    int len;
    for (int s = 0; s < 2; s++)
      for (int kk = 0; kk < 1536; kk++)
        push(OP_LOAD, s*1536 + (kk % 3)*512 + (kk % 512), -1, -1, -1,
             (kk < 761) ? coef_of(s*761 + kk) : 0, 0, 0, -1);
    for (int p = 0; p < 6; p++)
      for (int L = 0; L < 9; L++) begin
        len = 256 >> L;
        for (int blk = 0; blk < (1 << L); blk++)
          for (int o = 0; o < len; o++)
            push(OP_CT, p*512 + blk*2*len + o, p*512 + blk*2*len + o + len,
                 brv(blk, L) * len, -1, -1, 0, 0, -1);
      end
    for (int t = 0; t < 512; t++) begin
      for (int kk = 0; kk < 3; kk++) push(OP_PWRD, kk*512 + t, 1536 + kk*512 + t, -1, kk, -1, 0, 0, -1);
      for (int kk = 0; kk < 3; kk++) push(OP_PWWR, kk*512 + t, -1, -1, kk, -1, 0, 0, -1);
    end
    for (int p = 0; p < 3; p++)
      for (int L = 8; L >= 0; L--) begin
        len = 256 >> L;
        for (int blk = 0; blk < (1 << L); blk++)
          for (int o = 0; o < len; o++)
            push(OP_GS, p*512 + blk*2*len + o, p*512 + blk*2*len + o + len,
                 (512 - brv(blk, L) * len) % 512, -1, -1, 0, 0, -1);
      end
    for (int i = 0; i < 761; i++) begin
      push(OP_OUTRD, (i % 3)*512 + i % 512, -1, -1, -1, -1, 1, (i == 0) ? 0 : 0, i);
      push(OP_OUTRD, ((i+761) % 3)*512 + (i+761) % 512, -1, -1, -1, -1, 0, (i == 0) ? 1 : 0, i);
      if (i > 0) push(OP_OUTRD, ((i+760) % 3)*512 + (i+760) % 512, -1, -1, -1, -1, 0, 1, i);
    end
  endtask

  function automatic bit is_write(lane_op_e op);
    return op == OP_LOAD || op == OP_CT || op == OP_GS || op == OP_PWWR;
  endfunction
  function automatic bit reads1(lane_op_e op);
    return op == OP_CT || op == OP_GS || op == OP_PWRD;
  endfunction

  // Compare and hazard-check every issued command
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (done) ndone++;
    if (cmd.op != OP_NOP) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("unexpected command %s", cmd.op.name());
      end else begin
        e = q.pop_front();
        if (cmd.op != e.op || int'(cmd.addr0) != e.a0 ||
            (e.a1 >= 0 && int'(cmd.addr1) != e.a1) ||
            (e.tw >= 0 && int'(tw_addr) != e.tw) ||
            (e.k >= 0 && int'(cmd.k) != e.k) ||
            (e.coef != -1 && e.op == OP_LOAD && int'(cmd.coef) != e.coef) ||
            (e.op == OP_OUTRD && (!o_valid || int'(o_first) != e.first ||
                                  int'(o_last) != e.last || int'(o_idx) != e.idx))) begin
          failures++;
          if (failures < 10)
            $display("cmd %s a0=%0d a1=%0d tw=%0d k=%0d coef=%0d f/l/i=%0d/%0d/%0d; expected %s a0=%0d a1=%0d tw=%0d k=%0d coef=%0d f/l/i=%0d/%0d/%0d",
                     cmd.op.name(), cmd.addr0, cmd.addr1, tw_addr, cmd.k, cmd.coef, o_first, o_last, o_idx,
                     e.op.name(), e.a0, e.a1, e.tw, e.k, e.coef, e.first, e.last, e.idx);
        end
      end
      // read-after-write hazard: a word written by a command issued at c is
      // stored at c+2 and readable by commands issued from c+3
      if (cmd.op != OP_LOAD && cmd.op != OP_PWWR) begin
        if (wr_time[cmd.addr0] + 3 > cyc) begin
          failures++; $display("hazard on word %0d at clock %0d", cmd.addr0, cyc);
        end
        if (reads1(cmd.op) && wr_time[cmd.addr1] + 3 > cyc) begin
          failures++; $display("hazard on word %0d at clock %0d", cmd.addr1, cyc);
        end
      end
      if (is_write(cmd.op)) begin
        wr_time[cmd.addr0] = cyc;
        if (cmd.op == OP_CT || cmd.op == OP_GS) wr_time[cmd.addr1] = cyc;
      end
    end
  end

  // Input stream: value n is coef_of(n)
  assign in_coef = 13'(coef_of(nsent));
  always @(posedge clk) if (rst_n && in_valid && in_ready) nsent++;

  initial begin
    foreach (wr_time[n]) wr_time[n] = -100;
    build();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("busy before start"); end
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    while (!done) begin
      in_valid <= (nsent < 1522) && ($urandom_range(3) != 0);
      @(posedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d commands missing", q.size()); end
    checks++;
    if (ndone != 1 || busy) begin failures++; $display("done pulses %0d, busy %0d", ndone, busy); end
    checks++;
    if (nsent != 1522) begin failures++; $display("%0d coefficients consumed", nsent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
