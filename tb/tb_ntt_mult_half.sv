// tb_ntt_mult_half: the end-to-end test of tb_ntt_mult, run with the
// half-depth twiddle ROM (TW_HALF_STORE = 1), in which the upper 256 twiddles
// are produced by negating the lower 256. The checks are the same.
//
// Runs several multiplications: random R/q x R/3 and R/q x R/q operands and an
// all-extreme case (every coefficient +-2295) that drives the integer
// convolution to its largest magnitude. The input stream is throttled at
// random to exercise the ready/valid handshake. Each product is compared
// coefficient by coefficient with a schoolbook product folded modulo
// x^761 - x - 1 and reduced mod 4591 into the centred range, computed here in
// the testbench. The start-to-done latency is checked against the schedule
// (two 1536-word loads, 6 forward and 3 inverse NTTs of 9 layers x (256+2)
// clocks, 512 x 6 pointwise clocks, 2282 output reads) plus the input stalls.
// Every mechanism of the design is counted and must occur at least once.
module tb_ntt_mult_half;
  localparam int P = 761;
  localparam int Q = 4591;
  localparam int NRUNS = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, busy, done;
  logic in_valid = 1'b0, in_ready;
  logic signed [12:0] in_coef = '0;
  logic out_valid;
  logic [9:0] out_idx;
  logic signed [12:0] out_coef;

  int checks = 0, failures = 0;
  int a[P], b[P];
  int expc[P];
  int got_cnt;
  longint cyc = 0;
  int stalls;

  // mechanism counters
  int n_stall = 0, n_pad = 0, n_ct = 0, n_gs = 0, n_pwrd = 0, n_pwwr = 0;
  int n_negrom = 0, n_drain = 0, n_neg = 0, n_pos = 0, n_fold3 = 0, n_twhi = 0, n_outrd = 0;

  ntt_mult #(.TW_HALF_STORE(1'b1)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // Watchdog
  initial begin
    repeat (NRUNS * 40000 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism monitors
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.state == dut.u_ctrl.S_LOAD && in_ready && !in_valid) n_stall++;
    if (dut.cmd.op == ntt_pkg::OP_LOAD && !in_ready) n_pad++;
    if (dut.cmd.op == ntt_pkg::OP_CT) n_ct++;
    if (dut.cmd.op == ntt_pkg::OP_GS) n_gs++;
    if (dut.cmd.op == ntt_pkg::OP_PWRD) n_pwrd++;
    if (dut.cmd.op == ntt_pkg::OP_PWWR) n_pwwr++;
    if (dut.cmd.op == ntt_pkg::OP_OUTRD) n_outrd++;
    if (dut.u_ctrl.state == dut.u_ctrl.S_DRAIN) n_drain++;
    if (dut.cmd.op == ntt_pkg::OP_GS && dut.tw_addr >= 9'd256) n_twhi++;
    if (dut.u_rom.neg) n_negrom++;
    if (dut.u_crt.in_valid) begin
      if (dut.u_crt.x > 41'(dut.u_crt.HALF)) n_neg++; else n_pos++;
    end
    if (dut.u_ctrl.o_valid && dut.u_ctrl.sub == 3'd2) n_fold3++;
  end

  function automatic int cmod(longint v);
    longint r;
    r = v % Q;
    if (r < 0) r += Q;
    if (r > Q / 2) r -= Q;
    return int'(r);
  endfunction

  task automatic reference();
    longint c[2*P-1];
    foreach (c[x]) c[x] = 0;
    for (int x = 0; x < P; x++)
      for (int y = 0; y < P; y++)
        c[x+y] += longint'(a[x]) * longint'(b[y]);
    for (int x = 2*P-2; x >= P; x--) begin
      c[x-P]   += c[x];
      c[x-P+1] += c[x];
      c[x] = 0;
    end
    for (int x = 0; x < P; x++) expc[x] = cmod(c[x]);
  endtask

  task automatic run(input int mode);
    longint t0, lat, expected_lat;
    int sent;
    for (int x = 0; x < P; x++) begin
      case (mode)
        0: begin a[x] = int'($urandom_range(4590)) - 2295; b[x] = int'($urandom_range(2)) - 1; end
        1: begin a[x] = int'($urandom_range(4590)) - 2295; b[x] = int'($urandom_range(4590)) - 2295; end
        2: begin a[x] = 2295; b[x] = 2295; end
        default: begin a[x] = ($urandom_range(1) != 0) ? 2295 : -2295; b[x] = -2295; end
      endcase
    end
    reference();
    got_cnt = 0;
    stalls = 0;
    @(posedge clk);
    start <= 1'b1;
    t0 = cyc;
    @(posedge clk);
    start <= 1'b0;
    // stream a then b
    sent = 0;
    while (sent < 2*P) begin
      logic v;
      v = ($urandom_range(7) != 0);
      in_valid <= v;
      in_coef  <= 13'(sent < P ? a[sent] : b[sent-P]);
      @(posedge clk);
      if (in_valid && in_ready) sent++;
      else if (in_ready) stalls++;
    end
    in_valid <= 1'b0;
    while (!done) @(posedge clk);
    lat = cyc - t0;
    // 1 idle->load, 3072 load words, 9 NTTs x 9 layers x 258, 3072+2 pointwise,
    // 2282 output reads, 4 flush, 1 done register, plus one clock per
    // stalled load word
    expected_lat = 1 + 3072 + 9*9*258 + 3074 + 2282 + 4 + 1 + stalls;
    checks++;
    if (lat != expected_lat) begin
      failures++;
      $display("latency %0d, expected %0d", lat, expected_lat);
    end
    checks++;
    if (got_cnt != P) begin
      failures++;
      $display("mode %0d: %0d outputs, expected %0d", mode, got_cnt, P);
    end
    $display("run mode %0d: latency %0d clocks (%0d input stalls)", mode, lat, stalls);
  endtask

  // Output checker
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (int'(out_idx) != got_cnt || int'(out_coef) != expc[out_idx]) begin
      failures++;
      if (failures < 10)
        $display("out %0d (expected index %0d): got %0d expected %0d",
                 out_idx, got_cnt, out_coef, expc[out_idx]);
    end
    got_cnt++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int m = 0; m < NRUNS; m++) run(m);
    $display("negated ROM reads=%0d", n_negrom);
    $display("mechanisms: stall=%0d pad=%0d ct=%0d gs=%0d pwrd=%0d pwwr=%0d drain=%0d tw_upper=%0d crt_neg=%0d crt_pos=%0d fold3=%0d outrd=%0d",
             n_stall, n_pad, n_ct, n_gs, n_pwrd, n_pwwr, n_drain, n_twhi, n_neg, n_pos, n_fold3, n_outrd);
    checks++; if (n_stall == 0) begin failures++; $display("no input stall"); end
    checks++; if (n_pad   == 0) begin failures++; $display("no zero padding"); end
    checks++; if (n_ct    == 0) begin failures++; $display("no forward butterfly"); end
    checks++; if (n_gs    == 0) begin failures++; $display("no inverse butterfly"); end
    checks++; if (n_pwrd  == 0 || n_pwwr == 0) begin failures++; $display("no pointwise product"); end
    checks++; if (n_drain == 0) begin failures++; $display("no layer drain"); end
    checks++; if (n_twhi  == 0 || n_negrom == 0) begin failures++; $display("no upper-half twiddle"); end
    checks++; if (n_neg   == 0 || n_pos == 0) begin failures++; $display("CRT sign lift not exercised"); end
    checks++; if (n_fold3 == 0) begin failures++; $display("no three-term fold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
