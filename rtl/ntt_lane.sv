// ntt_lane: datapath of one NTT prime QM: coefficient bank, butterfly and
// pointwise unit behind a three-stage command pipeline.
//
// All three lanes receive the same command from the controller every clock
// and differ only in their prime; their twiddles come from one merged ROM
// read at the same address.
//   stage 0: cmd presented; bank read addresses addr0/addr1 issued (and the
//            controller issues the twiddle ROM address in the same clock)
//   stage 1: bank data and twiddle valid; butterfly, pointwise unit or input
//            conversion computes; results registered
//   stage 2: results written to the bank at the stage-0 addresses
// A value written in stage 2 can be read by a command issued one clock after
// that write, so the controller leaves two idle clocks between NTT layers.
// rd_data is bank port 0's read data in stage 1 (used by the CRT unit for
// OP_OUTRD). Input coefficients (OP_LOAD) are signed centred and are mapped
// to [0, QM). The lane partition follows the source design (one butterfly and
// one bank per prime); the pipeline is this design's own.
module ntt_lane #(
  parameter int unsigned QM = 15361
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  ntt_pkg::lane_cmd_t             cmd,
  input  logic signed [ntt_pkg::TW_W-1:0] tw,       // twiddle, stage 1
  output logic [ntt_pkg::RES_W-1:0]      rd_data   // stage 1
);
  import ntt_pkg::*;

  lane_cmd_t s1, s2;
  res_t      rdata0, rdata1;
  res_t      bf_x, bf_y;
  res_t      pw_c, pw_c_q;
  res_t      ld_q;
  logic [2:0][RES_W-1:0] abuf, bbuf;
  logic      we0, we1;
  res_t      wdata0, wdata1;

  coef_bank #(.DEPTH(BANK_DEPTH), .WIDTH(RES_W)) u_bank (
    .clk    (clk),
    .raddr0 (cmd.addr0), .raddr1 (cmd.addr1),
    .rdata0 (rdata0),    .rdata1 (rdata1),
    .we0    (we0), .waddr0 (s2.addr0), .wdata0 (wdata0),
    .we1    (we1), .waddr1 (s2.addr1), .wdata1 (wdata1)
  );

  butterfly #(.QM(QM)) u_bf (
    .clk (clk), .gs (s1.op == OP_GS),
    .a (rdata0), .b (rdata1), .w (tw),
    .x (bf_x), .y (bf_y)
  );

  pointwise_conv3 #(.QM(QM)) u_pw (.a(abuf), .b(bbuf), .k(s1.k), .c(pw_c));

  assign rd_data = rdata0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '{op: OP_NOP, default: '0};
      s2 <= '{op: OP_NOP, default: '0};
    end else begin
      s1 <= cmd;
      s2 <= s1;
    end
  end

  // Stage 1 registers (datapath, no reset needed)
  always_ff @(posedge clk) begin
    if (s1.op == OP_PWRD) begin
      abuf[s1.k] <= rdata0;
      bbuf[s1.k] <= rdata1;
    end
    pw_c_q <= pw_c;
    if (s1.coef[COEF_W-1]) ld_q <= RES_W'(QM) + RES_W'(s1.coef);  // mod 2^14: QM + coef
    else                   ld_q <= RES_W'(s1.coef);
  end

  // Stage 2: write back
  always_comb begin
    we0 = 1'b0; we1 = 1'b0; wdata0 = bf_x; wdata1 = bf_y;
    unique case (s2.op)
      OP_CT, OP_GS: begin we0 = 1'b1; we1 = 1'b1; end
      OP_LOAD:      begin we0 = 1'b1; wdata0 = ld_q; end
      OP_PWWR:      begin we0 = 1'b1; wdata0 = pw_c_q; end
      default:      ;
    endcase
  end
endmodule
