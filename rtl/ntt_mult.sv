// ntt_mult: sntrup761 polynomial multiplier, c = a * b in
// R/q = Z_4591[x]/(x^761 - x - 1), built on number-theoretic transforms.
//
// The 761-coefficient operands are multiplied as a cyclic convolution of
// length 1536 (long enough for the 1521-term product). Good's trick splits
// the length as 3 x 512: coefficient k goes to y-row k mod 3 and z-column
// k mod 512, so the product becomes three 512-point NTTs per operand, a
// pointwise product modulo y^3 - 1, and three inverse NTTs. The arithmetic is
// done exactly, modulo three primes (15361, 12289, 7681) whose product
// exceeds the range of the integer convolution, in three lanes that run in
// lockstep under one controller; a CRT unit recombines the residues and a
// final stage reduces modulo x^761 - x - 1 and q and centres the result.
// The twiddles of all three lanes come from one merged 42-bit ROM with a
// single address bus; TW_HALF_STORE = 1 selects the half-depth ROM variant.
//
// Interface: pulse start while idle; then supply 761 coefficients of a
// followed by 761 of b on in_coef (signed, centred, |c| <= 2295) with a
// valid/ready handshake. The product appears as 761 single-cycle out_valid
// beats with out_idx = 0..760 and a centred out_coef; done pulses after the
// last one. Latency from start to done: 29,332 clocks, plus one for every
// clock in which in_ready is high and in_valid low.
module ntt_mult #(
  parameter bit TW_HALF_STORE = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               busy,
  output logic               done,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic signed [12:0] in_coef,
  output logic               out_valid,
  output logic [9:0]         out_idx,
  output logic signed [12:0] out_coef
);
  import ntt_pkg::*;

  lane_cmd_t   cmd;
  logic [8:0]  tw_addr;
  logic [3*TW_W-1:0] tw_word;
  logic [2:0][RES_W-1:0] rd;
  logic        o_valid, o_first, o_last;
  logic [9:0]  o_idx;
  logic        t_valid, t_first, t_last;
  logic [9:0]  t_idx;
  logic        c_valid;
  logic [11:0] c_tag;
  logic [12:0] c_v;

  ntt_ctrl u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .in_valid, .in_ready, .in_coef,
    .cmd, .tw_addr,
    .o_valid, .o_first, .o_last, .o_idx
  );

  twiddle_rom #(.DEPTH(N), .HALF_STORE(TW_HALF_STORE)) u_rom (
    .clk, .addr(tw_addr), .rdata(tw_word)
  );

  ntt_lane #(.QM(Q0)) u_lane0 (.clk, .rst_n, .cmd, .tw(tw_word[0*TW_W +: TW_W]), .rd_data(rd[0]));
  ntt_lane #(.QM(Q1)) u_lane1 (.clk, .rst_n, .cmd, .tw(tw_word[1*TW_W +: TW_W]), .rd_data(rd[1]));
  ntt_lane #(.QM(Q2)) u_lane2 (.clk, .rst_n, .cmd, .tw(tw_word[2*TW_W +: TW_W]), .rd_data(rd[2]));

  // Align the output tags with the lanes' stage-1 read data
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_valid <= 1'b0; t_first <= 1'b0; t_last <= 1'b0; t_idx <= '0;
    end else begin
      t_valid <= o_valid; t_first <= o_first; t_last <= o_last; t_idx <= o_idx;
    end
  end

  crt_unit #(.TAG_W(12)) u_crt (
    .clk, .rst_n,
    .in_valid (t_valid), .in_tag ({t_first, t_last, t_idx}),
    .r0 (rd[0]), .r1 (rd[1]), .r2 (rd[2]),
    .out_valid (c_valid), .out_tag (c_tag), .v (c_v)
  );

  poly_reduce u_red (
    .clk, .rst_n,
    .in_valid (c_valid), .in_first (c_tag[11]), .in_last (c_tag[10]),
    .in_idx (c_tag[9:0]), .in_v (c_v),
    .out_valid, .out_idx, .out_coef
  );
endmodule
