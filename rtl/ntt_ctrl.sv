// ntt_ctrl: sequencer of the NTT multiplier.
//
// One controller drives all three prime lanes with the same command and the
// twiddle ROM with one address, so the three butterflies run in lockstep.
// After start it runs these phases:
//   LOAD  - 1536 words per operand: the 761 coefficients of A, then of B, are
//           taken from the input stream (valid/ready) and written to bank word
//           base + (k mod 3)*512 + (k mod 512) (Good's index map); the other
//           775 words are written with zero.
//   FWD   - forward 512-point NTT of the six z-polynomials (A0..A2, B0..B2):
//           9 layers of 256 Cooley-Tukey butterflies, natural order in,
//           bit-reversed order out. In layer L (block length 2*len,
//           len = 256 >> L) butterfly j pairs words 2*len*(j/len) + j%len and
//           that plus len, with twiddle exponent bitrev_L(j/len) * len.
//   PW    - for each of the 512 points: three reads (a_k, b_k) then three
//           writes of c_k (product modulo y^3 - 1, scaled by 1/512) over A.
//   INV   - inverse NTT of the three product polynomials: layers 8..0 of
//           Gentleman-Sande butterflies with exponent (512 - e) mod 512.
//   OUT   - for output i = 0..760 reads C_i, C_{i+761} and (i >= 1) C_{i+760}
//           for the CRT unit and the x^761 - x - 1 folding; tags mark the
//           first and last term of each output.
// Two idle clocks follow every NTT layer and the pointwise phase so that the
// lanes' write-back (two clocks after issue) is complete before the next
// reads. done pulses once the last coefficient has left the output stage.
// The phase order follows the source design; the schedule, the in-place
// memory map and the handshakes are this design's own.
module ntt_ctrl (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  output logic                        busy,
  output logic                        done,
  // input coefficient stream
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic signed [12:0]          in_coef,
  // lane command and twiddle address (stage 0)
  output ntt_pkg::lane_cmd_t          cmd,
  output logic [8:0]                  tw_addr,
  // output tag for the CRT / folding stage (stage 0)
  output logic                        o_valid,
  output logic                        o_first,
  output logic                        o_last,
  output logic [9:0]                  o_idx
);
  import ntt_pkg::*;

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_FWD, S_PW, S_INV, S_OUT, S_DRAIN, S_FLUSH, S_DONE
  } state_e;

  state_e     state, after_drain;
  logic [1:0] drain_cnt;
  logic [2:0] flush_cnt;

  // LOAD counters
  logic       opnd;          // 0: A, 1: B
  logic [10:0] k;            // 0..1535
  logic [1:0] k3;            // k mod 3
  logic [8:0] kz;            // k mod 512
  // NTT counters
  logic [2:0] poly;          // 0..5 forward, 0..2 inverse
  logic [3:0] layer;         // 0..8
  logic [7:0] j;             // 0..255
  // PW counters
  logic [8:0] t;
  logic [2:0] sub;
  // OUT counters
  logic [9:0] i;
  logic [1:0] i3;

  // Butterfly address generation
  logic [11:0] bf_a0, bf_a1;
  logic [7:0]  e;
  always_comb begin
    int unsigned sh;
    logic [8:0] a0, len;
    sh    = 8 - int'(layer);
    len   = 9'(1) << sh;
    a0    = ((9'(j) >> sh) << (sh + 1)) | (9'(j) & (len - 9'd1));
    bf_a0 = {poly, a0};
    bf_a1 = {poly, a0 + len};
    e     = '0;
    for (int b = 0; b < 8; b++)
      if (b < int'(layer)) e[7-b] = j[sh+b];
  end

  // OUT address of term sub: k = i, i+761, i+760
  logic [10:0] ok;
  logic [1:0]  ok3;
  always_comb begin
    case (sub)
      3'd0:    begin ok = 11'(i);          ok3 = i3; end
      3'd1:    begin ok = 11'(i) + 11'd761; ok3 = (i3 == 2'd0) ? 2'd2 : i3 - 2'd1; end
      default: begin ok = 11'(i) + 11'd760; ok3 = (i3 == 2'd2) ? 2'd0 : i3 + 2'd1; end
    endcase
  end

  // Command generation
  always_comb begin
    cmd      = '{op: OP_NOP, default: '0};
    tw_addr  = '0;
    in_ready = 1'b0;
    o_valid  = 1'b0;
    o_first  = 1'b0;
    o_last   = 1'b0;
    o_idx    = i;
    unique case (state)
      S_LOAD: begin
        in_ready  = (k < 11'(P));
        cmd.addr0 = (opnd ? 12'(B_BASE) : 12'd0) + {1'b0, k3, kz};
        cmd.coef  = (k < 11'(P)) ? in_coef : '0;
        if (k >= 11'(P) || in_valid) cmd.op = OP_LOAD;
      end
      S_FWD: begin
        cmd.op = OP_CT; cmd.addr0 = bf_a0; cmd.addr1 = bf_a1;
        tw_addr = {1'b0, e};
      end
      S_INV: begin
        cmd.op = OP_GS; cmd.addr0 = bf_a0; cmd.addr1 = bf_a1;
        tw_addr = 9'd0 - {1'b0, e};
      end
      S_PW: begin
        if (sub < 3'd3) begin
          cmd.op    = OP_PWRD;
          cmd.k     = sub[1:0];
          cmd.addr0 = {1'b0, sub[1:0], t};
          cmd.addr1 = 12'(B_BASE) + {1'b0, sub[1:0], t};
        end else begin
          cmd.op    = OP_PWWR;
          cmd.k     = 2'(sub - 3'd3);
          cmd.addr0 = {1'b0, 2'(sub - 3'd3), t};
        end
      end
      S_OUT: begin
        cmd.op    = OP_OUTRD;
        cmd.addr0 = {1'b0, ok3, ok[8:0]};  // ok < 1536: bits 10:9 not needed
        o_valid   = 1'b1;
        o_first   = (sub == 3'd0);
        o_last    = (sub == 3'd2) || (i == 10'd0 && sub == 3'd1);
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; after_drain <= S_IDLE;
      drain_cnt <= '0; flush_cnt <= '0; done <= 1'b0;
      opnd <= 1'b0; k <= '0; k3 <= '0; kz <= '0;
      poly <= '0; layer <= '0; j <= '0; t <= '0; sub <= '0; i <= '0; i3 <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_LOAD;
          opnd <= 1'b0; k <= '0; k3 <= '0; kz <= '0;
        end
        S_LOAD: if (cmd.op == OP_LOAD) begin
          k  <= k + 11'd1;
          kz <= kz + 9'd1;
          k3 <= (k3 == 2'd2) ? 2'd0 : k3 + 2'd1;
          if (k == 11'(NY*N - 1)) begin
            k <= '0; k3 <= '0; kz <= '0;
            if (!opnd) opnd <= 1'b1;
            else begin
              state <= S_FWD; poly <= '0; layer <= '0; j <= '0;
            end
          end
        end
        S_FWD, S_INV: begin
          j <= j + 8'd1;
          if (j == 8'd255) begin
            state <= S_DRAIN; drain_cnt <= '0; after_drain <= state;
            if (state == S_FWD) begin
              if (layer == 4'd8) begin
                layer <= '0;
                if (poly == 3'd5) after_drain <= S_PW;
                else poly <= poly + 3'd1;
              end else layer <= layer + 4'd1;
            end else begin
              if (layer == 4'd0) begin
                layer <= 4'd8;
                if (poly == 3'd2) after_drain <= S_OUT;
                else poly <= poly + 3'd1;
              end else layer <= layer - 4'd1;
            end
          end
        end
        S_PW: begin
          sub <= (sub == 3'd5) ? 3'd0 : sub + 3'd1;
          if (sub == 3'd5) begin
            t <= t + 9'd1;
            if (t == 9'd511) begin
              state <= S_DRAIN; drain_cnt <= '0; after_drain <= S_INV;
              poly <= '0; layer <= 4'd8; j <= '0;
            end
          end
        end
        S_OUT: begin
          if (o_last) begin
            sub <= '0;
            i   <= i + 10'd1;
            i3  <= (i3 == 2'd2) ? 2'd0 : i3 + 2'd1;
            if (i == 10'(P - 1)) begin
              state <= S_FLUSH; flush_cnt <= '0;
            end
          end else sub <= sub + 3'd1;
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt + 2'd1;
          if (drain_cnt == 2'd1) begin
            state <= after_drain;
            t <= '0; sub <= '0; i <= '0; i3 <= '0; j <= '0;
          end
        end
        S_FLUSH: begin
          flush_cnt <= flush_cnt + 3'd1;
          if (flush_cnt == 3'd3) begin
            state <= S_IDLE; done <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Input handshake: a coefficient is consumed only while in_ready is high
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_LOAD && cmd.op == OP_LOAD && k < 11'(P)) |-> (in_valid && in_ready))
    else $error("ntt_ctrl: coefficient written without a handshake");
endmodule
