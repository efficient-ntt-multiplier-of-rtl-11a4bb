// twiddle_rom: merged twiddle-factor ROM for the three NTT lanes.
//
// Entry n holds omega_j^n mod q_j, n = 0..511, for the three primes
// (q0, q1, q2) = (15361, 12289, 7681), each as a signed 14-bit centred value,
// concatenated into one 42-bit word {lane2, lane1, lane0}. Because the three
// butterflies run in lockstep they always want the same exponent, so one
// address bus and one 42-bit memory replace three separate 14-bit memories.
//
// HALF_STORE = 1 selects the reduced form: since omega^256 = -1,
// entry n + 256 equals the negation of entry n, so only the first DEPTH/2
// words are stored and the address MSB selects a negation after the read.
// HALF_STORE = 0 (default) stores all DEPTH words.
//
// Timing: synchronous read, like a block RAM: rdata is valid one clock after
// addr is presented. The table is computed at elaboration from the package
// constants, not loaded from a file. The merged layout and the half-storage
// rule follow the source design; the output register and lane ordering are
// this design's choice.
module twiddle_rom #(
  parameter int unsigned DEPTH      = 512,
  parameter bit          HALF_STORE = 1'b0
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [3*ntt_pkg::TW_W-1:0] rdata
);
  import ntt_pkg::*;

  localparam int unsigned AW     = $clog2(DEPTH);
  localparam int unsigned STORED = HALF_STORE ? DEPTH / 2 : DEPTH;
  localparam int unsigned SAW    = HALF_STORE ? AW - 1 : AW;
  localparam int unsigned WW     = 3 * TW_W;

  // Powers of a primitive DEPTH-th root, for one lane
  function automatic logic [TW_W-1:0] tw_entry(int unsigned lane, int unsigned n);
    int unsigned qm, w;
    case (lane)
      0:       begin qm = Q0; w = W0; end
      1:       begin qm = Q1; w = W1; end
      default: begin qm = Q2; w = W2; end
    endcase
    // DEPTH divides 512: use omega^(512/DEPTH) as the DEPTH-th root
    w = int'(modpow(w, 32'd512 / DEPTH, qm));
    return TW_W'(centre(modpow(w, n, qm), qm));
  endfunction

  function automatic logic [STORED-1:0][WW-1:0] gen_table();
    logic [STORED-1:0][WW-1:0] t;
    for (int unsigned n = 0; n < STORED; n++)
      t[n] = {tw_entry(2, n), tw_entry(1, n), tw_entry(0, n)};
    return t;
  endfunction

  localparam logic [STORED-1:0][WW-1:0] TABLE = gen_table();

  logic [WW-1:0] word;
  logic          neg;

  always_comb begin
    word = TABLE[addr[SAW-1:0]];
    neg  = HALF_STORE && addr[AW-1];
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < 3; l++) begin
      if (neg) rdata[l*TW_W +: TW_W] <= -word[l*TW_W +: TW_W];
      else     rdata[l*TW_W +: TW_W] <=  word[l*TW_W +: TW_W];
    end
  end
endmodule
