// coef_bank: coefficient data bank of one NTT lane.
//
// DEPTH words of WIDTH bits with two read ports and two write ports, so one
// butterfly can fetch its two operands and store its two results every clock.
// Reads are synchronous (data one clock after the address, as in a block
// RAM); a read of a word written in the same clock returns the old value.
// Writing both ports to the same address in one clock is not allowed (port 1
// wins). The source design places the coefficients of each prime in its own
// block-RAM bank; the port arrangement is this design's choice.
module coef_bank #(
  parameter int unsigned DEPTH = ntt_pkg::BANK_DEPTH,
  parameter int unsigned WIDTH = ntt_pkg::RES_W
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] raddr0,
  input  logic [$clog2(DEPTH)-1:0] raddr1,
  output logic [WIDTH-1:0]         rdata0,
  output logic [WIDTH-1:0]         rdata1,
  input  logic                     we0,
  input  logic [$clog2(DEPTH)-1:0] waddr0,
  input  logic [WIDTH-1:0]         wdata0,
  input  logic                     we1,
  input  logic [$clog2(DEPTH)-1:0] waddr1,
  input  logic [WIDTH-1:0]         wdata1
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    rdata0 <= mem[raddr0];
    rdata1 <= mem[raddr1];
    if (we0) mem[waddr0] <= wdata0;
    if (we1) mem[waddr1] <= wdata1;
  end

  // Two writes to one word in the same clock are a sequencing error
  assert property (@(posedge clk) !(we0 && we1 && waddr0 == waddr1))
    else $error("coef_bank: both write ports address word %0d", waddr0);
endmodule
