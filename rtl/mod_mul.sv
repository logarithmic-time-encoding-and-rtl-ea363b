// mod_mul: modular multiplier p = coef * x mod 2^B-1, latency N_IM clocks.
//
// The full 2B-bit product is folded once: because 2^B = 1 modulo 2^B-1,
// hi*2^B + lo is congruent to hi + lo, added with mod_adder. The input x may
// be any B-bit pattern (a received byte can be all ones); it is first mapped
// to its canonical residue so the product's high half is canonical.
// The result passes through N_IM registers (default 3, the multiply latency
// of the throughput model) which synthesis may retime into the multiplier.
// Fully pipelined: a new operand pair every clock. No reset: the registers
// hold data only; validity is tracked by the caller. The operation and its
// 3-clock cost follow the published cycle model; the fold circuit is this
// design's own.
module mod_mul #(
  parameter int unsigned B    = iecc_pkg::B_DEF,
  parameter int unsigned N_IM = iecc_pkg::N_IM_DEF
) (
  input  logic         clk,
  input  logic [B-1:0] coef,
  input  logic [B-1:0] x,
  output logic [B-1:0] p
);
  logic [B-1:0]   xc, cc;
  logic [2*B-1:0] prod;
  logic [B-1:0]   folded;
  logic [B-1:0]   pipe [N_IM];

  always_comb begin
    xc   = (&x)    ? '0 : x;
    cc   = (&coef) ? '0 : coef;
    prod = {{B{1'b0}}, cc} * {{B{1'b0}}, xc};
  end

  mod_adder #(.B(B)) u_fold (.a(prod[B-1:0]), .b(prod[2*B-1:B]), .s(folded));

  always_ff @(posedge clk) begin
    pipe[0] <= folded;
    for (int s = 1; s < N_IM; s++) pipe[s] <= pipe[s-1];
  end

  assign p = pipe[N_IM-1];
endmodule
