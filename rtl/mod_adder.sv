// mod_adder: one node of the modular adder tree, s = (a + b) mod 2^B-1.
//
// Arithmetic modulo 2^B-1 is ones'-complement arithmetic: a carry out of
// bit B-1 is worth 1. The node forms a+b and a+b+1 side by side; when
// a+b+1 carries out of B bits, a+b >= 2^B-1 and the residue is the low B
// bits of a+b+1, otherwise it is a+b. The result is always the canonical
// residue 0..2^B-2 (the all-ones pattern, which is congruent to zero, never
// leaves the node) provided at most one operand is the all-ones pattern;
// every caller guarantees that by feeding at least one canonical operand.
// Purely combinational. Modular addition is the published algorithm's
// basic step; the circuit and the canonical output are this design's.
module mod_adder #(
  parameter int unsigned B = iecc_pkg::B_DEF
) (
  input  logic [B-1:0] a,
  input  logic [B-1:0] b,
  output logic [B-1:0] s
);
  logic [B:0] sum0, sum1;

  always_comb begin
    sum0 = {1'b0, a} + {1'b0, b};
    sum1 = sum0 + 1'b1;
    s    = sum1[B] ? sum1[B-1:0] : sum0[B-1:0];
  end
endmodule
