// error_corrector: applies the corrections of one syndrome-table entry.
//
// For each of the T (location, value) pairs of the entry, the byte at that
// 0-based location is replaced by B'_i + E mod 2^B-1; all T additions run
// in parallel, one mod_adder per byte position and pair. Bytes named by no
// pair pass through unchanged, but are brought to their canonical residue
// (an all-ones byte, congruent to zero, becomes zero) when en is high.
// Pairs must name distinct locations. Location K addresses the check byte.
// Purely combinational; the decoder registers the result. The parallel
// additions follow the published correction step; the distinct-location
// rule and the canonical output are this design's.
module error_corrector #(
  parameter int unsigned B  = iecc_pkg::B_DEF,
  parameter int unsigned K  = iecc_pkg::K_DEF,
  parameter int unsigned T  = iecc_pkg::T_DEF,
  localparam int unsigned LW = iecc_pkg::loc_width(K)
) (
  input  logic          en,
  input  logic [B-1:0]  cw_in  [K+1],
  input  logic [LW-1:0] loc    [T],
  input  logic [B-1:0]  val    [T],
  output logic [B-1:0]  cw_out [K+1]
);
  for (genvar i = 0; i <= K; i++) begin : g_byte
    logic [B-1:0] addend;
    logic [B-1:0] fixed;
    always_comb begin
      addend = '0;
      for (int j = 0; j < T; j++)
        if (loc[j] == LW'(i)) addend = val[j];
    end
    // addend is a canonical residue, so cw_in may be any pattern
    mod_adder #(.B(B)) u_add (.a(cw_in[i]), .b(addend), .s(fixed));
    assign cw_out[i] = en ? fixed : cw_in[i];
  end
endmodule
