// syndrome_calc: parallel syndrome computation of an integer code.
//
// For a received codeword B'_1..B'_{K+1} the syndrome is
// S = sum_{i<=K} C_i*B'_i - B'_{K+1} mod 2^B-1; S = 0 means no detectable
// error. K mod_mul units form the products in N_IM clocks while the check
// byte is negated (modulo 2^B-1 negation is bitwise inversion) and delayed
// N_IM clocks to line up with them; the K+1 terms are then summed by an
// adder_tree of ceil(log2(K+1)) stages. Fully pipelined.
// Interface: in_valid/in_cw (in_cw[K] is the check byte) in; out_valid and
// syndrome out, N_IM + ceil(log2(K+1)) clocks later. The syndrome is a
// canonical residue, so S = 0 is a plain all-zeros test.
// Structure and cycle count follow the published algorithm; folding the
// subtraction into a negated leaf of the tree is this design's choice.
module syndrome_calc #(
  parameter int unsigned B    = iecc_pkg::B_DEF,
  parameter int unsigned K    = iecc_pkg::K_DEF,
  parameter int unsigned N_IM = iecc_pkg::N_IM_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [B-1:0] coef  [K],
  input  logic         in_valid,
  input  logic [B-1:0] in_cw [K+1],
  output logic         out_valid,
  output logic [B-1:0] syndrome
);
  logic [B-1:0] term [K+1];
  logic [B-1:0] neg_pipe [N_IM];
  logic         vld_m [N_IM+1];

  for (genvar i = 0; i < K; i++) begin : g_mul
    mod_mul #(.B(B), .N_IM(N_IM)) u_mul (
      .clk(clk), .coef(coef[i]), .x(in_cw[i]), .p(term[i])
    );
  end

  // N_{K+1} = -B'_{K+1}: ~x is 2^B-1-x; ~0 (all ones) is folded to 0
  always_ff @(posedge clk) begin
    neg_pipe[0] <= (in_cw[K] == '0) ? '0 : ~in_cw[K];
    for (int s = 1; s < N_IM; s++) neg_pipe[s] <= neg_pipe[s-1];
  end
  assign term[K] = neg_pipe[N_IM-1];

  assign vld_m[0] = in_valid;
  for (genvar s = 0; s < N_IM; s++) begin : g_vld
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld_m[s+1] <= 1'b0;
      else        vld_m[s+1] <= vld_m[s];
    end
  end

  adder_tree #(.B(B), .P(K+1)) u_tree (
    .clk(clk), .rst_n(rst_n), .in_valid(vld_m[N_IM]), .in(term),
    .out_valid(out_valid), .sum(syndrome)
  );
endmodule
