// iecc_encoder: parallel encoder of an integer error control code.
//
// The check byte of a dataword B_1..B_K is B_{K+1} = sum C_i*B_i mod 2^B-1.
// All K products N_i = C_i*B_i are formed at once by K mod_mul units
// (N_IM clocks), then summed by a binary adder_tree of ceil(log2 K) stages
// (one clock each). The encoder thus needs N_IM + ceil(log2 K) clocks per
// dataword, which grows with the logarithm of the codeword length. It is
// fully pipelined, accepting a dataword every clock; the data bytes travel
// alongside in a delay line so the codeword (out_data, out_check) leaves in
// one piece. Data bytes are expected to be residues 0..2^B-2; an all-ones
// byte is treated as zero.
// Interface: in_valid/in_data in, out_valid/out_data/out_check out,
// LATENCY = N_IM + ceil(log2 K) clocks later. No back-pressure.
// The multiply-then-tree structure and the cycle count follow the published
// algorithm; pipelining it to one dataword per clock is this design's choice.
module iecc_encoder #(
  parameter int unsigned B    = iecc_pkg::B_DEF,
  parameter int unsigned K    = iecc_pkg::K_DEF,
  parameter int unsigned N_IM = iecc_pkg::N_IM_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [B-1:0] coef     [K],
  input  logic         in_valid,
  input  logic [B-1:0] in_data  [K],
  output logic         out_valid,
  output logic [B-1:0] out_data [K],
  output logic [B-1:0] out_check
);
  localparam int unsigned LEVELS  = (K <= 1) ? 1 : $clog2(K);
  localparam int unsigned LATENCY = N_IM + LEVELS;

  logic [B-1:0] prod [K];
  logic         vld_m [N_IM+1];

  for (genvar i = 0; i < K; i++) begin : g_mul
    mod_mul #(.B(B), .N_IM(N_IM)) u_mul (
      .clk(clk), .coef(coef[i]), .x(in_data[i]), .p(prod[i])
    );
  end

  // valid alongside the multipliers
  assign vld_m[0] = in_valid;
  for (genvar s = 0; s < N_IM; s++) begin : g_vld
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld_m[s+1] <= 1'b0;
      else        vld_m[s+1] <= vld_m[s];
    end
  end

  adder_tree #(.B(B), .P(K)) u_tree (
    .clk(clk), .rst_n(rst_n), .in_valid(vld_m[N_IM]), .in(prod),
    .out_valid(out_valid), .sum(out_check)
  );

  // data delay line matching the check-byte latency
  logic [B-1:0] dline [LATENCY][K];
  always_ff @(posedge clk) begin
    dline[0] <= in_data;
    for (int s = 1; s < LATENCY; s++) dline[s] <= dline[s-1];
  end
  assign out_data = dline[LATENCY-1];
endmodule
