// adder_tree: binary-tree sum of P residues modulo 2^B-1.
//
// The P operands are paired in stage 1, the partial sums paired again in
// stage 2, and so on, so the sum is complete after LEVELS = ceil(log2 P)
// stages. Each stage is one row of mod_adder nodes followed by a register,
// i.e. one clock per modular addition; the tree accepts a new operand set
// every clock. When P is not a power of two the tree is padded with zero
// leaves (zero is the additive identity, so synthesis removes those nodes).
// All operands must be canonical residues except that any one may be the
// all-ones pattern; the sum is canonical.
// Timing: sum and out_valid appear LEVELS clocks after in/in_valid.
// The valid pipeline is reset by rst_n; the data registers are not.
// The tree shape and one clock per level follow the published algorithm;
// the zero padding is this design's choice.
module adder_tree #(
  parameter int unsigned B = iecc_pkg::B_DEF,
  parameter int unsigned P = iecc_pkg::K_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [B-1:0] in [P],
  output logic         out_valid,
  output logic [B-1:0] sum
);
  localparam int unsigned LEVELS = (P <= 1) ? 1 : $clog2(P);
  localparam int unsigned NP     = 1 << LEVELS;


  // Each stage g_stage[l] holds the registered sums of stage l+1, one
  // register per node, together with their valid bit.
  logic [B-1:0] leaf [NP];
  always_comb begin
    for (int j = 0; j < NP; j++) leaf[j] = (j < P) ? in[j] : '0;
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_stage
    localparam int unsigned NODES = NP >> (l + 1);
    logic [B-1:0] opnd [2*NODES];
    logic [B-1:0] node [NODES];
    logic [B-1:0] q    [NODES];
    logic         vin, vq;

    if (l == 0) begin : g_first
      assign opnd = leaf;
      assign vin  = in_valid;
    end else begin : g_next
      assign opnd = g_stage[l-1].q;
      assign vin  = g_stage[l-1].vq;
    end

    for (genvar j = 0; j < NODES; j++) begin : g_node
      mod_adder #(.B(B)) u_add (.a(opnd[2*j]), .b(opnd[2*j+1]), .s(node[j]));
    end

    always_ff @(posedge clk) q <= node;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vq <= 1'b0;
      else        vq <= vin;
    end
  end

  assign sum       = g_stage[LEVELS-1].q[0];
  assign out_valid = g_stage[LEVELS-1].vq;
endmodule
