// coef_file: register file of the K code coefficients C_1..C_K.
//
// The coefficients of an integer code are the result of an offline search
// and are shared by encoder and decoder. They are written one per clock
// (waddr is 0-based: C_i at address i-1) before any data is processed and
// are read in parallel by all multipliers. Reset clears them to zero.
// Loading the coefficients at run time, rather than fixing them, is this
// design's choice: they depend on the code chosen.
module coef_file #(
  parameter int unsigned B  = iecc_pkg::B_DEF,
  parameter int unsigned K  = iecc_pkg::K_DEF,
  localparam int unsigned AW = (K <= 1) ? 1 : $clog2(K)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [B-1:0]  wdata,
  output logic [B-1:0]  coef [K]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) coef[i] <= '0;
    end else if (we && 32'(waddr) < K) begin
      coef[waddr] <= wdata;
    end
  end
endmodule
