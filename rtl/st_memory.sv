// st_memory: storage for the syndrome table (ST).
//
// The table holds one entry per correctable syndrome, sorted by ascending
// syndrome, each laid out MSB first as {S, i_1, E_1, ..., i_t, E_t}: the
// syndrome, then for every erroneous byte its 0-based location and the value
// to add to it modulo 2^b-1. It is written once, before any codeword is
// decoded, through the write port (one entry per clock). Reads take N_ST
// clocks, modelling the table living in a memory level with that access
// time (4 clocks for an L1-class memory by default): the array is read into
// a register on the clock after re, and the word then passes N_ST-1 further
// registers. rvalid marks the word; reads may be issued every clock.
// The array is plain synthesizable storage; a memory compiler macro with
// the same latency can replace it. The entry layout and the N_ST read cost
// follow the published scheme; the write port and the register pipeline
// are this design's choices.
module st_memory #(
  parameter int unsigned DEPTH = iecc_pkg::DEPTH_DEF,
  parameter int unsigned W     = iecc_pkg::entry_width(iecc_pkg::B_DEF, iecc_pkg::K_DEF, iecc_pkg::T_DEF),
  parameter int unsigned N_ST  = iecc_pkg::N_ST_DEF,
  localparam int unsigned AW   = (DEPTH <= 1) ? 1 : $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic          rvalid,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];
  logic [W-1:0] dpipe [N_ST];
  logic         vpipe [N_ST];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    dpipe[0] <= mem[raddr];
    for (int s = 1; s < N_ST; s++) dpipe[s] <= dpipe[s-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N_ST; s++) vpipe[s] <= 1'b0;
    end else begin
      vpipe[0] <= re;
      for (int s = 1; s < N_ST; s++) vpipe[s] <= vpipe[s-1];
    end
  end

  assign rdata  = dpipe[N_ST-1];
  assign rvalid = vpipe[N_ST-1];
endmodule
