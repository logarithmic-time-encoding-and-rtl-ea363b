// iecc_decoder: decoder of an integer error control code.
//
// Decoding runs in three steps. (1) syndrome_calc computes S of the
// received codeword in N_IM + ceil(log2(K+1)) clocks. (2) If S = 0 the word
// is taken as error-free; otherwise st_search looks S up in the sorted
// syndrome table (st_memory) by binary search, each probe costing N_ST
// clocks. (3) A hit gives up to T (location, value) pairs which
// error_corrector adds to the named bytes modulo 2^B-1; a miss is an
// uncorrectable error and the word is passed on unchanged with a flag.
// The worst case is N_IM + ceil(log2(K+1)) + P*N_ST + 2 clocks from
// acceptance to result, P <= floor(log2 |xi|) + 1 probes, within the
// bound ceil(log2(K+1)) + (ceil(log2|xi|)+2)*N_ST + 5 of the cycle model
// for N_IM = 3; an error-free word takes N_IM + ceil(log2(K+1)) + 1.
// Interface: in_valid/in_ready handshake, one codeword in flight at a time
// (in_ready is low while busy). out_valid pulses for one clock with the
// corrected bytes and the flags out_err (S != 0), out_corrected and
// out_uncorrectable; no back-pressure. The table is loaded through
// st_we/st_waddr/st_wdata before use and st_size gives its entry count.
// The three steps, the binary search and the cycle bound follow the
// published algorithm; the handshake and the one-word-at-a-time control
// are this design's choice.
module iecc_decoder #(
  parameter int unsigned B     = iecc_pkg::B_DEF,
  parameter int unsigned K     = iecc_pkg::K_DEF,
  parameter int unsigned T     = iecc_pkg::T_DEF,
  parameter int unsigned DEPTH = iecc_pkg::DEPTH_DEF,
  parameter int unsigned N_IM  = iecc_pkg::N_IM_DEF,
  parameter int unsigned N_ST  = iecc_pkg::N_ST_DEF,
  localparam int unsigned LW   = iecc_pkg::loc_width(K),
  localparam int unsigned W    = iecc_pkg::entry_width(B, K, T),
  localparam int unsigned AW   = (DEPTH <= 1) ? 1 : $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [B-1:0]  coef [K],
  // syndrome table loading
  input  logic          st_we,
  input  logic [AW-1:0] st_waddr,
  input  logic [W-1:0]  st_wdata,
  input  logic [AW:0]   st_size,
  // received codeword
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [B-1:0]  in_cw [K+1],
  // result
  output logic          out_valid,
  output logic [B-1:0]  out_data [K],
  output logic [B-1:0]  out_check,
  output logic          out_err,
  output logic          out_corrected,
  output logic          out_uncorrectable,
  output logic [7:0]    out_probes
);
  typedef enum logic [1:0] {D_IDLE, D_SYND, D_SEARCH} state_e;
  state_e state;

  logic [B-1:0] cw_q [K+1];
  logic         syn_valid;
  logic [B-1:0] syndrome;

  syndrome_calc #(.B(B), .K(K), .N_IM(N_IM)) u_syn (
    .clk(clk), .rst_n(rst_n), .coef(coef),
    .in_valid(in_valid && in_ready), .in_cw(in_cw),
    .out_valid(syn_valid), .syndrome(syndrome)
  );

  logic          srch_start, srch_busy, srch_done, srch_found;
  logic [W-1:0]  srch_entry;
  logic [7:0]    srch_probes;
  logic          st_re, st_rvalid;
  logic [AW-1:0] st_raddr;
  logic [W-1:0]  st_rdata;

  st_memory #(.DEPTH(DEPTH), .W(W), .N_ST(N_ST)) u_st (
    .clk(clk), .rst_n(rst_n),
    .we(st_we), .waddr(st_waddr), .wdata(st_wdata),
    .re(st_re), .raddr(st_raddr), .rvalid(st_rvalid), .rdata(st_rdata)
  );

  assign srch_start = (state == D_SYND) && syn_valid && (syndrome != '0);

  st_search #(.DEPTH(DEPTH), .W(W), .B(B)) u_search (
    .clk(clk), .rst_n(rst_n), .start(srch_start), .key(syndrome),
    .size(st_size), .busy(srch_busy),
    .re(st_re), .raddr(st_raddr), .rvalid(st_rvalid), .rdata(st_rdata),
    .done(srch_done), .found(srch_found), .entry(srch_entry),
    .probes(srch_probes)
  );

  // fields of the matching entry: {S, loc_1, val_1, ..., loc_T, val_T};
  // the S field has served as the search key and is not used here
  logic [LW-1:0] fix_loc [T];
  logic [B-1:0]  fix_val [T];
  for (genvar j = 0; j < T; j++) begin : g_field
    localparam int unsigned HI = W - 1 - B - j * (LW + B);
    assign fix_loc[j] = srch_entry[HI -: LW];
    assign fix_val[j] = srch_entry[HI - LW -: B];
  end

  logic [B-1:0] cw_fixed [K+1];
  error_corrector #(.B(B), .K(K), .T(T)) u_fix (
    .en(srch_found), .cw_in(cw_q), .loc(fix_loc), .val(fix_val),
    .cw_out(cw_fixed)
  );

  assign in_ready = (state == D_IDLE);

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) cw_q <= in_cw;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state             <= D_IDLE;
      out_valid         <= 1'b0;
      out_err           <= 1'b0;
      out_corrected     <= 1'b0;
      out_uncorrectable <= 1'b0;
      out_probes        <= '0;
      out_check         <= '0;
      for (int i = 0; i < K; i++) out_data[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      case (state)
        D_IDLE: if (in_valid) state <= D_SYND;
        D_SYND: if (syn_valid) begin
          if (syndrome == '0) begin
            out_valid         <= 1'b1;
            out_err           <= 1'b0;
            out_corrected     <= 1'b0;
            out_uncorrectable <= 1'b0;
            out_probes        <= '0;
            for (int i = 0; i < K; i++) out_data[i] <= cw_q[i];
            out_check <= cw_q[K];
            state     <= D_IDLE;
          end else begin
            state <= D_SEARCH;
          end
        end
        D_SEARCH: if (srch_done) begin
          out_valid         <= 1'b1;
          out_err           <= 1'b1;
          out_corrected     <= srch_found;
          out_uncorrectable <= !srch_found;
          out_probes        <= srch_probes;
          for (int i = 0; i < K; i++) out_data[i] <= cw_fixed[i];
          out_check <= cw_fixed[K];
          state     <= D_IDLE;
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  // the search is only started from D_SYND and never while it runs
  assert property (@(posedge clk) disable iff (!rst_n) !(srch_start && srch_busy));
  // a search result is only expected while the decoder waits for it
  assert property (@(posedge clk) disable iff (!rst_n) srch_done |-> state == D_SEARCH);
endmodule
