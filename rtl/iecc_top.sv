// iecc_top: encoder and decoder of one integer error control code.
//
// The (K*B + B, K*B) code appends to K data bytes of B bits the check byte
// sum C_i*B_i mod 2^B-1. Encoding (iecc_encoder) is K parallel modular
// multiplications followed by a binary adder tree, N_IM + ceil(log2 K)
// clocks per dataword, pipelined. Decoding (iecc_decoder) forms the
// syndrome the same way, looks a nonzero syndrome up by binary search in
// a sorted syndrome table and adds the stored error values to the named
// bytes. Both read the coefficients from one coef_file. Before use,
// load the K coefficients (coef_we/coef_waddr/coef_wdata) and the sorted
// syndrome table (st_we/st_waddr/st_wdata, st_size entries); both come
// from an offline code search. The encoder stream (enc_*) has no
// back-pressure; the decoder stream (dec_*) accepts a codeword when
// dec_in_valid and dec_in_ready are both high and pulses dec_out_valid
// with the result. The defaults are the (2048,1984) code: B = 64, K = 31,
// single-bit errors in one byte (T = 1), 4096 table entries read with a
// 4-clock latency. The split into encoder and decoder, their steps and the
// cycle counts follow the published scheme; the interfaces, the sharing of
// one coefficient file and the loading ports are this design's.
module iecc_top #(
  parameter int unsigned B     = iecc_pkg::B_DEF,
  parameter int unsigned K     = iecc_pkg::K_DEF,
  parameter int unsigned T     = iecc_pkg::T_DEF,
  parameter int unsigned DEPTH = iecc_pkg::DEPTH_DEF,
  parameter int unsigned N_IM  = iecc_pkg::N_IM_DEF,
  parameter int unsigned N_ST  = iecc_pkg::N_ST_DEF,
  localparam int unsigned W    = iecc_pkg::entry_width(B, K, T),
  localparam int unsigned AW   = (DEPTH <= 1) ? 1 : $clog2(DEPTH),
  localparam int unsigned CAW  = (K <= 1) ? 1 : $clog2(K)
) (
  input  logic           clk,
  input  logic           rst_n,
  // configuration
  input  logic           coef_we,
  input  logic [CAW-1:0] coef_waddr,
  input  logic [B-1:0]   coef_wdata,
  input  logic           st_we,
  input  logic [AW-1:0]  st_waddr,
  input  logic [W-1:0]   st_wdata,
  input  logic [AW:0]    st_size,
  // encoder
  input  logic           enc_in_valid,
  input  logic [B-1:0]   enc_in_data [K],
  output logic           enc_out_valid,
  output logic [B-1:0]   enc_out_data [K],
  output logic [B-1:0]   enc_out_check,
  // decoder
  input  logic           dec_in_valid,
  output logic           dec_in_ready,
  input  logic [B-1:0]   dec_in_cw [K+1],
  output logic           dec_out_valid,
  output logic [B-1:0]   dec_out_data [K],
  output logic [B-1:0]   dec_out_check,
  output logic           dec_out_err,
  output logic           dec_out_corrected,
  output logic           dec_out_uncorrectable,
  output logic [7:0]     dec_out_probes
);
  logic [B-1:0] coef [K];

  coef_file #(.B(B), .K(K)) u_coef (
    .clk(clk), .rst_n(rst_n), .we(coef_we), .waddr(coef_waddr),
    .wdata(coef_wdata), .coef(coef)
  );

  iecc_encoder #(.B(B), .K(K), .N_IM(N_IM)) u_enc (
    .clk(clk), .rst_n(rst_n), .coef(coef),
    .in_valid(enc_in_valid), .in_data(enc_in_data),
    .out_valid(enc_out_valid), .out_data(enc_out_data), .out_check(enc_out_check)
  );

  iecc_decoder #(.B(B), .K(K), .T(T), .DEPTH(DEPTH), .N_IM(N_IM), .N_ST(N_ST)) u_dec (
    .clk(clk), .rst_n(rst_n), .coef(coef),
    .st_we(st_we), .st_waddr(st_waddr), .st_wdata(st_wdata), .st_size(st_size),
    .in_valid(dec_in_valid), .in_ready(dec_in_ready), .in_cw(dec_in_cw),
    .out_valid(dec_out_valid), .out_data(dec_out_data), .out_check(dec_out_check),
    .out_err(dec_out_err), .out_corrected(dec_out_corrected),
    .out_uncorrectable(dec_out_uncorrectable), .out_probes(dec_out_probes)
  );
endmodule
