// iecc_decoder_tb: decoder of a small code, B = 8, K = 8, T = 1, with a
// 144-entry syndrome table (2*b*(k+1)) in a 256-deep memory, N_ST = 4.
// The coefficients are found by a greedy search so that all single-bit
// errors have distinct nonzero syndromes; the sorted table is loaded
// through the write port. Then for random codewords: the clean word, every
// single-bit error in every byte (must be corrected), and random multi-byte
// errors (outcome taken from the reference table: corrected, miscorrected
// to the table's entry, or uncorrectable). Checks the outputs, flags, that
// in_ready stays low while busy, and the latency: N_IM + ceil(log2(K+1)) + 1
// clocks for a clean word and N_IM + ceil(log2(K+1)) + probes*N_ST + 2
// otherwise, never above ceil(log2(K+1)) + (ceil(log2|xi|)+2)*N_ST + 5.
module iecc_decoder_tb;
  import iecc_ref_pkg::*;
  localparam int B = 8, K = 8, T = 1, DEPTH = 256, N_IM = 3, N_ST = 4;
  localparam int LW = 4, W = B + T * (LW + B), AW = 8;
  localparam int L = 4;                // ceil(log2(K+1))
  localparam int NXI = 2 * B * (K + 1);
  localparam int BOUND = L + (8 + 2) * N_ST + 5;   // ceil(log2 144) = 8
  int checks = 0, failures = 0;
  int n_clean = 0, n_fixed = 0, n_unc = 0, n_busy = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [B-1:0]  coef [K];
  logic          st_we;
  logic [AW-1:0] st_waddr;
  logic [W-1:0]  st_wdata;
  logic [AW:0]   st_size;
  logic          in_valid, in_ready, out_valid, out_err, out_corrected, out_unc;
  logic [B-1:0]  in_cw [K+1], out_data [K], out_check;
  logic [7:0]    out_probes;

  iecc_decoder #(.B(B), .K(K), .T(T), .DEPTH(DEPTH), .N_IM(N_IM), .N_ST(N_ST)) u_dut (
    .clk(clk), .rst_n(rst_n), .coef(coef), .st_we(st_we), .st_waddr(st_waddr),
    .st_wdata(st_wdata), .st_size(st_size), .in_valid(in_valid), .in_ready(in_ready),
    .in_cw(in_cw), .out_valid(out_valid), .out_data(out_data), .out_check(out_check),
    .out_err(out_err), .out_corrected(out_corrected), .out_uncorrectable(out_unc),
    .out_probes(out_probes));

  iecc_code code;

  task automatic decode(input u64 w []);
    u64 s, exp [];
    int idx, t0, lat;
    bit exp_err, exp_fix;
    s = code.syndrome(w);
    idx = (s == 0) ? -1 : code.lookup(s);
    exp_err = (s != 0);
    exp_fix = (idx >= 0);
    exp = new[K+1];
    for (int i = 0; i <= K; i++) exp[i] = exp_fix ? mred(u128'(w[i]), B) : w[i];
    if (exp_fix) exp[code.st_loc[idx]] = madd(exp[code.st_loc[idx]], code.st_e[idx], B);
    @(negedge clk);
    in_valid = 1;
    for (int i = 0; i <= K; i++) in_cw[i] = B'(w[i]);
    t0 = int'($time);
    @(negedge clk);
    // keep offering the next word while busy: must not be taken
    while (!out_valid) begin
      if (in_ready) begin failures++; $display("FAIL in_ready while busy"); end
      n_busy++;
      @(negedge clk);
    end
    in_valid = 0;
    lat = (int'($time) - t0) / 10;
    checks++;
    if (out_err !== exp_err || out_corrected !== exp_fix || out_unc !== (exp_err && !exp_fix)) begin
      failures++;
      $display("FAIL flags err=%0d fix=%0d unc=%0d exp err=%0d fix=%0d", out_err, out_corrected, out_unc, exp_err, exp_fix);
    end
    for (int i = 0; i < K; i++) begin
      checks++;
      if (out_data[i] !== B'(exp[i])) begin
        failures++;
        $display("FAIL byte %0d = %h exp %h (S=%h)", i, out_data[i], exp[i], s);
      end
    end
    checks++;
    if (out_check !== B'(exp[K])) begin failures++; $display("FAIL check byte"); end
    checks++;
    if ((!exp_err && lat != N_IM + L + 1) ||
        (exp_err && lat != N_IM + L + int'(out_probes) * N_ST + 2) || lat > BOUND) begin
      failures++;
      $display("FAIL latency %0d probes %0d", lat, out_probes);
    end
    if (!exp_err) n_clean++; else if (exp_fix) n_fixed++; else n_unc++;
  endtask

  initial begin
    code = new(B, K);
    if (!code.search(1)) begin
      $display("no code found");
      failures++;
    end
    code.build_table();
    foreach (coef[i]) coef[i] = B'(code.coef[i]);
    st_we = 0; st_waddr = 0; st_wdata = 0; st_size = (AW+1)'(NXI);
    in_valid = 0;
    foreach (in_cw[i]) in_cw[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NXI; i++) begin
      @(negedge clk);
      st_we = 1; st_waddr = AW'(i);
      st_wdata = {B'(code.st_s[i]), LW'(code.st_loc[i]), B'(code.st_e[i])};
    end
    @(negedge clk) st_we = 0;
    for (int n = 0; n < 6; n++) begin
      u64 d [], w [];
      d = new[K];
      for (int i = 0; i < K; i++) d[i] = (n == 0) ? 0 : u64'($urandom) % 255;
      w = new[K+1];
      for (int i = 0; i < K; i++) w[i] = d[i];
      w[K] = code.check_byte(d);
      decode(w);
      for (int loc = 0; loc <= K; loc++)
        for (int r = 0; r < B; r++) begin
          u64 e [];
          e = new[K+1](w);
          e[loc] ^= u64'(1) << r;
          decode(e);
        end
      for (int m = 0; m < 20; m++) begin
        u64 e [];
        e = new[K+1](w);
        for (int q = 0; q < 2 + m % 2; q++) e[$urandom % (K+1)] ^= u64'(1) << ($urandom % B);
        decode(e);
      end
    end
    checks++;
    if (n_clean == 0 || n_fixed == 0 || n_unc == 0) begin
      failures++;
      $display("FAIL coverage clean=%0d fixed=%0d uncorrectable=%0d", n_clean, n_fixed, n_unc);
    end
    $display("clean=%0d corrected=%0d uncorrectable=%0d busy cycles=%0d", n_clean, n_fixed, n_unc, n_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
