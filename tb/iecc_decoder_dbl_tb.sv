// iecc_decoder_dbl_tb: decoder running a code of the class that corrects a
// double-bit error (error value +-2^r +-2^s) inside any one byte, T = 1:
// B = 16, K = 4, one table entry per byte and error value (5 * 480 = 2400
// entries) in a 4096-deep table, N_ST = 4. The same hardware as for
// single-bit errors; only coefficients and table differ. Coefficients come
// from a greedy search. Decodes clean words, random double-bit errors in
// one byte (all must be corrected to the original word) and single-bit
// errors (outcome from the reference table), checking results, flags and
// the latency N_IM + ceil(log2(K+1)) + probes*N_ST + 2.
module iecc_decoder_dbl_tb;
  import iecc_ref_pkg::*;
  localparam int B = 16, K = 4, T = 1, DEPTH = 4096, N_IM = 3, N_ST = 4;
  localparam int LW = 3, W = B + T * (LW + B), AW = 12, L = 3;
  int checks = 0, failures = 0, n_dbl = 0, n_other = 0;
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

  task automatic decode(input u64 w [], input u64 orig [], input bit must_fix);
    u64 s, exp [];
    int idx, t0, lat;
    s = code.syndrome(w);
    idx = (s == 0) ? -1 : code.lookup(s);
    exp = new[K+1];
    for (int i = 0; i <= K; i++) exp[i] = (idx >= 0) ? mred(u128'(w[i]), B) : w[i];
    if (idx >= 0) exp[code.st_loc[idx]] = madd(exp[code.st_loc[idx]], code.st_e[idx], B);
    if (must_fix) begin
      checks++;
      for (int i = 0; i <= K; i++)
        if (exp[i] != orig[i]) begin
          failures++;
          $display("FAIL reference cannot correct a double-bit error");
          break;
        end
    end
    @(negedge clk);
    in_valid = 1;
    for (int i = 0; i <= K; i++) in_cw[i] = B'(w[i]);
    t0 = int'($time);
    @(negedge clk) in_valid = 0;
    while (!out_valid) @(negedge clk);
    lat = (int'($time) - t0) / 10;
    checks++;
    if (out_err !== (s != 0) || out_corrected !== (idx >= 0) || out_unc !== (s != 0 && idx < 0)) begin
      failures++;
      $display("FAIL flags");
    end
    for (int i = 0; i <= K; i++) begin
      logic [B-1:0] got;
      got = (i == K) ? out_check : out_data[i];
      checks++;
      if (got !== B'(exp[i])) begin
        failures++;
        $display("FAIL byte %0d = %h exp %h", i, got, exp[i]);
      end
    end
    checks++;
    if ((s == 0 && lat != N_IM + L + 1) ||
        (s != 0 && lat != N_IM + L + int'(out_probes) * N_ST + 2)) begin
      failures++;
      $display("FAIL latency %0d probes %0d", lat, out_probes);
    end
    if (must_fix) n_dbl++; else n_other++;
  endtask

  initial begin
    code = new(B, K);
    code.use_double_bit();
    if (!code.search(1)) begin
      failures++;
      $display("FAIL no code found");
    end
    code.build_table();
    foreach (coef[i]) coef[i] = B'(code.coef[i]);
    st_we = 0; st_waddr = 0; st_wdata = 0; st_size = (AW+1)'(code.st_s.size());
    in_valid = 0;
    foreach (in_cw[i]) in_cw[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (code.st_s[i]) begin
      @(negedge clk);
      st_we = 1; st_waddr = AW'(i);
      st_wdata = {B'(code.st_s[i]), LW'(code.st_loc[i]), B'(code.st_e[i])};
    end
    @(negedge clk) st_we = 0;
    for (int n = 0; n < 5; n++) begin
      u64 d [], w [], e [];
      d = new[K];
      foreach (d[i]) d[i] = u64'($urandom) % modulus(B);
      w = new[K+1];
      for (int i = 0; i < K; i++) w[i] = d[i];
      w[K] = code.check_byte(d);
      decode(w, w, 0);
      for (int m = 0; m < 60; m++) begin
        int loc, r, q;
        loc = $urandom % (K + 1);
        r = $urandom % B;
        q = (r + 1 + $urandom % (B - 1)) % B;
        e = new[K+1](w);
        e[loc] ^= (u64'(1) << r) | (u64'(1) << q);
        decode(e, w, 1);
      end
      for (int m = 0; m < 10; m++) begin
        e = new[K+1](w);
        e[$urandom % (K + 1)] ^= u64'(1) << ($urandom % B);
        decode(e, w, 0);
      end
    end
    $display("entries=%0d double-bit=%0d other=%0d", code.st_s.size(), n_dbl, n_other);
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
