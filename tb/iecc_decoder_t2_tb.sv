// iecc_decoder_t2_tb: decoder with two corrections per table entry (T = 2)
// on a code that corrects a single-bit error in each of up to two bytes:
// B = 24, K = 2, |xi| = 2*b*(b*k+1)*(k+1) = 7056 entries in an 8192-deep
// table, N_ST = 4. Coefficients come from a random search and the sorted
// table is loaded through the write port. Single-byte entries carry a zero
// second value at another location. Decodes clean words, every single-bit
// error, random two-byte errors (all must be corrected) and three-byte
// errors (outcome from the reference table), and checks results, flags and
// the latency N_IM + ceil(log2(K+1)) + probes*N_ST + 2.
module iecc_decoder_t2_tb;
  import iecc_ref_pkg::*;
  localparam int B = 24, K = 2, T = 2, DEPTH = 8192, N_IM = 3, N_ST = 4;
  localparam int LW = 2, W = B + T * (LW + B), AW = 13, L = 2;
  int checks = 0, failures = 0, n_single = 0, n_double = 0, n_other = 0;
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

  task automatic decode(input u64 w [], input u64 orig [], input int nbytes);
    u64 s, exp [];
    int idx, t0, lat;
    s = code.syndrome(w);
    idx = (s == 0) ? -1 : code.lookup(s);
    exp = new[K+1];
    for (int i = 0; i <= K; i++) exp[i] = (idx >= 0) ? mred(u128'(w[i]), B) : w[i];
    if (idx >= 0) begin
      exp[code.st_loc[idx]]  = madd(exp[code.st_loc[idx]], code.st_e[idx], B);
      exp[code.st_loc2[idx]] = madd(exp[code.st_loc2[idx]], code.st_e2[idx], B);
    end
    // up to two erroneous bytes must give back the original word
    if (nbytes <= 2) begin
      checks++;
      for (int i = 0; i <= K; i++)
        if (exp[i] != orig[i]) begin
          failures++;
          $display("FAIL reference cannot correct a %0d-byte error", nbytes);
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
        (s != 0 && lat != N_IM + L + int'(out_probes) * N_ST + 2) ||
        int'(out_probes) > 13 + 1) begin
      failures++;
      $display("FAIL latency %0d probes %0d", lat, out_probes);
    end
    if (nbytes == 1) n_single++; else if (nbytes == 2) n_double++; else n_other++;
  endtask

  initial begin
    code = new(B, K);
    if (!code.search_t2(200)) begin
      failures++;
      $display("FAIL no t = 2 code found");
    end
    foreach (coef[i]) coef[i] = B'(code.coef[i]);
    st_we = 0; st_waddr = 0; st_wdata = 0; st_size = (AW+1)'(code.st_s.size());
    in_valid = 0;
    foreach (in_cw[i]) in_cw[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (code.st_s[i]) begin
      @(negedge clk);
      st_we = 1; st_waddr = AW'(i);
      st_wdata = {B'(code.st_s[i]), LW'(code.st_loc[i]), B'(code.st_e[i]),
                  LW'(code.st_loc2[i]), B'(code.st_e2[i])};
    end
    @(negedge clk) st_we = 0;
    for (int n = 0; n < 4; n++) begin
      u64 d [], w [], e [];
      d = new[K];
      foreach (d[i]) d[i] = u64'($urandom) % modulus(B);
      w = new[K+1];
      for (int i = 0; i < K; i++) w[i] = d[i];
      w[K] = code.check_byte(d);
      decode(w, w, 0);
      for (int loc = 0; loc <= K; loc++)
        for (int r = 0; r < B; r++) begin
          e = new[K+1](w);
          e[loc] ^= u64'(1) << r;
          decode(e, w, 1);
        end
      for (int m = 0; m < 60; m++) begin
        int a, c;
        a = $urandom % (K + 1);
        c = (a + 1 + $urandom % K) % (K + 1);
        e = new[K+1](w);
        e[a] ^= u64'(1) << ($urandom % B);
        e[c] ^= u64'(1) << ($urandom % B);
        decode(e, w, 2);
      end
      for (int m = 0; m < 10; m++) begin
        e = new[K+1](w);
        for (int q = 0; q <= K; q++) e[q] ^= u64'(1) << ($urandom % B);
        decode(e, w, 3);
      end
    end
    $display("single=%0d double=%0d three-byte=%0d", n_single, n_double, n_other);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
