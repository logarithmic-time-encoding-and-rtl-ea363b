// iecc_top_tb: end-to-end run of encoder and decoder of a small code
// (B = 8, K = 8, single-bit errors, 144-entry table in a 256-deep memory,
// N_IM = 3, N_ST = 4).
// The testbench searches coefficients, builds and sorts the syndrome table,
// loads both through the configuration ports, streams datawords through the
// encoder back to back, corrupts the codewords (none, one bit of a data
// byte, one bit of the check byte, a flip that leaves an all-ones byte, two
// or three bits) and decodes them, checking every result against the
// reference model and the cycle counts of both paths: N_IM + ceil(log2 K)
// for the encoder; N_IM + ceil(log2(K+1)) + 1 for a clean word and
// N_IM + ceil(log2(K+1)) + probes*N_ST + 2 otherwise, never above
// ceil(log2(K+1)) + (ceil(log2|xi|)+2)*N_ST + 5. Each mechanism must occur
// at least once: back-to-back encoding, clean word, data-byte and
// check-byte correction, all-ones received byte, uncorrectable word,
// decoder busy stall, and a search that descends to the last level of the
// table (at least floor(log2 |xi|) probes).
module iecc_top_tb;
  import iecc_ref_pkg::*;
  localparam int B = 8, K = 8, T = 1, DEPTH = 256, N_IM = 3, N_ST = 4;
  localparam int NXI = 2 * B * (K + 1);       // 144 table entries
  localparam int NW = 100, WATCHDOG = 200000;
  localparam int LW = $clog2(K + 1), W = B + T * (LW + B);
  localparam int AW = $clog2(DEPTH), CAW = $clog2(K);
  localparam int LK = $clog2(K), LK1 = $clog2(K + 1);
  localparam int BOUND = LK1 + ($clog2(NXI) + 2) * N_ST + 5;
  int checks = 0, failures = 0;
  int n_b2b = 0, n_clean = 0, n_fix_data = 0, n_fix_check = 0, n_ones = 0;
  int n_unc = 0, n_busy = 0, n_deep = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           coef_we;
  logic [CAW-1:0] coef_waddr;
  logic [B-1:0]   coef_wdata;
  logic           st_we;
  logic [AW-1:0]  st_waddr;
  logic [W-1:0]   st_wdata;
  logic [AW:0]    st_size;
  logic           enc_in_valid, enc_out_valid;
  logic [B-1:0]   enc_in_data [K], enc_out_data [K], enc_out_check;
  logic           dec_in_valid, dec_in_ready, dec_out_valid;
  logic [B-1:0]   dec_in_cw [K+1], dec_out_data [K], dec_out_check;
  logic           dec_out_err, dec_out_corrected, dec_out_unc;
  logic [7:0]     dec_out_probes;

  iecc_top #(.B(B), .K(K), .T(T), .DEPTH(DEPTH), .N_IM(N_IM), .N_ST(N_ST)) u_dut (
    .clk(clk), .rst_n(rst_n),
    .coef_we(coef_we), .coef_waddr(coef_waddr), .coef_wdata(coef_wdata),
    .st_we(st_we), .st_waddr(st_waddr), .st_wdata(st_wdata), .st_size(st_size),
    .enc_in_valid(enc_in_valid), .enc_in_data(enc_in_data),
    .enc_out_valid(enc_out_valid), .enc_out_data(enc_out_data), .enc_out_check(enc_out_check),
    .dec_in_valid(dec_in_valid), .dec_in_ready(dec_in_ready), .dec_in_cw(dec_in_cw),
    .dec_out_valid(dec_out_valid), .dec_out_data(dec_out_data), .dec_out_check(dec_out_check),
    .dec_out_err(dec_out_err), .dec_out_corrected(dec_out_corrected),
    .dec_out_uncorrectable(dec_out_unc), .dec_out_probes(dec_out_probes));

  iecc_code code;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // encoder scoreboard
  u64 sent [$][];
  int sent_cyc [$];
  u64 coded [$][];
  int last_out_cyc = -10;

  always @(negedge clk) if (rst_n && enc_out_valid) begin
    u64 w [];
    bit bad;
    checks++;
    if (sent.size() == 0) begin
      failures++;
      $display("FAIL unexpected encoder output");
    end else begin
      w = new[K+1];
      bad = (cyc - sent_cyc[0] != N_IM + LK);
      for (int i = 0; i < K; i++) begin
        w[i] = u64'(enc_out_data[i]);
        if (w[i] != sent[0][i]) bad = 1;
      end
      w[K] = u64'(enc_out_check);
      if (w[K] != code.check_byte(sent[0])) bad = 1;
      if (bad) begin
        failures++;
        $display("FAIL encoder check=%h exp=%h latency=%0d", enc_out_check,
                 code.check_byte(sent[0]), cyc - sent_cyc[0]);
      end
      if (cyc == last_out_cyc + 1) n_b2b++;
      last_out_cyc = cyc;
      coded.push_back(w);
      void'(sent.pop_front());
      void'(sent_cyc.pop_front());
    end
  end

  function automatic int flog2(int x);
    int r = 0;
    while (x > 1) begin x >>= 1; r++; end
    return r;
  endfunction

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
    for (int i = 0; i <= K; i++) if (w[i] == modulus(B)) n_ones++;
    @(negedge clk);
    while (!dec_in_ready) @(negedge clk);
    dec_in_valid = 1;
    for (int i = 0; i <= K; i++) dec_in_cw[i] = B'(w[i]);
    t0 = cyc;
    @(negedge clk);
    while (!dec_out_valid) begin
      if (dec_in_ready) begin failures++; $display("FAIL ready while busy"); end
      n_busy++;
      @(negedge clk);
    end
    dec_in_valid = 0;
    lat = cyc - t0;
    checks++;
    if (dec_out_err !== exp_err || dec_out_corrected !== exp_fix ||
        dec_out_unc !== (exp_err && !exp_fix)) begin
      failures++;
      $display("FAIL flags err=%0d fix=%0d unc=%0d exp err=%0d fix=%0d", dec_out_err,
               dec_out_corrected, dec_out_unc, exp_err, exp_fix);
    end
    for (int i = 0; i <= K; i++) begin
      logic [B-1:0] got;
      got = (i == K) ? dec_out_check : dec_out_data[i];
      checks++;
      if (got !== B'(exp[i])) begin
        failures++;
        $display("FAIL byte %0d = %h exp %h", i, got, exp[i]);
      end
    end
    checks++;
    if ((!exp_err && lat != N_IM + LK1 + 1) ||
        (exp_err && lat != N_IM + LK1 + int'(dec_out_probes) * N_ST + 2) || lat > BOUND) begin
      failures++;
      $display("FAIL decoder latency %0d probes %0d", lat, dec_out_probes);
    end
    if (exp_err && int'(dec_out_probes) >= flog2(NXI)) n_deep++;
    if (!exp_err) n_clean++;
    else if (!exp_fix) n_unc++;
    else if (code.st_loc[idx] == K) n_fix_check++;
    else n_fix_data++;
  endtask

  initial begin
    code = new(B, K);
    if (!code.search(1)) begin
      failures++;
      $display("FAIL no code found");
    end
    code.build_table();
    coef_we = 0; coef_waddr = 0; coef_wdata = 0;
    st_we = 0; st_waddr = 0; st_wdata = 0; st_size = (AW+1)'(NXI);
    enc_in_valid = 0; dec_in_valid = 0;
    foreach (enc_in_data[i]) enc_in_data[i] = 0;
    foreach (dec_in_cw[i]) dec_in_cw[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < K; i++) begin
      @(negedge clk);
      coef_we = 1; coef_waddr = CAW'(i); coef_wdata = B'(code.coef[i]);
    end
    @(negedge clk) coef_we = 0;
    for (int i = 0; i < NXI; i++) begin
      @(negedge clk);
      st_we = 1; st_waddr = AW'(i);
      st_wdata = {B'(code.st_s[i]), LW'(code.st_loc[i]), B'(code.st_e[i])};
    end
    @(negedge clk) st_we = 0;
    // encode NW datawords back to back
    for (int n = 0; n < NW; n++) begin
      u64 d [];
      d = new[K];
      for (int i = 0; i < K; i++) d[i] = mred(u128'({$urandom, $urandom}), B);
      if (n % 5 == 3) d[0] = modulus(B) ^ (u64'(1) << (B - 1));  // one flip from all ones
      @(negedge clk);
      enc_in_valid = 1;
      for (int i = 0; i < K; i++) enc_in_data[i] = B'(d[i]);
      sent.push_back(d);
      sent_cyc.push_back(cyc);
    end
    @(negedge clk) enc_in_valid = 0;
    repeat (N_IM + LK + 2) @(negedge clk);
    checks++;
    if (coded.size() != NW) begin failures++; $display("FAIL %0d codewords", coded.size()); end
    // corrupt and decode
    for (int n = 0; n < coded.size(); n++) begin
      u64 w [];
      w = new[K+1](coded[n]);
      case (n % 5)
        0: ;
        1: w[$urandom % K] ^= u64'(1) << ($urandom % B);
        2: w[K] ^= u64'(1) << ($urandom % B);
        3: w[0] ^= u64'(1) << (B - 1);
        default: for (int q = 0; q < 2 + (n / 5) % 2; q++)
                   w[$urandom % (K+1)] ^= u64'(1) << ($urandom % B);
      endcase
      decode(w);
    end
    // a word with errors in several bytes: not a single-byte pattern,
    // hence a miss unless its syndrome happens to be in the table
    for (int n = 0; n < 40 && n_unc == 0; n++) begin
      u64 w [];
      w = new[K+1](coded[n]);
      for (int q = 0; q <= K; q++) w[q] ^= u64'(1) << ($urandom % B);
      decode(w);
    end
    $display("back-to-back=%0d clean=%0d data-fix=%0d check-fix=%0d all-ones=%0d uncorrectable=%0d busy=%0d deep-searches=%0d",
             n_b2b, n_clean, n_fix_data, n_fix_check, n_ones, n_unc, n_busy, n_deep);
    checks++;
    if (n_b2b == 0 || n_clean == 0 || n_fix_data == 0 || n_fix_check == 0 || n_ones == 0 ||
        n_unc == 0 || n_busy == 0 || n_deep == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
