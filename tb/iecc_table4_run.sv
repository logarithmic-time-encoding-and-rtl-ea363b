// iecc_table4_run: one column of the throughput study, used by
// iecc_table4_tb. Instantiates the default top (b = 64, K = 31, 4096-entry
// table) with table-read latency N_ST and runs the three 64-bit codes
// (1920,1856), (1984,1920) and (2048,1984), i.e. k = 29, 30, 31 on the
// same hardware: a code with k < 31 is shortened by holding the unused data
// bytes at zero, and its table names the check byte as location 31. For each
// code it loads coefficients and table, encodes words, decodes them clean
// and with every kind of single-bit error plus some multi-byte errors,
// checks the results against the reference model, and records the longest
// decode time. That time must not exceed the processor cycle model
// ceil(log2(k+1)) + (ceil(log2|xi|)+2)*N_ST + 5 with |xi| = 2^12; the
// resulting throughputs at 3.0 GHz are printed next to the model's.
module iecc_table4_run #(
  parameter int N_ST = 4
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import iecc_ref_pkg::*;
  localparam int B = 64, K = 31, T = 1, DEPTH = 4096, N_IM = 3;
  localparam int LW = 5, W = B + T * (LW + B), AW = 12, CAW = 5;

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

  iecc_top #(.N_ST(N_ST)) u_dut (
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

  // hardware byte position of code byte i (check byte goes to K)
  function automatic int hw_pos(int i);
    return (i == code.k) ? K : i;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL N_ST=%0d k=%0d: %s", N_ST, code.k, what);
    end
  endtask

  // encode one dataword of the current code; returns its codeword
  task automatic encode(input u64 d [], output u64 w []);
    int t0;
    @(negedge clk);
    enc_in_valid = 1;
    for (int i = 0; i < K; i++) enc_in_data[i] = (i < code.k) ? B'(d[i]) : '0;
    t0 = cyc;
    @(negedge clk) enc_in_valid = 0;
    while (!enc_out_valid) @(negedge clk);
    chk(cyc - t0 == N_IM + 5, "encoder latency");
    chk(u64'(enc_out_check) == code.check_byte(d), "check byte");
    w = new[code.k + 1];
    for (int i = 0; i < code.k; i++) w[i] = d[i];
    w[code.k] = u64'(enc_out_check);
  endtask

  task automatic decode(input u64 w [], inout int worst);
    u64 s, exp [];
    int idx, t0, lat;
    s = code.syndrome(w);
    idx = (s == 0) ? -1 : code.lookup(s);
    exp = new[code.k + 1];
    for (int i = 0; i <= code.k; i++) exp[i] = (idx >= 0) ? mred(u128'(w[i]), B) : w[i];
    if (idx >= 0) exp[code.st_loc[idx]] = madd(exp[code.st_loc[idx]], code.st_e[idx], B);
    @(negedge clk);
    while (!dec_in_ready) @(negedge clk);
    dec_in_valid = 1;
    foreach (dec_in_cw[i]) dec_in_cw[i] = '0;
    for (int i = 0; i <= code.k; i++) dec_in_cw[hw_pos(i)] = B'(w[i]);
    t0 = cyc;
    @(negedge clk) dec_in_valid = 0;
    while (!dec_out_valid) @(negedge clk);
    lat = cyc - t0;
    if (lat > worst) worst = lat;
    chk(dec_out_err == (s != 0) && dec_out_corrected == (idx >= 0), "decoder flags");
    for (int i = 0; i <= code.k; i++) begin
      logic [B-1:0] got;
      got = (i == code.k) ? dec_out_check : dec_out_data[i];
      chk(got == B'(exp[i]), $sformatf("byte %0d", i));
    end
    for (int i = code.k; i < K; i++) chk(dec_out_data[i] == '0, "padding byte");
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    coef_we = 0; coef_waddr = 0; coef_wdata = 0;
    st_we = 0; st_waddr = 0; st_wdata = 0; st_size = 0;
    enc_in_valid = 0; dec_in_valid = 0;
    foreach (enc_in_data[i]) enc_in_data[i] = 0;
    foreach (dec_in_cw[i]) dec_in_cw[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int kc = 29; kc <= 31; kc++) begin
      int worst, model, lk1;
      real g_model, g_built;
      worst = 0;
      code = new(B, kc);
      if (!code.search(1)) chk(0, "code search");
      code.build_table();
      for (int i = 0; i < K; i++) begin
        @(negedge clk);
        coef_we = 1; coef_waddr = CAW'(i); coef_wdata = (i < kc) ? B'(code.coef[i]) : '0;
      end
      @(negedge clk) coef_we = 0;
      st_size = (AW+1)'(code.st_s.size());
      foreach (code.st_s[i]) begin
        @(negedge clk);
        st_we = 1; st_waddr = AW'(i);
        st_wdata = {B'(code.st_s[i]), LW'(hw_pos(code.st_loc[i])), B'(code.st_e[i])};
      end
      @(negedge clk) st_we = 0;
      for (int n = 0; n < 8; n++) begin
        u64 d [], w [], e [];
        d = new[kc];
        foreach (d[i]) d[i] = mred(u128'({$urandom, $urandom}), B);
        encode(d, w);
        decode(w, worst);
        for (int m = 0; m < 6; m++) begin
          e = new[kc + 1](w);
          e[(m == 0) ? kc : $urandom % (kc + 1)] ^= u64'(1) << ($urandom % B);
          decode(e, worst);
        end
        e = new[kc + 1](w);
        for (int q = 0; q <= kc; q++) e[q] ^= u64'(1) << ($urandom % B);
        decode(e, worst);
      end
      lk1 = $clog2(kc + 1);
      model = lk1 + (12 + 2) * N_ST + 5;
      chk(worst <= model, $sformatf("worst decode %0d clocks above model %0d", worst, model));
      g_model = 3.0 * real'((kc + 1) * B) / real'(model);
      g_built = 3.0 * real'((kc + 1) * B) / real'(worst);
      $display("(%0d,%0d) N_ST=%0d: worst decode %0d clocks (model %0d); at 3.0 GHz %0.1f Gbps (model %0.1f); encode %0.1f Gbps pipelined, %0.1f Gbps one word per %0d clocks",
               (kc + 1) * B, kc * B, N_ST, worst, model, g_built, g_model,
               3.0 * real'(kc * B), 3.0 * real'(kc * B) / real'($clog2(kc) + 3), $clog2(kc) + 3);
    end
    done = 1;
  end
endmodule
