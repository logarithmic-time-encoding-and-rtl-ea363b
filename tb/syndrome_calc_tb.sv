// syndrome_calc_tb: default syndrome unit (B = 64, K = 31) with random
// coefficients. Sends valid codewords (syndrome must be 0), codewords with
// one or more random byte errors, and words holding all-ones bytes, and
// checks each syndrome against the % reference and the latency
// N_IM + ceil(log2(K+1)) = 8 clocks.
module syndrome_calc_tb;
  import iecc_ref_pkg::*;
  localparam int B = 64, K = 31, LAT = 3 + 5;
  int checks = 0, failures = 0, zero_seen = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [B-1:0] coef [K];
  logic         in_valid, out_valid;
  logic [B-1:0] in_cw [K+1];
  logic [B-1:0] syndrome;

  syndrome_calc u_dut (.clk(clk), .rst_n(rst_n), .coef(coef), .in_valid(in_valid),
                       .in_cw(in_cw), .out_valid(out_valid), .syndrome(syndrome));

  iecc_code code;
  u64 exp_s [$];
  int exp_cyc [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_s.size() == 0 || syndrome !== exp_s[0] || cyc - exp_cyc[0] != LAT) begin
      failures++;
      $display("FAIL S=%h exp=%h", syndrome, exp_s.size() != 0 ? exp_s[0] : 0);
    end
    if (exp_s.size() != 0) begin
      if (exp_s[0] == 0) zero_seen++;
      void'(exp_s.pop_front()); void'(exp_cyc.pop_front());
    end
  end

  initial begin
    code = new(B, K);
    for (int i = 0; i < K; i++) begin
      code.coef[i] = mred(u128'({$urandom, $urandom}), B);
      coef[i] = code.coef[i];
    end
    in_valid = 0;
    foreach (in_cw[i]) in_cw[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      u64 w [];
      @(negedge clk);
      w = new[K+1];
      for (int i = 0; i < K; i++) w[i] = mred(u128'({$urandom, $urandom}), B);
      w[K] = code.check_byte(w);
      case (n % 4)
        1: w[$urandom % (K+1)] ^= u64'(1) << ($urandom % B);
        2: for (int e = 0; e < 3; e++) w[$urandom % (K+1)] = {$urandom, $urandom};
        3: w[$urandom % (K+1)] = '1;
        default: ;
      endcase
      in_valid = 1;
      for (int i = 0; i <= K; i++) in_cw[i] = w[i];
      exp_s.push_back(code.syndrome(w));
      exp_cyc.push_back(cyc);
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (exp_s.size() != 0 || zero_seen < 50) begin
      failures++;
      $display("FAIL missing=%0d zero syndromes=%0d", exp_s.size(), zero_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
