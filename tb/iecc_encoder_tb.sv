// iecc_encoder_tb: default encoder (B = 64, K = 31) with random
// coefficients. Streams random datawords, some back to back, and checks
// every check byte against sum C_i*B_i mod 2^64-1 computed with %, the
// data bytes passed along, and the latency N_IM + ceil(log2 K) = 8 clocks.
module iecc_encoder_tb;
  import iecc_ref_pkg::*;
  localparam int B = 64, K = 31, LAT = 3 + 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [B-1:0] coef [K];
  logic         in_valid, out_valid;
  logic [B-1:0] in_data [K], out_data [K];
  logic [B-1:0] out_check;

  iecc_encoder u_dut (.clk(clk), .rst_n(rst_n), .coef(coef), .in_valid(in_valid),
                      .in_data(in_data), .out_valid(out_valid), .out_data(out_data),
                      .out_check(out_check));

  iecc_code code;
  u64 exp_data [$][];
  u64 exp_chk [$];
  int exp_cyc [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_chk.size() == 0) begin
      failures++;
      $display("FAIL unexpected output");
    end else begin
      bit bad;
      bad = (out_check !== exp_chk[0]) || (cyc - exp_cyc[0] != LAT);
      for (int i = 0; i < K; i++) if (out_data[i] !== exp_data[0][i]) bad = 1;
      if (bad) begin
        failures++;
        $display("FAIL check=%h exp=%h latency=%0d", out_check, exp_chk[0], cyc - exp_cyc[0]);
      end
      void'(exp_chk.pop_front()); void'(exp_cyc.pop_front()); void'(exp_data.pop_front());
    end
  end

  initial begin
    code = new(B, K);
    for (int i = 0; i < K; i++) begin
      code.coef[i] = mred(u128'({$urandom, $urandom}), B);
      coef[i] = code.coef[i];
    end
    in_valid = 0;
    foreach (in_data[i]) in_data[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      u64 d [];
      @(negedge clk);
      d = new[K];
      in_valid = (n % 5) != 4;
      for (int i = 0; i < K; i++) begin
        d[i] = (n == 1) ? modulus(B) - 1 : mred(u128'({$urandom, $urandom}), B);
        in_data[i] = d[i];
      end
      if (in_valid) begin
        exp_data.push_back(d);
        exp_chk.push_back(code.check_byte(d));
        exp_cyc.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (exp_chk.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_chk.size()); end
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
