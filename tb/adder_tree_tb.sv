// adder_tree_tb: feeds the default 31-input, 64-bit tree a new random
// operand set every clock (with gaps in valid) and checks each sum against
// a % reference and that it arrives exactly ceil(log2 31) = 5 clocks later.
module adder_tree_tb;
  import iecc_ref_pkg::*;
  localparam int P = 31, B = 64, LEVELS = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  logic [B-1:0] in [P];
  logic [B-1:0] sum;

  adder_tree u_dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in(in),
                    .out_valid(out_valid), .sum(sum));

  u64 exp_sum [$];
  int exp_cyc [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_sum.size() == 0 || sum !== exp_sum[0] || cyc - exp_cyc[0] != LEVELS) begin
      failures++;
      $display("FAIL sum=%h exp=%h latency=%0d", sum, exp_sum.size() != 0 ? exp_sum[0] : 0,
               exp_sum.size() != 0 ? cyc - exp_cyc[0] : -1);
    end
    if (exp_sum.size() != 0) begin void'(exp_sum.pop_front()); void'(exp_cyc.pop_front()); end
  end

  initial begin
    in_valid = 0;
    foreach (in[i]) in[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      u64 acc;
      acc = 0;
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      foreach (in[i]) begin
        in[i] = (n % 7 == 0) ? 64'hFFFF_FFFF_FFFF_FFFE : mred(u128'({$urandom, $urandom}), B);
        if (i == 3 && n % 3 == 0) in[i] = '1;   // one all-ones operand
        acc = madd(acc, in[i], B);
      end
      if (in_valid) begin exp_sum.push_back(acc); exp_cyc.push_back(cyc); end
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (exp_sum.size() != 0) begin failures++; $display("FAIL %0d sums missing", exp_sum.size()); end
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
