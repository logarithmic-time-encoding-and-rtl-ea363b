// mod_mul_tb: streams random and corner operand pairs into the B = 64
// modular multiplier, one per clock, and checks every product against a
// % reference exactly N_IM = 3 clocks later.
module mod_mul_tb;
  import iecc_ref_pkg::*;
  localparam int N_IM = 3;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [63:0] coef, x, p;
  mod_mul u_dut (.clk(clk), .coef(coef), .x(x), .p(p));

  u64 exp_q [$];
  int cyc = 0;

  initial begin
    coef = 0; x = 0;
    for (int i = 0; i < 1000 + N_IM; i++) begin
      @(negedge clk);
      if (i >= N_IM) begin
        checks++;
        if (p !== exp_q[0]) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d p=%h exp %h", i, p, exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
      case (i % 5)
        0: begin coef = {$urandom, $urandom}; x = '1; end
        1: begin coef = 64'hFFFF_FFFF_FFFF_FFFE; x = 64'hFFFF_FFFF_FFFF_FFFE; end
        default: begin coef = {$urandom, $urandom}; x = {$urandom, $urandom}; end
      endcase
      exp_q.push_back(mmul(coef, x, 64));
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
