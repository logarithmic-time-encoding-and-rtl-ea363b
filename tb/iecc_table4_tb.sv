// iecc_table4_tb: runs the three 64-bit codes of the throughput study
// ((1920,1856), (1984,1920), (2048,1984), |xi| = 2^12) on the default
// hardware with the table read latency of an L1 (4), L2 (12) and L3 (25)
// class memory, one iecc_table4_run per latency, and checks that every
// decode is correct and within the processor cycle model.
module iecc_table4_tb;
  logic done [3];
  int   c [3], f [3];

  iecc_table4_run #(.N_ST(4))  u_l1 (.done(done[0]), .checks(c[0]), .failures(f[0]));
  iecc_table4_run #(.N_ST(12)) u_l2 (.done(done[1]), .checks(c[1]), .failures(f[1]));
  iecc_table4_run #(.N_ST(25)) u_l3 (.done(done[2]), .checks(c[2]), .failures(f[2]));

  initial begin
    wait (done[0] && done[1] && done[2]);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2]);
    $finish;
  end

  initial begin
    #50000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end
endmodule
