// st_memory_tb: 64-entry, 24-bit table with the default 4-clock read
// latency. Writes random words, reads them back in random order with
// reads issued every clock and with gaps, and checks data and that rvalid
// follows re by exactly N_ST clocks.
module st_memory_tb;
  localparam int DEPTH = 64, W = 24, N_ST = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          we, re, rvalid;
  logic [5:0]    waddr, raddr;
  logic [W-1:0]  wdata, rdata;
  logic [W-1:0]  model [DEPTH];

  st_memory #(.DEPTH(DEPTH), .W(W), .N_ST(N_ST)) u_dut (
    .clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata),
    .re(re), .raddr(raddr), .rvalid(rvalid), .rdata(rdata));

  logic [W-1:0] exp_q [$];
  int exp_cyc [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && rvalid) begin
    checks++;
    if (exp_q.size() == 0 || rdata !== exp_q[0] || cyc - exp_cyc[0] != N_ST) begin
      failures++;
      $display("FAIL rdata=%h exp=%h", rdata, exp_q.size() != 0 ? exp_q[0] : 0);
    end
    if (exp_q.size() != 0) begin void'(exp_q.pop_front()); void'(exp_cyc.pop_front()); end
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i); wdata = W'($urandom); model[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      re = ($urandom % 3) != 0;
      raddr = 6'($urandom);
      if (re) begin exp_q.push_back(model[raddr]); exp_cyc.push_back(cyc); end
    end
    @(negedge clk) re = 0;
    repeat (N_ST + 3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d reads lost", exp_q.size()); end
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
