// coef_file_tb: default coefficient file (K = 31, B = 64). Checks reset to
// zero, writes every address in random order, and that each write lands
// only at its address one clock later.
module coef_file_tb;
  localparam int B = 64, K = 31;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         we;
  logic [4:0]   waddr;
  logic [B-1:0] wdata;
  logic [B-1:0] coef [K];
  logic [B-1:0] model [K];

  coef_file u_dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata), .coef(coef));

  task automatic compare();
    for (int i = 0; i < K; i++) begin
      checks++;
      if (coef[i] !== model[i]) begin
        failures++;
        $display("FAIL C[%0d]=%h exp %h", i, coef[i], model[i]);
      end
    end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare();
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      we = ($urandom % 4) != 0;
      waddr = 5'($urandom % K);
      wdata = {$urandom, $urandom};
      @(negedge clk);
      if (we) model[waddr] = wdata;
      we = 0;
      compare();
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
