// st_search_tb: binary search over a 256-entry table of sorted, distinct
// random 16-bit keys held in st_memory (N_ST = 4). Looks up keys that are
// present (must return their entry) and absent (found = 0) for several
// table sizes, and checks that the search takes probes*N_ST + 1 clocks
// with at most floor(log2 size) + 1 probes.
module st_search_tb;
  localparam int DEPTH = 256, B = 16, W = 24, N_ST = 4, AW = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          we, re, rvalid, start, busy, done, found;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0]  wdata, rdata, entry;
  logic [B-1:0]  key;
  logic [AW:0]   size;
  logic [7:0]    probes;
  logic [B-1:0]  keys [DEPTH];

  st_memory #(.DEPTH(DEPTH), .W(W), .N_ST(N_ST)) u_mem (
    .clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata),
    .re(re), .raddr(raddr), .rvalid(rvalid), .rdata(rdata));

  st_search #(.DEPTH(DEPTH), .W(W), .B(B)) u_dut (
    .clk(clk), .rst_n(rst_n), .start(start), .key(key), .size(size), .busy(busy),
    .re(re), .raddr(raddr), .rvalid(rvalid), .rdata(rdata),
    .done(done), .found(found), .entry(entry), .probes(probes));

  function automatic int flog2(int x);
    int r = 0;
    while (x > 1) begin x >>= 1; r++; end
    return r;
  endfunction

  task automatic lookup(input logic [B-1:0] k, input int sz);
    int idx = -1, t0, cycles;
    for (int i = 0; i < sz; i++) if (keys[i] == k) idx = i;
    @(negedge clk);
    key = k; size = (AW+1)'(sz); start = 1;
    t0 = int'($time);
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    cycles = (int'($time) - t0) / 10;
    checks++;
    if (found !== (idx >= 0) || (idx >= 0 && entry !== {keys[idx], 8'(idx)}) ||
        int'(probes) > flog2(sz) + 1 || cycles != int'(probes) * N_ST + 1 ||
        (sz > 0 && probes == 0)) begin
      failures++;
      $display("FAIL key=%h size=%0d found=%0d idx=%0d entry=%h probes=%0d cycles=%0d",
               k, sz, found, idx, entry, probes, cycles);
    end
  endtask

  initial begin
    logic [B-1:0] kv;
    we = 0; start = 0; key = 0; size = 0; waddr = 0; wdata = 0;
    // sorted distinct keys: increments of 1..300
    kv = 16'd5;
    for (int i = 0; i < DEPTH; i++) begin
      keys[i] = kv;
      kv = kv + 16'(1 + $urandom % 250);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = {keys[i], 8'(i)};
    end
    @(negedge clk) we = 0;
    foreach (keys[i]) lookup(keys[i], DEPTH);
    lookup(16'd0, DEPTH);
    lookup(16'hFFFF, DEPTH);
    for (int n = 0; n < 100; n++) lookup(16'($urandom), DEPTH);
    for (int n = 0; n < 100; n++) begin
      int sz;
      sz = 1 + $urandom % DEPTH;
      lookup(keys[$urandom % sz], sz);
      lookup(keys[$urandom % DEPTH] + 16'd1, sz);
    end
    lookup(keys[0], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
