// error_corrector_tb: corrector with two corrections per entry (T = 2),
// B = 8, K = 5. Random codewords (including all-ones bytes) and random
// pairs of distinct locations and values; each output byte must be the
// received byte plus its value modulo 255, or the byte unchanged.
module error_corrector_tb;
  import iecc_ref_pkg::*;
  localparam int B = 8, K = 5, T = 2, LW = 3;
  int checks = 0, failures = 0;

  logic          en;
  logic [B-1:0]  cw_in [K+1], cw_out [K+1];
  logic [LW-1:0] loc [T];
  logic [B-1:0]  val [T];

  error_corrector #(.B(B), .K(K), .T(T)) u_dut (
    .en(en), .cw_in(cw_in), .loc(loc), .val(val), .cw_out(cw_out));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      en = (n % 8) != 0;
      foreach (cw_in[i]) cw_in[i] = (($urandom % 6) == 0) ? 8'hFF : B'($urandom);
      loc[0] = LW'($urandom % (K+1));
      loc[1] = LW'((int'(loc[0]) + 1 + $urandom % K) % (K+1));
      foreach (val[j]) val[j] = B'($urandom % 255);
      #1;
      for (int i = 0; i <= K; i++) begin
        u64 e;
        e = u64'(cw_in[i]);
        if (en) begin
          e = mred(u128'(e), B);
          for (int j = 0; j < T; j++) if (int'(loc[j]) == i) e = madd(e, u64'(val[j]), B);
        end
        checks++;
        if (cw_out[i] !== B'(e)) begin
          failures++;
          if (failures < 10) $display("FAIL byte %0d in=%h out=%h exp=%h", i, cw_in[i], cw_out[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
