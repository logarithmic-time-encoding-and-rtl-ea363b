// mod_adder_tb: checks the modulo 2^B-1 adder exhaustively at B = 8 (every
// a, including all ones, against every canonical b) and on random and
// corner operands at B = 64, against a % reference.
module mod_adder_tb;
  import iecc_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;
  logic [63:0] a64, b64, s64;

  mod_adder #(.B(8))  u8  (.a(a8),  .b(b8),  .s(s8));
  mod_adder           u64i (.a(a64), .b(b64), .s(s64));

  task automatic chk64(input u64 a, input u64 c);
    a64 = a; b64 = c; #1;
    checks++;
    if (s64 !== madd(a, c, 64)) begin
      failures++;
      $display("FAIL B=64 %h + %h = %h exp %h", a, c, s64, madd(a, c, 64));
    end
  endtask

  initial begin
    for (int a = 0; a < 256; a++)
      for (int c = 0; c < 255; c++) begin
        a8 = 8'(a); b8 = 8'(c); #1;
        checks++;
        if (s8 !== 8'(madd(u64'(a), u64'(c), 8))) begin
          failures++;
          if (failures < 10) $display("FAIL B=8 %0d + %0d = %0d", a, c, s8);
        end
      end
    chk64('1, 64'hFFFF_FFFF_FFFF_FFFE);
    chk64('1, 0);
    chk64(64'hFFFF_FFFF_FFFF_FFFE, 1);
    chk64(64'hFFFF_FFFF_FFFF_FFFE, 64'hFFFF_FFFF_FFFF_FFFE);
    chk64(0, 0);
    for (int i = 0; i < 2000; i++)
      chk64({$urandom, $urandom}, mred(u128'({$urandom, $urandom}), 64));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
