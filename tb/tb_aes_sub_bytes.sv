// tb_aes_sub_bytes: SubBytes on 300 random states and on the FIPS-197 C.3
// round-1 state (00102030...f0 -> 63cab7040953d051cd60e0e7ba70e18c).
module tb_aes_sub_bytes;
  import aes_ref_pkg::*;

  logic [127:0] state_in, state_out;
  int checks = 0, failures = 0;

  aes_sub_bytes dut (.state_in(state_in), .state_out(state_out));

  task automatic check(logic [127:0] s, logic [127:0] exp);
    state_in = s;
    #1;
    checks++;
    if (state_out !== exp) begin
      failures++;
      $display("FAIL sub_bytes(%032h) = %032h, expected %032h", s, state_out, exp);
    end
  endtask

  initial begin
    init();
    check(128'h00102030405060708090a0b0c0d0e0f0, 128'h63cab7040953d051cd60e0e7ba70e18c);
    for (int n = 0; n < 300; n++) begin
      automatic logic [127:0] s = rand128();
      check(s, aes_ref_pkg::sub_bytes(s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
