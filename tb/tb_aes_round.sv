// tb_aes_round: one round, full and final, against the reference. Includes
// FIPS-197 C.3 round 1 (state 00102030...f0 with round key 101112...1f gives
// 4f63760643e0aa85efa7213201a4e705) and 400 random cases, half of them with
// the MixColumns bypass of the last round.
module tb_aes_round;
  import aes_ref_pkg::*;

  logic [127:0] state_in, round_key, state_out;
  logic         last_round;
  int checks = 0, failures = 0;

  aes_round dut (.state_in(state_in), .round_key(round_key),
                 .last_round(last_round), .state_out(state_out));

  task automatic check(logic [127:0] s, logic [127:0] k, bit last, logic [127:0] exp);
    state_in   = s;
    round_key  = k;
    last_round = last;
    #1;
    checks++;
    if (state_out !== exp) begin
      failures++;
      $display("FAIL round(%032h, %032h, last=%0b) = %032h, expected %032h",
               s, k, last, state_out, exp);
    end
  endtask

  initial begin
    init();
    check(128'h00102030405060708090a0b0c0d0e0f0, 128'h101112131415161718191a1b1c1d1e1f,
          1'b0, 128'h4f63760643e0aa85efa7213201a4e705);
    for (int n = 0; n < 400; n++) begin
      automatic logic [127:0] s = rand128();
      automatic logic [127:0] k = rand128();
      automatic bit last = n[0];
      check(s, k, last, round_fn(s, k, last));
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
