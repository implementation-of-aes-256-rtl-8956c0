// tb_aes_mix_columns: MixColumns on the well-known test columns
// (db135345 -> 8e4da1bc, f20a225c -> 9fdc589d, 01010101 -> 01010101,
// c6c6c6c6 -> c6c6c6c6) and on 300 random states against the reference.
module tb_aes_mix_columns;
  import aes_ref_pkg::*;

  logic [127:0] state_in, state_out;
  int checks = 0, failures = 0;

  aes_mix_columns dut (.state_in(state_in), .state_out(state_out));

  task automatic check(logic [127:0] s, logic [127:0] exp);
    state_in = s;
    #1;
    checks++;
    if (state_out !== exp) begin
      failures++;
      $display("FAIL mix_columns(%032h) = %032h, expected %032h", s, state_out, exp);
    end
  endtask

  initial begin
    init();
    check(128'hdb135345_f20a225c_01010101_c6c6c6c6,
          128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6);
    for (int n = 0; n < 300; n++) begin
      automatic logic [127:0] s = rand128();
      check(s, aes_ref_pkg::mix_columns(s));
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
