// tb_aes_sub_word: SubWord on 500 random words and on the FIPS-197 A.3
// example (SubWord(RotWord(w7)) for the 603deb10... key).
module tb_aes_sub_word;
  import aes_ref_pkg::*;

  logic [31:0] in_word, out_word;
  int checks = 0, failures = 0;

  aes_sub_word dut (.in_word(in_word), .out_word(out_word));

  task automatic check(logic [31:0] w, logic [31:0] exp);
    in_word = w;
    #1;
    checks++;
    if (out_word !== exp) begin
      failures++;
      $display("FAIL sub_word(%08h) = %08h, expected %08h", w, out_word, exp);
    end
  endtask

  initial begin
    init();
    check(32'h14dff409, 32'hfa9ebf01);
    for (int n = 0; n < 500; n++) begin
      automatic logic [31:0] w = $urandom;
      check(w, sub_word(w));
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
