// tb_aes_sbox: exhaustive check of the S-box. All 256 inputs are compared
// with the reference package's table (found by inverse search), and five
// entries with the values printed in FIPS-197 Figure 7.
module tb_aes_sbox;
  import aes_ref_pkg::*;

  logic [7:0] in_byte, out_byte;
  int checks = 0, failures = 0;

  aes_sbox dut (.in_byte(in_byte), .out_byte(out_byte));

  task automatic check(logic [7:0] a, logic [7:0] exp);
    in_byte = a;
    #1;
    checks++;
    if (out_byte !== exp) begin
      failures++;
      $display("FAIL sbox(%02h) = %02h, expected %02h", a, out_byte, exp);
    end
  endtask

  initial begin
    init();
    for (int a = 0; a < 256; a++) check(8'(a), sbox_tab[a]);
    check(8'h00, 8'h63);
    check(8'h01, 8'h7c);
    check(8'h53, 8'hed);
    check(8'h10, 8'hca);
    check(8'hff, 8'h16);
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
