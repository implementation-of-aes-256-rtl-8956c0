// tb_aes_key_expand: walks the whole AES-256 schedule through the shared
// expansion step. Starting from the key, the step is applied seven times
// with round constants 01..40 and each group of eight words is compared
// with the reference schedule; for the FIPS-197 A.3 key the first derived
// words (9ba35411..., w8) and the last (fe4890d1..., w56) are also checked
// against the values printed in the standard. Then 50 random keys.
module tb_aes_key_expand;
  import aes_ref_pkg::*;

  logic [255:0] key_in, key_out;
  logic [31:0]  rcon;
  int checks = 0, failures = 0;

  aes_key_expand dut (.key_in(key_in), .rcon(rcon), .key_out(key_out));

  task automatic run_schedule(logic [255:0] key);
    words60_t w = expand_words(key);
    logic [255:0] g = key;
    logic [7:0] rc = 8'h01;
    for (int j = 1; j <= 7; j++) begin
      logic [255:0] exp;
      for (int i = 0; i < 8; i++)
        exp[255 - 32*i -: 32] = (8*j + i < 60) ? w[8*j + i] : 32'h0;
      key_in = g;
      rcon   = {rc, 24'h0};
      #1;
      checks++;
      // The last group only needs its first four words (w56..w59).
      if ((j < 7 && key_out !== exp) || (j == 7 && key_out[255:128] !== exp[255:128])) begin
        failures++;
        $display("FAIL group %0d: %064h expected %064h", j, key_out, exp);
      end
      g  = key_out;
      rc = mul(rc, 2);
    end
  endtask

  initial begin
    init();
    key_in = 256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4;
    rcon   = 32'h01000000;
    #1;
    checks++;
    if (key_out[255:224] !== 32'h9ba35411) begin
      failures++;
      $display("FAIL w8 = %08h", key_out[255:224]);
    end
    run_schedule(256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4);
    checks++;
    if (key_out[255:224] !== 32'hfe4890d1) begin
      failures++;
      $display("FAIL w56 = %08h", key_out[255:224]);
    end
    for (int n = 0; n < 50; n++) run_schedule(rand256());
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
