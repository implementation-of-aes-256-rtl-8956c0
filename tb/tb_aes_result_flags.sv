// tb_aes_result_flags: the five result flags. A matching result must set all
// five; corrupting one ciphertext word (each in turn) or the last round key
// (a random bit, the lowest bit, the highest bit) must clear exactly the
// matching flag; flags must only change on done and be cleared by reset.
module tb_aes_result_flags;
  localparam logic [127:0] EC = 128'hd83414223d20a0c928b136c884d07ea2;
  localparam logic [127:0] EK = 128'hfe4890d1e6188d0b046df344706c631e;

  logic         clk = 0, rst_n = 0, done = 0;
  logic [127:0] cipher_text = '0, subkey14 = '0;
  logic [4:0]   flags;
  logic         valid;
  int checks = 0, failures = 0;

  aes_result_flags dut (.*);

  always #5 clk = ~clk;

  task automatic expect_flags(logic [4:0] exp, logic exp_valid);
    checks++;
    if (flags !== exp || valid !== exp_valid) begin
      failures++;
      $display("FAIL flags=%05b valid=%0b, expected %05b/%0b", flags, valid, exp, exp_valid);
    end
  endtask

  task automatic present(logic [127:0] ct, logic [127:0] k);
    @(negedge clk);
    cipher_text = ct;
    subkey14    = k;
    done        = 1;
    @(negedge clk);
    done = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    expect_flags(5'b00000, 1'b0);
    rst_n = 1;
    present(EC, EK);
    expect_flags(5'b11111, 1'b1);
    // Values change without done: flags hold.
    @(negedge clk);
    cipher_text = '0;
    subkey14    = '0;
    repeat (2) @(negedge clk);
    expect_flags(5'b11111, 1'b1);
    for (int k = 0; k < 4; k++) begin
      automatic logic [127:0] ct = EC;
      automatic int bit_idx = 127 - 32*k - int'($urandom % 32);
      ct[bit_idx] = ~ct[bit_idx];
      present(ct, EK);
      expect_flags(5'b11111 & ~(5'b00001 << k), 1'b1);
    end
    present(EC, EK ^ (128'h1 << ($urandom % 128)));
    expect_flags(5'b01111, 1'b1);
    present(EC, EK ^ 128'h1);
    expect_flags(5'b01111, 1'b1);
    present(EC, EK ^ {1'b1, 127'h0});
    expect_flags(5'b01111, 1'b1);
    present(~EC, ~EK);
    expect_flags(5'b00000, 1'b1);
    present(EC, EK);
    expect_flags(5'b11111, 1'b1);
    rst_n = 0;
    #1;
    expect_flags(5'b00000, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
