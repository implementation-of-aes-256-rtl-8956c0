// tb_aes256_enc: the iterative core on its own. Encrypts the FIPS-197 C.3
// vector (key 000102...1f), the 603deb10... key with plaintext
// 00112233...ff, and 40 random blocks, each compared with the reference
// cipher, and checks subkey14 against the reference's round key 14. Each
// encryption must raise done exactly LATENCY = 15 clocks after the clock that
// sampled start, with busy high in between. A start pulse given while busy
// must be ignored, and outputs must hold after done.
module tb_aes256_enc;
  import aes_ref_pkg::*;

  localparam int LATENCY = 15;

  logic         clk = 0, rst_n = 0, start = 0;
  logic [127:0] data_in = '0;
  logic [255:0] key_in = '0;
  logic         busy, done;
  logic [127:0] cipher_text, subkey14;
  int checks = 0, failures = 0;
  int cycle = 0;

  aes256_enc dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic expect_eq(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic encrypt_one(logic [127:0] pt, logic [255:0] key,
                             logic [127:0] exp_ct, bit poke_start);
    int t0, lat;
    @(negedge clk);
    data_in = pt;
    key_in  = key;
    start   = 1;
    @(negedge clk);
    t0      = cycle;   // counts the clock that sampled start
    start   = 0;
    data_in = rand128();   // inputs may change once start is sampled
    key_in  = rand256();
    checks++;
    if (!busy) begin
      failures++;
      $display("FAIL busy not raised");
    end
    if (poke_start) begin
      repeat (3) @(negedge clk);
      start = 1;           // must be ignored while busy
      @(negedge clk);
      start = 0;
    end
    while (!done) @(negedge clk);
    lat = cycle - t0;
    checks++;
    if (lat != LATENCY) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat, LATENCY);
    end
    expect_eq("cipher_text", cipher_text, exp_ct);
    expect_eq("subkey14", subkey14, round_key(key, 14));
    @(negedge clk);
    checks++;
    if (done || busy) begin
      failures++;
      $display("FAIL done/busy not cleared after result");
    end
    repeat (2) @(negedge clk);
    expect_eq("cipher_text held", cipher_text, exp_ct);
  endtask

  initial begin
    init();
    repeat (2) @(negedge clk);
    rst_n = 1;
    encrypt_one(128'h00112233445566778899aabbccddeeff,
                256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f,
                128'h8ea2b7ca516745bfeafc49904b496089, 0);
    expect_eq("FIPS-197 C.3 subkey14", subkey14, 128'h24fc79ccbf0979e9371ac23c6d68de36);
    encrypt_one(128'h00112233445566778899aabbccddeeff,
                256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4,
                128'hd83414223d20a0c928b136c884d07ea2, 1);
    for (int n = 0; n < 40; n++) begin
      automatic logic [127:0] pt = rand128();
      automatic logic [255:0] k  = rand256();
      encrypt_one(pt, k, encrypt(pt, k), n % 5 == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
