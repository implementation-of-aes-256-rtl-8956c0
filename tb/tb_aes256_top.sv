// tb_aes256_top: end-to-end test of the encryption core with its self-check
// flags, at the top's default parameters.
//
// It runs the built-in test vector (use_test_vector high) and expects the
// FIPS-197 ciphertext, the right round key 14 and all five flags high; it
// then encrypts the FIPS-197 C.3 vector and 30 random blocks from the data
// and key ports against the reference cipher (flags must then show which
// words match the built-in expected values, normally none), and switches
// back to the test vector to see the flags recover. Every run checks the
// 15-clock latency. Besides the checks it counts how often each mechanism
// happened and fails any that never did: self-test mode, external-data
// mode, a flag mismatch, a start ignored while busy, the key register
// reloaded from the key-expansion unit (7 times per block), the round that
// folds in the initial AddRoundKey, and the final round without MixColumns.
module tb_aes256_top;
  import aes_ref_pkg::*;

  localparam int LATENCY = 15;
  localparam logic [127:0] TV_DATA = 128'h00112233445566778899aabbccddeeff;
  localparam logic [255:0] TV_KEY  =
    256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4;

  logic         clk, rst_n, start, use_test_vector;
  logic [127:0] data_in;
  logic [255:0] key_in;
  logic         busy, done, flags_valid;
  logic [127:0] cipher_text, subkey14;
  logic [4:0]   flags;

  int checks = 0, failures = 0, cycle = 0;
  int n_selftest = 0, n_external = 0, n_mismatch = 0, n_ignored = 0;
  int n_key_reload = 0, n_first_round = 0, n_final_round = 0;

  aes256_top dut (.*);

  initial clk = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // Mechanism counters, read from the core's internal control signals.
  always @(posedge clk) if (rst_n && dut.u_enc.busy) begin
    if (dut.u_enc.round < 4'd14 && !dut.u_enc.round[0]) n_key_reload++;
    if (dut.u_enc.round == 4'd0) n_first_round++;
    if (dut.u_enc.last_round) n_final_round++;
  end

  task automatic expect_eq(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic run(bit tv, logic [127:0] pt, logic [255:0] key, bit poke);
    int t0;
    logic [127:0] exp_ct, eff_pt;
    logic [255:0] eff_key;
    logic [4:0] exp_flags;
    eff_pt  = tv ? TV_DATA : pt;
    eff_key = tv ? TV_KEY : key;
    exp_ct  = encrypt(eff_pt, eff_key);
    @(negedge clk);
    use_test_vector = tv;
    data_in = pt;
    key_in  = key;
    start   = 1;
    @(negedge clk);
    t0    = cycle;
    start = 0;
    if (poke) begin
      repeat (4) @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      checks++;
      if (!busy) begin
        failures++;
        $display("FAIL busy dropped after start while busy");
      end
      n_ignored++;
    end
    while (!done) @(negedge clk);
    checks++;
    if (cycle - t0 != LATENCY) begin
      failures++;
      $display("FAIL latency %0d", cycle - t0);
    end
    expect_eq("cipher_text", cipher_text, exp_ct);
    expect_eq("subkey14", subkey14, round_key(eff_key, 14));
    @(negedge clk);
    for (int k = 0; k < 4; k++)
      exp_flags[k] = exp_ct[127 - 32*k -: 32] == dut.EXP_CIPHER[127 - 32*k -: 32];
    exp_flags[4] = round_key(eff_key, 14) == dut.EXP_SUBKEY14;
    checks++;
    if (flags !== exp_flags || !flags_valid) begin
      failures++;
      $display("FAIL flags %05b expected %05b", flags, exp_flags);
    end
    if (tv) begin
      n_selftest++;
      checks++;
      if (flags !== 5'b11111) begin
        failures++;
        $display("FAIL self-test flags %05b", flags);
      end
    end else begin
      n_external++;
    end
    if (flags != 5'b11111) n_mismatch++;
  endtask

  task automatic need(string what, int n, int min);
    checks++;
    $display("mechanism %-28s %0d", what, n);
    if (n < min) begin
      failures++;
      $display("FAIL mechanism %s happened %0d times, expected at least %0d", what, n, min);
    end
  endtask

  initial begin
    rst_n = 0;
    start = 0;
    use_test_vector = 0;
    data_in = '0;
    key_in  = '0;
    init();
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (flags !== 5'b00000 || flags_valid) begin
      failures++;
      $display("FAIL flags not cleared by reset");
    end
    run(1, rand128(), rand256(), 0);
    run(0, 128'h00112233445566778899aabbccddeeff,
        256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f, 1);
    expect_eq("FIPS-197 C.3", cipher_text, 128'h8ea2b7ca516745bfeafc49904b496089);
    for (int n = 0; n < 30; n++) run(0, rand128(), rand256(), n % 7 == 3);
    run(0, TV_DATA, TV_KEY, 0);
    run(1, rand128(), rand256(), 1);
    expect_eq("self-test ciphertext", cipher_text, 128'hd83414223d20a0c928b136c884d07ea2);
    need("self-test mode runs", n_selftest, 1);
    need("external data runs", n_external, 1);
    need("flag mismatches", n_mismatch, 1);
    need("start ignored while busy", n_ignored, 1);
    need("key register reloads", n_key_reload, 7 * (n_selftest + n_external));
    need("first round with key add", n_first_round, n_selftest + n_external);
    need("final rounds (no MixColumns)", n_final_round, n_selftest + n_external);
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
