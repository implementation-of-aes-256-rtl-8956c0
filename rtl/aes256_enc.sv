// aes256_enc: iterative AES-256 encryption core built for small area. One
// shared round datapath (aes_round) and one shared key-schedule step
// (aes_key_expand) are reused on every clock instead of being replicated.
//
// Storage:
//   subkey_a  256-bit key register. It holds two consecutive round keys at a
//             time (one key-schedule group of eight words) and is reloaded
//             from subkey_b every second round, a cyclic memory that walks
//             through the schedule alongside the data.
//   subkey_b  the next group, computed combinationally from subkey_a by
//             aes_key_expand with the round constant of the current round.
//   data_a    128-bit state register.
//   round     round counter, 0..14.
//
// Schedule, one clock per value of round (r):
//   r = 0      data_a <= Round(data ^ RK0, RK1): initial AddRoundKey and the
//              first full round in the same clock.
//   r = 1..12  data_a <= Round(data_a, RK(r+1)).
//   r = 13     data_a <= FinalRound(data_a, RK14)   (no MixColumns).
//   r = 14     cipher_text <= data_a, subkey14 <= RK14, done pulses.
//   The round key is a multiplexer on subkey_a: its low half in even rounds,
//   its high half in odd rounds. In even rounds 0..12, subkey_a <= subkey_b.
//   The round constant is a case on the round counter (01 in round 0,
//   doubling every two rounds up to 40 in round 12, 00 otherwise).
//
// Interface and timing: pulse start with data_in and key_in valid while the
// core is idle (start is ignored while busy). The edge that samples start
// loads the registers and raises busy; fifteen edges later (rounds 0..14)
// cipher_text and subkey14 are valid and done is high for one clock. Outputs
// hold their value until the next result. rst_n is an asynchronous,
// active-low reset that clears every register.
//
// What follows the source architecture: the register set, the two-round-key
// cyclic key register, the shared SubWord/RotWord hardware, the round numbering
// (last round without MixColumns at round 13, output at round 14) and the
// subkey14 output. The start/busy/done handshake, the reset style, and
// computing subkey_b combinationally are this design's own choices.
module aes256_enc
  import aes_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  block_t  data_in,
  input  key256_t key_in,
  output logic    busy,
  output logic    done,
  output block_t  cipher_text,
  output block_t  subkey14
);

  key256_t subkey_a, subkey_b;
  block_t  data_a;
  round_t  round;
  word_t   roundconstant;

  block_t  round_in, round_key, round_out;
  logic    last_round;

  // Round constant chosen by the current round; only even rounds expand keys.
  always_comb begin
    case (round)
      4'd0:    roundconstant = 32'h01000000;
      4'd2:    roundconstant = 32'h02000000;
      4'd4:    roundconstant = 32'h04000000;
      4'd6:    roundconstant = 32'h08000000;
      4'd8:    roundconstant = 32'h10000000;
      4'd10:   roundconstant = 32'h20000000;
      4'd12:   roundconstant = 32'h40000000;
      default: roundconstant = 32'h00000000;
    endcase
  end

  aes_key_expand u_key_expand (
    .key_in (subkey_a),
    .rcon   (roundconstant),
    .key_out(subkey_b)
  );

  // Round 0 folds the initial AddRoundKey (RK0, high half of subkey_a) in.
  assign round_in   = (round == '0) ? (data_a ^ subkey_a[255:128]) : data_a;
  assign round_key  = round[0] ? subkey_a[255:128] : subkey_a[127:0];
  assign last_round = (round == round_t'(NR - 1));

  aes_round u_round (
    .state_in  (round_in),
    .round_key (round_key),
    .last_round(last_round),
    .state_out (round_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      subkey_a    <= '0;
      data_a      <= '0;
      round       <= '0;
      busy        <= 1'b0;
      done        <= 1'b0;
      cipher_text <= '0;
      subkey14    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          subkey_a <= key_in;
          data_a   <= data_in;
          round    <= '0;
          busy     <= 1'b1;
        end
      end else if (round == round_t'(NR)) begin
        cipher_text <= data_a;
        subkey14    <= subkey_a[255:128];
        done        <= 1'b1;
        busy        <= 1'b0;
      end else begin
        data_a <= round_out;
        if (!round[0]) subkey_a <= subkey_b;
        round <= round + 1'b1;
      end
    end
  end

  // The round counter never passes the final round while busy (busy is
  // cleared by reset, so no disable clause is needed).
  a_round_range: assert property (@(posedge clk)
    busy |-> round <= round_t'(NR))
    else $error("aes256_enc: round counter out of range");

endmodule
