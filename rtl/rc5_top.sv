// rc5_top: RC5-32/12/16 encryptor, 64-bit blocks under a 128-bit key.
//
// The key-expansion unit turns the secret key into the expanded key table
// S (t = 2(r+1) words), and the encryption engine, a state machine with one
// state per step of the cipher and barrel shifters for the data-dependent
// rotations, encrypts blocks with that table.
//
// Interface:
//   key_start/key[]  load a new secret key; accepted only while both units
//                    are idle (key_ready). key_valid is high once the table
//                    is ready.
//   enc_start/pt_a/pt_b  encrypt one block (A, B words); accepted while
//                    enc_ready, which requires a valid key table.
//   done/ct_a/ct_b   ciphertext, done pulses for one cycle.
// Reset is synchronous, active low. Latency: 80 cycles for a key, 111 to
// 159 cycles for a block (see rc5_key_expansion and rc5_encrypt).
// Gating the two start inputs so that the table never changes under an
// encryption is this design's choice.
module rc5_top
  import rc5_pkg::*;
#(
  parameter int unsigned ROUNDS    = DEFAULT_ROUNDS,
  parameter int unsigned KEY_BYTES = DEFAULT_KEY_BYTES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       key_start,
  input  logic [7:0] key [KEY_BYTES],
  output logic       key_ready,
  output logic       key_valid,
  input  logic       enc_start,
  output logic       enc_ready,
  input  word_t      pt_a,
  input  word_t      pt_b,
  output logic       done,
  output word_t      ct_a,
  output word_t      ct_b
);

  localparam int unsigned T = 2 * (ROUNDS + 1);

  word_t s_tab [T];
  logic  ke_ready, en_ready;

  rc5_key_expansion #(
    .ROUNDS   (ROUNDS),
    .KEY_BYTES(KEY_BYTES)
  ) u_key (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (key_start && en_ready),
    .ready    (ke_ready),
    .key      (key),
    .key_valid(key_valid),
    .s_tab    (s_tab)
  );

  rc5_encrypt #(
    .ROUNDS(ROUNDS)
  ) u_enc (
    .clk  (clk),
    .rst_n(rst_n),
    .start(enc_start && key_valid && ke_ready),
    .ready(en_ready),
    .pt_a (pt_a),
    .pt_b (pt_b),
    .s_tab(s_tab),
    .done (done),
    .ct_a (ct_a),
    .ct_b (ct_b)
  );

  assign key_ready = ke_ready && en_ready;
  assign enc_ready = en_ready && key_valid && ke_ready;

endmodule
