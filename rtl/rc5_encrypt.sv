// rc5_encrypt: RC5-32/r block encryption as a multi-cycle state machine.
//
// The engine follows an ASM chart in which every step of the cipher is a
// state of its own, with a register between consecutive steps:
//
//   LOAD   Aa <= n1, Bb <= n2                      (waits for start)
//   INIT   Aa <= Aa + S[0], Bb <= Bb + S[1], i <= 0
//   XOR1   X1 <= Aa ^ Bb, Ibb <= Bb; if i == ROUNDS the block is done
//   WAIT1  empty state; the rotate amount of the A half is then chosen:
//            Ibb < 32  : ROT1  Rot <= Ibb
//            otherwise : DIV1  C <= Ibb/32, MUL1 K <= 32*C, SUB1 Rot <= Ibb-K
//   SHF1   X1 <= X1 <<< Rot                        (barrel shifter)
//   ADD1   Aa <= X1 + S[2i+2]
//   XOR2   X2 <= Aa ^ Bb, Iaa <= Aa, and the same choice for the B half:
//            Aa < 32   : ROT2  Rott <= Iaa
//            otherwise : DIV2, MUL2, SUB2 (Cc, Kk, Rott <= Iaa - Kk)
//   SHF2   X2 <= X2 <<< Rott                       (barrel shifter)
//   ADD2   Bb <= X2 + S[2i+3], i <= i + 1, back to XOR1
//
// The divide/multiply/subtract chain computes the word modulo 32, i.e. its
// low five bits, which is the RC5 rotate amount. Each of those steps is a
// shift or a subtraction, so each takes one short clock cycle.
//
// Round indexing: the chart counts i from 0 and leaves when i == ROUNDS, so
// round i (0-based) uses S[2i+2] and S[2i+3]; this is round i+1 of the
// cipher's "A = ((A^B)<<<B) + S[2i]" loop, which counts from 1.
//
// Interface: start is accepted while ready is high (state LOAD), together
// with the plaintext words pt_a (A, n1) and pt_b (B, n2). s_tab is the
// expanded key table and must stay stable while busy. done pulses for one
// cycle when ct_a/ct_b hold the ciphertext; they keep it until the next
// start. Reset (rst_n, active low, synchronous) returns to LOAD.
//
// Timing: from the cycle start is sampled to the cycle done is high takes
// 3 + sum over rounds of (9 + 2*[B >= 32] + 2*[A >= 32]) cycles, where B and
// A are the word values that select the rotate path of each half: between
// 111 and 159 cycles for 12 rounds (159 when every such word is 32 or more,
// the usual case).
//
// Design choices not fixed by the chart: the start/ready/done handshake,
// treating the words as unsigned (a signed 32-bit integer would give a
// negative remainder for words of 2^31 and up), and taking the B-half path
// decision on the value Iaa is being loaded with, so that no extra empty
// state is needed in that half.
module rc5_encrypt
  import rc5_pkg::*;
#(
  parameter  int unsigned ROUNDS = DEFAULT_ROUNDS,
  localparam int unsigned T      = 2 * (ROUNDS + 1)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  output logic  ready,
  input  word_t pt_a,
  input  word_t pt_b,
  input  word_t s_tab [T],
  output logic  done,
  output word_t ct_a,
  output word_t ct_b
);

  localparam int unsigned IW = $clog2(ROUNDS + 1);

  typedef enum logic [4:0] {
    LOAD, INIT,
    XOR1, WAIT1, ROT1, DIV1, MUL1, SUB1, SHF1, ADD1,
    XOR2, ROT2, DIV2, MUL2, SUB2, SHF2, ADD2
  } state_t;

  state_t state;

  word_t              aa, bb;        // cipher state words A, B
  word_t              x1, x2;        // xor / rotate work registers
  word_t              ibb, iaa;      // word copies used for the rotate amount
  logic [W-LOGW-1:0]  c1, c2;        // word / 32
  word_t              k1, k2;        // 32 * (word / 32)
  rot_t               rot1, rot2;    // rotate amounts (word mod 32)
  logic [IW-1:0]      i;             // completed rounds

  word_t x1_rot, x2_rot;

  rc5_barrel_shifter u_shift_a (.din(x1), .rot(rot1), .dout(x1_rot));
  rc5_barrel_shifter u_shift_b (.din(x2), .rot(rot2), .dout(x2_rot));

  // Key words of the current round (index 2i+2 and 2i+3).
  word_t s_even, s_odd;
  always_comb begin
    s_even = s_tab[2 * int'(i) + 2 < T ? 2 * int'(i) + 2 : T - 2];
    s_odd  = s_tab[2 * int'(i) + 3 < T ? 2 * int'(i) + 3 : T - 1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= LOAD;
      done  <= 1'b0;
      aa    <= '0;
      bb    <= '0;
      x1    <= '0;
      x2    <= '0;
      ibb   <= '0;
      iaa   <= '0;
      c1    <= '0;
      c2    <= '0;
      k1    <= '0;
      k2    <= '0;
      rot1  <= '0;
      rot2  <= '0;
      i     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        LOAD: if (start) begin
          aa    <= pt_a;
          bb    <= pt_b;
          state <= INIT;
        end
        INIT: begin
          aa    <= aa + s_tab[0];
          bb    <= bb + s_tab[1];
          i     <= '0;
          state <= XOR1;
        end
        XOR1: begin
          x1  <= aa ^ bb;
          ibb <= bb;
          if (int'(i) == ROUNDS) begin
            done  <= 1'b1;
            state <= LOAD;
          end else begin
            state <= WAIT1;
          end
        end
        WAIT1: state <= (ibb < word_t'(W)) ? ROT1 : DIV1;
        ROT1: begin
          rot1  <= ibb[LOGW-1:0];
          state <= SHF1;
        end
        DIV1: begin
          c1    <= ibb[W-1:LOGW];
          state <= MUL1;
        end
        MUL1: begin
          k1    <= {c1, {LOGW{1'b0}}};
          state <= SUB1;
        end
        SUB1: begin
          rot1  <= rot_t'(ibb - k1);
          state <= SHF1;
        end
        SHF1: begin
          x1    <= x1_rot;
          state <= ADD1;
        end
        ADD1: begin
          aa    <= x1 + s_even;
          state <= XOR2;
        end
        XOR2: begin
          x2    <= aa ^ bb;
          iaa   <= aa;
          state <= (aa < word_t'(W)) ? ROT2 : DIV2;
        end
        ROT2: begin
          rot2  <= iaa[LOGW-1:0];
          state <= SHF2;
        end
        DIV2: begin
          c2    <= iaa[W-1:LOGW];
          state <= MUL2;
        end
        MUL2: begin
          k2    <= {c2, {LOGW{1'b0}}};
          state <= SUB2;
        end
        SUB2: begin
          rot2  <= rot_t'(iaa - k2);
          state <= SHF2;
        end
        SHF2: begin
          x2    <= x2_rot;
          state <= ADD2;
        end
        ADD2: begin
          bb    <= x2 + s_odd;
          i     <= i + 1'b1;
          state <= XOR1;
        end
        default: state <= LOAD;
      endcase
    end
  end

  assign ready = (state == LOAD);
  assign ct_a  = aa;
  assign ct_b  = bb;

  // The remainder chain must always land in 0..31 with nothing lost.
  always_ff @(posedge clk) begin
    if (rst_n && state == SUB1) assert (ibb - k1 < word_t'(W));
    if (rst_n && state == SUB2) assert (iaa - k2 < word_t'(W));
  end

endmodule
