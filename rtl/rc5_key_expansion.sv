// rc5_key_expansion: RC5-32 key schedule, b-byte secret key -> table S.
//
// The key schedule is the standard three-step RC5 expansion:
//   1. the key bytes K[0..b-1] are packed little-endian into c = ceil(b/4)
//      words L[0..c-1] (K[0] is the low byte of L[0]);
//   2. S[k] = P32 + k*Q32 for k = 0..t-1, t = 2(r+1);
//   3. 3*max(t,c) mixing steps, each
//        A = S[i] = (S[i] + A + B) <<< 3
//        B = L[j] = (L[j] + A + B) <<< (A + B)
//        i = (i+1) mod t,  j = (j+1) mod c
//      starting from A = B = i = j = 0.
//
// Hardware: S and L are register arrays. Steps 1 and 2 happen together in
// one SETUP cycle (packing is wiring, and every S[k] is a constant).
// Step 3 runs one mixing step per clock; the fixed rotate by 3 is wiring
// and the data-dependent rotate uses the same barrel shifter as the
// encryption engine. The schedule itself is RC5's; the register-array
// organisation, the one-step-per-cycle timing and the handshake are this
// design's choices.
//
// Interface: start (accepted while ready) samples key[]; key_valid goes
// low at once and high again when s_tab holds the expanded table, which
// then stays until the next start. Reset (rst_n, active low, synchronous)
// clears key_valid.
// Timing: key_valid rises 2 + 3*max(t,c) clock edges after the edge that
// samples start: 80 cycles for RC5-32/12/16.
module rc5_key_expansion
  import rc5_pkg::*;
#(
  parameter  int unsigned ROUNDS    = DEFAULT_ROUNDS,
  parameter  int unsigned KEY_BYTES = DEFAULT_KEY_BYTES,
  localparam int unsigned T         = 2 * (ROUNDS + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       ready,
  input  logic [7:0] key [KEY_BYTES],
  output logic       key_valid,
  output word_t      s_tab [T]
);

  localparam int unsigned C     = key_words(KEY_BYTES);
  localparam int unsigned STEPS = 3 * ((T > C) ? T : C);
  localparam int unsigned TW    = $clog2(T);
  localparam int unsigned CW    = (C > 1) ? $clog2(C) : 1;
  localparam int unsigned NW    = $clog2(STEPS);

  typedef enum logic [1:0] {IDLE, SETUP, MIX} state_t;

  state_t        state;
  logic [7:0]    key_q [KEY_BYTES];  // key sampled at start
  word_t         s [T];
  word_t         l [C];
  word_t         a, b;
  logic [TW-1:0] si;
  logic [CW-1:0] lj;
  logic [NW-1:0] n;

  // One mixing step.
  word_t a_sum, a_new, ab, b_sum, b_new;
  always_comb begin
    a_sum = s[si] + a + b;
    a_new = {a_sum[W-4:0], a_sum[W-1:W-3]};
    ab    = a_new + b;
    b_sum = l[lj] + ab;
  end

  rc5_barrel_shifter u_shift (.din(b_sum), .rot(ab[LOGW-1:0]), .dout(b_new));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      key_valid <= 1'b0;
      a         <= '0;
      b         <= '0;
      si        <= '0;
      lj        <= '0;
      n         <= '0;
      for (int k = 0; k < KEY_BYTES; k++) key_q[k] <= '0;
      for (int k = 0; k < T; k++) s[k] <= '0;
      for (int k = 0; k < C; k++) l[k] <= '0;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          key_q     <= key;
          key_valid <= 1'b0;
          state     <= SETUP;
        end
        SETUP: begin
          // Step 1: little-endian byte packing; step 2: P/Q progression.
          for (int k = 0; k < C; k++) begin
            l[k] <= '0;
            for (int by = 0; by < W / 8; by++)
              if (k * (W / 8) + by < KEY_BYTES)
                l[k][8*by +: 8] <= key_q[k * (W / 8) + by];
          end
          for (int k = 0; k < T; k++) s[k] <= P32 + word_t'(k) * Q32;
          a     <= '0;
          b     <= '0;
          si    <= '0;
          lj    <= '0;
          n     <= '0;
          state <= MIX;
        end
        MIX: begin
          // Step 3: one mixing step per cycle.
          s[si] <= a_new;
          l[lj] <= b_new;
          a     <= a_new;
          b     <= b_new;
          si    <= (int'(si) == T - 1) ? '0 : si + 1'b1;
          lj    <= (int'(lj) == C - 1) ? '0 : lj + 1'b1;
          n     <= n + 1'b1;
          if (int'(n) == STEPS - 1) begin
            key_valid <= 1'b1;
            state     <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign ready = (state == IDLE);
  assign s_tab = s;

endmodule
