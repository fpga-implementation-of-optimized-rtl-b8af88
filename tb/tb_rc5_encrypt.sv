// tb_rc5_encrypt: self-checking test of the RC5-32/12 encryption engine.
//
// The key table comes from the reference key schedule. Checks:
//  - the published RC5-32/12/16 vectors: all-zero key and block gives
//    eedba521 6d8f4b15; key 915f4619...a9ce91 on that block gives
//    ac13c0f7 52892b5b (words written as 32-bit values, A first);
//  - random keys and blocks against the reference model;
//  - blocks crafted so that the rotate amounts of round 1 come from words
//    below 32, which takes the short path of both halves;
//  - the cycle count of every block against the count the reference model
//    predicts from the rotate paths, and ready/done behaviour.
module tb_rc5_encrypt;
  import rc5_pkg::*;
  import rc5_ref_pkg::*;

  localparam int unsigned R = DEFAULT_ROUNDS;
  localparam int unsigned T = 2 * (R + 1);

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0, ready, done;
  word_t pt_a = '0, pt_b = '0, ct_a, ct_b;
  word_t s_tab [T];
  int    checks = 0, failures = 0;
  int    short_b = 0, short_a = 0;

  always #5 clk = ~clk;

  rc5_encrypt dut (
    .clk(clk), .rst_n(rst_n), .start(start), .ready(ready),
    .pt_a(pt_a), .pt_b(pt_b), .s_tab(s_tab),
    .done(done), .ct_a(ct_a), .ct_b(ct_b)
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_key(bq_t key);
    wq_t s;
    s = expand(key, R);
    for (int k = 0; k < T; k++) s_tab[k] = s[k];
  endtask

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Encrypts one block and checks result and latency.
  task automatic run(word_t a, word_t b, logic known = 1'b0,
                     word_t ka = '0, word_t kb = '0);
    wq_t          s;
    w32_t         ea, eb;
    int unsigned  nb, na, cyc;
    for (int k = 0; k < T; k++) s.push_back(s_tab[k]);
    ea = a; eb = b;
    encrypt(ea, eb, s, R, nb, na);
    short_b += nb;
    short_a += na;
    @(negedge clk);
    check("ready before start", ready);
    start = 1'b1; pt_a = a; pt_b = b;
    @(posedge clk);
    cyc = 1;
    @(negedge clk);
    start = 1'b0; pt_a = ~a; pt_b = ~b;   // inputs are only sampled once
    check("ready low while busy", !ready);
    while (!done) begin
      @(posedge clk);
      cyc++;
      @(negedge clk);
    end
    check($sformatf("ciphertext %h %h want %h %h", ct_a, ct_b, ea, eb),
          ct_a == ea && ct_b == eb);
    if (known)
      check($sformatf("published vector %h %h", ct_a, ct_b),
            ct_a == ka && ct_b == kb);
    check($sformatf("latency %0d want %0d", cyc, enc_cycles(R, nb, na)),
          cyc == enc_cycles(R, nb, na));
    @(negedge clk);
    check("done is a pulse", !done);
    check("result held", ct_a == ea && ct_b == eb);
  endtask

  bq_t key;
  word_t a0, a, b;

  initial begin
    for (int k = 0; k < T; k++) s_tab[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    key = {};
    for (int k = 0; k < 16; k++) key.push_back(8'h00);
    set_key(key);
    run(32'h0, 32'h0, 1'b1, 32'heedba521, 32'h6d8f4b15);

    key = {8'h91, 8'h5f, 8'h46, 8'h19, 8'hbe, 8'h41, 8'hb2, 8'h51,
           8'h63, 8'h55, 8'ha5, 8'h01, 8'h10, 8'ha9, 8'hce, 8'h91};
    set_key(key);
    run(32'heedba521, 32'h6d8f4b15, 1'b1, 32'hac13c0f7, 32'h52892b5b);

    // Round 1 with B = 5 entering and A = 7 leaving the A half.
    b  = 32'd5 - s_tab[1];
    a0 = rotr(32'd7 - s_tab[2], 5) ^ 32'd5;
    a  = a0 - s_tab[0];
    run(a, b);

    for (int n = 0; n < 12; n++) begin
      key = {};
      for (int k = 0; k < 16; k++) key.push_back(8'($urandom));
      set_key(key);
      run($urandom, $urandom);
      run($urandom, $urandom);
    end

    check("short B-half path taken", short_b > 0);
    check("short A-half path taken", short_a > 0);
    $display("short paths: B half %0d, A half %0d", short_b, short_a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
