// tb_rc5_top: end-to-end test of the RC5-32/12/16 encryptor at its default
// parameters: key loading through the key-expansion unit, then block
// encryption with the resulting table.
//
// Checks the published vectors (all-zero key and block -> eedba521
// 6d8f4b15; key 915f4619be41b2516355a50110a9ce91 on that block -> ac13c0f7
// 52892b5b), random keys and blocks against the reference model, key and
// block latencies, and that an encryption request without a valid key
// table is refused. Counts each mechanism: key expansion, encryption, the
// short and long rotate-amount paths of both halves, refused start, key
// reload; one that never happened is a failure.
module tb_rc5_top;
  import rc5_pkg::*;
  import rc5_ref_pkg::*;

  localparam int unsigned R = DEFAULT_ROUNDS;
  localparam int unsigned B = DEFAULT_KEY_BYTES;
  localparam int unsigned T = 2 * (R + 1);
  localparam int unsigned KEY_LAT = 2 + 3 * ((T > (B + 3) / 4) ? T : (B + 3) / 4);

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       key_start = 1'b0, key_ready, key_valid;
  logic [7:0] key [B];
  logic       enc_start = 1'b0, enc_ready, done;
  word_t      pt_a = '0, pt_b = '0, ct_a, ct_b;
  int         checks = 0, failures = 0;
  int         n_keys = 0, n_blocks = 0, n_short_b = 0, n_short_a = 0;
  int         n_long_b = 0, n_long_a = 0, n_refused = 0, n_reload = 0;
  wq_t        cur_s;

  always #5 clk = ~clk;

  rc5_top dut (
    .clk(clk), .rst_n(rst_n),
    .key_start(key_start), .key(key), .key_ready(key_ready), .key_valid(key_valid),
    .enc_start(enc_start), .enc_ready(enc_ready), .pt_a(pt_a), .pt_b(pt_b),
    .done(done), .ct_a(ct_a), .ct_b(ct_b)
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic load_key(bq_t kq);
    int unsigned cyc;
    if (n_keys > 0) n_reload++;
    cur_s = expand(kq, R);
    @(negedge clk);
    check("key_ready", key_ready);
    for (int k = 0; k < B; k++) key[k] = kq[k];
    key_start = 1'b1;
    @(posedge clk);
    cyc = 1;
    @(negedge clk);
    key_start = 1'b0;
    // A block request now must be refused.
    check("enc_ready low while expanding", !enc_ready);
    enc_start = 1'b1;
    @(posedge clk);
    cyc++;
    @(negedge clk);
    enc_start = 1'b0;
    n_refused++;
    while (!key_valid) begin
      check("no encryption during expansion", !done);
      @(posedge clk);
      cyc++;
      @(negedge clk);
    end
    check($sformatf("key latency %0d want %0d", cyc, KEY_LAT), cyc == KEY_LAT);
    check("no block started by refused request", enc_ready && !done);
    n_keys++;
  endtask

  task automatic run(word_t a, word_t b, logic known = 1'b0,
                     word_t ka = '0, word_t kb = '0);
    w32_t        ea, eb;
    int unsigned nb, na, cyc;
    ea = a; eb = b;
    encrypt(ea, eb, cur_s, R, nb, na);
    n_short_b += nb;       n_short_a += na;
    n_long_b  += R - nb;   n_long_a  += R - na;
    @(negedge clk);
    check("enc_ready", enc_ready);
    enc_start = 1'b1; pt_a = a; pt_b = b;
    @(posedge clk);
    cyc = 1;
    @(negedge clk);
    enc_start = 1'b0;
    check("key_ready low while encrypting", !key_ready);
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
    check($sformatf("block latency %0d want %0d", cyc, enc_cycles(R, nb, na)),
          cyc == enc_cycles(R, nb, na));
    n_blocks++;
  endtask

  task automatic count(string what, int n);
    check($sformatf("%s happened", what), n > 0);
    $display("  %-28s %0d", what, n);
  endtask

  bq_t   kq;
  word_t a0;

  initial begin
    for (int k = 0; k < B; k++) key[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("no key after reset", !key_valid && !enc_ready);

    kq = {};
    for (int k = 0; k < B; k++) kq.push_back(8'h00);
    load_key(kq);
    run(32'h0, 32'h0, 1'b1, 32'heedba521, 32'h6d8f4b15);

    kq = {8'h91, 8'h5f, 8'h46, 8'h19, 8'hbe, 8'h41, 8'hb2, 8'h51,
          8'h63, 8'h55, 8'ha5, 8'h01, 8'h10, 8'ha9, 8'hce, 8'h91};
    load_key(kq);
    run(32'heedba521, 32'h6d8f4b15, 1'b1, 32'hac13c0f7, 32'h52892b5b);

    // Round 1 with B = 3 entering and A = 30 leaving the A half.
    a0   = rotr(32'd30 - cur_s[2], 3) ^ 32'd3;
    run(a0 - cur_s[0], 32'd3 - cur_s[1]);

    for (int n = 0; n < 8; n++) begin
      kq = {};
      for (int k = 0; k < B; k++) kq.push_back(8'($urandom));
      load_key(kq);
      for (int m = 0; m < 3; m++) run($urandom, $urandom);
    end

    $display("mechanisms:");
    count("key expansion", n_keys);
    count("key reload", n_reload);
    count("block encryption", n_blocks);
    count("refused block request", n_refused);
    count("short path, A half (B<32)", n_short_b);
    count("long path, A half", n_long_b);
    count("short path, B half (A<32)", n_short_a);
    count("long path, B half", n_long_a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
