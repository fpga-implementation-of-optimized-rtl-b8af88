// tb_rc5_top_32_16_10: the encryptor built as RC5-32/16/10 (16 rounds,
// 10-byte key, 34-word table, 3-word key array whose last word is only
// half filled). Random keys and blocks are checked against the reference
// model, together with the key and block latencies.
module tb_rc5_top_32_16_10;
  import rc5_pkg::*;
  import rc5_ref_pkg::*;

  localparam int unsigned R = 16;
  localparam int unsigned B = 10;
  localparam int unsigned T = 2 * (R + 1);
  localparam int unsigned KEY_LAT = 2 + 3 * T;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       key_start = 1'b0, key_ready, key_valid;
  logic [7:0] key [B];
  logic       enc_start = 1'b0, enc_ready, done;
  word_t      pt_a = '0, pt_b = '0, ct_a, ct_b;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  rc5_top #(.ROUNDS(R), .KEY_BYTES(B)) dut (
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

  bq_t         kq;
  wq_t         s;
  w32_t        a, b, ea, eb;
  int unsigned nb, na, cyc;

  initial begin
    for (int k = 0; k < B; k++) key[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6; n++) begin
      kq = {};
      for (int k = 0; k < B; k++) kq.push_back(8'($urandom));
      s = expand(kq, R);
      @(negedge clk);
      for (int k = 0; k < B; k++) key[k] = kq[k];
      key_start = 1'b1;
      cyc = 0;
      do begin
        @(posedge clk);
        cyc++;
        @(negedge clk);
        key_start = 1'b0;
      end while (!key_valid);
      check($sformatf("key latency %0d want %0d", cyc, KEY_LAT), cyc == KEY_LAT);
      for (int m = 0; m < 3; m++) begin
        a = $urandom; b = $urandom;
        ea = a; eb = b;
        encrypt(ea, eb, s, R, nb, na);
        enc_start = 1'b1; pt_a = a; pt_b = b;
        cyc = 0;
        do begin
          @(posedge clk);
          cyc++;
          @(negedge clk);
          enc_start = 1'b0;
        end while (!done);
        check($sformatf("ciphertext %h %h want %h %h", ct_a, ct_b, ea, eb),
              ct_a == ea && ct_b == eb);
        check($sformatf("block latency %0d want %0d", cyc, enc_cycles(R, nb, na)),
              cyc == enc_cycles(R, nb, na));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
