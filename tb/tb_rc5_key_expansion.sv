// tb_rc5_key_expansion: self-checking test of the RC5-32/12/16 key schedule.
//
// Checks, for the worked-example key 915f4619be41b2516355a50110a9ce91:
//  - the initial table (P32/Q32 progression: S[0] = b7e15163,
//    S[1] = 5618cb1c, S[24] = 8d14babb, S[25] = 2b4c3474) one cycle after
//    the setup step;
//  - the first four mixing results S[0..3] = bf0a8b1d 816b9c77 aba46177
//    b4312645;
//  - the final table against the reference key schedule;
// and for the all-zero key and random keys the final table against the
// reference. Also checks key_valid/ready and the 80-cycle latency.
module tb_rc5_key_expansion;
  import rc5_pkg::*;
  import rc5_ref_pkg::*;

  localparam int unsigned R = DEFAULT_ROUNDS;
  localparam int unsigned B = DEFAULT_KEY_BYTES;
  localparam int unsigned T = 2 * (R + 1);
  localparam int unsigned LAT = 2 + 3 * T;

  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0, ready, key_valid;
  logic [7:0] key [B];
  word_t      s_tab [T];
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  rc5_key_expansion dut (
    .clk(clk), .rst_n(rst_n), .start(start), .ready(ready), .key(key),
    .key_valid(key_valid), .s_tab(s_tab)
  );

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic run(bq_t kq, logic example);
    wq_t         s;
    int unsigned cyc;
    s = expand(kq, R);
    @(negedge clk);
    check("ready before start", ready);
    for (int k = 0; k < B; k++) key[k] = kq[k];
    start = 1'b1;
    @(posedge clk);
    cyc = 1;
    @(negedge clk);
    start = 1'b0;
    for (int k = 0; k < B; k++) key[k] = ~kq[k];   // sampled only at start
    check("key_valid low while expanding", !key_valid);
    check("ready low while expanding", !ready);
    while (!key_valid) begin
      @(posedge clk);
      cyc++;
      @(negedge clk);
      if (example && cyc == 2) begin
        check("initial S[0]",  s_tab[0]  == 32'hb7e15163);
        check("initial S[1]",  s_tab[1]  == 32'h5618cb1c);
        check("initial S[24]", s_tab[24] == 32'h8d14babb);
        check("initial S[25]", s_tab[25] == 32'h2b4c3474);
      end
      if (example && cyc == 6) begin
        check("mix S[0]", s_tab[0] == 32'hbf0a8b1d);
        check("mix S[1]", s_tab[1] == 32'h816b9c77);
        check("mix S[2]", s_tab[2] == 32'haba46177);
        check("mix S[3]", s_tab[3] == 32'hb4312645);
      end
    end
    check($sformatf("latency %0d want %0d", cyc, LAT), cyc == LAT);
    for (int k = 0; k < T; k++)
      check($sformatf("S[%0d] %h want %h", k, s_tab[k], s[k]), s_tab[k] == s[k]);
    @(negedge clk);
    check("ready after expansion", ready && key_valid);
  endtask

  bq_t kq;

  initial begin
    for (int k = 0; k < B; k++) key[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("no valid key after reset", !key_valid);

    kq = {8'h91, 8'h5f, 8'h46, 8'h19, 8'hbe, 8'h41, 8'hb2, 8'h51,
          8'h63, 8'h55, 8'ha5, 8'h01, 8'h10, 8'ha9, 8'hce, 8'h91};
    run(kq, 1'b1);
    check("example S[25] (last word written)", s_tab[25] == 32'h30726d5a);

    kq = {};
    for (int k = 0; k < B; k++) kq.push_back(8'h00);
    run(kq, 1'b0);

    for (int n = 0; n < 10; n++) begin
      kq = {};
      for (int k = 0; k < B; k++) kq.push_back(8'($urandom));
      run(kq, 1'b0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
