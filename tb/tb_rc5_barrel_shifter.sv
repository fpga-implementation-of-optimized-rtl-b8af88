// tb_rc5_barrel_shifter: checks the 32-bit rotator exhaustively over the
// rotate amount, for fixed patterns and random words, against a rotation
// computed from a doubled 64-bit word.
module tb_rc5_barrel_shifter;
  import rc5_pkg::*;

  word_t din, dout;
  rot_t  rot;
  int    checks = 0, failures = 0;

  rc5_barrel_shifter dut (.din(din), .rot(rot), .dout(dout));

  function automatic word_t expect_rot(word_t x, int unsigned n);
    logic [63:0] d;
    d = {x, x} << n;
    return d[63:32];
  endfunction

  task automatic check(word_t x, int unsigned n);
    din = x;
    rot = rot_t'(n);
    #1;
    checks++;
    if (dout !== expect_rot(x, n)) begin
      failures++;
      $display("FAIL din=%h rot=%0d got %h want %h", x, n, dout, expect_rot(x, n));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 32; n++) begin
      check(32'h0000_0001, n);
      check(32'h8000_0000, n);
      check(32'hb7e1_5163, n);
      for (int r = 0; r < 20; r++) check($urandom, n);
    end
    // Worked-example rotations of the key schedule (amount = low 5 bits).
    din = 32'hd850_eaae; rot = 5'h1d; #1; checks++;
    if (dout !== 32'hdb0a_1d55) begin failures++; $display("FAIL example 1"); end
    din = 32'hae27_fb8a; rot = 5'h0c; #1; checks++;
    if (dout !== 32'h7fb8_aae2) begin failures++; $display("FAIL example 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
