// rc5_barrel_shifter: combinational 32-bit rotate left, dout = din <<< rot.
//
// This is the rotation unit of the RC5 datapath. rot ranges over 0..31, so
// every amount is a true rotation and no out-of-range case exists. The
// rotation is built as five cascaded stages that each rotate by 1, 2, 4, 8
// or 16 positions when the matching bit of rot is set; this gives the same
// function as a 32-way multiplexer that selects one of the 32 rotations
// (the form the design was described in) with log2(32) levels of 2:1 muxes.
//
// Interface: din (word to rotate), rot (amount, 5 bits), dout (result).
// Timing: purely combinational; the instantiating state machine registers
// the result.
module rc5_barrel_shifter
  import rc5_pkg::*;
(
  input  word_t din,
  input  rot_t  rot,
  output word_t dout
);

  word_t stage [LOGW+1];

  assign stage[0] = din;

  for (genvar s = 0; s < LOGW; s++) begin : g_stage
    localparam int unsigned SH = 1 << s;
    assign stage[s+1] = rot[s] ? {stage[s][W-1-SH:0], stage[s][W-1:W-SH]}
                               : stage[s];
  end

  assign dout = stage[LOGW];

endmodule
