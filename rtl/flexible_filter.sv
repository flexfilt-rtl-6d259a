// flexible_filter: one FlexFilt Flexible Filter.
//
// A bit-granular match/mask comparator. Every instruction bit whose Mask bit
// is 1 is a don't care and is blocked (forced to 0); the remaining bits pass
// through and the result is compared with Match. Equality raises `hit`,
// meaning the instruction belongs to the filtered group. With the Match of a
// filter cleared in the masked positions, one filter can catch a single
// instruction, a subset (e.g. BLT/BGE/BLTU/BGEU: Match 0x00004063, Mask
// 0xFFFFBF80) or a whole opcode group.
//
// The masking and comparison follow the design description literally: the
// masked instruction is compared with the full Match word, so a Match with a
// 1 in a masked position never hits. Implementations use that to disable a
// filter (Match = Mask = all ones is the reset state elsewhere in FlexFilt).
//
// Purely combinational, no clock; the result is available in the same cycle
// as the instruction.
module flexible_filter #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] instr,
  input  logic [W-1:0] match_bits,
  input  logic [W-1:0] mask_bits,
  output logic         hit
);
  logic [W-1:0] passed;

  always_comb begin
    passed = instr & ~mask_bits;       // mask control logic
    hit    = (passed == match_bits);   // comparator
  end
endmodule
