// tb_flexible_filter: self-checking test of one Flexible Filter.
//
// Checks the BLT/BGE/BLTU/BGEU group filter (Match 0x00004063, Mask
// 0xFFFFBF80) against every branch funct3 and random instructions, an
// exact-instruction filter (ret = jalr x0, 0(x1)), the LOAD+STORE opcode
// group (opcode 0-00011), one filter per RV64I opcode group (LUI, AUIPC,
// JAL, JALR, BRANCH, LOAD, STORE, ALUI, ALU, FENCE, ECALL/EBREAK) against
// instructions of every group, and random match/mask pairs against a reference
// written as a per-bit loop.
module tb_flexible_filter;
  logic [31:0] instr, match_bits, mask_bits;
  logic        hit;
  int checks = 0, failures = 0;

  flexible_filter dut (.instr, .match_bits, .mask_bits, .hit);

  function automatic logic ref_hit(logic [31:0] i, logic [31:0] m, logic [31:0] k);
    for (int b = 0; b < 32; b++)
      if (!k[b] && (i[b] != m[b])) return 1'b0;
      else if (k[b] && m[b]) return 1'b0;   // masked bit is 0 after masking
    return 1'b1;
  endfunction

  task automatic check(logic [31:0] i, logic [31:0] m, logic [31:0] k, logic exp);
    instr = i; match_bits = m; mask_bits = k;
    #1;
    checks++;
    if (hit !== exp) begin
      failures++;
      $display("FAIL instr=%h match=%h mask=%h hit=%b exp=%b", i, m, k, hit, exp);
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
    logic [31:0] r, m, k;
    // Branch group: funct3 1xx filtered, 0xx not
    for (int f3 = 0; f3 < 8; f3++) begin
      r = $urandom;
      r[6:0] = 7'b1100011;
      r[14:12] = 3'(f3);
      check(r, 32'h0000_4063, 32'hFFFF_BF80, f3 >= 4);
    end
    // the example bltu a4,s7,... = 0x03776263
    check(32'h0377_6263, 32'h0000_4063, 32'hFFFF_BF80, 1'b1);
    // beq is not in the group
    check(32'h0377_0263, 32'h0000_4063, 32'hFFFF_BF80, 1'b0);
    // exact match of ret (0x00008067)
    check(32'h0000_8067, 32'h0000_8067, 32'h0000_0000, 1'b1);
    check(32'h0001_0067, 32'h0000_8067, 32'h0000_0000, 1'b0);
    // LOAD + STORE group: opcode 0-00011
    for (int n = 0; n < 50; n++) begin
      r = $urandom;
      r[6:0] = (n % 2) ? 7'b0000011 : 7'b0100011;
      check(r, 32'h0000_0003, 32'hFFFF_FFA0, 1'b1);
      r[4] = 1'b1;   // ALUI / ALU opcodes are outside the group
      check(r, 32'h0000_0003, 32'hFFFF_FFA0, 1'b0);
    end
    // the eleven RV64I opcode groups: one filter per group, each catching only its own
    begin
      logic [6:0] groups [11] = '{7'b0110111, 7'b0010111, 7'b1101111, 7'b1100111, 7'b1100011,
                                  7'b0000011, 7'b0100011, 7'b0010011, 7'b0110011, 7'b0001111,
                                  7'b1110011};
      for (int g = 0; g < 11; g++)
        for (int h = 0; h < 11; h++)
          for (int n = 0; n < 4; n++) begin
            r = $urandom;
            r[6:0] = groups[h];
            check(r, 32'(groups[g]), 32'hFFFF_FF80, g == h);
          end
    end
    // random configurations, with hits forced half of the time
    for (int n = 0; n < 2000; n++) begin
      k = $urandom & $urandom;
      m = $urandom & ~k;
      r = $urandom;
      if (n % 2) r = (r & k) | m;
      if (n % 7 == 0) m = m | (k & $urandom);   // 1 in a masked bit: never hits
      check(r, m, k, ref_hit(r, m, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
