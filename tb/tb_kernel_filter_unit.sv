// tb_kernel_filter_unit: self-checking test of the kernel-level filters.
//
// Configures the four dedicated filters and the two address ranges from
// machine mode, checks that writes from S- and U-mode are refused, reads the
// CSRs back, then sweeps instructions, privilege levels and physical
// addresses against a reference: a hit needs S-mode, an address in
// [base0,bound0) or [base1,bound1), and a filter match.
module tb_kernel_filter_unit;
  import flexfilt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic csr_we = 0;
  logic [11:0] csr_addr = 0;
  logic [63:0] csr_wdata = 0, csr_rdata;
  priv_e csr_priv = PRV_M, cur_priv = PRV_S;
  logic csr_sel, csr_illegal;
  logic [31:0] instr = 0;
  logic [PADDR_W-1:0] ppc = 0;
  logic hit;
  int checks = 0, failures = 0;

  logic [31:0] m_match [4], m_mask [4];
  logic [PADDR_W-1:0] m_base [2], m_bound [2];

  kernel_filter_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic csr_write(logic [11:0] a, logic [63:0] d, priv_e p, logic exp_illegal);
    @(negedge clk);
    csr_we = 1; csr_addr = a; csr_wdata = d; csr_priv = p;
    #1;
    checks++;
    if (csr_illegal !== exp_illegal) begin
      failures++; $display("FAIL csr_illegal=%b for priv %0d", csr_illegal, p);
    end
    @(posedge clk); #1;
    csr_we = 0; csr_priv = PRV_M;
  endtask

  task automatic csr_expect(logic [11:0] a, logic [63:0] exp);
    @(negedge clk);
    csr_addr = a; #1;
    checks++;
    if (!csr_sel || csr_rdata !== exp) begin
      failures++; $display("FAIL csr %h = %h exp %h", a, csr_rdata, exp);
    end
  endtask

  function automatic logic ref_hit(logic [31:0] i, logic [PADDR_W-1:0] pa, priv_e p);
    logic inr = 0, fh = 0;
    for (int r = 0; r < 2; r++) if (pa >= m_base[r] && pa < m_bound[r]) inr = 1;
    for (int f = 0; f < 4; f++) if ((i & ~m_mask[f]) == m_match[f]) fh = 1;
    return (p == PRV_S) && inr && fh;
  endfunction

  initial begin
    for (int f = 0; f < 4; f++) begin m_match[f] = '1; m_mask[f] = '1; end
    for (int r = 0; r < 2; r++) begin m_base[r] = '0; m_bound[r] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // after reset nothing is filtered
    @(negedge clk); instr = 32'h0000_0073; ppc = 'h1000; cur_priv = PRV_S; #1;
    checks++; if (hit) begin failures++; $display("FAIL hit after reset"); end
    // writes below machine mode are refused
    csr_write(CSR_KMATCH0, 64'h0000_000B, PRV_S, 1'b1);
    csr_write(CSR_KBASE0, 64'h0, PRV_U, 1'b1);
    csr_expect(CSR_KMATCH0, 64'hFFFF_FFFF);
    // filter 0: all custom-0 instructions; filter 1: csrrw to satp (0x180)
    m_match[0] = 32'h0000_000B; m_mask[0] = 32'hFFFF_FF80;
    m_match[1] = 32'h1800_1073; m_mask[1] = 32'h0000_0F80;
    m_match[2] = 32'h1050_0073; m_mask[2] = 32'h0000_0000;  // wfi
    // two ranges of kernel text with a hole (the allowed function) between
    m_base[0] = 'h8020_0000; m_bound[0] = 'h8020_4000;
    m_base[1] = 'h8020_5000; m_bound[1] = 'h8040_0000;
    for (int f = 0; f < 4; f++) begin
      csr_write(CSR_KMATCH0 + 12'(f), 64'(m_match[f]), PRV_M, 1'b0);
      csr_write(CSR_KMASK0 + 12'(f), 64'(m_mask[f]), PRV_M, 1'b0);
    end
    csr_write(CSR_KBASE0,  64'(m_base[0]),  PRV_M, 1'b0);
    csr_write(CSR_KBOUND0, 64'(m_bound[0]), PRV_M, 1'b0);
    csr_write(CSR_KBASE1,  64'(m_base[1]),  PRV_M, 1'b0);
    csr_write(CSR_KBOUND1, 64'(m_bound[1]), PRV_M, 1'b0);
    for (int f = 0; f < 4; f++) begin
      csr_expect(CSR_KMATCH0 + 12'(f), 64'(m_match[f]));
      csr_expect(CSR_KMASK0 + 12'(f), 64'(m_mask[f]));
    end
    csr_expect(CSR_KBOUND1, 64'(m_bound[1]));
    // directed: custom-0 inside range 0, in the hole, inside range 1
    begin
      logic [PADDR_W-1:0] pas [4] = '{'h8020_0000, 'h8020_4800, 'h8020_5000, 'h8040_0000};
      logic exps [4] = '{1'b1, 1'b0, 1'b1, 1'b0};
      for (int n = 0; n < 4; n++) begin
        @(negedge clk); instr = 32'h0020_800B; ppc = pas[n]; cur_priv = PRV_S; #1;
        checks++;
        if (hit !== exps[n]) begin failures++; $display("FAIL directed %0d hit=%b", n, hit); end
      end
    end
    // random sweep
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      case ($urandom % 4)
        0: instr = ($urandom & 32'hFFFF_FF80) | 32'h0B;
        1: instr = ($urandom & 32'h0000_0F80) | 32'h1800_1073;
        2: instr = 32'h1050_0073;
        default: instr = $urandom;
      endcase
      ppc = PADDR_W'('h801F_F000 + ($urandom % 'h0021_0000));
      case ($urandom % 3) 0: cur_priv = PRV_U; 1: cur_priv = PRV_S; default: cur_priv = PRV_M; endcase
      #1;
      checks++;
      if (hit !== ref_hit(instr, ppc, cur_priv)) begin
        failures++;
        $display("FAIL instr=%h pa=%h priv=%0d hit=%b", instr, ppc, cur_priv, hit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
