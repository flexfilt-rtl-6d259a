// tb_flexfilt_unit: self-checking test of the execute-stage FlexFilt unit.
//
// Runs a random mix of FlexFilt custom instructions (SETMATCH, SETMASK,
// SETPRIV, WRIPR and the privileged read/load operations) and ordinary
// instructions from random domains and privilege levels. A reference model
// of the filter configuration and the IPR predicts, for every instruction,
// whether it is filtered, whether it is illegal, and the rd value of reads.
// Directed parts: the trusted-domain WRPKR scenario (allowed in domain 1,
// stopped in domain 0), sealing a filter against further changes, and a
// kernel-level filter set up through the CSR port.
module tb_flexfilt_unit;
  import flexfilt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ex_valid = 0, ex_fault = 0;
  logic [31:0] ex_instr = 0;
  logic [PADDR_W-1:0] ex_ppc = 0;
  logic [3:0] ex_ipkey = 0;
  priv_e cur_priv = PRV_U, csr_priv = PRV_M;
  logic [63:0] rs1_data = 0, rs2_data = 0, rd_data, csr_wdata = 0, csr_rdata;
  logic filtered, illegal, is_custom, rd_wen, csr_we = 0, csr_sel, csr_illegal;
  logic [11:0] csr_addr = 0;
  int checks = 0, failures = 0;
  int n_filtered = 0, n_exec = 0, n_bad = 0;

  // reference model
  logic [31:0] m_match [4], m_mask [4];
  logic [7:0]  m_priv [4];
  logic [63:0] m_ipr;
  logic        k_on;   // kernel filter 0 = wfi in [0, 0x1000) once configured

  flexfilt_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] cust(ff_op_e op);
    return {op, 5'd2, 5'd1, 3'b000, 5'd3, OPC_CUSTOM0};
  endfunction

  // one execute-stage instruction; compares against the model, then updates it
  task automatic step(logic [31:0] instr, logic [3:0] key, priv_e p,
                      logic [63:0] a, logic [63:0] b, logic [PADDR_W-1:0] pa = 'h8000_0000);
    logic e_filt, e_cust, e_bad, e_ill, e_wen;
    logic [63:0] e_rd;
    ff_op_e op;
    int f;
    @(negedge clk);
    ex_valid = 1; ex_instr = instr; ex_ipkey = key; cur_priv = p;
    rs1_data = a; rs2_data = b; ex_ppc = pa;
    #1;
    e_filt = 0;
    for (int i = 0; i < 4; i++)
      if (((instr & ~m_mask[i]) == m_match[i]) && m_ipr[4*key + i] && (m_priv[i][1:0] == p))
        e_filt = 1;
    if (k_on && p == PRV_S && pa < 'h1000 && instr == 32'h1050_0073) e_filt = 1;
    op = ff_op_e'(instr[31:25]);
    e_cust = (instr[6:0] == OPC_CUSTOM0) && (instr[14:12] == 0) &&
             (op inside {F7_SETMATCH, F7_SETMASK, F7_SETPRIV, F7_WRIPR, F7_RDMATCH,
                         F7_RDMASK, F7_RDPRIV, F7_RDIPR, F7_LDIPR});
    f = int'(b[1:0]);
    e_bad = 0;
    if (op inside {F7_RDMATCH, F7_RDMASK, F7_RDPRIV, F7_RDIPR, F7_LDIPR} && p == PRV_U) e_bad = 1;
    if (!(op inside {F7_RDIPR, F7_LDIPR}) && b >= 4) e_bad = 1;
    if (op == F7_WRIPR && a >= 16) e_bad = 1;
    if (op inside {F7_SETMATCH, F7_SETMASK, F7_SETPRIV} && p == PRV_U && m_priv[f][2]) e_bad = 1;
    if (op == F7_SETPRIV && a[1:0] > p) e_bad = 1;
    e_ill = e_filt || (e_cust && e_bad);
    e_wen = e_cust && !e_filt && !e_bad && (op inside {F7_RDMATCH, F7_RDMASK, F7_RDPRIV, F7_RDIPR});
    e_rd = '0;
    case (op)
      F7_RDMATCH: e_rd = 64'(m_match[f]);
      F7_RDMASK:  e_rd = 64'(m_mask[f]);
      F7_RDPRIV:  e_rd = 64'(m_priv[f]);
      F7_RDIPR:   e_rd = m_ipr;
      default: ;
    endcase
    checks++;
    if (filtered !== e_filt || illegal !== e_ill || is_custom !== e_cust || rd_wen !== e_wen ||
        (e_wen && rd_data !== e_rd)) begin
      failures++;
      $display("FAIL instr=%h key=%0d priv=%0d a=%h b=%h: filt %b/%b ill %b/%b cust %b/%b wen %b/%b rd %h/%h",
               instr, key, p, a, b, filtered, e_filt, illegal, e_ill, is_custom, e_cust,
               rd_wen, e_wen, rd_data, e_rd);
    end
    if (e_filt) n_filtered++;
    if (e_cust && e_bad && !e_filt) n_bad++;
    if (e_cust && !e_filt && !e_bad) begin
      n_exec++;
      case (op)
        F7_SETMATCH: m_match[f] = a[31:0];
        F7_SETMASK:  m_mask[f]  = a[31:0];
        F7_SETPRIV:  m_priv[f]  = a[7:0];
        F7_WRIPR:    m_ipr[4*a[3:0] + f] = 1'b1;
        F7_LDIPR:    m_ipr = a;
        default: ;
      endcase
    end
    @(posedge clk); #1;
    ex_valid = 0;
  endtask

  localparam logic [31:0] WRPKR = 32'h0000_502B;  // stand-in WRPKR: custom-1, funct3 5

  initial begin
    for (int i = 0; i < 4; i++) begin m_match[i] = '1; m_mask[i] = '1; m_priv[i] = 0; end
    m_ipr = 0; k_on = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // nothing filtered after reset
    step(WRPKR, 0, PRV_U, 0, 0);
    // trusted-domain scenario: filter 0 catches WRPKR (any registers), enabled for domain 0 only
    step(cust(F7_SETMATCH), 0, PRV_U, 64'(WRPKR & 32'h0000_707F), 0);
    step(cust(F7_SETMASK),  0, PRV_U, 64'(32'hFFFF_8F80), 0);
    step(cust(F7_SETPRIV),  0, PRV_U, 64'(PRV_U), 0);
    step(cust(F7_WRIPR),    0, PRV_U, 0, 0);
    step(WRPKR | 32'h00A0_0500, 0, PRV_U, 0, 0);   // untrusted domain 0: stopped
    step(WRPKR | 32'h00A0_0500, 1, PRV_U, 0, 0);   // trusted domain 1: runs
    step(WRPKR, 0, PRV_S, 0, 0);                   // supervisor: filter is for U only
    checks++;
    if (n_filtered != 1) begin failures++; $display("FAIL WRPKR scenario filtered %0d", n_filtered); end
    // seal filter 3 and try to change it from user mode, then from supervisor mode
    step(cust(F7_SETPRIV), 0, PRV_U, 64'h4, 3);
    step(cust(F7_SETMATCH), 0, PRV_U, 64'h1234, 3);       // illegal
    step(cust(F7_SETMATCH), 0, PRV_S, 64'h1234, 3);       // kernel restore allowed
    step(cust(F7_RDMATCH), 0, PRV_S, 0, 3);
    step(cust(F7_SETPRIV), 0, PRV_S, 64'h0, 3);
    // kernel-level filter 0: wfi in [0, 0x1000)
    @(negedge clk);
    csr_we = 1; csr_priv = PRV_M; csr_addr = CSR_KMATCH0; csr_wdata = 64'h1050_0073;
    @(negedge clk); csr_addr = CSR_KMASK0;  csr_wdata = 0;
    @(negedge clk); csr_addr = CSR_KBOUND0; csr_wdata = 64'h1000;
    @(negedge clk); csr_we = 0;
    k_on = 1;
    step(32'h1050_0073, 0, PRV_S, 0, 0, 'h800);    // stopped
    step(32'h1050_0073, 0, PRV_S, 0, 0, 'h1800);   // outside the range
    step(32'h1050_0073, 0, PRV_U, 0, 0, 'h800);    // not kernel level
    // random mix
    for (int n = 0; n < 4000; n++) begin
      logic [31:0] ins;
      logic [63:0] a, b;
      priv_e p;
      ff_op_e ops [9] = '{F7_SETMATCH, F7_SETMASK, F7_SETPRIV, F7_WRIPR, F7_RDMATCH,
                          F7_RDMASK, F7_RDPRIV, F7_RDIPR, F7_LDIPR};
      int sel;
      case ($urandom % 8) 0: p = PRV_S; 1: p = PRV_M; default: p = PRV_U; endcase
      a = {$urandom, $urandom};
      b = 64'($urandom % 5);
      sel = $urandom % 10;
      if (sel < 4) begin
        ins = cust(ops[$urandom % 9]);
        if (ff_op_e'(ins[31:25]) == F7_WRIPR) a = 64'($urandom % 17);
        if (ff_op_e'(ins[31:25]) == F7_SETPRIV) a = 64'($urandom % 4);
        if (ff_op_e'(ins[31:25]) == F7_LDIPR && ($urandom % 4) != 0) a = m_ipr;
        if (ff_op_e'(ins[31:25]) == F7_SETMASK) a = {$urandom, ($urandom | $urandom)};
        if (ff_op_e'(ins[31:25]) == F7_SETMATCH) a = 64'($urandom & ~m_mask[b[1:0]]);
      end else if (sel < 8) begin
        int f;
        f = $urandom % 4;
        ins = (m_match[f] | ($urandom & m_mask[f]));  // aimed at a configured filter
      end else begin
        ins = $urandom;
      end
      step(ins, 4'($urandom), p, a, b);
    end
    checks++;
    if (n_filtered < 20 || n_exec < 100 || n_bad < 20) begin
      failures++;
      $display("FAIL coverage filtered=%0d exec=%0d bad=%0d", n_filtered, n_exec, n_bad);
    end
    $display("coverage: filtered=%0d executed=%0d illegal_ops=%0d", n_filtered, n_exec, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
