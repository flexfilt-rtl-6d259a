// tb_flexfilt_top: end-to-end test of the FlexFilt pipeline slice.
//
// Runs the top at its default sizes with behavioural models of the parts of
// the host core around it: a page table and walker that answers three cycles
// after a request, an instruction cache with a random 1-3 cycle latency that
// honours imem_kill, a register file, and trap handling that flushes the
// pipeline after an exception and resumes after the trapping instruction.
//
// The program follows the trusted-function scenario: WRPKR (here a custom-1
// instruction standing in for the memory-protection-key write) may only run
// in the trusted pages of domain 1. User code configures Flexible Filter 0
// with SETMATCH/SETMASK/SETPRIV and enables it for domain 0 with WRIPR;
// WRPKR then traps in domain 0 and runs in domain 1. Machine mode sets up a
// kernel-level filter for custom-0 instructions over two physical ranges;
// supervisor code then has the privileged FlexFilt reads stopped inside the
// ranges and executed outside them, reads back the configuration and
// reloads the IPR, after which user code sees the new domain policy.
//
// Every retired instruction is compared with a hand-written expectation
// (pc, exception, cause, filtered, rd value). The test also requires that
// each mechanism happened: I-TLB miss and fill, cache wait, queue full, stall,
// flush, user-level filter, kernel-level filter, fetch page fault, custom
// instruction executed, custom instruction refused, privileged read, IPR
// reload and privilege change. It checks the fetch-to-execute latency of
// four cycles on a hit. A final phase runs 300 random user instructions
// from the three user pages under random stalls, cache delays and the flushes
// that each filtered instruction causes.
module tb_flexfilt_top;
  import flexfilt_pkg::*;

  logic clk = 0, rst_n = 0;
  priv_e priv = PRV_U;
  logic flush = 0, sfence = 0, stall = 0;
  logic fetch_valid = 0, fetch_ready;
  logic [38:0] fetch_vaddr = 0;
  logic ptw_req_valid, ptw_resp_valid = 0;
  logic [26:0] ptw_req_vpn;
  logic [63:0] ptw_resp_pte = 0;
  logic imem_req_valid, imem_kill, imem_resp_valid = 0;
  logic [PADDR_W-1:0] imem_req_paddr;
  logic [31:0] imem_resp_instr = 0;
  logic [4:0] ex_rs1_idx, ex_rs2_idx, ex_out_rd_idx;
  logic [63:0] ex_rs1_data = 0, ex_rs2_data = 0;
  logic ex_out_valid, ex_out_exception, ex_out_filtered, ex_out_custom, ex_out_rd_wen;
  logic [63:0] ex_out_pc, ex_out_rd_data;
  logic [31:0] ex_out_instr;
  logic [3:0] ex_out_ipkey, ex_out_cause;
  logic csr_we = 0, csr_sel, csr_illegal;
  logic [11:0] csr_addr = 0;
  logic [63:0] csr_wdata = 0, csr_rdata;

  flexfilt_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  // mechanism counters
  int n_tlb_miss = 0, n_cache_wait = 0, n_queue_full = 0, n_stall = 0, n_flush = 0;
  int n_user_filt = 0, n_kern_filt = 0, n_fetch_fault = 0, n_custom_exec = 0;
  int n_custom_bad = 0, n_priv_read = 0, n_ipr_load = 0, n_priv_change = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- memory image ----------------
  localparam logic [31:0] NOP   = 32'h0000_0013;
  localparam logic [31:0] WRPKR = 32'h00A3_502B;   // custom-1, funct3 5
  function automatic logic [31:0] cust(ff_op_e op, int rd, int rs1, int rs2);
    return {op, 5'(rs2), 5'(rs1), 3'b000, 5'(rd), OPC_CUSTOM0};
  endfunction

  // pages: vpn -> {ppn, ipkey, X, U}
  logic [63:0] page_table [logic [26:0]];
  logic [31:0] pmem [logic [PADDR_W-1:0]];
  function automatic logic [63:0] mk_pte(logic [43:0] ppn, logic [3:0] key, logic x, logic u);
    logic [63:0] p = '0;
    p[57:54] = key; p[53:10] = ppn; p[0] = 1; p[1] = 1; p[3] = x; p[4] = u; p[6] = 1;
    return p;
  endfunction
  localparam logic [26:0] VA_A = 27'h10, VA_B = 27'h11, VA_C = 27'h12, VA_N = 27'h13;
  localparam logic [26:0] VA_K1 = 27'h20, VA_K2 = 27'h21, VA_K3 = 27'h22;
  function automatic logic [38:0] va(logic [26:0] vpn, int off);
    return {vpn, 12'(off)};
  endfunction
  function automatic logic [PADDR_W-1:0] pa_of(logic [38:0] v);
    return {page_table[v[38:12]][53:10], v[11:0]};
  endfunction

  logic [63:0] rf [32];

  // ---------------- program ----------------
  typedef struct {
    logic [38:0] va;
    logic        exc;
    logic [3:0]  cause;
    logic        filt;
    logic        wen;
    logic [63:0] rd;
  } step_t;
  step_t prog [$];

  task automatic put(logic [38:0] v, logic [31:0] ins, logic exc = 0, logic filt = 0,
                     logic [3:0] cause = CAUSE_ILLEGAL_INSTR, logic wen = 0, logic [63:0] rd = 0);
    step_t s;
    if (page_table[v[38:12]][3]) pmem[pa_of(v)] = ins;
    s.va = v; s.exc = exc; s.cause = cause; s.filt = filt; s.wen = wen; s.rd = rd;
    prog.push_back(s);
  endtask

  // ---------------- run one phase at privilege p ----------------
  int lat_start [logic [38:0]];
  int best_lat = 1000;   // shortest fetch-to-execute latency seen
  logic stall_on = 0;

  task automatic run(priv_e p);
    int fi = 0, ri = 0;
    int ptw_cnt = -1;
    logic [26:0] ptw_vpn = 0;
    int ic_cnt = -1;
    logic [PADDR_W-1:0] ic_pa = 0;
    logic flush_next = 0;
    if (priv != p) n_priv_change++;
    priv = p;
    while (ri < prog.size()) begin
      @(negedge clk);
      cycle++;
      flush = flush_next; flush_next = 0;
      if (flush) n_flush++;
      stall = stall_on && ($urandom % 4 != 0);
      if (stall) n_stall++;
      fetch_valid = fi < prog.size();
      fetch_vaddr = fetch_valid ? prog[fi].va : '0;
      ptw_resp_valid = (ptw_cnt == 0);
      ptw_resp_pte = page_table[ptw_vpn];
      imem_resp_valid = (ic_cnt == 0);
      imem_resp_instr = pmem.exists(ic_pa) ? pmem[ic_pa] : NOP;
      #1;
      ex_rs1_data = rf[ex_rs1_idx];
      ex_rs2_data = rf[ex_rs2_idx];
      #1;
      if (dut.u_iq.cnt_q == 3'(dut.IQ_DEPTH)) n_queue_full++;
      if (dut.s1_valid_q && !dut.s1_have_q && !dut.s1_pkt_q.fault && !imem_resp_valid) n_cache_wait++;
      // walker and cache models
      if (ptw_cnt >= 0) ptw_cnt--;
      if (ptw_req_valid) begin ptw_cnt = 2; ptw_vpn = ptw_req_vpn; n_tlb_miss++; end
      if (ic_cnt >= 0) ic_cnt--;
      if (imem_kill) ic_cnt = -1;
      if (imem_req_valid) begin
        ic_cnt = stall_on ? (($urandom % 4 == 0) ? 2 : 0) : int'($urandom % 3);
        ic_pa = imem_req_paddr;
        checks++;
        if (imem_req_paddr !== pa_of(fetch_vaddr)) begin
          failures++; $display("FAIL translation %h -> %h", fetch_vaddr, imem_req_paddr);
        end
      end
      if (fetch_ready) begin
        if (!stall_on) lat_start[fetch_vaddr] = cycle;
        fi++;
      end
      // retirement
      if (ex_out_valid) begin
        step_t e = prog[ri];
        checks++;
        if (ex_out_pc[38:0] !== e.va || ex_out_exception !== e.exc ||
            (e.exc && ex_out_cause !== e.cause) || ex_out_filtered !== e.filt ||
            ex_out_rd_wen !== e.wen || (e.wen && ex_out_rd_data !== e.rd) ||
            ex_out_ipkey !== page_table[e.va[38:12]][57:54]) begin
          failures++;
          $display("FAIL step %0d pc=%h exp %h: exc %b/%b cause %0d/%0d filt %b/%b wen %b/%b rd %h/%h",
                   ri, ex_out_pc, e.va, ex_out_exception, e.exc, ex_out_cause, e.cause,
                   ex_out_filtered, e.filt, ex_out_rd_wen, e.wen, ex_out_rd_data, e.rd);
        end
        if (!stall_on && lat_start.exists(e.va) && !e.exc && !ex_out_custom) begin
          checks++;
          if (cycle - lat_start[e.va] < 4) begin
            failures++; $display("FAIL latency %0d for %h", cycle - lat_start[e.va], e.va);
          end
          if (cycle - lat_start[e.va] < best_lat) best_lat = cycle - lat_start[e.va];
        end
        if (ex_out_filtered) begin
          if (p == PRV_S) n_kern_filt++; else n_user_filt++;
        end
        if (ex_out_exception && ex_out_cause == CAUSE_FETCH_PAGE_FAULT) n_fetch_fault++;
        if (ex_out_custom && !ex_out_exception) n_custom_exec++;
        if (ex_out_custom && ex_out_exception && !ex_out_filtered) n_custom_bad++;
        if (ex_out_rd_wen) begin n_priv_read++; rf[ex_out_rd_idx] = ex_out_rd_data; end
        if (ex_out_custom && !ex_out_exception && ex_out_instr[31:25] == F7_LDIPR) n_ipr_load++;
        ri++;
        if (ex_out_exception) begin flush_next = 1; fi = ri; end
      end
      @(posedge clk);
    end
    // drain
    @(negedge clk); flush = 1; n_flush++;
    @(posedge clk);
    @(negedge clk); flush = 0; stall = 0; fetch_valid = 0;
    ptw_resp_valid = 0; imem_resp_valid = 0;
    prog.delete();
  endtask

  task automatic mcsr(logic [11:0] a, logic [63:0] d);
    @(negedge clk);
    csr_we = 1; csr_addr = a; csr_wdata = d;
    #1;
    checks++;
    if (csr_illegal !== 1'b0 || !csr_sel) begin failures++; $display("FAIL csr write %h", a); end
    @(posedge clk); #1; csr_we = 0;
  endtask


  initial begin
    page_table[VA_A]  = mk_pte(44'h80010, 4'd0, 1, 1);
    page_table[VA_B]  = mk_pte(44'h80011, 4'd1, 1, 1);
    page_table[VA_C]  = mk_pte(44'h80022, 4'd1, 1, 1);
    page_table[VA_N]  = mk_pte(44'h80013, 4'd0, 0, 1);
    page_table[VA_K1] = mk_pte(44'h90000, 4'd0, 1, 0);
    page_table[VA_K2] = mk_pte(44'h90001, 4'd0, 1, 0);
    page_table[VA_K3] = mk_pte(44'h90002, 4'd0, 1, 0);
    for (int i = 0; i < 32; i++) rf[i] = '0;
    rf[1] = 64'h0000_502B;            // Match: custom-1 opcode, funct3 5
    rf[2] = 0;                        // filter index 0
    rf[3] = 64'hFFFF_8F80;            // Mask: registers and funct7 are don't cares
    rf[4] = 64'(PRV_U);               // privilege level of the filter
    rf[5] = 0;                        // domain 0
    rf[7] = 16;                       // no such domain
    rf[10] = 64'h10;                  // IPR image: filter 0 for domain 1 only

    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- phase 1: user mode, configure and use the trusted domain ----
    put(va(VA_A, 'h000), NOP);
    put(va(VA_A, 'h004), cust(F7_SETMATCH, 0, 1, 2));
    put(va(VA_A, 'h008), cust(F7_SETMASK,  0, 3, 2));
    put(va(VA_A, 'h00C), cust(F7_SETPRIV,  0, 4, 2));
    put(va(VA_A, 'h010), cust(F7_WRIPR,    0, 5, 2));
    put(va(VA_A, 'h014), cust(F7_WRIPR,    0, 7, 2), 1);        // bad domain
    put(va(VA_A, 'h018), cust(F7_RDIPR,    8, 0, 0), 1);        // privileged op in U
    put(va(VA_B, 'h000), WRPKR);                                // good_code1: runs
    put(va(VA_B, 'h004), NOP);
    put(va(VA_A, 'h01C), WRPKR, 1, 1);                          // untrusted: stopped
    put(va(VA_A, 'h020), NOP);
    put(va(VA_C, 'h000), WRPKR);                                // good_code2: runs
    put(va(VA_N, 'h000), NOP, 1, 0, CAUSE_FETCH_PAGE_FAULT);    // not executable
    put(va(VA_A, 'h024), WRPKR | 32'h0100_0000, 1, 1);          // other registers: stopped
    for (int i = 0; i < 8; i++) put(va(VA_A, 'h100 + 4*i), NOP);
    run(PRV_U);
    // ---- phase 1b: same code with back-pressure from the core ----
    stall_on = 1;
    for (int i = 0; i < 24; i++) put(va(i % 2 ? VA_B : VA_A, 'h200 + 4*i), i % 2 ? WRPKR : NOP);
    put(va(VA_A, 'h300), WRPKR, 1, 1);
    put(va(VA_B, 'h300), WRPKR);
    run(PRV_U);
    stall_on = 0;

    // ---- phase 2: machine mode configures the kernel-level filter ----
    priv = PRV_M; n_priv_change++;
    mcsr(CSR_KMATCH0, 64'h0000_000B);                 // every custom-0 instruction
    mcsr(CSR_KMASK0,  64'hFFFF_FF80);
    mcsr(CSR_KBASE0,  64'h9000_0000);                 // K1 page
    mcsr(CSR_KBOUND0, 64'h9000_1000);
    mcsr(CSR_KBASE1,  64'h9000_2000);                 // K3 page
    mcsr(CSR_KBOUND1, 64'h9000_3000);
    @(negedge clk); csr_addr = CSR_KBOUND1; #1;
    checks++;
    if (csr_rdata !== 64'h9000_3000) begin failures++; $display("FAIL csr readback"); end

    // ---- phase 3: supervisor mode ----
    put(va(VA_K1, 'h000), cust(F7_RDIPR, 8, 0, 0), 1, 1);       // inside range 0: stopped
    put(va(VA_K2, 'h000), cust(F7_RDIPR, 8, 0, 0), 0, 0, CAUSE_ILLEGAL_INSTR, 1, 64'h1);
    put(va(VA_K2, 'h004), cust(F7_RDMATCH, 9, 0, 2), 0, 0, CAUSE_ILLEGAL_INSTR, 1, 64'h502B);
    put(va(VA_K2, 'h008), cust(F7_RDMASK, 11, 0, 2), 0, 0, CAUSE_ILLEGAL_INSTR, 1, 64'hFFFF_8F80);
    put(va(VA_K3, 'h000), cust(F7_RDMASK, 11, 0, 2), 1, 1);     // inside range 1: stopped
    put(va(VA_K1, 'h004), WRPKR);                               // user filter does not apply in S
    put(va(VA_K2, 'h00C), cust(F7_LDIPR, 0, 10, 0));            // IPR <= 0x10
    put(va(VA_K2, 'h010), cust(F7_RDIPR, 12, 0, 0), 0, 0, CAUSE_ILLEGAL_INSTR, 1, 64'h10);
    put(va(VA_A, 'h000), NOP, 1, 0, CAUSE_FETCH_PAGE_FAULT);    // user page from S
    run(PRV_S);

    // ---- phase 4: user mode under the reloaded policy ----
    put(va(VA_A, 'h400), WRPKR);                                // domain 0 now free
    put(va(VA_B, 'h400), WRPKR, 1, 1);                          // domain 1 now filtered
    put(va(VA_A, 'h404), NOP);
    run(PRV_U);

    // ---- phase 5: random user code across the three pages, with stalls ----
    stall_on = 1;
    for (int i = 0; i < 300; i++) begin
      logic [26:0] pg;
      logic [31:0] ins;
      logic hitw;
      int unsigned r;
      r = $urandom;                // one draw for both choices
      case (r % 3) 0: pg = VA_A; 1: pg = VA_B; default: pg = VA_C; endcase
      case ((r / 3) % 3)
        0: ins = (WRPKR & 32'h0000_707F) | ($urandom & 32'hFFFF_8F80);   // any WRPKR
        1: ins = NOP;
        default: begin
          ins = $urandom;
          if (ins[6:0] == OPC_CUSTOM0) ins[6:0] = 7'b0110011;
        end
      endcase
      // IPR is now 0x10: filter 0 (WRPKR, U-level) is enabled for domain 1 only
      hitw = ((ins & ~32'hFFFF_8F80) == 32'h0000_502B) && page_table[pg][57:54] == 4'd1;
      put(va(pg, 'h500 + 4*i), ins, hitw, hitw);
    end
    run(PRV_U);
    stall_on = 0;

    // fetch-to-execute latency: four cycles when the cache answers at once
    checks++;
    if (best_lat != 4) begin failures++; $display("FAIL best latency %0d", best_lat); end
    // mechanisms
    begin
      string names [13] = '{"tlb_miss", "cache_wait", "queue_full", "stall", "flush", "user_filter",
                            "kernel_filter", "fetch_fault", "custom_exec", "custom_refused",
                            "privileged_read", "ipr_load", "priv_change"};
      int counts [13];
      counts = '{n_tlb_miss, n_cache_wait, n_queue_full, n_stall, n_flush, n_user_filt,
                 n_kern_filt, n_fetch_fault, n_custom_exec, n_custom_bad, n_priv_read,
                 n_ipr_load, n_priv_change};
      for (int i = 0; i < 13; i++) begin
        $display("mechanism %-16s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", names[i]); end
      end
      checks++;
      if (n_user_filt < 4 || n_kern_filt != 2) begin
        failures++; $display("FAIL filtered counts user=%0d kernel=%0d", n_user_filt, n_kern_filt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
