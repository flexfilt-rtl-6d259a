// flexfilt_top: the FlexFilt path through an in-order pipeline.
//
// FlexFilt stops chosen instructions in chosen code pages. Each executable
// page carries a 4-bit instruction protection key (ipkey) in its page table
// entry; pages with the same key form one of 16 instruction domains. Four
// shared Match/Mask filters recognise instructions, and the 64-bit IPR says
// which filters apply to which domain. This module carries the ipkey from
// address translation to the execute stage, where the check is made:
//
//   fetch   : the I-TLB translates the fetch address and supplies the ipkey;
//             a miss asks the page table walker (ports ptw_*) and the entry
//             is filled from the PTE it returns. The physical address goes to
//             the instruction cache (ports imem_*); the ipkey, pc and physical
//             pc wait in the fetch register until the instruction returns.
//   queue   : instruction and ipkey enter the instruction queue together.
//   decode  : a pipeline register; the core's own decoder works in parallel
//             and is not part of this module.
//   execute : flexfilt_unit checks the instruction against the filters for
//             its domain and privilege level, and the kernel-level filters,
//             and executes FlexFilt's own custom instructions.
//
// The page table walker, the instruction cache arrays, the register file,
// the CSR file and the trap logic belong to the host core; they connect
// through ports. The core supplies the privilege level, register operands
// (combinationally, for the source registers named by ex_rs1_idx and
// ex_rs2_idx), a stall that holds decode and execute, and a flush that
// empties fetch, queue, decode and execute after a trap or redirect.
//
// Timing: a fetch accepted in cycle t issues its cache request in cycle t;
// the response may come in t+1 or later. A flush while the access is
// outstanding raises imem_kill, after which the cache must not answer it.
// With an always-hitting cache and no stalls, an instruction fetched in
// cycle t is in the queue from t+2, in decode at t+3 and reported by the
// execute stage at t+4. The filter
// check itself adds no cycle. One cache access is outstanding at a time,
// and a new one may start in the cycle the previous one returns, so fetch
// sustains one instruction per cycle.
//
// From the design description: the I-TLB ipkey field, the ipkey travelling
// with the instruction through cache, queue, decode and execute, the check
// in the execute stage and the illegal-instruction exception. This
// implementation's choices: the handshakes on every port, queue depth, TLB
// size and replacement, and a single outstanding fetch.
module flexfilt_top
  import flexfilt_pkg::*;
#(
  parameter int unsigned TLB_ENTRIES = 32,
  parameter int unsigned IQ_DEPTH    = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  priv_e              priv,          // current privilege (mstatus)
  input  logic               flush,         // trap / redirect
  input  logic               sfence,        // flush the I-TLB
  input  logic               stall,         // hold decode and execute
  // fetch address stream
  input  logic               fetch_valid,
  input  logic [38:0]        fetch_vaddr,
  output logic               fetch_ready,
  // page table walker
  output logic               ptw_req_valid,
  output logic [26:0]        ptw_req_vpn,
  input  logic               ptw_resp_valid,
  input  logic [63:0]        ptw_resp_pte,
  // instruction cache
  output logic               imem_req_valid,
  output logic [PADDR_W-1:0] imem_req_paddr,
  output logic               imem_kill,     // drop the outstanding access
  input  logic               imem_resp_valid,
  input  logic [31:0]        imem_resp_instr,
  // register operands for the execute stage
  output logic [4:0]         ex_rs1_idx,
  output logic [4:0]         ex_rs2_idx,
  input  logic [XLEN-1:0]    ex_rs1_data,
  input  logic [XLEN-1:0]    ex_rs2_data,
  // execute-stage result
  output logic               ex_out_valid,
  output logic [XLEN-1:0]    ex_out_pc,
  output logic [31:0]        ex_out_instr,
  output logic [IPKEY_W-1:0] ex_out_ipkey,
  output logic               ex_out_exception,
  output logic [3:0]         ex_out_cause,
  output logic               ex_out_filtered,
  output logic               ex_out_custom,   // a FlexFilt custom instruction executed or trapped
  output logic               ex_out_rd_wen,
  output logic [4:0]         ex_out_rd_idx,
  output logic [XLEN-1:0]    ex_out_rd_data,
  // machine-mode CSR port of the kernel-level filters
  input  logic               csr_we,
  input  logic [11:0]        csr_addr,
  input  logic [XLEN-1:0]    csr_wdata,
  output logic [XLEN-1:0]    csr_rdata,
  output logic               csr_sel,
  output logic               csr_illegal
);
  // ---------------- fetch ----------------
  logic               tlb_hit, tlb_fault;
  logic [PADDR_W-1:0] tlb_paddr;
  logic [IPKEY_W-1:0] tlb_ipkey;
  logic               miss_q;
  logic [26:0]        miss_vpn_q;

  logic               s1_valid_q, s1_have_q;
  fetch_pkt_t         s1_pkt_q;
  logic               s1_done, s1_free, accept;

  logic               iq_enq_ready, iq_deq_valid, iq_deq_ready;
  fetch_pkt_t         iq_enq_pkt, iq_deq_pkt;

  itlb #(.ENTRIES(TLB_ENTRIES)) u_itlb (
    .clk, .rst_n,
    .flush        (sfence),
    .lookup_vaddr (fetch_vaddr),
    .priv         (priv),
    .hit          (tlb_hit),
    .fault        (tlb_fault),
    .paddr        (tlb_paddr),
    .ipkey        (tlb_ipkey),
    .fill_valid   (ptw_resp_valid && miss_q),
    .fill_vpn     (miss_vpn_q),
    .fill_pte     (ptw_resp_pte)
  );

  always_comb begin
    // the fetch register completes when its instruction (or fault) is known
    // and the queue takes it
    s1_done  = s1_valid_q && (s1_pkt_q.fault || s1_have_q || imem_resp_valid) && iq_enq_ready;
    s1_free  = !s1_valid_q || s1_done;
    accept   = fetch_valid && tlb_hit && s1_free && !flush;
    fetch_ready = accept;

    imem_req_valid = accept && !tlb_fault;
    imem_req_paddr = tlb_paddr;
    imem_kill      = flush && s1_valid_q && !s1_have_q && !s1_pkt_q.fault;

    ptw_req_valid  = fetch_valid && !tlb_hit && !miss_q && !flush;
    ptw_req_vpn    = fetch_vaddr[38:12];

    iq_enq_pkt       = s1_pkt_q;
    if (!s1_have_q && !s1_pkt_q.fault) iq_enq_pkt.instr = imem_resp_instr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      miss_q     <= 1'b0;
      miss_vpn_q <= '0;
    end else if (ptw_req_valid) begin
      miss_q     <= 1'b1;
      miss_vpn_q <= ptw_req_vpn;
    end else if (ptw_resp_valid) begin
      miss_q     <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid_q <= 1'b0;
      s1_have_q  <= 1'b0;
      s1_pkt_q   <= '0;
    end else if (flush) begin
      s1_valid_q <= 1'b0;
      s1_have_q  <= 1'b0;
    end else if (accept) begin
      s1_valid_q      <= 1'b1;
      s1_have_q       <= 1'b0;
      s1_pkt_q.instr  <= '0;
      s1_pkt_q.pc     <= XLEN'(signed'(fetch_vaddr));
      s1_pkt_q.ppc    <= tlb_paddr;
      s1_pkt_q.ipkey  <= tlb_ipkey;
      s1_pkt_q.fault  <= tlb_fault;
    end else if (s1_done) begin
      s1_valid_q <= 1'b0;
      s1_have_q  <= 1'b0;
    end else if (s1_valid_q && !s1_have_q && imem_resp_valid) begin
      // queue full: hold the returned instruction
      s1_have_q      <= 1'b1;
      s1_pkt_q.instr <= imem_resp_instr;
    end
  end

  // ---------------- instruction queue ----------------
  inst_queue #(.DEPTH(IQ_DEPTH)) u_iq (
    .clk, .rst_n,
    .flush     (flush),
    .enq_valid (s1_valid_q && (s1_pkt_q.fault || s1_have_q || imem_resp_valid)),
    .enq_ready (iq_enq_ready),
    .enq_pkt   (iq_enq_pkt),
    .deq_valid (iq_deq_valid),
    .deq_ready (iq_deq_ready),
    .deq_pkt   (iq_deq_pkt),
    .count     ()
  );

  // ---------------- decode and execute registers ----------------
  logic       d_valid_q, e_valid_q;
  fetch_pkt_t d_pkt_q, e_pkt_q;

  assign iq_deq_ready = !stall && !flush;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid_q <= 1'b0;
      e_valid_q <= 1'b0;
      d_pkt_q   <= '0;
      e_pkt_q   <= '0;
    end else if (flush) begin
      d_valid_q <= 1'b0;
      e_valid_q <= 1'b0;
    end else if (!stall) begin
      d_valid_q <= iq_deq_valid;
      d_pkt_q   <= iq_deq_pkt;
      e_valid_q <= d_valid_q;
      e_pkt_q   <= d_pkt_q;
    end
  end

  // ---------------- FlexFilt check ----------------
  logic ff_filtered, ff_illegal, ff_custom, ff_rd_wen;
  logic [XLEN-1:0] ff_rd_data;
  logic e_fire;

  assign e_fire     = e_valid_q && !stall && !flush;
  assign ex_rs1_idx = e_pkt_q.instr[19:15];
  assign ex_rs2_idx = e_pkt_q.instr[24:20];

  flexfilt_unit u_ff (
    .clk, .rst_n,
    .ex_valid  (e_fire),
    .ex_instr  (e_pkt_q.instr),
    .ex_ppc    (e_pkt_q.ppc),
    .ex_ipkey  (e_pkt_q.ipkey),
    .ex_fault  (e_pkt_q.fault),
    .cur_priv  (priv),
    .rs1_data  (ex_rs1_data),
    .rs2_data  (ex_rs2_data),
    .filtered  (ff_filtered),
    .illegal   (ff_illegal),
    .is_custom (ff_custom),
    .rd_wen    (ff_rd_wen),
    .rd_data   (ff_rd_data),
    .csr_we, .csr_addr, .csr_wdata,
    .csr_priv  (priv),
    .csr_rdata, .csr_sel, .csr_illegal
  );

  always_comb begin
    ex_out_valid     = e_fire;
    ex_out_pc        = e_pkt_q.pc;
    ex_out_instr     = e_pkt_q.instr;
    ex_out_ipkey     = e_pkt_q.ipkey;
    ex_out_filtered  = ff_filtered;
    ex_out_custom    = ff_custom;
    ex_out_exception = e_fire && (e_pkt_q.fault || ff_illegal);
    ex_out_cause     = e_pkt_q.fault ? CAUSE_FETCH_PAGE_FAULT : CAUSE_ILLEGAL_INSTR;
    ex_out_rd_wen    = ff_rd_wen;
    ex_out_rd_idx    = e_pkt_q.instr[11:7];
    ex_out_rd_data   = ff_rd_data;
  end

  // a cache response only arrives for an outstanding request
  assert property (@(posedge clk) disable iff (!rst_n)
                   imem_resp_valid |-> (s1_valid_q && !s1_have_q && !s1_pkt_q.fault));
endmodule
