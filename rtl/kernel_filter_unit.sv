// kernel_filter_unit: FlexFilt's kernel-level instruction filters.
//
// Four dedicated Flexible Filters inspect supervisor-mode instructions only,
// and only while the instruction's physical address lies inside one of two
// address ranges, each held in a pair of CSRs (base inclusive, bound
// exclusive). With two ranges a kernel can cover its text on both sides of a
// function, such as the context-switch routine, that must stay allowed.
// `hit` is high when the instruction in the execute stage must be turned into
// an illegal-instruction exception.
//
// All registers are machine-mode CSRs: a write is accepted only when
// csr_priv is M; a write from a lower level is refused and flagged with
// csr_illegal so the core can trap. Reads return the register's contents.
// Reset puts every filter in the never-matching state (Match = Mask = all
// ones) and empties both ranges (base = bound = 0).
//
// From the design description: four dedicated filters, supervisor-level
// scope, physical address ranges held in two pairs of CSRs, machine-mode-only
// configuration. This implementation's choices: the CSR addresses (see
// flexfilt_pkg), base/bound semantics of a pair, and the union of the two
// ranges as the filtered region.
//
// Timing: filter check is combinational; CSR writes take effect next cycle.
module kernel_filter_unit
  import flexfilt_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // machine-mode CSR port
  input  logic               csr_we,
  input  logic [11:0]        csr_addr,
  input  logic [XLEN-1:0]    csr_wdata,
  input  priv_e              csr_priv,
  output logic [XLEN-1:0]    csr_rdata,
  output logic               csr_sel,      // csr_addr names one of these CSRs
  output logic               csr_illegal,  // write attempted below M-mode
  // execute-stage check
  input  logic [31:0]        instr,
  input  logic [PADDR_W-1:0] ppc,
  input  priv_e              cur_priv,
  output logic               hit
);
  logic [NUM_KFILTERS-1:0][31:0]      kmatch_q, kmask_q;
  logic [NUM_KRANGES-1:0][PADDR_W-1:0] kbase_q, kbound_q;
  logic [NUM_KFILTERS-1:0]            fhit;
  logic                               in_range;

  // CSR decode
  logic        sel_match, sel_mask, sel_range;
  logic [1:0]  fidx;
  logic        ridx, rbound;
  always_comb begin
    sel_match = (csr_addr >= CSR_KMATCH0) && (csr_addr < CSR_KMATCH0 + 12'(NUM_KFILTERS));
    sel_mask  = (csr_addr >= CSR_KMASK0)  && (csr_addr < CSR_KMASK0  + 12'(NUM_KFILTERS));
    sel_range = (csr_addr >= CSR_KBASE0)  && (csr_addr < CSR_KBASE0  + 12'(2*NUM_KRANGES));
    fidx      = csr_addr[1:0];
    ridx      = csr_addr[1];
    rbound    = csr_addr[0];
    csr_sel   = sel_match | sel_mask | sel_range;
    csr_illegal = csr_we && csr_sel && (csr_priv != PRV_M);
    csr_rdata = '0;
    if (sel_match)      csr_rdata = XLEN'(kmatch_q[fidx]);
    else if (sel_mask)  csr_rdata = XLEN'(kmask_q[fidx]);
    else if (sel_range) csr_rdata = XLEN'(rbound ? kbound_q[ridx] : kbase_q[ridx]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kmatch_q <= '1;
      kmask_q  <= '1;
      kbase_q  <= '0;
      kbound_q <= '0;
    end else if (csr_we && csr_sel && csr_priv == PRV_M) begin
      if (sel_match)      kmatch_q[fidx] <= csr_wdata[31:0];
      else if (sel_mask)  kmask_q[fidx]  <= csr_wdata[31:0];
      else if (rbound)    kbound_q[ridx] <= csr_wdata[PADDR_W-1:0];
      else                kbase_q[ridx]  <= csr_wdata[PADDR_W-1:0];
    end
  end

  for (genvar i = 0; i < NUM_KFILTERS; i++) begin : g_kf
    flexible_filter u_filter (
      .instr      (instr),
      .match_bits (kmatch_q[i]),
      .mask_bits  (kmask_q[i]),
      .hit        (fhit[i])
    );
  end

  always_comb begin
    in_range = 1'b0;
    for (int r = 0; r < NUM_KRANGES; r++)
      if (ppc >= kbase_q[r] && ppc < kbound_q[r]) in_range = 1'b1;
    hit = (cur_priv == PRV_S) && in_range && (|fhit);
  end
endmodule
