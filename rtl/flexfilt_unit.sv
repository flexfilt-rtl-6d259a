// flexfilt_unit: execute-stage FlexFilt logic.
//
// Holds the configuration of the four shared Flexible Filters (Match, Mask and
// a priv byte each), the 64-bit IPR and the kernel-level filter unit, and
// decides for the instruction in the execute stage whether it must be
// stopped. Shared filter i stops the instruction when
//   filter i matches the instruction, AND
//   IPR valid bit i of the instruction's domain (its ipkey) is set, AND
//   the core's current privilege level equals the level in priv[i][1:0].
// The four results are ORed together with the kernel-level filter result;
// a stopped instruction leaves as an illegal-instruction exception and has no
// other effect. All of this is combinational within the execute cycle, so
// filtering adds no cycles.
//
// The unit also executes FlexFilt's custom instructions (custom-0 opcode,
// funct3 = 0, operation in funct7, see flexfilt_pkg):
//   SETMATCH/SETMASK/SETPRIV rs1 = value, rs2 = filter index
//   WRIPR                    rs1 = domain, rs2 = filter index (sets the bit)
//   RDMATCH/RDMASK/RDPRIV    rd  = value of filter rs2       (S-mode and up)
//   RDIPR / LDIPR            rd  = IPR / IPR = rs1          (S-mode and up)
// An index out of range, a privileged operation from U-mode, a SETPRIV that
// names a level above the current one, or an unprivileged SET* of a sealed
// filter from U-mode is an illegal instruction. Writes take effect at the
// next clock edge, so the next instruction already sees them.
//
// From the design description: four shared filters, the Match/Mask
// mechanism, the IPR with one valid bit per domain and filter, the AND/OR
// exception logic, the custom instructions SETMATCH, SETMASK, SETPRIV and
// WRIPR, five privileged instructions for context switches, and that the
// shared filters act on user-level instructions. This implementation's
// choices: the encodings, the names and exact effect of the five privileged
// instructions, the priv byte layout (level + seal) and the reset state
// (filters never match, IPR clear, priv = U).
module flexfilt_unit
  import flexfilt_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // execute-stage instruction
  input  logic               ex_valid,
  input  logic [31:0]        ex_instr,
  input  logic [PADDR_W-1:0] ex_ppc,
  input  logic [IPKEY_W-1:0] ex_ipkey,
  input  logic               ex_fault,     // fetch fault already attached
  input  priv_e              cur_priv,
  input  logic [XLEN-1:0]    rs1_data,
  input  logic [XLEN-1:0]    rs2_data,
  // result
  output logic               filtered,     // stopped by a Flexible Filter
  output logic               illegal,      // illegal-instruction exception
  output logic               is_custom,    // instruction is a FlexFilt op
  output logic               rd_wen,
  output logic [XLEN-1:0]    rd_data,
  // machine-mode CSR port of the kernel-level filters
  input  logic               csr_we,
  input  logic [11:0]        csr_addr,
  input  logic [XLEN-1:0]    csr_wdata,
  input  priv_e              csr_priv,
  output logic [XLEN-1:0]    csr_rdata,
  output logic               csr_sel,
  output logic               csr_illegal
);
  localparam int unsigned FIDX_W = $clog2(NUM_FILTERS);

  logic [NUM_FILTERS-1:0][31:0] match_q, mask_q;
  logic [NUM_FILTERS-1:0][7:0]  priv_q;
  logic [NUM_FILTERS-1:0]       fhit, vbits, level_ok;
  logic                         user_hit, kern_hit;
  logic [IPR_W-1:0]             ipr_value;

  // ---------------- filtering ----------------
  for (genvar i = 0; i < NUM_FILTERS; i++) begin : g_filter
    flexible_filter u_filter (
      .instr      (ex_instr),
      .match_bits (match_q[i]),
      .mask_bits  (mask_q[i]),
      .hit        (fhit[i])
    );
    assign level_ok[i] = (priv_q[i][1:0] == cur_priv);
  end

  kernel_filter_unit u_kfu (
    .clk, .rst_n,
    .csr_we, .csr_addr, .csr_wdata, .csr_priv, .csr_rdata, .csr_sel, .csr_illegal,
    .instr    (ex_instr),
    .ppc      (ex_ppc),
    .cur_priv (cur_priv),
    .hit      (kern_hit)
  );

  // ---------------- custom instruction decode ----------------
  ff_op_e                 op;
  logic                   op_known, op_priv_only, op_bad, do_exec;
  logic [FIDX_W-1:0]      fsel;
  logic                   set_en, load_en;
  logic [IPKEY_W-1:0]     set_dom;

  always_comb begin
    op       = ff_op_e'(ex_instr[31:25]);
    op_known = 1'b0;
    case (op)
      F7_SETMATCH, F7_SETMASK, F7_SETPRIV, F7_WRIPR,
      F7_RDMATCH, F7_RDMASK, F7_RDPRIV, F7_RDIPR, F7_LDIPR: op_known = 1'b1;
      default: op_known = 1'b0;
    endcase
    is_custom = ex_valid && !ex_fault && (ex_instr[6:0] == OPC_CUSTOM0)
                && (ex_instr[14:12] == 3'b000) && op_known;
    op_priv_only = ex_instr[28];           // funct7 8..12
    fsel     = rs2_data[FIDX_W-1:0];
    set_dom  = rs1_data[IPKEY_W-1:0];

    op_bad = 1'b0;
    if (op_priv_only && cur_priv == PRV_U) op_bad = 1'b1;
    if (op != F7_RDIPR && op != F7_LDIPR && rs2_data >= XLEN'(NUM_FILTERS)) op_bad = 1'b1;
    if (op == F7_WRIPR && rs1_data >= XLEN'(NUM_DOMAINS)) op_bad = 1'b1;
    if ((op == F7_SETMATCH || op == F7_SETMASK || op == F7_SETPRIV) &&
        cur_priv == PRV_U && priv_q[fsel][PRIV_SEAL_BIT]) op_bad = 1'b1;
    if (op == F7_SETPRIV && rs1_data[1:0] > cur_priv) op_bad = 1'b1;
  end

  always_comb begin
    user_hit = |(fhit & vbits & level_ok);
    filtered = ex_valid && !ex_fault && (user_hit || kern_hit);
    illegal  = filtered || (is_custom && op_bad);
    do_exec  = is_custom && !filtered && !op_bad;

    set_en  = do_exec && (op == F7_WRIPR);
    load_en = do_exec && (op == F7_LDIPR);

    rd_wen  = do_exec && op_priv_only && (op != F7_LDIPR);
    rd_data = '0;
    case (op)
      F7_RDMATCH: rd_data = XLEN'(match_q[fsel]);
      F7_RDMASK:  rd_data = XLEN'(mask_q[fsel]);
      F7_RDPRIV:  rd_data = XLEN'(priv_q[fsel]);
      F7_RDIPR:   rd_data = XLEN'(ipr_value);
      default:    rd_data = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      match_q <= '1;
      mask_q  <= '1;
      priv_q  <= '0;
    end else if (do_exec) begin
      case (op)
        F7_SETMATCH: match_q[fsel] <= rs1_data[31:0];
        F7_SETMASK:  mask_q[fsel]  <= rs1_data[31:0];
        F7_SETPRIV:  priv_q[fsel]  <= rs1_data[7:0];
        default: ;
      endcase
    end
  end

  ipr u_ipr (
    .clk, .rst_n,
    .set_en     (set_en),
    .set_domain (set_dom),
    .set_filter (fsel),
    .load_en    (load_en),
    .load_value (rs1_data[IPR_W-1:0]),
    .rd_ipkey   (ex_ipkey),
    .rd_valid   (vbits),
    .value      (ipr_value)
  );
endmodule
