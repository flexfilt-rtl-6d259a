// flexfilt_pkg: constants and types shared by the FlexFilt blocks.
//
// FlexFilt gives every executable page a 4-bit instruction protection key
// (ipkey, so 16 instruction domains) and provides four shared Flexible Filters
// plus four dedicated kernel-level filters. Those counts follow the design
// description. The encodings of the custom instructions, the CSR addresses of
// the kernel-level registers and the layout of the per-filter priv byte are
// this implementation's own choices; they are collected here so that software
// and hardware agree on one place.
package flexfilt_pkg;

  // Sizes of the design
  localparam int unsigned NUM_FILTERS  = 4;   // shared Flexible Filters
  localparam int unsigned NUM_DOMAINS  = 16;  // instruction protection domains
  localparam int unsigned IPKEY_W      = 4;   // ipkey width (PTE bits 57:54)
  localparam int unsigned IPR_W        = NUM_DOMAINS * NUM_FILTERS; // 64-bit IPR
  localparam int unsigned NUM_KFILTERS = 4;   // dedicated kernel-level filters
  localparam int unsigned NUM_KRANGES  = 2;   // base/bound CSR pairs
  localparam int unsigned XLEN         = 64;
  localparam int unsigned PADDR_W      = 56;  // Sv39 physical address width

  // Position of the ipkey in an Sv39/Sv48 PTE: the low 4 of the 10 reserved bits 63:54
  localparam int unsigned PTE_IPKEY_LSB = 54;

  // RISC-V privilege levels
  typedef enum logic [1:0] {
    PRV_U = 2'd0,
    PRV_S = 2'd1,
    PRV_M = 2'd3
  } priv_e;

  // Exception causes reported by the execute stage
  localparam logic [3:0] CAUSE_FETCH_PAGE_FAULT = 4'd12;
  localparam logic [3:0] CAUSE_ILLEGAL_INSTR    = 4'd2;

  // Custom instructions: R-type on the custom-0 major opcode, operation in funct7.
  localparam logic [6:0] OPC_CUSTOM0 = 7'b0001011;
  typedef enum logic [6:0] {
    // unprivileged (config_filter / config_instr_domain)
    F7_SETMATCH = 7'd0,   // match[rs2] <= rs1
    F7_SETMASK  = 7'd1,   // mask[rs2]  <= rs1
    F7_SETPRIV  = 7'd2,   // priv[rs2]  <= rs1[7:0]
    F7_WRIPR    = 7'd3,   // IPR[4*rs1 + rs2] <= 1
    // privileged (supervisor and above): context-switch save/restore
    F7_RDMATCH  = 7'd8,   // rd <= match[rs2]
    F7_RDMASK   = 7'd9,   // rd <= mask[rs2]
    F7_RDPRIV   = 7'd10,  // rd <= priv[rs2]
    F7_RDIPR    = 7'd11,  // rd <= IPR
    F7_LDIPR    = 7'd12   // IPR <= rs1
  } ff_op_e;

  // Layout of the per-filter priv byte written by SETPRIV
  //   [1:0] privilege level whose instructions the filter inspects
  //   [2]   seal: once set, unprivileged SET* writes to this filter are illegal
  localparam int unsigned PRIV_SEAL_BIT = 2;

  // Machine-mode CSRs of the kernel-level filters (custom machine read/write space)
  localparam logic [11:0] CSR_KMATCH0 = 12'h7C0;  // 7C0..7C3: kernel filter match
  localparam logic [11:0] CSR_KMASK0  = 12'h7C4;  // 7C4..7C7: kernel filter mask
  localparam logic [11:0] CSR_KBASE0  = 12'h7C8;  // range 0 base  (inclusive)
  localparam logic [11:0] CSR_KBOUND0 = 12'h7C9;  // range 0 bound (exclusive)
  localparam logic [11:0] CSR_KBASE1  = 12'h7CA;  // range 1 base
  localparam logic [11:0] CSR_KBOUND1 = 12'h7CB;  // range 1 bound

  // One fetched instruction with the FlexFilt side information that travels with it
  typedef struct packed {
    logic [31:0]        instr;
    logic [XLEN-1:0]    pc;     // virtual pc
    logic [PADDR_W-1:0] ppc;    // physical pc (used by the kernel-level ranges)
    logic [IPKEY_W-1:0] ipkey;
    logic               fault;  // instruction fetch page fault
  } fetch_pkt_t;

endpackage
