// itlb: instruction TLB extended with the FlexFilt ipkey field.
//
// A fully associative table of ENTRIES translations for Sv39 4 KiB pages.
// Each entry holds VPage#, PPage#, the X and U permission bits and the 4-bit
// instruction protection key. The ipkey comes from the PTE that the page
// table walker delivers on a fill: bits 57:54, the low four of the ten bits
// the Sv39/Sv48 PTE reserves.
//
// Lookup is combinational: for lookup_vaddr it returns hit, the physical
// address, the ipkey, and `fault` when the page may not be fetched from at
// priv (X clear, a user page fetched in S-mode or a supervisor page fetched
// in U-mode). A fill (fill_valid with the VPN and the leaf PTE) writes the
// next entry in round-robin order at the clock edge; `flush` (sfence.vma)
// invalidates every entry. Reset empties the table.
//
// From the design description: the added ipkey field, its PTE position and
// the fill from the walker. This implementation's choices: the entry count
// (32), round-robin replacement, 4 KiB pages only (no superpages) and no
// ASIDs.
module itlb
  import flexfilt_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               flush,
  // lookup
  input  logic [38:0]        lookup_vaddr,
  input  priv_e              priv,
  output logic               hit,
  output logic               fault,
  output logic [PADDR_W-1:0] paddr,
  output logic [IPKEY_W-1:0] ipkey,
  // fill from the page table walker
  input  logic               fill_valid,
  input  logic [26:0]        fill_vpn,
  input  logic [63:0]        fill_pte
);
  typedef struct packed {
    logic               valid;
    logic [26:0]        vpn;
    logic [43:0]        ppn;
    logic               x;
    logic               u;
    logic [IPKEY_W-1:0] ipkey;
  } tlb_entry_t;

  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  tlb_entry_t [ENTRIES-1:0] tab_q;
  logic [IDX_W-1:0]         rr_q;
  tlb_entry_t               sel;

  always_comb begin
    hit = 1'b0;
    sel = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (tab_q[i].valid && tab_q[i].vpn == lookup_vaddr[38:12]) begin
        hit = 1'b1;
        sel = tab_q[i];
      end
    end
    paddr = {sel.ppn, lookup_vaddr[11:0]};
    ipkey = sel.ipkey;
    fault = hit && (!sel.x || (priv == PRV_U && !sel.u) || (priv == PRV_S && sel.u));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tab_q <= '0;
      rr_q  <= '0;
    end else if (flush) begin
      for (int i = 0; i < ENTRIES; i++) tab_q[i].valid <= 1'b0;
    end else if (fill_valid) begin
      tab_q[rr_q].valid <= fill_pte[0];
      tab_q[rr_q].vpn   <= fill_vpn;
      tab_q[rr_q].ppn   <= fill_pte[53:10];
      tab_q[rr_q].x     <= fill_pte[3];
      tab_q[rr_q].u     <= fill_pte[4];
      tab_q[rr_q].ipkey <= fill_pte[PTE_IPKEY_LSB +: IPKEY_W];
      rr_q <= (rr_q == IDX_W'(ENTRIES-1)) ? '0 : rr_q + 1'b1;
    end
  end
endmodule
