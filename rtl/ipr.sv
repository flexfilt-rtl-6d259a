// ipr: Instruction Protection Register with its control and index select logic.
//
// The IPR holds one valid bit per (domain, filter) pair: 16 domains x 4
// filters = 64 bits. Domain d owns bits [4d+3:4d], with bit 4d+v enabling
// filter v for that domain (V3..V0 from high to low, domain 15 at the top).
// Index select logic returns the four valid bits of the domain named by the
// ipkey of the instruction in the execute stage; this read is combinational.
//
// Control logic (registered, effective the cycle after the request):
//   set_en  : WRIPR, sets the single bit (set_domain, set_filter) to 1.
//   load_en : privileged whole-register write (restore on a context switch).
//             load_en wins over set_en in the same cycle.
// Reset clears all bits, so no filter applies to any domain.
// The layout and the WRIPR operands follow the design description; the
// whole-register load and the priority are this implementation's choices.
module ipr
  import flexfilt_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           set_en,
  input  logic [IPKEY_W-1:0]             set_domain,
  input  logic [$clog2(NUM_FILTERS)-1:0] set_filter,
  input  logic                           load_en,
  input  logic [IPR_W-1:0]               load_value,
  input  logic [IPKEY_W-1:0]             rd_ipkey,
  output logic [NUM_FILTERS-1:0]         rd_valid,
  output logic [IPR_W-1:0]               value
);
  logic [NUM_DOMAINS-1:0][NUM_FILTERS-1:0] bits_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits_q <= '0;
    end else if (load_en) begin
      bits_q <= load_value;
    end else if (set_en) begin
      bits_q[set_domain][set_filter] <= 1'b1;
    end
  end

  always_comb begin
    rd_valid = bits_q[rd_ipkey];
    value    = bits_q;
  end
endmodule
