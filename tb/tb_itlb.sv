// tb_itlb: self-checking test of the I-TLB with the ipkey field.
//
// Fills entries from PTEs whose bits 57:54 carry an ipkey (with the other
// reserved bits set to random values, which must be ignored) and checks
// hits, physical addresses, ipkeys and fetch permission faults against a
// reference list. Filling more pages than entries checks round-robin
// eviction; the example rows of the overview figure (150->4500 key 0000,
// 184->1220 key 1110, 280->560 key 0000) are filled and read back; sfence checks that all entries are dropped.
module tb_itlb;
  import flexfilt_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, flush = 0, fill_valid = 0;
  logic [38:0] lookup_vaddr = 0;
  priv_e priv = PRV_U;
  logic hit, fault;
  logic [PADDR_W-1:0] paddr;
  logic [3:0] ipkey;
  logic [26:0] fill_vpn = 0;
  logic [63:0] fill_pte = 0;
  int checks = 0, failures = 0;

  itlb #(.ENTRIES(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // page n: vpn = 0x100 + n, ppn = 0x4000 + 3n, ipkey = n mod 16, X unless n % 5 == 4, U unless n % 7 == 6
  function automatic logic [63:0] pte_of(int n);
    logic [63:0] p = '0;
    p[63:58] = 6'($urandom);
    p[57:54] = 4'(n % 16);
    p[53:10] = 44'('h4000 + 3*n);
    p[0] = 1; p[1] = 1; p[3] = (n % 5 != 4); p[4] = (n % 7 != 6); p[6] = 1;
    return p;
  endfunction

  task automatic fill(int n);
    @(negedge clk);
    fill_valid = 1; fill_vpn = 27'('h100 + n); fill_pte = pte_of(n);
    @(posedge clk); #1;
    fill_valid = 0;
  endtask

  task automatic look(int n, logic exp_hit, priv_e p = PRV_U);
    logic [11:0] off = 12'($urandom);
    @(negedge clk);
    lookup_vaddr = {27'('h100 + n), off}; priv = p;
    #1;
    checks++;
    if (hit !== exp_hit) begin failures++; $display("FAIL page %0d hit=%b exp=%b", n, hit, exp_hit); end
    else if (exp_hit) begin
      logic exp_fault = (n % 5 == 4) || (p == PRV_U && n % 7 == 6) || (p == PRV_S && n % 7 != 6);
      checks++;
      if (paddr !== {44'('h4000 + 3*n), off} || ipkey !== 4'(n % 16) || fault !== exp_fault) begin
        failures++;
        $display("FAIL page %0d pa=%h key=%0d fault=%b exp_fault=%b", n, paddr, ipkey, fault, exp_fault);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) look(n, 0);
    for (int n = 0; n < N; n++) fill(n);
    for (int n = 0; n < N; n++) look(n, 1);
    for (int n = 0; n < N; n++) look(n, 1, PRV_S);
    // round robin: 3 more pages evict pages 0..2
    for (int n = N; n < N + 3; n++) fill(n);
    for (int n = 0; n < N + 3; n++) look(n, n >= 3);
    // many pages, random lookups: the last N filled are resident
    for (int n = N + 3; n < 40; n++) fill(n);
    for (int r = 0; r < 300; r++) begin
      int n;
      n = $urandom % 40;
      look(n, n >= 40 - N);
    end
    // the three example rows of the overview figure: VPage# -> PPage#, X, ipkey
    begin
      logic [26:0] fv [3] = '{27'd150, 27'd184, 27'd280};
      logic [43:0] fp [3] = '{44'd4500, 44'd1220, 44'd560};
      logic [3:0]  fk [3] = '{4'b0000, 4'b1110, 4'b0000};
      for (int i = 0; i < 3; i++) begin
        @(negedge clk);
        fill_valid = 1; fill_vpn = fv[i];
        fill_pte = {6'h3F, fk[i], fp[i], 10'b00_0101_1011};   // V R X U A, reserved bits 63:58 set
        @(posedge clk); #1; fill_valid = 0;
      end
      for (int i = 0; i < 3; i++) begin
        @(negedge clk);
        lookup_vaddr = {fv[i], 12'h123}; priv = PRV_U; #1;
        checks++;
        if (!hit || fault || ipkey !== fk[i] || paddr !== {fp[i], 12'h123}) begin
          failures++; $display("FAIL figure row %0d: hit=%b key=%b pa=%h", i, hit, ipkey, paddr);
        end
      end
    end
    // sfence drops everything
    @(negedge clk); flush = 1; @(posedge clk); #1; flush = 0;
    for (int n = 0; n < 40; n++) look(n, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
