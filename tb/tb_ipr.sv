// tb_ipr: self-checking test of the Instruction Protection Register.
//
// Drives random WRIPR bit sets and whole-register loads against a 64-bit
// reference model, and after each cycle reads the four valid bits of every
// domain through the index select port.
module tb_ipr;
  import flexfilt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic set_en = 0, load_en = 0;
  logic [3:0] set_domain = 0, rd_ipkey = 0;
  logic [1:0] set_filter = 0;
  logic [63:0] load_value = 0, value, model;
  logic [3:0] rd_valid;
  int checks = 0, failures = 0;

  ipr dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int d = 0; d < 16; d++) begin
      rd_ipkey = 4'(d);
      #1;
      checks++;
      if (rd_valid !== model[4*d +: 4]) begin
        failures++;
        $display("FAIL domain %0d valid=%b exp=%b", d, rd_valid, model[4*d +: 4]);
      end
    end
    checks++;
    if (value !== model) begin
      failures++;
      $display("FAIL value=%h exp=%h", value, model);
    end
  endtask

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    // domain 14 gets filters 1,2,3 as in the overview figure (1110)
    for (int v = 1; v < 4; v++) begin
      set_en = 1; set_domain = 4'd14; set_filter = 2'(v);
      @(posedge clk); #1;
      model[4*14 + v] = 1'b1;
    end
    set_en = 0;
    @(negedge clk);
    check_all();
    rd_ipkey = 4'd14; #1;
    checks++;
    if (rd_valid !== 4'b1110) begin failures++; $display("FAIL domain 14 = %b", rd_valid); end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      set_en     = ($urandom % 3) != 0;
      load_en    = ($urandom % 11) == 0;
      set_domain = 4'($urandom);
      set_filter = 2'($urandom);
      load_value = {$urandom, $urandom};
      @(posedge clk); #1;
      if (load_en) model = load_value;
      else if (set_en) model[4*set_domain + set_filter] = 1'b1;
      set_en = 0; load_en = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
