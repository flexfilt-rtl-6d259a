// tb_inst_queue: self-checking test of the instruction queue.
//
// Random enqueue/dequeue traffic with random back-pressure against a
// reference queue: packets (with their ipkeys) must leave in order and
// unchanged, full and empty must be reported, and a flush must empty the
// queue. Checks that a packet can be dequeued the cycle after it entered.
module tb_inst_queue;
  import flexfilt_pkg::*;
  localparam int D = 4;
  logic clk = 0, rst_n = 0, flush = 0;
  logic enq_valid = 0, enq_ready, deq_valid, deq_ready = 0;
  fetch_pkt_t enq_pkt, deq_pkt;
  logic [2:0] count;
  int checks = 0, failures = 0, n_full = 0, n_both = 0;
  fetch_pkt_t model [$];

  inst_queue #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fetch_pkt_t rnd_pkt();
    fetch_pkt_t p;
    p.instr = $urandom; p.pc = {$urandom, $urandom}; p.ppc = {$urandom, $urandom};
    p.ipkey = 4'($urandom); p.fault = 1'($urandom);
    return p;
  endfunction

  initial begin
    enq_pkt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency: in at edge t, visible at the head right after
    @(negedge clk);
    enq_pkt = rnd_pkt(); enq_valid = 1;
    @(posedge clk); #1; enq_valid = 0;
    checks++;
    if (!deq_valid || deq_pkt !== enq_pkt) begin failures++; $display("FAIL one-cycle latency"); end
    model.push_back(enq_pkt);
    for (int n = 0; n < 5000; n++) begin
      logic de, en;
      @(negedge clk);
      enq_valid = ($urandom % 4) != 0;
      deq_ready = ($urandom % 3) == 0 || (n > 2500 && ($urandom % 3) != 0);
      enq_pkt = rnd_pkt();
      flush = ($urandom % 500) == 0;
      #1;
      checks++;
      if (deq_valid !== (model.size() != 0) || count !== 3'(model.size()) ||
          enq_ready !== (model.size() < D || deq_ready)) begin
        failures++;
        $display("FAIL flags valid=%b ready=%b count=%0d model=%0d", deq_valid, enq_ready, count, model.size());
      end
      if (deq_valid && model.size() != 0) begin
        checks++;
        if (deq_pkt !== model[0]) begin failures++; $display("FAIL head %h exp %h", deq_pkt.instr, model[0].instr); end
      end
      de = deq_valid && deq_ready;
      en = enq_valid && enq_ready;
      if (model.size() == D) n_full++;
      if (de && en) n_both++;
      @(posedge clk); #1;
      if (flush) model.delete();
      else begin
        if (de) void'(model.pop_front());
        if (en) model.push_back(enq_pkt);
      end
      flush = 0;
    end
    checks++;
    if (n_full == 0 || n_both == 0) begin failures++; $display("FAIL coverage full=%0d both=%0d", n_full, n_both); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
