// inst_queue: instruction queue between fetch and decode.
//
// A DEPTH-entry FIFO of fetch packets (instruction, virtual and physical pc,
// ipkey and fetch-fault flag, see flexfilt_pkg::fetch_pkt_t). In FlexFilt the
// queue's only change is that the ipkey of each instruction is stored next to
// it, so that the domain of an instruction follows it to the execute stage.
//
// Valid/ready handshake on both sides: a packet moves when valid and ready
// are both high at a rising edge. Enqueue and dequeue may happen in the same
// cycle, also when full (the head leaves as the new packet enters). `flush`
// empties the queue (taken exception or redirect). The head is presented
// combinationally from storage, so a packet can leave the cycle after it
// entered. Reset empties the queue.
//
// Depth 4 and the handshake are this implementation's choices; the
// description gives neither.
module inst_queue
  import flexfilt_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,
  input  logic       enq_valid,
  output logic       enq_ready,
  input  fetch_pkt_t enq_pkt,
  output logic       deq_valid,
  input  logic       deq_ready,
  output fetch_pkt_t deq_pkt,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  fetch_pkt_t             mem_q [DEPTH];
  logic [PTR_W-1:0]       head_q, tail_q;
  logic [$clog2(DEPTH+1)-1:0] cnt_q;
  logic                   do_enq, do_deq;

  function automatic logic [PTR_W-1:0] inc(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    deq_valid = (cnt_q != '0);
    enq_ready = (cnt_q != ($clog2(DEPTH+1))'(DEPTH)) || deq_ready;
    do_deq    = deq_valid && deq_ready;
    do_enq    = enq_valid && enq_ready;
    deq_pkt   = mem_q[head_q];
    count     = cnt_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0;
      tail_q <= '0;
      cnt_q  <= '0;
    end else if (flush) begin
      head_q <= '0;
      tail_q <= '0;
      cnt_q  <= '0;
    end else begin
      if (do_enq) tail_q <= inc(tail_q);
      if (do_deq) head_q <= inc(head_q);
      case ({do_enq, do_deq})
        2'b10:   cnt_q <= cnt_q + 1'b1;
        2'b01:   cnt_q <= cnt_q - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_enq && !flush) mem_q[tail_q] <= enq_pkt;
  end

  // storage is read only when an entry is valid
  assert property (@(posedge clk) disable iff (!rst_n) cnt_q <= ($clog2(DEPTH+1))'(DEPTH));
endmodule
