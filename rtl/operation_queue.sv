// operation_queue: in-order queue of operations waiting for the DRAM.
//
// Reads, writes to open rows, flushed and evicted buffered writes all enter
// here and leave in the same order towards the AMB's DDR port. It is a
// circular buffer of DEPTH op_t entries with an occupancy counter. The
// document names the queue; its depth and the valid/ready handshakes are
// this design's choices.
//
// Interface: push_* (valid/ready, ready = not full) and pop_* (valid/ready,
// valid = not empty). empty_o reports an idle queue.
// Timing: an operation pushed at one edge can leave at the next; push and pop
// may happen in the same cycle, also when the queue is full.
module operation_queue
  import tap_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push_valid,
  output logic push_ready,
  input  op_t  push_op,
  output logic pop_valid,
  input  logic pop_ready,
  output op_t  pop_op,
  output logic empty_o
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  op_t             mem_q [DEPTH];
  logic [PW-1:0]   wp_q, rp_q;
  logic [PW:0]     cnt_q;
  logic            do_push, do_pop;

  assign pop_valid  = cnt_q != '0;
  assign push_ready = (cnt_q != (PW+1)'(DEPTH)) || pop_ready;
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop_valid && pop_ready;
  assign pop_op     = mem_q[rp_q];
  assign empty_o    = cnt_q == '0;

  function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q  <= '0;
      rp_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) wp_q <= incr(wp_q);
      if (do_pop)  rp_q <= incr(rp_q);
      cnt_q <= cnt_q + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem_q[wp_q] <= push_op;
  end

endmodule
