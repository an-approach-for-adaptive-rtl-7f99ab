// operation_queue_tb: self-checking test of the operation queue.
// Random pushes and pops with a scoreboard check ordering and contents; the
// queue must accept exactly DEPTH operations when not drained, and an
// operation pushed into an empty queue must be poppable one cycle later.
module operation_queue_tb;
  import tap_pkg::*;
  localparam int DEPTH = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push_valid, push_ready, pop_valid, pop_ready, empty_o;
  op_t push_op, pop_op;

  operation_queue #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  op_t sb[$];

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic op_t rand_op();
    op_t o;
    o = '0;
    o.kind = op_kind_e'($urandom_range(0, 1));
    o.bank = bank_t'($urandom); o.row = row_t'($urandom); o.col = col_t'($urandom);
    o.line = line_t'($urandom); o.data = {16{$urandom}};
    return o;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (pop_valid && pop_ready) begin
      checks++;
      if (sb.size() == 0 || pop_op !== sb[0]) begin failures++; $display("FAIL: wrong op out"); end
      if (sb.size() != 0) void'(sb.pop_front());
    end
    if (push_valid && push_ready) sb.push_back(push_op);
  end

  initial begin
    int accepted;
    push_valid = 0; pop_ready = 0; push_op = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // latency: push into empty queue, visible next cycle
    @(negedge clk);
    push_valid = 1; push_op = rand_op();
    @(negedge clk);
    push_valid = 0;
    checks++;
    if (!pop_valid || empty_o) begin failures++; $display("FAIL: not visible after one cycle"); end
    pop_ready = 1;
    @(negedge clk);
    pop_ready = 0;
    // fill to capacity
    accepted = 0;
    for (int n = 0; n < DEPTH + 4; n++) begin
      push_valid = 1; push_op = rand_op();
      #1 if (push_ready) accepted++;
      @(negedge clk);
    end
    push_valid = 0;
    checks++;
    if (accepted != DEPTH) begin failures++; $display("FAIL: accepted %0d, depth %0d", accepted, DEPTH); end
    // random traffic
    for (int n = 0; n < 4000; n++) begin
      push_valid = $urandom_range(0, 1); push_op = rand_op();
      pop_ready  = $urandom_range(0, 1);
      @(negedge clk);
    end
    push_valid = 0; pop_ready = 1;
    repeat (DEPTH + 2) @(negedge clk);
    checks++;
    if (sb.size() != 0 || !empty_o) begin failures++; $display("FAIL: not drained"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
