// read_fifo_tb: self-checking test of the read FIFO with forwarding.
// Reads are allocated at random, about a third with forwarded data; a small
// in-order DRAM stand-in returns data for every read after a random delay;
// the consumer takes data with random back-pressure. Each returned line must
// equal the forwarded data if the read was forwarded, else the DRAM data,
// in allocation order, and no read may leave before the DRAM answered it.
module read_fifo_tb;
  import tap_pkg::*;
  localparam int DEPTH = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic alloc_valid, alloc_ready, alloc_fwd, fill_valid, out_valid, out_ready, out_fwd;
  data_t alloc_data, fill_data, out_data;

  read_fifo #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, n_fwd = 0;
  data_t exp_q[$];
  bit    expfwd_q[$];
  int    pending_fills = 0;   // reads issued to the stand-in, not yet returned
  int    returned = 0, popped = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DRAM stand-in: returns a fill for each allocated read, in order,
  // after a random gap; its data is a counter-derived pattern
  int fill_no = 0;
  always @(negedge clk) begin
    fill_valid = 0;
    if (rst_n && pending_fills > 0 && $urandom_range(0, 2) == 0) begin
      fill_valid = 1;
      fill_data  = {16{32'hD000_0000 + fill_no}};
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (fill_valid) begin pending_fills--; fill_no++; returned++; end
    if (out_valid && out_ready) begin
      checks++;
      popped++;
      if (popped > returned) begin failures++; $display("FAIL: read left before DRAM data"); end
      if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected read data"); end
      else begin
        data_t e; bit ef;
        e = exp_q.pop_front(); ef = expfwd_q.pop_front();
        if (out_data !== e || out_fwd !== ef) begin
          failures++; $display("FAIL %0t: data %0h exp %0h fwd %0b exp %0b", $time, out_data[31:0], e[31:0], out_fwd, ef);
        end
      end
    end
    if (alloc_valid && alloc_ready) begin
      // the DRAM data for this read will carry number alloc_no
      pending_fills++;
    end
  end

  int alloc_no = 0;
  initial begin
    alloc_valid = 0; out_ready = 0; alloc_fwd = 0; alloc_data = '0; fill_valid = 0; fill_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      #1;
      alloc_valid = $urandom_range(0, 1);
      alloc_fwd   = $urandom_range(0, 2) == 0;
      alloc_data  = {16{32'hF000_0000 + alloc_no}};
      out_ready   = $urandom_range(0, 3) != 0;
      #1;
      if (alloc_valid && alloc_ready) begin
        exp_q.push_back(alloc_fwd ? alloc_data : {16{32'hD000_0000 + alloc_no}});
        expfwd_q.push_back(alloc_fwd);
        if (alloc_fwd) n_fwd++;
        alloc_no++;
      end
    end
    @(negedge clk);
    #1 alloc_valid = 0; out_ready = 1;
    repeat (200) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_fwd == 0) begin failures++; $display("FAIL: %0d reads missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
