// cmd_decoder_tb: self-checking test of the command decoder.
// Random operations are offered with random back-pressure; every decoded
// output is compared, in order, with a reference split of the address
// (row = bits 29:16, bank pair = bits 15:11, column = {10:6, 4:2},
// line = bits 29:6). Also checks the one-cycle latency of an unstalled
// operation.
module cmd_decoder_tb;
  import tap_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  op_kind_e in_kind;
  addr_t in_addr;
  data_t in_data;
  op_t out_op;

  cmd_decoder dut (.*);

  int checks = 0, failures = 0;
  op_t exp_q[$];

  function automatic op_t ref_decode(op_kind_e k, addr_t a, data_t d);
    op_t o;
    o.kind = k;
    o.row  = ROW_W'(a >> 16);
    o.bank = BANK_W'((a >> 11) & 30'h1f);
    o.col  = COL_W'((((a >> 6) & 30'h1f) << 3) | ((a >> 2) & 30'h7));
    o.line = LINE_W'(a >> 6);
    o.data = d;
    return o;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    op_t e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL: unexpected output");
    end else begin
      e = exp_q.pop_front();
      if (out_op !== e) begin
        failures++;
        $display("FAIL: got bank %0d row %0d col %0d, exp bank %0d row %0d col %0d",
                 out_op.bank, out_op.row, out_op.col, e.bank, e.row, e.col);
      end
    end
  end

  initial begin
    in_valid = 0; out_ready = 0; in_kind = OP_READ; in_addr = '0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency check: one operation, output ready
    @(negedge clk);
    in_valid = 1; in_kind = OP_WRITE; in_addr = 30'h2345_6789 & 30'h3fff_ffff;
    in_data = {16{32'hdead_beef}}; out_ready = 1;
    exp_q.push_back(ref_decode(in_kind, in_addr, in_data));
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid) begin failures++; $display("FAIL: latency not 1 cycle"); end
    @(negedge clk);
    // random traffic with back-pressure
    for (int n = 0; n < 2000; n++) begin
      in_valid  = ($urandom_range(0, 3) != 0);
      in_kind   = op_kind_e'($urandom_range(0, 1));
      in_addr   = addr_t'($urandom);
      in_data   = {16{$urandom}};
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      if (in_valid && in_ready) exp_q.push_back(ref_decode(in_kind, in_addr, in_data));
      @(negedge clk);
    end
    in_valid = 0; out_ready = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d ops lost", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
