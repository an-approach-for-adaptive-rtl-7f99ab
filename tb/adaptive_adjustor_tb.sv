// adaptive_adjustor_tb: self-checking test of the Adaptive Adjustor at the
// document's settings (K = 10 accesses, thresholds 500/1000/4000 cycles,
// 4 agreeing samples). Each sample is produced with an exact length in
// cycles; the sample class is checked at the threshold boundaries, and the
// buffer size is checked after every sample against a scripted expectation:
// a switch needs four consecutive samples asking for the same new size.
module adaptive_adjustor_tb;
  import tap_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic access_i, switch_o, sample_o;
  wb_size_e size_o, sample_cls_o;

  adaptive_adjustor dut (.*);

  int checks = 0, failures = 0, switches = 0;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && switch_o) switches++;

  function automatic wb_size_e cls_of(int c);
    if (c < 500)  return SZ_64;
    if (c < 1000) return SZ_32;
    if (c < 4000) return SZ_16;
    return SZ_OFF;
  endfunction

  // One sample lasting exactly c cycles: accesses in its first K-1 cycles
  // and the K-th in cycle c; a sample of T3 cycles or more has no accesses
  // and ends by itself after T3 cycles.
  task automatic run_sample(int c, wb_size_e exp_size);
    int len;
    bit seen;
    len = (c >= 4000) ? 4000 : c;
    seen = 0;
    for (int t = 1; t <= len; t++) begin
      @(negedge clk);
      access_i = (c < 4000) && (t < 10 || t == c);
      @(posedge clk);
      #1;
      if (sample_o) begin
        seen = 1;
      end
    end
    // sample_o is sampled just after the edge: check class in the last cycle
    checks++;
    if (!seen) begin failures++; $display("FAIL: sample of %0d cycles not seen", c); end
    checks++;
    if (size_o !== exp_size) begin
      failures++;
      $display("FAIL %0t: after sample of %0d cycles size %s exp %s", $time, c, size_o.name(), exp_size.name());
    end
  endtask


  wb_size_e last_cls;
  always @(posedge clk) if (rst_n && sample_o) last_cls <= sample_cls_o;

  task automatic class_sample(int c, wb_size_e exp_size);
    run_sample(c, exp_size);
    checks++;
    if (last_cls !== cls_of(c)) begin
      failures++;
      $display("FAIL: class of %0d-cycle sample %s exp %s", c, last_cls.name(), cls_of(c).name());
    end
  endtask

  initial begin
    access_i = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (size_o !== SZ_64) begin failures++; $display("FAIL: reset size"); end
    // fast DRAM: stays at 64
    repeat (6) class_sample(499, SZ_64);
    // 500 cycles asks for 32: switch on the 4th sample only
    class_sample(500, SZ_64); class_sample(999, SZ_64); class_sample(700, SZ_64);
    class_sample(500, SZ_32);
    // three samples ask for 16, then one for 64: no switch, streak restarts
    class_sample(1000, SZ_32); class_sample(3999, SZ_32); class_sample(2000, SZ_32);
    class_sample(100, SZ_32);
    // 64, 64, 16 breaks the streak again
    class_sample(100, SZ_32); class_sample(100, SZ_32); class_sample(1500, SZ_32);
    class_sample(1500, SZ_32); class_sample(1500, SZ_32); class_sample(1500, SZ_16);
    // idle DRAM: samples end after 4000 cycles and turn the buffer off
    class_sample(4000, SZ_16); class_sample(9000, SZ_16); class_sample(4000, SZ_16);
    class_sample(4000, SZ_OFF);
    // heavy traffic returns: back to 64
    class_sample(200, SZ_OFF); class_sample(200, SZ_OFF); class_sample(200, SZ_OFF);
    class_sample(200, SZ_64);
    repeat (2) @(posedge clk);
    checks++;
    if (switches != 4) begin failures++; $display("FAIL: %0d switches, expected 4", switches); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
