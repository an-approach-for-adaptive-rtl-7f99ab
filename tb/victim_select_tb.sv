// victim_select_tb: self-checking test of the random victim choice.
// For each buffer size the victim index must stay below the number of
// enabled entries, must follow the reference LFSR sequence (x^16 + x^14 +
// x^13 + x^11 + 1, seed ACE1) and must reach every enabled entry.
module victim_select_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [6:0] active_n;
  logic [5:0] victim_o;

  victim_select #(.N(64)) dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] ref_lfsr;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sizes[4] = '{0, 16, 32, 64};
    bit seen [64];
    active_n = 7'd64;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    ref_lfsr = 16'hACE1;
    foreach (sizes[s]) begin
      active_n = 7'(sizes[s]);
      foreach (seen[i]) seen[i] = 0;
      for (int n = 0; n < 1000; n++) begin
        int exp;
        exp = (sizes[s] == 0) ? 0 : int'(ref_lfsr[5:0]) % sizes[s];
        #1;
        checks++;
        if (int'(victim_o) != exp) begin
          failures++;
          $display("FAIL: size %0d victim %0d exp %0d", sizes[s], victim_o, exp);
        end
        seen[victim_o] = 1;
        @(posedge clk);
        ref_lfsr = {ref_lfsr[14:0], ref_lfsr[15] ^ ref_lfsr[13] ^ ref_lfsr[12] ^ ref_lfsr[10]};
      end
      for (int i = 0; i < sizes[s]; i++) begin
        checks++;
        if (!seen[i]) begin failures++; $display("FAIL: size %0d entry %0d never chosen", sizes[s], i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
