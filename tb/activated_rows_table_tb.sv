// activated_rows_table_tb: self-checking test of the Activated Rows Table.
// Random updates, lookups and refreshes are applied and every lookup is
// compared with a reference model (an open flag and a row per bank pair).
module activated_rows_table_tb;
  import tap_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [BANK_W-1:0] lk_bank, upd_bank;
  row_t lk_row, upd_row;
  logic lk_hit, upd_valid, refresh_i;

  activated_rows_table dut (.*);

  int checks = 0, failures = 0;
  bit   ref_open [N_BANKS];
  row_t ref_row  [N_BANKS];

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_lookup(int b, row_t r);
    bit exp;
    lk_bank = BANK_W'(b); lk_row = r;
    #1;
    exp = ref_open[b] && ref_row[b] == r;
    checks++;
    if (lk_hit !== exp) begin
      failures++;
      $display("FAIL: bank %0d row %0d hit %0b exp %0b", b, r, lk_hit, exp);
    end
  endtask

  initial begin
    upd_valid = 0; refresh_i = 0; lk_bank = '0; lk_row = '0; upd_bank = '0; upd_row = '0;
    foreach (ref_open[i]) ref_open[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // after reset every row is closed
    for (int b = 0; b < N_BANKS; b++) check_lookup(b, row_t'($urandom));
    for (int n = 0; n < 5000; n++) begin
      int b;
      row_t r;
      b = $urandom_range(0, N_BANKS - 1);
      r = row_t'($urandom_range(0, 7));   // few rows: many hits
      upd_valid = ($urandom_range(0, 1) == 1);
      upd_bank  = BANK_W'($urandom_range(0, N_BANKS - 1));
      upd_row   = row_t'($urandom_range(0, 7));
      refresh_i = ($urandom_range(0, 199) == 0);
      check_lookup(b, r);
      @(posedge clk);
      if (refresh_i) foreach (ref_open[i]) ref_open[i] = 0;
      if (upd_valid) begin ref_open[upd_bank] = 1; ref_row[upd_bank] = upd_row; end
      @(negedge clk);
      upd_valid = 0; refresh_i = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
