// write_buffer_tb: self-checking test of the write buffer (CAM + array).
// Random broadcasts, probes, writes, invalidates, reads and size changes are
// applied each cycle; every output is compared with a reference model kept
// in the testbench (valid, flush flag and contents of each entry). Lines and
// rows are drawn from small ranges so that row and address matches are
// frequent. The testbench keeps at most one entry per line, as the TAP does.
module write_buffer_tb;
  import tap_pkg::*;

  localparam int N  = 64;
  localparam int IW = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [IW:0] active_n;
  logic bc_valid, bc_addr_hit, pr_hit, wr_en, wr_flag, inv_en;
  bank_t bc_bank; row_t bc_row; line_t bc_line, pr_line;
  data_t bc_addr_data;
  logic [IW-1:0] pr_idx, wr_idx, inv_idx, rd_idx, free_idx, flag_idx, drain_idx;
  op_t wr_op, rd_op;
  logic [N-1:0] valid_o;
  logic free_found, flag_found, drain_found;

  write_buffer #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  int n_rowm = 0, n_addrm = 0;
  bit  m_valid [N];
  bit  m_flag  [N];
  op_t m_op    [N];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic op_t rand_op();
    op_t o;
    o.kind = OP_WRITE;
    o.bank = bank_t'($urandom_range(0, 3));
    o.row  = row_t'($urandom_range(0, 3));
    o.col  = col_t'({$urandom_range(0, 3), 3'b000});
    o.line = {o.row, o.bank, o.col[7:3]};
    o.data = {16{$urandom}};
    return o;
  endfunction

  task automatic expect_eq(string what, logic [1023:0] got, logic [1023:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t: %s got %0h exp %0h", $time, what, got, exp);
    end
  endtask

  initial begin
    op_t b;
    int an;
    bc_valid = 0; wr_en = 0; inv_en = 0; wr_flag = 0; rd_idx = '0;
    bc_bank = '0; bc_row = '0; bc_line = '0; pr_line = '0; wr_op = '0; wr_idx = '0; inv_idx = '0;
    active_n = 7'd64;
    foreach (m_valid[i]) begin m_valid[i] = 0; m_flag[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 99) == 0) begin
        case ($urandom_range(0, 3))
          0: an = 0; 1: an = 16; 2: an = 32; default: an = 64;
        endcase
        active_n = (IW+1)'(an);
      end
      b = rand_op();
      bc_valid = $urandom_range(0, 2) == 0;
      bc_bank = b.bank; bc_row = b.row; bc_line = b.line;
      pr_line = rand_op().line;
      rd_idx = IW'($urandom_range(0, N - 1));
      inv_en = $urandom_range(0, 3) == 0;
      inv_idx = IW'($urandom_range(0, N - 1));
      // write: a free entry in range or an entry holding the same line
      wr_en = 0;
      wr_op = rand_op();
      wr_flag = $urandom_range(0, 1);
      begin
        int same;
        same = -1;
        for (int i = 0; i < N; i++) if (m_valid[i] && m_op[i].line == wr_op.line) same = i;
        if (same >= 0) begin
          wr_idx = IW'(same); wr_en = $urandom_range(0, 1);
        end else begin
          int k;
          k = $urandom_range(0, N - 1);
          if (k < int'(active_n) && !m_valid[k]) begin wr_idx = IW'(k); wr_en = 1; end
        end
      end
      #1;
      // compare combinational outputs with the model
      begin
        bit exp_ah, exp_ph, ff, lf, df;
        data_t exp_ad;
        int exp_pi, fi, li, di;
        exp_ah = 0; exp_ph = 0; ff = 0; lf = 0; df = 0; exp_ad = '0;
        exp_pi = 0; fi = 0; li = 0; di = 0;
        for (int i = N - 1; i >= 0; i--) begin
          if (m_valid[i] && bc_valid && m_op[i].bank == bc_bank && m_op[i].row == bc_row) begin
            n_rowm++;
            if (m_op[i].line == bc_line) begin exp_ah = 1; exp_ad = m_op[i].data; n_addrm++; end
          end
          if (m_valid[i] && m_op[i].line == pr_line) begin exp_ph = 1; exp_pi = i; end
          if (!m_valid[i] && i < int'(active_n)) begin ff = 1; fi = i; end
          if (m_flag[i]) begin lf = 1; li = i; end
          if (m_valid[i] && i >= int'(active_n)) begin df = 1; di = i; end
        end
        expect_eq("bc_addr_hit", bc_addr_hit, exp_ah);
        if (exp_ah) expect_eq("bc_addr_data", bc_addr_data, exp_ad);
        expect_eq("pr_hit", pr_hit, exp_ph);
        if (exp_ph) expect_eq("pr_idx", pr_idx, exp_pi);
        expect_eq("free_found", free_found, ff);
        if (ff) expect_eq("free_idx", free_idx, fi);
        expect_eq("flag_found", flag_found, lf);
        if (lf) expect_eq("flag_idx", flag_idx, li);
        expect_eq("drain_found", drain_found, df);
        if (df) expect_eq("drain_idx", drain_idx, di);
        if (m_valid[rd_idx]) expect_eq("rd_op", rd_op, m_op[rd_idx]);
        for (int i = 0; i < N; i++) if (valid_o[i] !== m_valid[i]) begin
          failures++; $display("FAIL: valid[%0d]", i);
        end
      end
      // update the model as the clock edge will
      @(posedge clk);
      for (int i = 0; i < N; i++)
        if (m_valid[i] && bc_valid && m_op[i].bank == bc_bank && m_op[i].row == bc_row) m_flag[i] = 1;
      if (inv_en) begin m_valid[inv_idx] = 0; m_flag[inv_idx] = 0; end
      if (wr_en) begin m_valid[wr_idx] = 1; m_flag[wr_idx] = wr_flag; m_op[wr_idx] = wr_op; end
    end
    checks++;
    if (n_rowm == 0 || n_addrm == 0) begin failures++; $display("FAIL: no matches exercised"); end
    $display("row matches %0d, address matches %0d", n_rowm, n_addrm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
