// tap_workload_tb: the TAP at its default parameters under two synthetic
// four-core traffic mixes, one memory-heavy and one memory-light.
//
// Each of four cores runs a stencil-like loop: it reads two source arrays
// and writes one destination array, every array in its own rows, and the
// cores' arrays share banks so their rows conflict. Operations of the four
// cores are interleaved round-robin.
//   heavy mix: a command is offered every cycle;
//   light mix: a command every 500 cycles on average.
// For each mix the testbench reports the DRAM page hit rate and the number
// of activations with the TAP, and the same figures for the identical command
// stream sent straight to an open-page DRAM (computed in the testbench).
// Checks: every read returns the golden data; under the heavy mix the TAP
// raises the hit rate and cuts activations; under the light mix the Adaptive
// Adjustor switches the buffer off; at the end the DRAM holds every write.
module tap_workload_tb;
  import tap_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     cmd_valid, cmd_ready, refresh_i;
  op_kind_e cmd_kind;
  addr_t    cmd_addr;
  data_t    cmd_data;
  logic     dram_valid, dram_ready, dram_rd_valid;
  op_t      dram_op;
  data_t    dram_rd_data;
  logic     rd_valid, rd_ready, rd_fwd;
  data_t    rd_data;
  wb_size_e wb_size_o;
  logic     wb_switch_o;
  tap_events_t events_o;

  tap dut (.*);

  dram_model u_dram (
    .clk, .rst_n, .op_valid(dram_valid), .op_ready(dram_ready), .op(dram_op),
    .refresh_i, .rd_valid(dram_rd_valid), .rd_data(dram_rd_data)
  );

  int checks = 0, failures = 0;

  initial begin
    #100000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  data_t gold [line_t];
  data_t exp_rd[$];
  line_t written[$];

  always @(posedge clk) if (rst_n) begin
    if (cmd_valid && cmd_ready) begin
      line_t l;
      l = cmd_addr[29:6];
      if (cmd_kind == OP_WRITE) begin
        if (!gold.exists(l)) written.push_back(l);
        gold[l] = cmd_data;
      end else begin
        exp_rd.push_back(gold.exists(l) ? gold[l] : u_dram.init_pattern(l));
      end
    end
    if (rd_valid && rd_ready) begin
      checks++;
      if (exp_rd.size() == 0 || rd_data !== exp_rd[0]) begin
        failures++; $display("FAIL %0t: read data mismatch", $time);
      end
      if (exp_rd.size() != 0) void'(exp_rd.pop_front());
    end
  end

  assign rd_ready = 1'b1;

  // baseline: the same stream straight into an open-page DRAM
  bit   bl_open [N_BANKS];
  row_t bl_row  [N_BANKS];
  int   bl_hits, bl_ops;

  function automatic addr_t mk(int row, int bank, int sect);
    return {row_t'(row), bank_t'(bank), 5'(sect), 6'b0};
  endfunction

  int wr_no = 0;
  task automatic send(op_kind_e k, addr_t a);
    bank_t b;
    row_t  r;
    b = a[15:11]; r = a[29:16];
    bl_ops++;
    if (bl_open[b] && bl_row[b] == r) bl_hits++;
    bl_open[b] = 1; bl_row[b] = r;
    @(negedge clk);
    cmd_valid = 1; cmd_kind = k; cmd_addr = a;
    cmd_data  = {16{32'h3C00_0000 + wr_no}};
    wr_no++;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd_valid = 0;
  endtask

  // one mix: n iterations of the four cores' loops; gap = mean idle cycles
  task automatic run_mix(string name, int n, int gap, int base_row, output real tap_hr,
                         output real bl_hr, output int tap_acts, output int bl_acts);
    int h0, o0, a0;
    h0 = u_dram.n_hits; o0 = u_dram.n_ops; a0 = u_dram.n_acts;
    bl_hits = 0; bl_ops = 0;
    foreach (bl_open[i]) bl_open[i] = 0;
    for (int i = 0; i < n; i++) begin
      for (int c = 0; c < 4; c++) begin
        int bank, row0, sect;
        bank = c % 2;                          // cores 0,2 and 1,3 share banks
        row0 = base_row + 16 * c + 3 * (i / 32);
        sect = i % 32;
        send(OP_READ,  mk(row0,     bank, sect));   // src array 1
        if (gap > 0) repeat ($urandom_range(0, 2 * gap)) @(negedge clk);
        send(OP_READ,  mk(row0 + 1, bank, sect));   // src array 2
        if (gap > 0) repeat ($urandom_range(0, 2 * gap)) @(negedge clk);
        send(OP_WRITE, mk(row0 + 2, bank, sect));   // dst array
        if (gap > 0) repeat ($urandom_range(0, 2 * gap)) @(negedge clk);
      end
    end
    repeat (300) @(negedge clk);
    tap_hr   = real'(u_dram.n_hits - h0) / real'(u_dram.n_ops - o0);
    bl_hr    = real'(bl_hits) / real'(bl_ops);
    tap_acts = u_dram.n_acts - a0;
    bl_acts  = bl_ops - bl_hits;
    $display("%s mix: page hit rate %0.3f with TAP, %0.3f without; activations %0d vs %0d; size now %s",
             name, tap_hr, bl_hr, tap_acts, bl_acts, wb_size_o.name());
  endtask

  initial begin
    real th, bh;
    int ta, ba;
    bit went_off;
    cmd_valid = 0; cmd_kind = OP_READ; cmd_addr = '0; cmd_data = '0; refresh_i = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    run_mix("heavy", 256, 0, 1000, th, bh, ta, ba);
    checks++;
    if (!(th > bh)) begin failures++; $display("FAIL: heavy mix: no hit rate gain"); end
    checks++;
    if (!(ta < ba)) begin failures++; $display("FAIL: heavy mix: no fewer activations"); end
    checks++;
    if (wb_size_o != SZ_64) begin failures++; $display("FAIL: heavy mix: buffer not at 64 entries"); end

    went_off = 0;
    fork
      run_mix("light", 24, 500, 3000, th, bh, ta, ba);
      forever begin
        @(posedge clk);
        if (wb_size_o == SZ_OFF) went_off = 1;
      end
    join_any
    disable fork;
    checks++;
    if (!went_off) begin failures++; $display("FAIL: light mix: buffer never switched off"); end

    // let everything drain, then compare DRAM contents
    repeat (20000) @(negedge clk);
    foreach (written[i]) begin
      checks++;
      if (u_dram.peek(written[i]) !== gold[written[i]]) begin
        failures++; $display("FAIL: DRAM line %0h stale", written[i]);
      end
    end
    checks++;
    if (exp_rd.size() != 0) begin failures++; $display("FAIL: reads lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
