// tap_tb: end-to-end test of the TAP at its default parameters, with the
// behavioural DRAM model on the DDR port.
//
// A golden memory in the testbench is updated as each command is accepted;
// every read returned northbound must carry the golden value of its line at
// the time the read was accepted, in order, and at the end (after the buffer
// has been switched off and written back) the DRAM must hold the golden
// value of every line written. Phases:
//   1. an idle read, to check the decoder + queue latency (2 cycles);
//   2. read one array while writing another in other rows of the same bank,
//      the document's motivating case: the DRAM page hit rate must beat the
//      hit rate of the same command stream sent straight to the DRAM, and
//      the buffer fills, so random evictions and row-match flushes happen;
//   3. write-then-read and write-twice to buffered lines (forwarding, merging);
//   4. random traffic over few banks and rows, with refreshes;
//   5. slower and slower traffic, so the Adaptive Adjustor shrinks the
//      buffer to 32, 16 and off, writing back switched-off entries;
//   6. writes with the buffer off (sent straight on), then fast traffic so
//      the buffer grows back.
// Each mechanism is counted and must occur at least once.
module tap_tb;
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
  longint cycle = 0;
  longint acc_cyc = -1, pop_cyc = -1;   // first command accepted / first DRAM op

  // event counters
  int n_read, n_direct, n_buffered, n_merged, n_flush, n_fwd, n_evict, n_drain;
  int n_switch, n_refresh, n_rd_fwd_out;
  bit seen_size [4];

  initial begin
    #40000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // golden memory and expected read data
  data_t gold [line_t];
  data_t exp_rd[$];
  line_t written[$];

  function automatic data_t gold_of(line_t l);
    return gold.exists(l) ? gold[l] : u_dram.init_pattern(l);
  endfunction

  function automatic addr_t mk(int row, int bank, int sect);
    return {row_t'(row), bank_t'(bank), 5'(sect), 6'b0};
  endfunction

  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (events_o.read)         n_read++;
    if (events_o.direct_write) n_direct++;
    if (events_o.buffered)     n_buffered++;
    if (events_o.merged)       n_merged++;
    if (events_o.row_flush)    n_flush++;
    if (events_o.addr_fwd)     n_fwd++;
    if (events_o.evict)        n_evict++;
    if (events_o.drain)        n_drain++;
    if (wb_switch_o)           n_switch++;
    if (refresh_i)             n_refresh++;
    seen_size[wb_size_o] = 1;
    if (cmd_valid && cmd_ready && acc_cyc < 0) acc_cyc = cycle;
    if (dram_valid && dram_ready && pop_cyc < 0) pop_cyc = cycle;
    if (cmd_valid && cmd_ready) begin
      line_t l;
      l = cmd_addr[29:6];
      if (cmd_kind == OP_WRITE) begin
        if (!gold.exists(l)) written.push_back(l);
        gold[l] = cmd_data;
      end else begin
        exp_rd.push_back(gold_of(l));
      end
    end
    if (rd_valid && rd_ready) begin
      checks++;
      if (rd_fwd) n_rd_fwd_out++;
      if (exp_rd.size() == 0) begin
        failures++; $display("FAIL: unexpected read data");
      end else begin
        data_t e;
        e = exp_rd.pop_front();
        if (rd_data !== e) begin
          failures++;
          $display("FAIL %0t: read data %0h exp %0h", $time, rd_data[63:0], e[63:0]);
        end
      end
    end
  end

  // northbound consumer with occasional back-pressure
  always @(negedge clk) rd_ready <= ($urandom_range(0, 7) != 0);

  int wr_no = 0;
  task automatic send(op_kind_e k, addr_t a);
    @(negedge clk);
    cmd_valid = 1; cmd_kind = k; cmd_addr = a;
    cmd_data  = {16{32'h5700_0000 + wr_no}};
    wr_no++;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic idle(int n);
    repeat (n) @(negedge clk);
  endtask

  // hit rate of a command stream sent straight to an open-page DRAM
  bit   bl_open [N_BANKS];
  row_t bl_row  [N_BANKS];
  int   bl_hits = 0, bl_ops = 0;
  task automatic base_track(addr_t a);
    bank_t b;
    row_t  r;
    b = a[15:11]; r = a[29:16];
    bl_ops++;
    if (bl_open[b] && bl_row[b] == r) bl_hits++;
    bl_open[b] = 1; bl_row[b] = r;
  endtask

  initial begin
    int h0, o0;
    cmd_valid = 0; cmd_kind = OP_READ; cmd_addr = '0; cmd_data = '0; refresh_i = 0;
    foreach (bl_open[i]) bl_open[i] = 0;
    foreach (seen_size[i]) seen_size[i] = 0;
    n_read = 0; n_direct = 0; n_buffered = 0; n_merged = 0; n_flush = 0; n_fwd = 0;
    n_evict = 0; n_drain = 0; n_switch = 0; n_refresh = 0; n_rd_fwd_out = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // 1. latency of a read through an idle TAP
    send(OP_READ, mk(1, 1, 1));
    idle(20);
    checks++;
    if (pop_cyc - acc_cyc != 2) begin
      failures++; $display("FAIL: read reached the DDR port after %0d cycles, expected 2", pop_cyc - acc_cyc);
    end

    // 2. read array A (rows 100..) while writing array B (rows 200..), bank 3
    h0 = u_dram.n_hits; o0 = u_dram.n_ops;
    for (int i = 0; i < 400; i++) begin
      send(OP_READ,  mk(100 + i / 32, 3, i % 32)); base_track(mk(100 + i / 32, 3, i % 32));
      send(OP_WRITE, mk(200 + i / 32, 3, i % 32)); base_track(mk(200 + i / 32, 3, i % 32));
    end
    idle(200);
    begin
      real tap_rate, base_rate;
      tap_rate  = real'(u_dram.n_hits - h0) / real'(u_dram.n_ops - o0);
      base_rate = real'(bl_hits) / real'(bl_ops);
      $display("array copy: page hit rate %0.3f with the write buffer, %0.3f without",
               tap_rate, base_rate);
      checks++;
      if (!(tap_rate > base_rate + 0.2)) begin failures++; $display("FAIL: no hit rate gain"); end
    end

    // 3. forwarding and merging on lines in closed rows of bank 7
    for (int i = 0; i < 8; i++) begin
      send(OP_WRITE, mk(300 + i, 7, i));
      send(OP_WRITE, mk(300 + i, 7, i));     // same line again: merged
      send(OP_WRITE, mk(400 + i, 8, i));
      send(OP_READ,  mk(400 + i, 8, i));     // buffered line: forwarded
    end
    idle(200);

    // 4. random traffic with refreshes
    for (int i = 0; i < 1500; i++) begin
      send($urandom_range(0, 2) == 0 ? OP_READ : OP_WRITE,
           mk($urandom_range(0, 5), $urandom_range(0, 3), $urandom_range(0, 7)));
      if ($urandom_range(0, 199) == 0) begin
        @(negedge clk); refresh_i = 1; @(negedge clk); refresh_i = 0;
      end
      idle($urandom_range(0, 2));
    end
    // refill the buffer with writes to closed rows before slowing down
    for (int i = 0; i < 64; i++) send(OP_WRITE, mk(500 + i / 8, 10 + i % 8, i % 32));

    // 5. slower traffic: 32 entries, 16 entries, then off
    for (int i = 0; i < 60; i++) begin
      send(OP_READ, mk(600, 12, i % 32)); idle(70);
    end
    for (int i = 0; i < 60; i++) begin
      send((i % 2) != 0 ? OP_READ : OP_WRITE, mk(601 + i % 3, 13, i % 32)); idle(200);
    end
    idle(20000);
    checks++;
    if (wb_size_o != SZ_OFF) begin failures++; $display("FAIL: buffer not off after idling"); end

    // 6. buffer off: writes go straight on; then fast traffic again
    for (int i = 0; i < 20; i++) send(OP_WRITE, mk(700 + i, 14, i));
    for (int i = 0; i < 200; i++) begin
      send((i % 2) != 0 ? OP_READ : OP_WRITE, mk(800 + (i % 4), 15 + (i % 2), i % 32));
    end
    idle(20000);   // let the buffer go off and write everything back

    // final contents of the DRAM
    foreach (written[i]) begin
      checks++;
      if (u_dram.peek(written[i]) !== gold[written[i]]) begin
        failures++; $display("FAIL: DRAM line %0h stale", written[i]);
      end
    end
    checks++;
    if (exp_rd.size() != 0) begin failures++; $display("FAIL: %0d reads never returned", exp_rd.size()); end

    $display("events: read %0d direct_write %0d buffered %0d merged %0d row_flush %0d",
             n_read, n_direct, n_buffered, n_merged, n_flush);
    $display("        addr_fwd %0d (returned %0d) evict %0d drain %0d switch %0d refresh %0d",
             n_fwd, n_rd_fwd_out, n_evict, n_drain, n_switch, n_refresh);
    $display("        sizes seen: off %0b 16 %0b 32 %0b 64 %0b; DRAM ops %0d hits %0d activates %0d",
             seen_size[0], seen_size[1], seen_size[2], seen_size[3],
             u_dram.n_ops, u_dram.n_hits, u_dram.n_acts);
    begin
      int cnt[13];
      string nm[13];
      cnt = '{n_read, n_direct, n_buffered, n_merged, n_flush, n_fwd, n_evict, n_drain,
              n_switch, n_refresh, int'(seen_size[1]), int'(seen_size[2]), int'(seen_size[0])};
      nm  = '{"read", "direct_write", "buffered", "merged", "row_flush", "addr_fwd", "evict",
              "drain", "resize", "refresh", "size16", "size32", "size_off"};
      foreach (cnt[i]) begin
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL: mechanism %s never happened", nm[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
