// tap: Throughput-Aware Page Hit Aware Write Buffer, placed in the AMB of an
// FB-DIMM between the command decoder and the DDR2 port.
//
// Idea: reads are what the processor waits for, writes are not. A write to a
// row that is not open in its bank would cost a PRECHARGE/ACTIVATE pair, so
// it is parked in a write buffer until some other operation opens that row;
// then it follows that operation and hits the open row. Fewer activations
// mean less DRAM power and a cooler module, with reads never delayed.
//
// Per cycle at most one operation enters the operation queue, chosen as:
//  1. a buffered write whose row was just opened (row match, "flush
//     pending"), lowest entry first; new commands wait meanwhile;
//  2. the decoded command:
//       read  -> operation queue, a read FIFO slot is allocated and, on an
//                address match, filled with the buffered data;
//       write, row open (Activated Rows Table hit) -> operation queue;
//       write, row closed, same line already buffered -> overwrite entry;
//       write, row closed, buffer off (size 0) -> operation queue;
//       write, row closed, free entry -> buffered;
//       write, row closed, buffer full -> a random entry is evicted to the
//                operation queue and the new write takes its place;
//  3. when idle (no command, empty queue) a write held in an entry that the
//     last down-sizing switched off is written back.
// Every operation entering the queue updates the Activated Rows Table and is
// broadcast to the write buffer, which flags its row matches (step 1).
// The Adaptive Adjustor watches operations leaving to the DRAM and sets the
// number of enabled entries to 64, 32, 16 or 0.
//
// This follows the document's description of the TAP. This design's own
// choices: the priority order above, write merging for a second write to a
// buffered line, one operation per cycle, stalling new commands while row
// matches are issued, and draining switched-off entries only when idle.
//
// Interface: cmd_* southbound operations (valid/ready); dram_* operations to
// the DDR port (valid/ready) and its in-order read data (valid only);
// rd_* northbound read data (valid/ready); refresh_i closes all rows;
// wb_size_o, wb_switch_o and events_o report the buffer size and activity.
// Timing: a command is decoded in one cycle and can enter the operation
// queue in the next; an operation pushed can leave at the following edge.
module tap
  import tap_pkg::*;
#(
  parameter int unsigned N_ENTRIES  = 64,
  parameter int unsigned OPQ_DEPTH  = 8,
  parameter int unsigned RDQ_DEPTH  = 16,
  parameter int unsigned K_ACCESSES = 10,
  parameter int unsigned T1         = 500,
  parameter int unsigned T2         = 1000,
  parameter int unsigned T3         = 4000,
  parameter int unsigned SAMPLES    = 4,
  parameter wb_size_e    INIT_SIZE  = SZ_64
) (
  input  logic        clk,
  input  logic        rst_n,
  // southbound commands
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  op_kind_e    cmd_kind,
  input  addr_t       cmd_addr,
  input  data_t       cmd_data,
  input  logic        refresh_i,
  // DDR port
  output logic        dram_valid,
  input  logic        dram_ready,
  output op_t         dram_op,
  input  logic        dram_rd_valid,
  input  data_t       dram_rd_data,
  // northbound read data
  output logic        rd_valid,
  input  logic        rd_ready,
  output data_t       rd_data,
  output logic        rd_fwd,
  // status
  output wb_size_e    wb_size_o,
  output logic        wb_switch_o,
  output tap_events_t events_o
);

  localparam int unsigned IW = $clog2(N_ENTRIES);

  // command decoder
  logic dec_valid, dec_ready;
  op_t  dec_op;

  cmd_decoder u_dec (
    .clk, .rst_n,
    .in_valid (cmd_valid), .in_ready (cmd_ready),
    .in_kind  (cmd_kind),  .in_addr  (cmd_addr), .in_data (cmd_data),
    .out_valid(dec_valid), .out_ready(dec_ready), .out_op (dec_op)
  );

  // adaptive adjustor
  wb_size_e    size;
  logic [IW:0] active_n;
  logic        dram_access;
  logic        smp_unused;
  wb_size_e    smp_cls_unused;

  assign dram_access = dram_valid && dram_ready;

  adaptive_adjustor #(
    .K(K_ACCESSES), .T1(T1), .T2(T2), .T3(T3), .SAMPLES(SAMPLES),
    .INIT_SIZE(INIT_SIZE)
  ) u_adj (
    .clk, .rst_n, .access_i(dram_access), .size_o(size), .switch_o(wb_switch_o),
    .sample_o(smp_unused), .sample_cls_o(smp_cls_unused)
  );

  assign active_n  = (IW+1)'(size_entries(size, N_ENTRIES));
  assign wb_size_o = size;

  // operation queue
  logic opq_push, opq_ready, opq_empty;
  op_t  opq_op;

  operation_queue #(.DEPTH(OPQ_DEPTH)) u_opq (
    .clk, .rst_n,
    .push_valid(opq_push), .push_ready(opq_ready), .push_op(opq_op),
    .pop_valid (dram_valid), .pop_ready(dram_ready), .pop_op(dram_op),
    .empty_o   (opq_empty)
  );

  // activated rows table
  logic art_hit;

  activated_rows_table #(.NB(N_BANKS)) u_art (
    .clk, .rst_n,
    .lk_bank  (dec_op.bank), .lk_row(dec_op.row), .lk_hit(art_hit),
    .upd_valid(opq_push),    .upd_bank(opq_op.bank), .upd_row(opq_op.row),
    .refresh_i
  );

  // write buffer
  logic          bc_addr_hit, pr_hit;
  data_t         bc_addr_data;
  logic [IW-1:0] pr_idx, free_idx, flag_idx, drain_idx, victim_idx, wr_idx, inv_idx, rd_idx;
  logic          free_found, flag_found, drain_found;
  logic          wr_en, wr_flag, inv_en;
  op_t           wb_rd_op;
  logic [N_ENTRIES-1:0] wb_valid_unused;

  write_buffer #(.N(N_ENTRIES)) u_wb (
    .clk, .rst_n, .active_n,
    .bc_valid(opq_push), .bc_bank(opq_op.bank), .bc_row(opq_op.row), .bc_line(opq_op.line),
    .bc_addr_hit, .bc_addr_data,
    .pr_line(dec_op.line), .pr_hit, .pr_idx,
    .wr_en, .wr_idx, .wr_op(dec_op), .wr_flag,
    .inv_en, .inv_idx,
    .rd_idx, .rd_op(wb_rd_op),
    .valid_o(wb_valid_unused),
    .free_found, .free_idx, .flag_found, .flag_idx, .drain_found, .drain_idx
  );

  victim_select #(.N(N_ENTRIES)) u_victim (
    .clk, .rst_n, .active_n, .victim_o(victim_idx)
  );

  // read FIFO
  logic rdq_alloc, rdq_ready;

  read_fifo #(.DEPTH(RDQ_DEPTH)) u_rdq (
    .clk, .rst_n,
    .alloc_valid(rdq_alloc), .alloc_ready(rdq_ready),
    .alloc_fwd  (bc_addr_hit), .alloc_data(bc_addr_data),
    .fill_valid (dram_rd_valid), .fill_data(dram_rd_data),
    .out_valid  (rd_valid), .out_ready(rd_ready), .out_data(rd_data), .out_fwd(rd_fwd)
  );

  // control: choose the one operation that enters the operation queue
  always_comb begin
    opq_push  = 1'b0;
    opq_op    = dec_op;
    dec_ready = 1'b0;
    rdq_alloc = 1'b0;
    wr_en     = 1'b0;
    wr_idx    = free_idx;
    wr_flag   = 1'b0;
    inv_en    = 1'b0;
    inv_idx   = flag_idx;
    rd_idx    = flag_idx;
    events_o  = '0;

    if (flag_found) begin
      // 1. row match: follow the operation that opened the row
      rd_idx    = flag_idx;
      inv_idx   = flag_idx;
      opq_op    = wb_rd_op;
      opq_push  = opq_ready;
      inv_en    = opq_ready;
      events_o.row_flush = opq_ready;
    end else if (dec_valid) begin
      // 2. the decoded command
      if (dec_op.kind == OP_READ) begin
        opq_push  = opq_ready && rdq_ready;
        rdq_alloc = opq_push;
        dec_ready = opq_push;
        events_o.read     = opq_push;
        events_o.addr_fwd = opq_push && bc_addr_hit;
      end else if (art_hit || (active_n == '0 && !pr_hit)) begin
        opq_push  = opq_ready;
        dec_ready = opq_ready;
        events_o.direct_write = opq_ready;
      end else if (pr_hit) begin
        wr_en     = 1'b1;
        wr_idx    = pr_idx;
        dec_ready = 1'b1;
        events_o.merged = 1'b1;
      end else if (free_found) begin
        wr_en     = 1'b1;
        wr_idx    = free_idx;
        dec_ready = 1'b1;
        events_o.buffered = 1'b1;
      end else begin
        // buffer full: evict a random entry, the new write takes its place
        rd_idx    = victim_idx;
        inv_idx   = victim_idx;
        wr_idx    = victim_idx;
        opq_op    = wb_rd_op;
        opq_push  = opq_ready;
        inv_en    = opq_ready;
        wr_en     = opq_ready;
        wr_flag   = dec_op.bank == wb_rd_op.bank && dec_op.row == wb_rd_op.row;
        dec_ready = opq_ready;
        events_o.evict    = opq_ready;
        events_o.buffered = opq_ready;
      end
    end else if (drain_found && opq_empty) begin
      // 3. write back entries switched off by a down-sizing
      rd_idx   = drain_idx;
      inv_idx  = drain_idx;
      opq_op   = wb_rd_op;
      opq_push = 1'b1;
      inv_en   = 1'b1;
      events_o.drain = 1'b1;
    end
  end

  // A row match can only exist for a row just opened by a queued operation,
  // so a write that finds its row open never finds its line buffered.
  a_no_hit_and_buffered: assert property (@(posedge clk) disable iff (!rst_n)
    dec_valid && !flag_found && dec_op.kind == OP_WRITE && art_hit |-> !pr_hit);
  // At most one operation per cycle, and the DDR port handshake is stable.
  a_dram_hold: assert property (@(posedge clk) disable iff (!rst_n)
    dram_valid && !dram_ready |=> dram_valid);

endmodule
