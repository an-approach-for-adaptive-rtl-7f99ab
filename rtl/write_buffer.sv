// write_buffer: the TAP's Write Buffer, a content addressable memory (CAM)
// of buffered write addresses beside a buffer array of 64-byte write data.
//
// How it works
//  * Broadcast port (bc_*): the address of the operation entering the
//    operation queue is compared with every valid entry. A row match (same
//    bank and row) marks the entry "flush pending": it must follow that
//    operation to the DRAM, where it will hit the row just opened. An address
//    match (same 64-byte line, a special case of a row match) also returns
//    the entry's data so that the read FIFO can use it in place of the stale
//    DRAM data.
//  * Probe port (pr_*): an address-only compare used to find an entry that
//    already holds the line of a new write to a closed row, which is then
//    overwritten in place (write merging keeps one copy per line).
//  * Write port (wr_*) fills an entry, invalidate port (inv_*) frees one,
//    read port (rd_*) returns an entry as a write operation for issue.
//  * Sizing: active_n entries (0, N/4, N/2 or N) are in use. An entry is
//    clocked only while it is inside the active range or still holds a write;
//    that enable is where clock gating cells go. Entries outside the range
//    that are still valid are reported on drain_* so they can be written back.
//  * Helper outputs give the lowest free entry inside the active range, the
//    lowest flush-pending entry and the lowest entry to drain.
// The CAM/array split, the broadcast compare, row and address matches and
// clock-gated sizing follow the document. Write merging, the priority
// encoders and the fixed segment boundaries are this design's choices.
//
// Timing: all compares and reads are combinational; writes, invalidates and
// flag updates take effect at the next clock edge. A flag set by a broadcast
// and an invalidate of the same entry in one cycle: invalidate wins. A write
// in the same cycle as a broadcast takes its flag from wr_flag.
module write_buffer
  import tap_pkg::*;
#(
  parameter int unsigned N  = 64,
  localparam int unsigned IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [IW:0]   active_n,
  // broadcast of the operation entering the operation queue
  input  logic          bc_valid,
  input  bank_t         bc_bank,
  input  row_t          bc_row,
  input  line_t         bc_line,
  output logic          bc_addr_hit,
  output data_t         bc_addr_data,
  // address probe for a new write
  input  line_t         pr_line,
  output logic          pr_hit,
  output logic [IW-1:0] pr_idx,
  // fill / overwrite an entry
  input  logic          wr_en,
  input  logic [IW-1:0] wr_idx,
  input  op_t           wr_op,
  input  logic          wr_flag,
  // free an entry
  input  logic          inv_en,
  input  logic [IW-1:0] inv_idx,
  // read an entry for issue
  input  logic [IW-1:0] rd_idx,
  output op_t           rd_op,
  // status
  output logic [N-1:0]  valid_o,
  output logic          free_found,
  output logic [IW-1:0] free_idx,
  output logic          flag_found,
  output logic [IW-1:0] flag_idx,
  output logic          drain_found,
  output logic [IW-1:0] drain_idx
);

  // CAM part
  logic [N-1:0] valid_q, flag_q;
  bank_t        bank_q [N];
  row_t         row_q  [N];
  col_t         col_q  [N];
  line_t        line_q [N];
  // buffer array
  data_t        data_q [N];

  logic [N-1:0] gate_en, row_m, addr_m, probe_m;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      gate_en[i] = (i < int'(active_n)) || valid_q[i];
      row_m[i]   = gate_en[i] && valid_q[i] && bc_valid &&
                   bank_q[i] == bc_bank && row_q[i] == bc_row;
      addr_m[i]  = row_m[i] && line_q[i] == bc_line;
      probe_m[i] = gate_en[i] && valid_q[i] && line_q[i] == pr_line;
    end
  end

  // Write merging keeps at most one entry per line, so at most one of
  // addr_m and of probe_m is set and an OR-reduction selects it.
  always_comb begin
    bc_addr_hit  = |addr_m;
    bc_addr_data = '0;
    pr_hit       = |probe_m;
    pr_idx       = '0;
    for (int i = 0; i < N; i++) begin
      if (addr_m[i])  bc_addr_data = bc_addr_data | data_q[i];
      if (probe_m[i]) pr_idx       = pr_idx | IW'(i);
    end
  end

  always_comb begin
    free_found  = 1'b0;  free_idx  = '0;
    flag_found  = 1'b0;  flag_idx  = '0;
    drain_found = 1'b0;  drain_idx = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (!valid_q[i] && i < int'(active_n)) begin
        free_found = 1'b1; free_idx = IW'(i);
      end
      if (flag_q[i]) begin
        flag_found = 1'b1; flag_idx = IW'(i);
      end
      if (valid_q[i] && i >= int'(active_n)) begin
        drain_found = 1'b1; drain_idx = IW'(i);
      end
    end
  end

  assign valid_o = valid_q;

  always_comb begin
    rd_op      = '0;
    rd_op.kind = OP_WRITE;
    rd_op.bank = bank_q[rd_idx];
    rd_op.row  = row_q[rd_idx];
    rd_op.col  = col_q[rd_idx];
    rd_op.line = line_q[rd_idx];
    rd_op.data = data_q[rd_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      flag_q  <= '0;
    end else begin
      flag_q <= flag_q | row_m;
      if (inv_en) begin
        valid_q[inv_idx] <= 1'b0;
        flag_q[inv_idx]  <= 1'b0;
      end
      if (wr_en) begin
        valid_q[wr_idx] <= 1'b1;
        flag_q[wr_idx]  <= wr_flag;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && gate_en[wr_idx]) begin
      bank_q[wr_idx] <= wr_op.bank;
      row_q[wr_idx]  <= wr_op.row;
      col_q[wr_idx]  <= wr_op.col;
      line_q[wr_idx] <= wr_op.line;
      data_q[wr_idx] <= wr_op.data;
    end
  end

endmodule
