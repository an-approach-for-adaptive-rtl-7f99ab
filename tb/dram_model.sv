// dram_model: behavioural model of the DDR2 SDRAM behind the AMB, for
// simulation only (not synthesizable). It takes one 64-byte operation at a
// time in order, in open page mode: a bank keeps its last row open until
// another row of that bank is needed or a refresh closes every row.
//   page hit        : T_BURST cycles
//   bank closed     : T_RCD + T_BURST (ACTIVATE first)
//   other row open  : T_RP + T_RCD + T_BURST (PRECHARGE, ACTIVATE)
// Read data is returned in order T_CL cycles after the operation completes.
// Unwritten lines read as a pattern derived from the line address
// (init_pattern). The model counts operations, page hits and activations,
// and exposes its contents through peek().
// Interface: op_* valid/ready; rd_valid/rd_data (no back-pressure);
// refresh_i closes all rows.
module dram_model
  import tap_pkg::*;
#(
  parameter int T_BURST = 4,
  parameter int T_RCD   = 5,
  parameter int T_RP    = 5,
  parameter int T_CL    = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  op_valid,
  output logic  op_ready,
  input  op_t   op,
  input  logic  refresh_i,
  output logic  rd_valid,
  output data_t rd_data
);

  data_t mem [line_t];
  bit    open_b [N_BANKS];
  row_t  open_r [N_BANKS];

  int n_ops = 0, n_hits = 0, n_acts = 0, n_reads = 0, n_writes = 0;

  int    busy = 0;
  int    rd_due_q[$];
  data_t rd_dat_q[$];
  int    cyc = 0;

  function automatic data_t init_pattern(line_t l);
    return {16{8'hA5, l}};
  endfunction

  function automatic data_t peek(line_t l);
    return mem.exists(l) ? mem[l] : init_pattern(l);
  endfunction

  assign op_ready = rst_n && busy == 0;

  always @(posedge clk) begin
    rd_valid <= 1'b0;
    if (!rst_n) begin
      busy = 0;
      foreach (open_b[i]) open_b[i] = 0;
    end else begin
      cyc++;
      if (busy > 0) busy--;
      if (refresh_i) foreach (open_b[i]) open_b[i] = 0;
      if (op_valid && op_ready) begin
        int t;
        n_ops++;
        if (open_b[op.bank] && open_r[op.bank] == op.row) begin
          n_hits++;
          t = T_BURST;
        end else begin
          n_acts++;
          t = (open_b[op.bank] ? T_RP : 0) + T_RCD + T_BURST;
          open_b[op.bank] = 1;
          open_r[op.bank] = op.row;
        end
        busy = t - 1;
        if (op.kind == OP_WRITE) begin
          n_writes++;
          mem[op.line] = op.data;
        end else begin
          n_reads++;
          rd_due_q.push_back(cyc + t + T_CL);
          rd_dat_q.push_back(peek(op.line));
        end
      end
      if (rd_due_q.size() != 0 && rd_due_q[0] <= cyc) begin
        void'(rd_due_q.pop_front());
        rd_valid <= 1'b1;
        rd_data  <= rd_dat_q.pop_front();
      end
    end
  end

endmodule
