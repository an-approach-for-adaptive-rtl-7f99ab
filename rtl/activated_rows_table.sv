// activated_rows_table: the TAP's Activated Rows Table.
//
// One entry per independent bank (here per bank pair, 32 of them) records
// whether a row is open and which one. The DRAM runs in open page mode, so
// every operation that enters the operation queue leaves its row open in its
// bank: the TAP writes (upd_bank, upd_row) here in that cycle. A write is
// sent on only if its row is the open one (lookup port). A REFRESH closes all
// rows, so refresh_i clears every entry. Entries start closed after reset.
// Structure follows the document; the refresh clear and reset state are this
// design's choices.
//
// Timing: lookup is combinational; update and refresh take effect at the
// next clock edge (update wins over refresh in the same cycle for its bank).
module activated_rows_table
  import tap_pkg::*;
#(
  parameter int unsigned NB = N_BANKS
) (
  input  logic  clk,
  input  logic  rst_n,
  // lookup
  input  logic [$clog2(NB)-1:0] lk_bank,
  input  row_t  lk_row,
  output logic  lk_hit,
  // update from the operation entering the operation queue
  input  logic  upd_valid,
  input  logic [$clog2(NB)-1:0] upd_bank,
  input  row_t  upd_row,
  // close all rows
  input  logic  refresh_i
);

  logic [NB-1:0] open_q;
  row_t          row_q [NB];

  assign lk_hit = open_q[lk_bank] && (row_q[lk_bank] == lk_row);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_q <= '0;
    end else begin
      if (refresh_i) open_q <= '0;
      if (upd_valid) open_q[upd_bank] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (upd_valid) row_q[upd_bank] <= upd_row;
  end

endmodule
