// read_fifo: the AMB read FIFO, extended with write-buffer forwarding.
//
// A slot is allocated, in order, for every read entering the operation
// queue. If that read's line was held in the write buffer (address match)
// the buffered data is stored in the slot at allocation. DRAM read data
// (fill_*) arrives in request order and completes the oldest slot still
// waiting; for a forwarded slot the stale DRAM data is dropped and the
// buffered data kept. Slots leave in order once complete, so a read is
// returned in DRAM order and with the DRAM's latency in either case. Replacing the read data with the buffered
// write data follows the document; the slot scheme, depth and handshakes are
// this design's choices.
//
// Interface: alloc_* (valid/ready) at read issue, fill_* (valid only, the
// DRAM cannot be stalled: a slot always exists for it) and out_* (valid/ready;
// out_fwd tells that the data came from the write buffer).
// Timing: data can leave the cycle after the DRAM fills its slot.
module read_fifo
  import tap_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  alloc_valid,
  output logic  alloc_ready,
  input  logic  alloc_fwd,
  input  data_t alloc_data,
  input  logic  fill_valid,
  input  data_t fill_data,
  output logic  out_valid,
  input  logic  out_ready,
  output data_t out_data,
  output logic  out_fwd
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  data_t            data_q [DEPTH];
  logic [DEPTH-1:0] done_q, fwd_q;
  logic [PW-1:0]    wp_q, fp_q, rp_q;
  logic [PW:0]      cnt_q;
  logic             do_alloc, do_pop;

  function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + PW'(1);
  endfunction

  assign alloc_ready = cnt_q != (PW+1)'(DEPTH);
  assign do_alloc    = alloc_valid && alloc_ready;
  assign out_valid   = cnt_q != '0 && done_q[rp_q];
  // done_q: the DRAM has returned data for the slot
  assign do_pop      = out_valid && out_ready;
  assign out_data    = data_q[rp_q];
  assign out_fwd     = fwd_q[rp_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q   <= '0;
      fp_q   <= '0;
      rp_q   <= '0;
      cnt_q  <= '0;
      done_q <= '0;
      fwd_q  <= '0;
    end else begin
      if (fill_valid) begin
        fp_q <= incr(fp_q);
        done_q[fp_q] <= 1'b1;
      end
      if (do_alloc) begin
        wp_q         <= incr(wp_q);
        done_q[wp_q] <= 1'b0;
        fwd_q[wp_q]  <= alloc_fwd;
      end
      if (do_pop) begin
        rp_q         <= incr(rp_q);
        done_q[rp_q] <= 1'b0;
      end
      cnt_q <= cnt_q + (PW+1)'(do_alloc) - (PW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_alloc && alloc_fwd)            data_q[wp_q] <= alloc_data;
    if (fill_valid && !fwd_q[fp_q])       data_q[fp_q] <= fill_data;
  end

endmodule
