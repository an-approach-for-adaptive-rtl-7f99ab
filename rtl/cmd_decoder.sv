// cmd_decoder: command decoder at the TAP input.
//
// Takes one DRAM operation per cycle from the AMB's southbound side (kind,
// 30-bit byte address, 64 bytes of write data) and registers it as a decoded
// op_t: bank group, row, column and 64-byte line address, split according to
// the module's memory map (see tap_pkg). The decoding follows the document's
// address mapping; the valid/ready handshake and the single register stage
// are this design's choices.
//
// Interface: in_* is a valid/ready input, out_* a valid/ready output.
// Timing: one cycle of latency; full throughput (a new operation is taken
// in the same cycle the held one leaves).
module cmd_decoder
  import tap_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  op_kind_e in_kind,
  input  addr_t    in_addr,
  input  data_t    in_data,
  output logic     out_valid,
  input  logic     out_ready,
  output op_t      out_op
);

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_op    <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_op <= decode_addr(in_kind, in_addr, in_data);
    end
  end

endmodule
