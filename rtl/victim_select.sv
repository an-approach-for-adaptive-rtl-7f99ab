// victim_select: chooses which write buffer entry to evict when the buffer
// is full.
//
// A 16-bit maximal-length Fibonacci LFSR (taps 16,14,13,11) advances every
// cycle; its low bits, masked to the number of active entries (a power of
// two: N/4, N/2 or N), give the victim index. The document replaces a random
// entry rather than the oldest; the LFSR, its polynomial and seed are this
// design's choices.
//
// Interface: active_n is the number of enabled entries, victim_o the chosen
// index, always below active_n when active_n > 0.
// Timing: combinational from the LFSR state; a new value every clock.
module victim_select #(
  parameter int unsigned N    = 64,
  parameter logic [15:0] SEED = 16'hACE1,
  localparam int unsigned IW  = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [IW:0]   active_n,
  output logic [IW-1:0] victim_o
);

  logic [15:0] lfsr_q;
  logic        fb;

  assign fb = lfsr_q[15] ^ lfsr_q[13] ^ lfsr_q[12] ^ lfsr_q[10];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lfsr_q <= SEED;
    else        lfsr_q <= {lfsr_q[14:0], fb};
  end

  logic [IW:0] mask;
  assign mask     = (active_n == '0) ? '0 : active_n - (IW+1)'(1);
  assign victim_o = lfsr_q[IW-1:0] & mask[IW-1:0];

endmodule
