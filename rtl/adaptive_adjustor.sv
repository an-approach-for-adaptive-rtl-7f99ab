// adaptive_adjustor: the TAP's Adaptive Adjustor, which sets the write
// buffer size from the DRAM throughput.
//
// How it works: a performance counter measures how many clock cycles the
// DRAM takes for K consecutive accesses (one access = one operation leaving
// the operation queue, signalled by access_i). Each finished interval is a
// sample, classified as
//     cycles <  T1        -> SZ_64 (all entries)
//     T1 <= cycles < T2   -> SZ_32
//     T2 <= cycles < T3   -> SZ_16
//     cycles >= T3        -> SZ_OFF (no write buffer)
// The size only changes when SAMPLES consecutive samples all ask for the same
// size and it differs from the current one; this keeps switching rare.
// The thresholds, K = 10 and four agreeing samples follow the document. This
// design's choices: the size after reset (INIT_SIZE); a sample also ends once
// T3 cycles have passed, because its class can no longer change and an idle
// DRAM must still be recognised; the samples must agree on one size.
//
// Interface: access_i is a one-cycle pulse per DRAM access. size_o is the
// current size, switch_o pulses for one cycle when it changes, sample_o
// pulses when a sample ends and sample_cls_o gives its class.
// Timing: the sample ends in the cycle of the K-th access (or the T3-th
// cycle); the new size is visible the cycle after the deciding sample.
module adaptive_adjustor
  import tap_pkg::*;
#(
  parameter int unsigned K         = 10,
  parameter int unsigned T1        = 500,
  parameter int unsigned T2        = 1000,
  parameter int unsigned T3        = 4000,
  parameter int unsigned SAMPLES   = 4,
  parameter wb_size_e    INIT_SIZE = SZ_64
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     access_i,
  output wb_size_e size_o,
  output logic     switch_o,
  output logic     sample_o,
  output wb_size_e sample_cls_o
);

  localparam int unsigned CW = $clog2(T3 + 1);
  localparam int unsigned AW = $clog2(K + 1);
  localparam int unsigned SW = $clog2(SAMPLES + 1);

  logic [CW-1:0] cyc_q;
  logic [AW-1:0] acc_q;
  logic [SW-1:0] streak_q;
  wb_size_e      last_q, size_q;

  logic [CW-1:0] cyc_now;
  logic          sample_end;
  wb_size_e      cls;

  assign cyc_now    = cyc_q + CW'(1);
  assign sample_end = (access_i && acc_q == AW'(K - 1)) || (cyc_now == CW'(T3));

  always_comb begin
    if (cyc_now < CW'(T1))      cls = SZ_64;
    else if (cyc_now < CW'(T2)) cls = SZ_32;
    else if (cyc_now < CW'(T3)) cls = SZ_16;
    else                        cls = SZ_OFF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_q    <= '0;
      acc_q    <= '0;
      streak_q <= '0;
      last_q   <= INIT_SIZE;
      size_q   <= INIT_SIZE;
      switch_o <= 1'b0;
    end else begin
      switch_o <= 1'b0;
      if (sample_end) begin
        cyc_q <= '0;
        acc_q <= '0;
        if (cls == size_q) begin
          streak_q <= '0;
        end else if (streak_q != '0 && cls == last_q) begin
          if (streak_q == SW'(SAMPLES - 1)) begin
            size_q   <= cls;
            streak_q <= '0;
            switch_o <= 1'b1;
          end else begin
            streak_q <= streak_q + SW'(1);
          end
        end else if (SAMPLES == 1) begin
          size_q   <= cls;
          switch_o <= 1'b1;
        end else begin
          streak_q <= SW'(1);
          last_q   <= cls;
        end
      end else begin
        cyc_q <= cyc_now;
        if (access_i) acc_q <= acc_q + AW'(1);
      end
    end
  end

  assign size_o       = size_q;
  assign sample_o     = sample_end;
  assign sample_cls_o = cls;

endmodule
