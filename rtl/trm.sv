// trm: phase detector and phase-difference encoder of the PSK module.
//
// When clkcounter's load strobe arrives, trm looks at the 64-bit cycle from
// tr and finds its phase: the index i of the first sample, counting from 0,
// where the signal rises through mid-scale (sample i-1 below MID, sample i at
// or above MID, taken circularly over the cycle). It subtracts the phase of
// the previous cycle (0 after reset) modulo SAMPLES and puts the difference
// out as an 8-bit binary angle, sym = diff * 256/SAMPLES, so one full turn is
// 256 codes. If no rising crossing exists (a flat or clipped cycle) the
// previous phase is kept, the difference is 0 and `found` is low.
// Timing: sym, phase and found are registered; sym_valid pulses for one
// clock in the cycle after load.
// Recognising the phase change from the previous cycle and producing an
// 8-bit word follows the source design; the crossing detector and the
// binary-angle coding are this design's choices.
module trm #(
  parameter int unsigned SAMPLES  = 16,
  parameter int unsigned SAMPLE_W = 4,
  parameter int unsigned SYM_W    = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        load,
  input  logic [SAMPLES*SAMPLE_W-1:0] frame,
  output logic [SYM_W-1:0]            sym,
  output logic                        sym_valid,
  output logic [$clog2(SAMPLES)-1:0]  phase,
  output logic                        found
);
  localparam int unsigned PW = $clog2(SAMPLES);
  localparam logic [SAMPLE_W-1:0] MID = SAMPLE_W'(1) << (SAMPLE_W - 1);

  initial begin
    if (SYM_W < PW) $error("trm: SYM_W must hold the phase index");
  end

  logic          hit;
  logic [PW-1:0] new_phase;
  logic [PW-1:0] diff;

  always_comb begin
    hit       = 1'b0;
    new_phase = phase;
    for (int i = SAMPLES - 1; i >= 0; i--) begin
      logic [SAMPLE_W-1:0] cur, prv;
      cur = frame[i*SAMPLE_W +: SAMPLE_W];
      prv = frame[((i + SAMPLES - 1) % SAMPLES)*SAMPLE_W +: SAMPLE_W];
      if (prv < MID && cur >= MID) begin  // lowest index wins
        hit       = 1'b1;
        new_phase = PW'(i);
      end
    end
    diff = new_phase - phase;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sym       <= '0;
      sym_valid <= 1'b0;
      phase     <= '0;
      found     <= 1'b0;
    end else begin
      sym_valid <= load;
      if (load) begin
        sym   <= SYM_W'(diff) << (SYM_W - PW);
        phase <= new_phase;
        found <= hit;
      end
    end
  end
endmodule
