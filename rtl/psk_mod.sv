// psk_mod: the PSK module - symbol generation from the data signal X.
//
// Structure (as in the source design): a clock counter (clkcounter) drives
// three stages.
//   tr        4-bit samples in, one per clock -> 64-bit cycle
//   trm       64-bit cycle -> 8-bit phase-difference word
//   generator 8-bit word -> single serial line
// Timing with the defaults: samples of cycle n enter in slots 0..15; the
// cycle is in `frame` (frame_valid high) in slot 0 of cycle n+1; its word is
// in `sym` (sym_valid high) in slot 1; the word's 8 bits leave on ser_bit in
// slots 2..15 and 0..1 of cycle n+1, two clocks per bit, MSB first. So the
// first bit of a cycle's word is on the line two clock edges after the edge
// that took the cycle's last sample, and the line carries one word per 16
// clocks with no gaps.
module psk_mod #(
  parameter int unsigned SAMPLES  = 16,
  parameter int unsigned SAMPLE_W = 4,
  parameter int unsigned SYM_W    = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [SAMPLE_W-1:0]         x_in,
  output logic [$clog2(SAMPLES)-1:0]  idx,
  output logic [SAMPLES*SAMPLE_W-1:0] frame,
  output logic                        frame_valid,
  output logic [SYM_W-1:0]            sym,
  output logic                        sym_valid,
  output logic [$clog2(SAMPLES)-1:0]  phase,
  output logic                        found,
  output logic                        ser_bit,
  output logic                        bit_strobe,
  output logic                        sym_start,
  output logic                        ser_valid
);
  logic frame_end, trm_load, gen_load, gen_shift;

  clkcounter #(.SAMPLES(SAMPLES), .SYM_W(SYM_W)) u_clkcounter (
    .clk, .rst_n, .idx, .frame_end, .trm_load, .gen_load, .gen_shift
  );

  tr #(.SAMPLES(SAMPLES), .SAMPLE_W(SAMPLE_W)) u_tr (
    .clk, .rst_n, .idx, .frame_end, .x_in, .frame, .frame_valid
  );

  trm #(.SAMPLES(SAMPLES), .SAMPLE_W(SAMPLE_W), .SYM_W(SYM_W)) u_trm (
    .clk, .rst_n, .load(trm_load), .frame, .sym, .sym_valid, .phase, .found
  );

  generator #(.SYM_W(SYM_W)) u_generator (
    .clk, .rst_n, .load(gen_load), .shift(gen_shift), .sym,
    .ser_bit, .bit_strobe, .sym_start, .ser_valid
  );
endmodule
