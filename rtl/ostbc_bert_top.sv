// ostbc_bert_top: bit-error-rate tester for a PSK + OSTBC link.
//
// The chain, in order:
//   X --> psk_mod --(serial PSK line)--> [OSTBC encoder, external]
//     --> noise_gen (AWGN channel) --> [OSTBC decoder, external]
//     --(serial PSK line)--> inv_psk --> Y
//   ber_calc compares each cycle of X (from psk_mod) with the cycle of Y
//   regenerated from it and counts bit errors.
// The OSTBC encoder and decoder are not part of this RTL; their connections
// are ports: psk_* goes to the encoder, chan_in/chan_in_valid comes from it,
// chan_out/chan_out_valid goes to the decoder and rx_* comes back from it.
// Tying psk_* to rx_* directly, or through a symbol mapper around the noise
// channel, gives a working link.
// Interface: one 4-bit sample of X per clock on x_in, continuously after
// reset (synchronous, active low). Y leaves on y_out/y_valid, one sample per
// clock. err_bits/total_bits is the bit error rate over 64-bit cycles.
// The blocks and their order follow the source design's system diagram;
// the 16-phase PSK follows its PSK module.
module ostbc_bert_top #(
  parameter int unsigned SAMPLES    = 16,
  parameter int unsigned SAMPLE_W   = 4,
  parameter int unsigned SYM_W      = 8,
  parameter int unsigned CHAN_W     = 8,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // data signal X
  input  logic [SAMPLE_W-1:0]       x_in,
  // to the OSTBC encoder
  output logic                      psk_bit,
  output logic                      psk_bit_strobe,
  output logic                      psk_sym_start,
  output logic                      psk_valid,
  // AWGN channel: from the encoder, to the decoder
  input  logic signed [CHAN_W-1:0]  chan_in,
  input  logic                      chan_in_valid,
  input  logic [2:0]                noise_atten,
  output logic signed [CHAN_W-1:0]  chan_out,
  output logic                      chan_out_valid,
  // from the OSTBC decoder
  input  logic                      rx_bit,
  input  logic                      rx_bit_valid,
  input  logic                      rx_sym_start,
  // received signal Y
  output logic [SAMPLE_W-1:0]       y_out,
  output logic                      y_valid,
  // BER computation
  output logic [31:0]               err_bits,
  output logic [31:0]               total_bits,
  output logic [31:0]               frames,
  output logic                      ref_overflow,
  output logic                      rx_underflow,
  // observation: transmitter word and phases
  output logic [SYM_W-1:0]          tx_sym,
  output logic                      tx_sym_valid,
  output logic                      tx_found,
  output logic [$clog2(SAMPLES)-1:0] tx_phase,
  output logic [$clog2(SAMPLES)-1:0] rx_phase,
  output logic signed [10:0]        chan_noise
);
  localparam int unsigned FW = SAMPLES * SAMPLE_W;

  logic [FW-1:0]              x_frame, y_frame;
  logic                       x_frame_valid, y_frame_valid;

  psk_mod #(.SAMPLES(SAMPLES), .SAMPLE_W(SAMPLE_W), .SYM_W(SYM_W)) u_psk (
    .clk, .rst_n, .x_in,
    .idx(), .frame(x_frame), .frame_valid(x_frame_valid),
    .sym(tx_sym), .sym_valid(tx_sym_valid), .phase(tx_phase), .found(tx_found),
    .ser_bit(psk_bit), .bit_strobe(psk_bit_strobe), .sym_start(psk_sym_start),
    .ser_valid(psk_valid)
  );

  noise_gen #(.W(CHAN_W)) u_noise (
    .clk, .rst_n, .atten(noise_atten),
    .din(chan_in), .din_valid(chan_in_valid),
    .dout(chan_out), .dout_valid(chan_out_valid), .noise(chan_noise)
  );

  inv_psk #(.SAMPLES(SAMPLES), .SAMPLE_W(SAMPLE_W), .SYM_W(SYM_W)) u_inv (
    .clk, .rst_n, .rx_bit, .rx_bit_valid, .rx_sym_start,
    .y_frame, .y_frame_valid, .y_out, .y_valid, .phase(rx_phase)
  );

  ber_calc #(.W(FW), .DEPTH(FIFO_DEPTH), .CNT_W(32)) u_ber (
    .clk, .rst_n,
    .ref_frame(x_frame), .ref_valid(x_frame_valid),
    .rx_frame(y_frame), .rx_valid(y_frame_valid),
    .err_bits, .total_bits, .frames,
    .overflow(ref_overflow), .underflow(rx_underflow)
  );
endmodule
