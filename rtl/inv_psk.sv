// inv_psk: inverse PSK - regenerates the signal Y from received PSK words.
//
// It mirrors psk_mod. A serial word starts at the bit flagged rx_sym_start;
// the following bits (one per rx_bit_valid, MSB first) are shifted in until
// SYM_W bits are held, and bits outside a word are ignored. The word is a
// binary-angle phase difference (256 codes per turn); it is rounded to the
// nearest of the SAMPLES phases (add half a step, keep the top bits), which
// absorbs errors in the low bits, and added to the accumulated phase (0 after
// reset). The regenerated cycle is the reference sine of psk_pkg at that
// phase: sample k = round(7.5 + 7.5*sin(2*pi*(k - phase)/16)).
// Outputs: the whole 64-bit cycle in y_frame with a one-clock y_frame_valid
// pulse in the clock after the last bit of the word; the same samples one per
// clock on y_out/y_valid over the next SAMPLES clocks (a new word restarts
// the stream).
// That the received symbols are turned back into a signal Y follows the
// source design; everything about how is this design's choice, made to
// invert psk_mod. The waveform table fixes SAMPLES = 16 and SAMPLE_W = 4.
module inv_psk #(
  parameter int unsigned SAMPLES  = 16,
  parameter int unsigned SAMPLE_W = 4,
  parameter int unsigned SYM_W    = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        rx_bit,
  input  logic                        rx_bit_valid,
  input  logic                        rx_sym_start,
  output logic [SAMPLES*SAMPLE_W-1:0] y_frame,
  output logic                        y_frame_valid,
  output logic [SAMPLE_W-1:0]         y_out,
  output logic                        y_valid,
  output logic [$clog2(SAMPLES)-1:0]  phase
);
  localparam int unsigned PW = $clog2(SAMPLES);
  localparam int unsigned CW = $clog2(SYM_W + 1);

  initial begin
    if (SAMPLES != 16 || SAMPLE_W != 4)
      $error("inv_psk: the waveform table is for 16 samples of 4 bits");
  end

  logic [SYM_W-2:0] sr;       // bits of the word received so far
  logic [CW-1:0]    cnt;      // bits of the current word held in sr
  logic             in_word;
  logic [PW-1:0]    out_k;
  logic             streaming;

  logic             take, first, done;
  logic [SYM_W-1:0] word;
  logic [PW-1:0]    diff, phase_next;

  always_comb begin
    first      = rx_bit_valid && rx_sym_start;
    take       = rx_bit_valid && (rx_sym_start || in_word);
    word       = first ? SYM_W'(rx_bit) : {sr[SYM_W-2:0], rx_bit};
    done       = take && ((first ? CW'(1) : cnt + CW'(1)) == CW'(SYM_W));
    // round to the nearest phase step, modulo one turn
    diff       = PW'((word + (SYM_W'(1) << (SYM_W - PW - 1))) >> (SYM_W - PW));
    phase_next = phase + diff;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr            <= '0;
      cnt           <= '0;
      in_word       <= 1'b0;
      phase         <= '0;
      y_frame       <= '0;
      y_frame_valid <= 1'b0;
      out_k         <= '0;
      streaming     <= 1'b0;
      y_out         <= '0;
      y_valid       <= 1'b0;
    end else begin
      y_frame_valid <= 1'b0;
      if (take) begin
        sr      <= word[SYM_W-2:0];
        cnt     <= first ? CW'(1) : cnt + CW'(1);
        in_word <= 1'b1;
      end
      if (done) begin
        in_word       <= 1'b0;
        cnt           <= '0;
        phase         <= phase_next;
        y_frame       <= psk_pkg::sine_frame(phase_next);
        y_frame_valid <= 1'b1;
      end

      // sample stream: y_out = sine16(k - phase), k = 0..SAMPLES-1
      y_valid <= streaming;
      y_out   <= psk_pkg::sine16(out_k - phase);
      if (done) begin
        streaming <= 1'b1;
        out_k     <= '0;
      end else if (streaming) begin
        out_k <= out_k + 1'b1;
        if (out_k == PW'(SAMPLES - 1)) streaming <= 1'b0;
      end
    end
  end
endmodule
