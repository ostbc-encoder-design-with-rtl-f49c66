// noise_gen: additive white Gaussian noise channel.
//
// Every valid input sample gets a fresh noise value added. The noise is the
// central-limit approximation of a Gaussian: the four bytes of a 32-bit
// xorshift pseudo-random word (x ^= x<<13; x ^= x>>17; x ^= x<<5) are summed
// and their mean 510 removed, giving an Irwin-Hall distribution on
// -510..+510 with standard deviation about 147.8. The value is shifted right
// arithmetically by `atten` (0..7, each step halves the noise amplitude,
// -6 dB) and added to the signed W-bit sample with saturation.
// Timing: one clock of latency; dout_valid follows din_valid. The generator
// steps once per valid sample, so the noise sequence depends only on SEED
// and the number of samples seen since reset.
// That the channel adds white Gaussian noise to the encoder output follows
// the source design; the generator, the widths and the power control are
// this design's choices.
module noise_gen #(
  parameter int unsigned W    = 8,
  parameter logic [31:0] SEED = 32'h1234_5678
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [2:0]          atten,
  input  logic signed [W-1:0] din,
  input  logic                din_valid,
  output logic signed [W-1:0] dout,
  output logic                dout_valid,
  output logic signed [10:0]  noise
);
  localparam int signed MAXV = (1 <<< (W - 1)) - 1;
  localparam int signed MINV = -(1 <<< (W - 1));

  initial begin
    if (SEED == '0) $error("noise_gen: SEED must be non-zero");
  end

  logic [31:0] state, s1, s2, s3;
  logic signed [10:0] n_raw, n_scaled;
  logic signed [12:0] sum;

  always_comb begin
    s1 = state ^ (state << 13);
    s2 = s1 ^ (s1 >> 17);
    s3 = s2 ^ (s2 << 5);
    n_raw    = 11'(signed'({3'b000, state[7:0]}) + signed'({3'b000, state[15:8]})
                 + signed'({3'b000, state[23:16]}) + signed'({3'b000, state[31:24]})
                 - 11'sd510);
    n_scaled = n_raw >>> atten;
    sum      = 13'(din) + 13'(n_scaled);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= SEED;
      dout       <= '0;
      dout_valid <= 1'b0;
      noise      <= '0;
    end else begin
      dout_valid <= din_valid;
      if (din_valid) begin
        state <= s3;
        noise <= n_scaled;
        if (sum > 13'(MAXV))      dout <= W'(MAXV);
        else if (sum < 13'(MINV)) dout <= W'(MINV);
        else                      dout <= W'(sum);
      end
    end
  end
endmodule
