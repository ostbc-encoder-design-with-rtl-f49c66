// tr: cycle collector of the PSK module.
//
// Takes one SAMPLE_W-bit sample per clock into the slot named by clkcounter's
// idx. In the frame_end slot the assembled SAMPLES-sample cycle (64 bits by
// default), including the sample arriving in that same clock, is copied to
// the output register `frame`, and frame_valid pulses for one clock on the
// next cycle while collection of the next cycle goes on. Sample k of a cycle
// sits in frame[k*SAMPLE_W +: SAMPLE_W].
// Collecting 16 four-bit samples into a 64-bit cycle and passing it on
// follows the source design; one sample per clock and the bit order are this
// design's choices.
module tr #(
  parameter int unsigned SAMPLES  = 16,
  parameter int unsigned SAMPLE_W = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [$clog2(SAMPLES)-1:0]    idx,
  input  logic                          frame_end,
  input  logic [SAMPLE_W-1:0]           x_in,
  output logic [SAMPLES*SAMPLE_W-1:0]   frame,
  output logic                          frame_valid
);
  logic [SAMPLES*SAMPLE_W-1:0] acc, acc_next;

  always_comb begin
    acc_next = acc;
    acc_next[idx*SAMPLE_W +: SAMPLE_W] = x_in;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc         <= '0;
      frame       <= '0;
      frame_valid <= 1'b0;
    end else begin
      acc         <= acc_next;
      frame_valid <= frame_end;
      if (frame_end) frame <= acc_next;
    end
  end
endmodule
