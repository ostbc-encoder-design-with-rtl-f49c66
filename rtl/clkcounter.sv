// clkcounter: the control-signal source of the PSK module.
//
// A free-running modulo-SAMPLES counter numbers the sample slots of a cycle,
// one slot per clock. From the slot number it decodes the strobes that keep
// tr, trm and generator in step:
//   frame_end  slot SAMPLES-1 : tr takes the last sample and closes the frame
//   trm_load   slot 0         : trm evaluates the frame just closed
//   gen_load   slot 1         : generator loads the word trm produced
//   gen_shift  every slot where (slot-1) is even, except gen_load's slot:
//              generator moves to its next bit, so each of the 8 bits of a
//              word is held for SAMPLES/8 = 2 clocks
// The last three are held off until the first cycle has been collected, so
// no word is made from the empty frame present right after reset.
// That the PSK module has such a counter driving the three other blocks
// follows the source design; the slot assignment is this design's choice.
// Reset: synchronous, active low, to slot 0.
module clkcounter #(
  parameter int unsigned SAMPLES = 16,
  parameter int unsigned SYM_W   = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  output logic [$clog2(SAMPLES)-1:0] idx,
  output logic                       frame_end,
  output logic                       trm_load,
  output logic                       gen_load,
  output logic                       gen_shift
);
  localparam int unsigned IW        = $clog2(SAMPLES);
  localparam int unsigned BIT_CLKS  = SAMPLES / SYM_W;  // clocks per serial bit

  initial begin
    if (SAMPLES % SYM_W != 0 || SAMPLES < 2 * SYM_W)
      $error("clkcounter: SAMPLES must be a multiple of SYM_W and at least 2*SYM_W");
  end

  logic started;  // a complete cycle has been collected since reset

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx     <= '0;
      started <= 1'b0;
    end else if (idx == IW'(SAMPLES - 1)) begin
      idx     <= '0;
      started <= 1'b1;
    end else begin
      idx     <= idx + 1'b1;
    end
  end

  // slot relative to the generator load slot (1), modulo SAMPLES
  logic [IW-1:0] rel;
  assign rel = idx - IW'(1);

  always_comb begin
    frame_end = (idx == IW'(SAMPLES - 1));
    trm_load  = started && (idx == '0);
    gen_load  = started && (idx == IW'(1));
    gen_shift = started && (idx != IW'(1)) && ((32'(rel) % BIT_CLKS) == 0);
  end
endmodule
