// ber_calc: bit-error-rate counter between the transmitted and the received
// signal.
//
// Transmitted cycles (ref_frame, one W-bit cycle per ref_valid pulse) wait in
// a DEPTH-entry FIFO. Each received cycle (rx_frame on rx_valid) is matched
// with the oldest waiting transmitted cycle, so the latency of whatever lies
// between the two need not be known, only that no cycle is lost. For each
// match the differing bits are counted (population count of the XOR) and
// added to err_bits, W is added to total_bits and frames is incremented; the
// bit error rate is err_bits / total_bits. A transmitted cycle arriving with
// the FIFO full is dropped and sets the sticky `overflow` flag; a received
// cycle with nothing to match is not counted and sets the sticky `underflow`
// flag. Counters saturate at their maximum.
// Timing: the counters change in the clock after rx_valid. A push and a
// match may happen in the same clock.
// Comparing the actual and the received signal to get the BER follows the
// source design; the FIFO matching and the counter widths are this design's
// choices.
module ber_calc #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 4,
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [W-1:0]     ref_frame,
  input  logic             ref_valid,
  input  logic [W-1:0]     rx_frame,
  input  logic             rx_valid,
  output logic [CNT_W-1:0] err_bits,
  output logic [CNT_W-1:0] total_bits,
  output logic [CNT_W-1:0] frames,
  output logic             overflow,
  output logic             underflow
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned NW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [NW-1:0] level;

  logic           pop, push;
  logic [W-1:0]   diff_bits;
  logic [$clog2(W+1)-1:0] nerr;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  function automatic logic [CNT_W-1:0] sat_add(input logic [CNT_W-1:0] a,
                                               input logic [CNT_W-1:0] b);
    logic [CNT_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[CNT_W] ? '1 : s[CNT_W-1:0];
  endfunction

  always_comb begin
    pop       = rx_valid && (level != '0);
    push      = ref_valid && ((level != NW'(DEPTH)) || pop);
    diff_bits = mem[rd_ptr] ^ rx_frame;
    nerr      = '0;
    for (int i = 0; i < W; i++) nerr += diff_bits[i];
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= ref_frame;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr     <= '0;
      wr_ptr     <= '0;
      level      <= '0;
      err_bits   <= '0;
      total_bits <= '0;
      frames     <= '0;
      overflow   <= 1'b0;
      underflow  <= 1'b0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      level <= level + NW'(push) - NW'(pop);
      if (ref_valid && !push) overflow  <= 1'b1;
      if (rx_valid && !pop)   underflow <= 1'b1;
      if (pop) begin
        err_bits   <= sat_add(err_bits, CNT_W'(nerr));
        total_bits <= sat_add(total_bits, CNT_W'(W));
        frames     <= sat_add(frames, CNT_W'(1));
      end
    end
  end

  // FIFO bookkeeping never leaves its range
  assert property (@(posedge clk) disable iff (!rst_n) level <= NW'(DEPTH));
endmodule
