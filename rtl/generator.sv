// generator: parallel-to-serial converter of the PSK module.
//
// On clkcounter's load strobe it takes the SYM_W-bit PSK word from trm into a
// shift register; on each shift strobe it moves to the next bit. ser_bit is
// the register's MSB, so the word goes out MSB first, each bit held from one
// strobe to the next (2 clocks with the default clkcounter, filling the
// 16-clock cycle with 8 bits). bit_strobe is high in the first clock of each
// bit, sym_start in the first clock of a word's first bit, and ser_valid
// from the first load on.
// Turning the 8-bit parallel word into a single serial line follows the
// source design; bit order and bit period are this design's choices.
module generator #(
  parameter int unsigned SYM_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             shift,
  input  logic [SYM_W-1:0] sym,
  output logic             ser_bit,
  output logic             bit_strobe,
  output logic             sym_start,
  output logic             ser_valid
);
  logic [SYM_W-1:0] sr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr         <= '0;
      bit_strobe <= 1'b0;
      sym_start  <= 1'b0;
      ser_valid  <= 1'b0;
    end else begin
      bit_strobe <= (load || shift) && (load || ser_valid);
      sym_start  <= load;
      if (load) begin
        sr        <= sym;
        ser_valid <= 1'b1;
      end else if (shift) begin
        sr <= {sr[SYM_W-2:0], 1'b0};
      end
    end
  end

  assign ser_bit = sr[SYM_W-1];
endmodule
