// generator_tb: drives load/shift strobes in the pattern of the slot counter
// (load in slot 1, shift in slots 3,5,..,15) with random words and checks
// that each word leaves MSB first, each bit held for two clocks, with
// bit_strobe on the first clock of every bit and sym_start on the first bit.
module generator_tb;
  logic clk = 0, rst_n = 0;
  logic load = 0, shift = 0;
  logic [7:0] sym = 0;
  logic ser_bit, bit_strobe, sym_start, ser_valid;
  int checks = 0, failures = 0;

  generator dut (.clk, .rst_n, .load, .shift, .sym, .ser_bit, .bit_strobe, .sym_start, .ser_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [7:0] cur;
    int bitpos, nstrobes;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!ser_valid && !bit_strobe, "idle before the first load");
    cur = 0; bitpos = 0; nstrobes = 0;
    for (int cyc = 0; cyc < 60; cyc++) begin
      for (int slot = 0; slot < 16; slot++) begin
        load  = (slot == 1);
        shift = (slot >= 3 && slot % 2 == 1);
        if (load) sym = 8'($urandom);
        @(negedge clk);
        // slot+1 is now the visible slot
        if (load) begin cur = sym; bitpos = 7; end
        else if (shift && ser_valid) bitpos--;
        if (cyc > 0 || slot >= 1) begin
          chk(ser_valid, "ser_valid");
          chk(ser_bit == cur[bitpos], $sformatf("bit %0d of %0h", bitpos, cur));
          chk(bit_strobe == (load || shift), "bit_strobe");
          chk(sym_start == load, "sym_start");
          if (bit_strobe) nstrobes++;
        end
      end
    end
    chk(nstrobes == 8 * 60, $sformatf("strobes %0d", nstrobes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
