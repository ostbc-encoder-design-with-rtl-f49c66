// clkcounter_tb: checks the slot counter and its strobes against an
// independent model: slot = clocks since reset mod 16; strobes only after the
// first full cycle; frame_end in slot 15, trm_load in 0, gen_load in 1,
// gen_shift in slots 3,5,...,15 (7 per cycle).
module clkcounter_tb;
  logic clk = 0, rst_n = 0;
  logic [3:0] idx;
  logic frame_end, trm_load, gen_load, gen_shift;
  int checks = 0, failures = 0;

  clkcounter dut (.clk, .rst_n, .idx, .frame_end, .trm_load, .gen_load, .gen_shift);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
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
    int n, shifts;
    bit started;
    repeat (3) @(negedge clk);
    rst_n = 1;
    n = 0; started = 0; shifts = 0;
    // after reset the counter shows slot 0 until the first edge with rst_n high
    for (int c = 0; c < 16 * 12; c++) begin
      int slot;
      slot = n % 16;
      chk(idx == 4'(slot), $sformatf("idx %0d exp %0d", idx, slot));
      chk(frame_end == (slot == 15), "frame_end");
      chk(trm_load  == (started && slot == 0), "trm_load");
      chk(gen_load  == (started && slot == 1), "gen_load");
      chk(gen_shift == (started && slot >= 3 && slot % 2 == 1), "gen_shift");
      if (gen_shift) shifts++;
      if (slot == 15) started = 1;
      @(negedge clk);
      n++;
    end
    chk(shifts == 7 * 11, $sformatf("shift count %0d", shifts));
    // reset in the middle returns to slot 0 and re-arms the start guard
    rst_n = 0; @(negedge clk); rst_n = 1;
    chk(idx == 0 && !trm_load && !gen_load && !gen_shift, "after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
