// tr_tb: feeds random 4-bit samples with a slot counter kept by the bench and
// checks that every 16 samples appear as one 64-bit cycle (sample k in bits
// [4k+3:4k]) with a single frame_valid pulse the clock after slot 15.
module tr_tb;
  logic clk = 0, rst_n = 0;
  logic [3:0] idx = 0, x_in = 0;
  logic frame_end;
  logic [63:0] frame;
  logic frame_valid;
  int checks = 0, failures = 0;

  tr dut (.clk, .rst_n, .idx, .frame_end, .x_in, .frame, .frame_valid);

  assign frame_end = (idx == 15);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
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
    logic [3:0] samples [16];
    logic [63:0] expf;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(frame == 0 && !frame_valid, "reset state");
    for (int cyc = 0; cyc < 40; cyc++) begin
      for (int k = 0; k < 16; k++) begin
        idx = 4'(k);
        samples[k] = 4'($urandom);
        x_in = samples[k];
        @(negedge clk);
        if (k == 15) begin
          expf = '0;
          for (int j = 0; j < 16; j++) expf = expf | (64'(samples[j]) << (4 * j));
          chk(frame == expf && frame_valid, $sformatf("cycle %0d", cyc));
        end else begin
          chk(!frame_valid, "no stray frame_valid");
          if (cyc > 0) chk(frame == expf, "frame held while the next cycle is collected");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
