// inv_psk_tb: sends 8-bit phase-difference words serially (MSB first, one
// bit per strobe, random gaps), some with errors in the low bits that must
// round away, stray bits outside any word, and an aborted word. Checks the
// accumulated phase, the regenerated 64-bit cycle against a quantised sine
// made here with $sin, the one-clock y_frame_valid pulse right after the
// last bit, and the 16-sample y_out stream that follows.
module inv_psk_tb;
  logic clk = 0, rst_n = 0;
  logic rx_bit = 0, rx_bit_valid = 0, rx_sym_start = 0;
  logic [63:0] y_frame;
  logic y_frame_valid, y_valid;
  logic [3:0] y_out, phase;
  int checks = 0, failures = 0;

  inv_psk dut (.clk, .rst_n, .rx_bit, .rx_bit_valid, .rx_sym_start,
               .y_frame, .y_frame_valid, .y_out, .y_valid, .phase);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [3:0] sine_s(input int k, input int p);
    real v;
    v = 7.5 + 7.5 * $sin(2.0 * 3.14159265358979 * real'((k - p + 16) % 16) / 16.0);
    return 4'($rtoi($floor(v + 0.5)));
  endfunction

  int exp_phase = 0;
  int frames_ok = 0, streams_ok = 0;

  // y_out stream monitor
  int sidx = 0;
  logic [3:0] sbuf [16];
  always @(negedge clk) begin
    if (rst_n && y_valid) begin
      sbuf[sidx] = y_out;
      sidx++;
      if (sidx == 16) begin
        bit ok;
        ok = 1;
        for (int k = 0; k < 16; k++) if (sbuf[k] != sine_s(k, exp_phase)) ok = 0;
        chk(ok, "y_out stream");
        if (ok) streams_ok++;
        sidx = 0;
      end
    end
  end

  task automatic send_bits(input logic [7:0] w, input int nbits, input bit mark);
    for (int b = 7; b > 7 - nbits; b--) begin
      rx_bit = w[b];
      rx_bit_valid = 1;
      rx_sym_start = mark && (b == 7);
      @(negedge clk);
      if (b != 7 - nbits + 1 || nbits != 8 || !mark) chk(!y_frame_valid, "no early y_frame_valid");
      rx_bit_valid = 0; rx_sym_start = 0;
      repeat ($urandom_range(1)) begin
        @(negedge clk);
        chk(!y_frame_valid, "no y_frame_valid in gaps");
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 80; i++) begin
      int d, off;
      logic [7:0] w;
      d = (i < 16) ? i : int'($urandom_range(15));
      off = (i % 3 == 0) ? int'($urandom_range(15)) - 8 : 0;
      w = 8'(d * 16 + off);
      if (i % 7 == 3) send_bits(8'($urandom), 3, 0);   // stray bits, ignored
      if (i % 11 == 5) send_bits(8'($urandom), 5, 1);  // aborted word, restarted below
      // last bit, then the frame must be there at the next sample point
      for (int b = 7; b >= 0; b--) begin
        rx_bit = w[b]; rx_bit_valid = 1; rx_sym_start = (b == 7);
        @(negedge clk);
        rx_bit_valid = 0; rx_sym_start = 0;
        if (b != 0) begin
          chk(!y_frame_valid, "no early y_frame_valid");
          if ($urandom_range(1) == 1) @(negedge clk);
        end
      end
      exp_phase = (exp_phase + d) % 16;
      chk(y_frame_valid, "y_frame_valid right after the last bit");
      chk(phase == 4'(exp_phase), $sformatf("phase %0d exp %0d", phase, exp_phase));
      begin
        logic [63:0] f;
        for (int k = 0; k < 16; k++) f[4*k +: 4] = sine_s(k, exp_phase);
        chk(y_frame == f, "y_frame");
        if (y_frame == f) frames_ok++;
      end
      @(negedge clk);
      chk(!y_frame_valid, "y_frame_valid is one pulse");
      repeat (17) @(negedge clk);
    end
    chk(frames_ok == 80 && streams_ok == 80, $sformatf("frames %0d streams %0d", frames_ok, streams_ok));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
