// ber_sweep_tb: bit error rate of the whole link against noise level.
//
// Runs the BER tester top at its default sizes once per noise setting,
// atten = 0..7 (each step 6 dB less noise), with a reset in between to clear
// the counters. As in ostbc_bert_top_tb the bench stands in for the OSTBC
// encoder and decoder with a +-64 antipodal mapping and a sign decision. X is
// a quantised sine ($sin) at a random phase every cycle, so a clean channel
// gives no errors. Prints the BER table and checks its shape: no errors at
// atten >= 3, where the bounded noise (|n| <= 510 >> 3 = 63) can never cross
// the +-64 levels; errors at atten 0..2; and no queue flags.
// Because the phase is sent as a difference, one wrong phase step shifts
// every later cycle of Y, so the signal BER jumps to about one half as soon
// as any step is lost. The bench therefore also counts wrong phase steps
// (received word, rounded, against the transmitted word) and checks that
// their number falls at each step of less noise.
module ber_sweep_tb;
  logic clk = 0, rst_n = 0;
  logic [3:0] x_in = 0;
  logic psk_bit, psk_bit_strobe, psk_sym_start, psk_valid;
  logic signed [7:0] chan_in, chan_out;
  logic chan_in_valid, chan_out_valid;
  logic [2:0] noise_atten = 0;
  logic rx_bit, rx_bit_valid, rx_sym_start;
  logic [3:0] y_out;
  logic y_valid;
  logic [31:0] err_bits, total_bits, frames;
  logic ref_overflow, rx_underflow;
  logic [7:0] tx_sym;
  logic tx_sym_valid, tx_found;
  logic [3:0] tx_phase, rx_phase;
  logic signed [10:0] chan_noise;
  int checks = 0, failures = 0;

  ostbc_bert_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
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

  // stand-in for encoder + decoder
  logic strobe_d, start_d;
  assign chan_in       = psk_bit ? 8'sd64 : -8'sd64;
  assign chan_in_valid = psk_valid;
  always @(posedge clk) begin
    strobe_d <= psk_bit_strobe;
    start_d  <= psk_sym_start;
  end
  assign rx_bit       = !chan_out[7];
  assign rx_bit_valid = strobe_d && chan_out_valid;
  assign rx_sym_start = start_d;

  localparam int NCYC = 300;

  // phase-step errors: transmitted words against received words
  logic [7:0] txq [$];
  logic [7:0] rsh;
  int rnb = -1, step_err = 0;
  always @(negedge clk) begin
    if (!rst_n) begin
      txq.delete(); rnb = -1;
    end else begin
      if (tx_sym_valid) txq.push_back(tx_sym);
      if (rx_bit_valid) begin
        if (rx_sym_start) begin rsh = 8'(rx_bit); rnb = 1; end
        else if (rnb > 0) begin rsh = {rsh[6:0], rx_bit}; rnb++; end
        if (rnb == 8) begin
          logic [7:0] t;
          t = txq.size() > 0 ? txq.pop_front() : 8'h00;
          if (4'(rsh[7:4] + (rsh[3] ? 4'd1 : 4'd0)) != t[7:4]) step_err++;
          rnb = -1;
        end
      end
    end
  end

  initial begin
    int errs [8];
    int nfr [8];
    int serr [8];
    for (int a = 0; a < 8; a++) begin
      rst_n = 0;
      step_err = 0;
      noise_atten = 3'(a);
      repeat (2) @(negedge clk);
      rst_n = 1;
      for (int c = 0; c < NCYC; c++) begin
        int p;
        p = int'($urandom_range(15));
        for (int k = 0; k < 16; k++) begin
          x_in = sine_s(k, p);
          @(negedge clk);
        end
      end
      errs[a] = int'(err_bits);
      nfr[a] = int'(frames);
      serr[a] = step_err;
      $display("atten %0d: %0d errors in %0d bits, BER %f; %0d wrong phase steps in %0d",
               a, errs[a], total_bits, real'(errs[a]) / real'(total_bits), serr[a], nfr[a]);
      chk(nfr[a] >= NCYC - 2 && total_bits == 32'(64 * nfr[a]), "cycles compared");
      chk(!ref_overflow && !rx_underflow, "no queue flags");
      if (a >= 3) chk(errs[a] == 0, $sformatf("no errors at atten %0d", a));
      else chk(errs[a] > 0, $sformatf("errors at atten %0d", a));
      if (a >= 3) chk(serr[a] == 0, "no wrong phase steps");
      if (a >= 1 && a <= 3) chk(serr[a] < serr[a - 1], "fewer wrong phase steps with less noise");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
