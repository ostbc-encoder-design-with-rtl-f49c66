// psk_mod_tb: end-to-end test of the PSK module. Sends quantised sine cycles
// (made here with $sin) at random phases, plus flat cycles, one sample per
// clock; a monitor deserialises the serial line and checks each 8-bit word
// against the expected phase difference (times 16), checks the collected
// cycle on `frame`, and checks the latency: the first bit of a cycle's word
// appears two clock edges after the edge that took the cycle's last sample.
module psk_mod_tb;
  logic clk = 0, rst_n = 0;
  logic [3:0] x_in = 0;
  logic [3:0] idx, phase;
  logic [63:0] frame;
  logic frame_valid, sym_valid, found;
  logic [7:0] sym;
  logic ser_bit, bit_strobe, sym_start, ser_valid;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;   // posedges since start

  psk_mod dut (.clk, .rst_n, .x_in, .idx, .frame, .frame_valid, .sym, .sym_valid,
               .phase, .found, .ser_bit, .bit_strobe, .sym_start, .ser_valid);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
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

  // expected words and the cycle count at which each cycle's last sample was taken
  logic [7:0]  exp_word [$];
  int unsigned exp_time [$];
  logic [63:0] exp_frame [$];
  int words_seen = 0;

  // serial monitor
  logic [7:0] shreg;
  int nb = -1;
  always @(negedge clk) begin
    // after the last test cycle the bench keeps sending a flat signal; the
    // words of those extra cycles are not checked
    if (rst_n && bit_strobe && (exp_time.size() > 0 || nb > 0)) begin
      if (sym_start) begin
        begin int unsigned t0; t0 = exp_time.pop_front(); chk(cyc - t0 == 2, $sformatf("word latency %0d", cyc - t0)); end
        shreg = 8'(ser_bit); nb = 1;
      end else if (nb > 0) begin
        shreg = {shreg[6:0], ser_bit}; nb++;
      end
      if (nb == 8) begin
        logic [7:0] e;
        e = exp_word.pop_front();
        chk(shreg == e, $sformatf("word %0h exp %0h", shreg, e));
        words_seen++;
        nb = -1;
      end
    end
    if (rst_n && frame_valid && exp_frame.size() > 0) begin
      chk(frame == exp_frame.pop_front(), "frame");
    end
  end

  initial begin
    int prev, p, ncyc;
    logic [63:0] f;
    repeat (2) @(negedge clk);
    rst_n = 1;
    prev = 0;
    ncyc = 60;
    for (int c = 0; c < ncyc; c++) begin
      bit flat;
      flat = (c == 20 || c == 41);
      p = flat ? prev : int'($urandom_range(15));
      for (int k = 0; k < 16; k++) begin
        x_in = flat ? 4'd9 : sine_s(k, p);
        f[4*k +: 4] = x_in;
        @(negedge clk);
      end
      exp_time.push_back(cyc);
      exp_word.push_back(8'(((p - prev + 16) % 16) * 16));
      exp_frame.push_back(f);
      prev = p;
    end
    x_in = 4'd9;
    repeat (24) @(negedge clk);
    chk(words_seen == ncyc, $sformatf("words %0d", words_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
