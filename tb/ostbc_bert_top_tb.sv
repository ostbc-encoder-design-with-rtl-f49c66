// ostbc_bert_top_tb: end-to-end run of the BER tester at its default sizes.
//
// The bench stands in for the OSTBC encoder and decoder, which are outside
// this RTL: it maps each bit of the serial PSK line to +64 / -64 on the
// channel input and takes the sign of the noisy channel output as the
// received bit, with the line's bit and word markers passed along one clock
// later (the channel's latency). X is a quantised sine ($sin here) at a new
// phase every 16-sample cycle, with some flat cycles.
// In every cycle err_bits and frames must equal the bench's own running
// count: the popcount of X xor the Y seen on y_out.
// Phase A, noise attenuated 7 steps (well below the +-64 levels): Y must
// equal the expected sine cycle by cycle, so errors come only from the flat
// cycles, which no sine can reproduce.
// Phase B, strong noise: some words arrive damaged only in their low bits and are
// corrected by rounding, others change the phase.
// Phase C: the received line is cut for 6 cycles, so transmitted cycles pile
// up and the reference queue overflows.
// Mechanisms counted, each must happen: all 16 phase differences, a phase
// wrap-around, a cycle with no rising crossing, a damaged word corrected by
// rounding, a damaged word that changed the phase, bit errors counted, and
// the overflow flag. The X-to-Y latency must be the same for every cycle.
module ostbc_bert_top_tb;
  logic clk = 0, rst_n = 0;
  logic [3:0] x_in = 0;
  logic psk_bit, psk_bit_strobe, psk_sym_start, psk_valid;
  logic signed [7:0] chan_in, chan_out;
  logic chan_in_valid, chan_out_valid;
  logic [2:0] noise_atten = 7;
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
  int unsigned cyc = 0;

  ostbc_bert_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (30000) @(posedge clk);
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

  // ---- stand-in for encoder + decoder: antipodal mapping, sign decision ----
  logic cut = 0;          // phase C: received line cut
  logic strobe_d, start_d;
  assign chan_in       = psk_bit ? 8'sd64 : -8'sd64;
  assign chan_in_valid = psk_valid;
  always @(posedge clk) begin
    strobe_d <= psk_bit_strobe;
    start_d  <= psk_sym_start;
  end
  assign rx_bit       = !chan_out[7];
  assign rx_bit_valid = strobe_d && chan_out_valid && !cut;
  assign rx_sym_start = start_d;

  // ---- mechanism counters ----
  int seen_diff [16];
  int n_wrap = 0, n_flat = 0, n_rounded = 0, n_phase_err = 0;
  int unsigned lat_first = 0;
  int n_lat = 0;

  // transmitted words (from the top's observation port) vs received words
  logic [7:0] txq [$];
  logic [7:0] rsh;
  int rnb = -1;
  always @(negedge clk) begin
    if (rst_n && tx_sym_valid) begin
      txq.push_back(tx_sym);
      seen_diff[tx_sym[7:4]]++;
      if (!tx_found) n_flat++;
    end
    if (rst_n && rx_bit_valid) begin
      if (rx_sym_start) begin rsh = 8'(rx_bit); rnb = 1; end
      else if (rnb > 0) begin rsh = {rsh[6:0], rx_bit}; rnb++; end
      if (rnb == 8) begin
        logic [7:0] t;
        t = txq.size() > 0 ? txq.pop_front() : 8'h00;
        if (rsh != t) begin
          if (rsh[7:4] + (rsh[3] ? 4'd1 : 4'd0) == t[7:4]) n_rounded++;
          else n_phase_err++;
        end
        rnb = -1;
      end
    end
  end

  // X cycles sent, and the cycle at which each one's last sample went in
  logic [63:0] xq [$];
  int unsigned xt [$];
  logic [63:0] yexpq [$];
  bit check_y = 1, exact = 1;
  int exp_err = 0, y_frames = 0;

  // Y stream monitor
  int yi = 0;
  logic [63:0] ybuf;
  logic [31:0] snap_err, snap_frames;
  int ber_checked = 0;
  always @(negedge clk) begin
    if (rst_n && y_valid && check_y) begin
      if (yi == 0) begin
        // ber_calc has counted this cycle one clock before its first sample
        snap_err = err_bits;
        snap_frames = frames;
        if (xt.size() > 0) begin
          int unsigned t0;
          t0 = xt.pop_front();
          if (n_lat == 0) lat_first = cyc - t0;
          chk(cyc - t0 == lat_first, $sformatf("X to Y latency %0d", cyc - t0));
          n_lat++;
        end
      end
      ybuf[4*yi +: 4] = y_out;
      yi++;
      if (yi == 16) begin
        logic [63:0] xf, ye;
        xf = xq.pop_front();
        ye = yexpq.pop_front();
        if (exact) chk(ybuf == ye, "Y cycle equals the expected sine");
        exp_err += $countones(xf ^ ybuf);
        y_frames++;
        chk(snap_err == 32'(exp_err), $sformatf("err_bits %0d exp %0d", snap_err, exp_err));
        chk(snap_frames == 32'(y_frames), "frames counted");
        ber_checked++;
        yi = 0;
      end
    end
  end

  int prev_p = 0;
  task automatic send_cycle(input int p, input bit flat);
    logic [63:0] f;
    int pp;
    pp = flat ? prev_p : p;
    if (!flat && pp < prev_p) n_wrap++;
    for (int k = 0; k < 16; k++) begin
      x_in = flat ? 4'd4 : sine_s(k, p);
      f[4*k +: 4] = x_in;
      @(negedge clk);
    end
    xq.push_back(f);
    xt.push_back(cyc);
    begin
      logic [63:0] ye;
      for (int k = 0; k < 16; k++) ye[4*k +: 4] = sine_s(k, pp);
      yexpq.push_back(ye);
    end
    prev_p = pp;
  endtask

  initial begin
    int n_before;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- phase A: weak noise ----
    noise_atten = 7;
    for (int i = 0; i < 48; i++) begin
      int p;
      p = (i < 16) ? (prev_p + i) % 16 : int'($urandom_range(15));
      send_cycle(p, i == 20 || i == 33);
    end
    // keep feeding the last phase while the tail drains
    for (int i = 0; i < 3; i++) send_cycle(prev_p, 0);
    chk(total_bits == {frames[25:0], 6'd0}, "64 bits per cycle");
    chk(n_rounded == 0 && n_phase_err == 0, "no damaged words at weak noise");
    // ---- phase B: strong noise ----
    noise_atten = 2;
    exact = 0;
    for (int i = 0; i < 150; i++) send_cycle(int'($urandom_range(15)), 0);
    noise_atten = 7;
    for (int i = 0; i < 3; i++) send_cycle(prev_p, 0);
    chk(ber_checked > 190, "BER counters checked cycle by cycle");
    $display("BER over %0d bits: %0d errors", total_bits, err_bits);
    chk(!ref_overflow && !rx_underflow, "no queue flags before phase C");
    // ---- phase C: received line cut, reference queue overflows ----
    check_y = 0;
    n_before = int'(frames);
    cut = 1;
    for (int i = 0; i < 6; i++) send_cycle(int'($urandom_range(15)), 0);
    chk(ref_overflow, "overflow flag");
    chk(int'(frames) == n_before, "nothing compared while the line is cut");
    cut = 0;
    for (int i = 0; i < 3; i++) send_cycle(prev_p, 0);
    // ---- every mechanism happened ----
    for (int d = 0; d < 16; d++) chk(seen_diff[d] > 0, $sformatf("phase difference %0d seen", d));
    chk(n_wrap > 0, "phase wrap-around");
    chk(n_flat > 0, "cycle without a rising crossing");
    chk(n_rounded > 0, "damaged word corrected by rounding");
    chk(n_phase_err > 0, "damaged word changed the phase");
    chk(err_bits > 0, "bit errors counted");
    chk(n_lat > 100, "latency measured");
    $display("mechanisms: wraps %0d flat %0d rounded %0d phase_err %0d latency %0d clocks",
             n_wrap, n_flat, n_rounded, n_phase_err, lat_first);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
