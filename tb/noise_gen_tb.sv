// noise_gen_tb: checks the AWGN channel two ways. Exactly: a model of the
// xorshift generator kept by the bench predicts every noise value, and every
// output sample (shifted noise plus input, saturated to 8 bits signed),
// including saturation at both ends, with one clock of latency and no
// advance of the generator on idle clocks. Statistically, over 20000
// samples at full power: mean near 0, standard deviation near 147.8, and
// about two thirds of the values within one standard deviation, as for a
// bell-shaped (sum of four uniforms) distribution.
module noise_gen_tb;
  logic clk = 0, rst_n = 0;
  logic [2:0] atten = 0;
  logic signed [7:0] din = 0, dout;
  logic din_valid = 0, dout_valid;
  logic signed [10:0] noise;
  int checks = 0, failures = 0;

  noise_gen dut (.clk, .rst_n, .atten, .din, .din_valid, .dout, .dout_valid, .noise);

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

  logic [31:0] st;
  function automatic int next_noise();
    int n;
    n = int'(st[7:0]) + int'(st[15:8]) + int'(st[23:16]) + int'(st[31:24]) - 510;
    st = st ^ (st << 13);
    st = st ^ (st >> 17);
    st = st ^ (st << 5);
    return n;
  endfunction

  initial begin
    real sum, sumsq, mean, sd;
    int n_in, n, e, big;
    st = 32'h1234_5678;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // exact comparison with random inputs and shifts, idle clocks mixed in
    big = 0;
    for (int i = 0; i < 3000; i++) begin
      din_valid = ($urandom_range(3) != 0);
      din   = (i % 50 == 0) ? 8'sd127 : (i % 50 == 1) ? -8'sd128 : 8'($urandom);
      atten = 3'($urandom);
      @(negedge clk);
      chk(dout_valid == din_valid, "dout_valid follows din_valid");
      if (din_valid) begin
        n = next_noise() >>> atten;
        e = int'(din) + n;
        if (e > 127) begin e = 127; big++; end
        if (e < -128) begin e = -128; big++; end
        chk(int'(noise) == n, $sformatf("noise %0d exp %0d", noise, n));
        chk(int'(dout) == e, $sformatf("dout %0d exp %0d", dout, e));
      end
    end
    chk(big > 10, "saturation exercised");
    // statistics at full power
    din_valid = 1; din = 0; atten = 0;
    sum = 0; sumsq = 0; n_in = 0;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      sum += real'(noise);
      sumsq += real'(noise) * real'(noise);
      if (noise >= -148 && noise <= 148) n_in++;
    end
    mean = sum / 20000.0;
    sd = $sqrt(sumsq / 20000.0 - mean * mean);
    $display("noise mean %f sd %f within 1 sd %0d/20000", mean, sd, n_in);
    chk(mean > -5.0 && mean < 5.0, "mean");
    chk(sd > 140.0 && sd < 156.0, "standard deviation");
    chk(n_in > 12800 && n_in < 14000, "bell shape");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
