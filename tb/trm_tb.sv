// trm_tb: presents 64-bit cycles of a quantised sine at chosen phases (made
// here with $sin, independently of the design's table), plus cycles with no
// rising crossing and cycles with several, and checks the 8-bit word
// (phase difference mod 16, times 16), the tracked phase, `found`, and that
// sym_valid pulses exactly one clock after load.
module trm_tb;
  logic clk = 0, rst_n = 0;
  logic load = 0;
  logic [63:0] frame = '0;
  logic [7:0] sym;
  logic sym_valid;
  logic [3:0] phase;
  logic found;
  int checks = 0, failures = 0;

  trm dut (.clk, .rst_n, .load, .frame, .sym, .sym_valid, .phase, .found);

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

  function automatic logic [63:0] sine_at(input int p);
    logic [63:0] f;
    for (int k = 0; k < 16; k++) begin
      real v;
      v = 7.5 + 7.5 * $sin(2.0 * 3.14159265358979 * real'((k - p + 16) % 16) / 16.0);
      f[4*k +: 4] = 4'($rtoi($floor(v + 0.5)));
    end
    return f;
  endfunction

  // reference phase finder: first k with s[k-1] < 8 <= s[k]; -1 if none
  function automatic int ref_phase(input logic [63:0] f);
    for (int k = 0; k < 16; k++)
      if (f[4*((k + 15) % 16) +: 4] < 8 && f[4*k +: 4] >= 8) return k;
    return -1;
  endfunction

  int prev;

  task automatic present(input logic [63:0] f);
    int p, d;
    frame = f;
    load = 1;
    @(negedge clk);
    load = 0;
    p = ref_phase(f);
    if (p < 0) p = prev;
    d = (p - prev + 16) % 16;
    chk(sym_valid, "sym_valid one clock after load");
    chk(sym == 8'(d * 16), $sformatf("sym %0h exp %0h (p %0d prev %0d)", sym, d * 16, p, prev));
    chk(phase == 4'(p), "phase");
    chk(found == (ref_phase(f) >= 0), "found");
    prev = p;
    @(negedge clk);
    chk(!sym_valid, "sym_valid is one pulse");
  endtask

  initial begin
    bit seen [16];
    logic [63:0] f;
    prev = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // every phase difference at least once, then random
    for (int d = 0; d < 16; d++) present(sine_at((prev + d) % 16));
    for (int i = 0; i < 100; i++) present(sine_at($urandom_range(15)));
    // flat cycle: no rising crossing, phase kept
    present({16{4'd8}});
    present({16{4'd3}});
    // two rising crossings (squarewave at twice the rate): the lower index wins
    f = '0;
    for (int k = 0; k < 16; k++) f[4*k +: 4] = ((k + 3) % 8 < 4) ? 4'd12 : 4'd2;
    present(f);
    // load not asserted: nothing changes
    frame = sine_at((prev + 5) % 16);
    repeat (3) begin @(negedge clk); chk(!sym_valid && phase == 4'(prev), "idle without load"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
