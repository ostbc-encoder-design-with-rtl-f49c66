// ber_calc_tb: pushes random 64-bit transmitted cycles and, after a random
// delay, the same cycles with a known number of flipped bits as received
// cycles, in order. Checks err_bits, total_bits and frames against the
// bench's own sums after every match, a push and a match in the same clock,
// the sticky underflow flag (a received cycle with nothing waiting), and the
// sticky overflow flag (a fifth cycle into the 4-deep queue).
module ber_calc_tb;
  logic clk = 0, rst_n = 0;
  logic [63:0] ref_frame = 0, rx_frame = 0;
  logic ref_valid = 0, rx_valid = 0;
  logic [31:0] err_bits, total_bits, frames;
  logic overflow, underflow;
  int checks = 0, failures = 0;

  ber_calc dut (.clk, .rst_n, .ref_frame, .ref_valid, .rx_frame, .rx_valid,
                .err_bits, .total_bits, .frames, .overflow, .underflow);

  always #5 clk = ~clk;

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

  logic [63:0] q [$];
  int exp_err = 0, exp_frames = 0;

  function automatic logic [63:0] corrupt(input logic [63:0] f, input int n);
    logic [63:0] m;
    m = '0;
    while ($countones(m) < n) m[$urandom_range(63)] = 1'b1;
    return f ^ m;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // in-order traffic: each clock may push, match, or both
    for (int i = 0; i < 2000; i++) begin
      logic [63:0] f;
      int n;
      ref_valid = (q.size() < 3) && ($urandom_range(2) == 0);
      rx_valid  = (q.size() > 0) && ($urandom_range(2) == 0);
      n = $urandom_range(4) == 0 ? int'($urandom_range(64)) : int'($urandom_range(3));
      if (rx_valid) rx_frame = corrupt(q[0], n);
      f = {$urandom, $urandom};
      ref_frame = f;
      @(negedge clk);
      if (ref_valid) q.push_back(f);
      if (rx_valid) begin
        void'(q.pop_front());
        exp_err += n;
        exp_frames++;
      end
      chk(err_bits == 32'(exp_err), $sformatf("err_bits %0d exp %0d", err_bits, exp_err));
      chk(total_bits == 32'(64 * exp_frames), "total_bits");
      chk(frames == 32'(exp_frames), "frames");
      chk(!overflow && !underflow, "no flag in normal traffic");
    end
    ref_valid = 0; rx_valid = 0;
    // drain what is left
    while (q.size() > 0) begin
      rx_valid = 1; rx_frame = q.pop_front();
      @(negedge clk);
      exp_frames++;
    end
    rx_valid = 0;
    @(negedge clk);
    chk(err_bits == 32'(exp_err) && frames == 32'(exp_frames), "after drain");
    // underflow: a received cycle with an empty queue is not counted
    rx_valid = 1; rx_frame = '1;
    @(negedge clk);
    rx_valid = 0;
    chk(underflow && frames == 32'(exp_frames), "underflow");
    // overflow: five cycles into four places
    for (int i = 0; i < 5; i++) begin
      ref_valid = 1; ref_frame = 64'(i);
      @(negedge clk);
      chk(overflow == (i == 4), $sformatf("overflow after %0d pushes", i + 1));
    end
    ref_valid = 0;
    // the four that got in come out in order
    for (int i = 0; i < 4; i++) begin
      rx_valid = 1; rx_frame = 64'(i);
      @(negedge clk);
    end
    rx_valid = 0;
    chk(err_bits == 32'(exp_err) && frames == 32'(exp_frames + 4), "queued cycles kept in order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
