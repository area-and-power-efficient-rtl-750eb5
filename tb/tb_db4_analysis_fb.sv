// tb_db4_analysis_fb: end-to-end test of the one-level db4 analysis filter
// bank at its default parameters.
//
// Feeds a synthetic 8-bit ECG-like signal (baseline wander, P wave, QRS spike,
// T wave, noise) followed by random full-scale samples, with random gaps in
// x_valid, and compares every cA/cD pair with a reference model:
//   cA(m) = floor(sum_k g(k) x(2m-k) / 1024), cD likewise with h,
// using the integer db4 coefficients and x(n) = 0 before the first sample.
// Also checks the timing: a pair appears exactly ten cycles after the
// sample x(2m) was accepted, and back-to-back samples are accepted every
// eight cycles. Counts each mechanism (back-to-back accept, stall of an
// offered sample while busy, idle gap, dropped odd output, negative and
// positive outputs) and fails if one never happened.
module tb_db4_analysis_fb;
  logic clk = 0, rst_n = 0, x_valid = 0;
  logic x_ready, c_valid;
  logic signed [7:0] x = 0;
  logic signed [9:0] ca, cd;
  int checks = 0, failures = 0;

  localparam int NSAMP = 4000;

  int g [8] = '{-11, 34, 32, -192, -29, 646, 732, 236};
  int h [8] = '{-236, 732, -646, -29, 192, 32, -34, -11};

  db4_analysis_fb dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NSAMP * 40 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%t: %s", $time, what);
    end
  endtask

  // Synthetic ECG: 72 samples per beat.
  function automatic int ecg(input int n);
    real t, v;
    t = real'(n % 72);
    v = 20.0 * $sin(2.0 * 3.14159265 * real'(n) / 500.0);
    v += 15.0 * $exp(-((t - 12.0) * (t - 12.0)) / 8.0);
    v += 100.0 * $exp(-((t - 24.0) * (t - 24.0)) / 1.5);
    v -= 30.0 * $exp(-((t - 21.0) * (t - 21.0)) / 1.0);
    v += 30.0 * $exp(-((t - 45.0) * (t - 45.0)) / 20.0);
    v += real'(int'($urandom % 7) - 3);
    if (v > 127.0) v = 127.0;
    if (v < -128.0) v = -128.0;
    return int'(v);
  endfunction

  int xs [$];               // accepted samples
  int acc_cycle [$];        // cycle at which each sample was accepted
  int cycle = 0;
  int n_b2b = 0, n_stall = 0, n_idle = 0, n_drop = 0, n_neg = 0, n_pos = 0, n_out = 0;
  int last_acc = -100;

  function automatic int ref_out(input int m, input bit hp);
    int s = 0, n = 2 * m;
    for (int k = 0; k < 8; k++)
      if (n - k >= 0) s += (hp ? h[k] : g[k]) * xs[n - k];
    return s >>> 10;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      cycle++;
      if (x_valid && x_ready) begin
        if (cycle - last_acc == 8) n_b2b++;
        chk(cycle - last_acc >= 8, "accept spacing");
        last_acc = cycle;
        xs.push_back(int'(x));
        acc_cycle.push_back(cycle);
        if (xs.size() % 2 == 0) n_drop++;   // its filter output is decimated away
      end
      if (x_valid && !x_ready) n_stall++;
      if (!x_valid && x_ready) n_idle++;
      if (c_valid) begin
        int ea, ed;
        ea = ref_out(n_out, 0);
        ed = ref_out(n_out, 1);
        chk(int'(ca) == ea, $sformatf("cA(%0d)=%0d exp %0d", n_out, ca, ea));
        chk(int'(cd) == ed, $sformatf("cD(%0d)=%0d exp %0d", n_out, cd, ed));
        chk(cycle - acc_cycle[2 * n_out] == 10,
            $sformatf("latency %0d", cycle - acc_cycle[2 * n_out]));
        if (ca < 0 || cd < 0) n_neg++;
        if (ca > 0 || cd > 0) n_pos++;
        n_out++;
      end
    end
  end

  initial begin
    int n;
    n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (n < NSAMP) begin
      // Offer a sample; hold it until it is accepted.
      x_valid = (n < 200) || (($urandom % 3) != 0);
      x = (n < NSAMP / 2) ? 8'(ecg(n)) : 8'($urandom);
      @(posedge clk);
      if (x_valid && x_ready) n++;
      @(negedge clk);
      while (x_valid && !x_ready) @(negedge clk);
    end
    x_valid = 0;
    repeat (20) @(posedge clk);
    chk(n_out == NSAMP / 2, $sformatf("outputs %0d", n_out));
    $display("samples=%0d outputs=%0d back_to_back=%0d stalls=%0d idle=%0d dropped=%0d neg=%0d pos=%0d",
             xs.size(), n_out, n_b2b, n_stall, n_idle, n_drop, n_neg, n_pos);
    chk(n_b2b > 0, "no back-to-back accept");
    chk(n_stall > 0, "no stall");
    chk(n_idle > 0, "no idle gap");
    chk(n_drop > 0, "no dropped output");
    chk(n_neg > 0, "no negative output");
    chk(n_pos > 0, "no positive output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
