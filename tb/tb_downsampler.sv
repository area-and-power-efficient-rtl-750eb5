// tb_downsampler: random accumulator values with random gaps. Every first,
// third, fifth ... input must appear one cycle later as floor(in / 1024) with
// out_valid; the others must produce no output.
module tb_downsampler;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [19:0] in_v = 0;
  logic signed [9:0]  out_v;
  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0, exp_q [$];

  downsampler dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in(in_v),
                   .out_valid(out_valid), .out(out_v));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker: compares each output with the queued expectation.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int e;
      checks++;
      n_out++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output %0d", out_v);
      end else begin
        e = exp_q.pop_front();
        if (int'(out_v) != e) begin
          failures++;
          if (failures < 10) $display("out %0d exp %0d", out_v, e);
        end
      end
    end
  end

  initial begin
    int v;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 2) == 0;
      v = int'($urandom % (1 << 20)) - (1 << 19);
      if (i < 4) v = (i % 2 == 0) ? -1 : 1023;  // floor towards minus infinity
      in_v = 20'(v);
      if (in_valid) begin
        if (n_in % 2 == 0) exp_q.push_back(v >>> 10);
        n_in++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (n_out != (n_in + 1) / 2 || exp_q.size() != 0) begin
      failures++;
      $display("count: in=%0d out=%0d left=%0d", n_in, n_out, exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
