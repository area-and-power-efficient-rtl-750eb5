// tb_tdl_filter: runs many eight-tap frames through one filter with random
// samples, alternately with the lowpass and the highpass select settings, and
// checks the accumulator after each frame against sum_k c(k) x_k computed with
// the integer db4 coefficients (c = g or h).
module tb_tdl_filter;
  import db4_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, first = 0;
  logic signed [7:0]  x = 0;
  logic signed [19:0] acc;
  tap_ctrl_t ctrl;
  int checks = 0, failures = 0;

  int tbl_s0 [8] = '{1, 0, 3, 3, 2, 0, 2, 1};
  int tbl_s1 [8] = '{1, 0, 0, 1, 0, 0, 1, 3};
  int tbl_s2 [8] = '{1, 1, 3, 2, 0, 2, 2, 1};
  int tbl_s3 [8] = '{0, 1, 0, 0, 0, 1, 2, 2};
  int g_neg  [8] = '{1, 1, 1, 0, 1, 0, 1, 0};
  int h_neg  [8] = '{1, 1, 1, 1, 1, 1, 0, 1};
  int g      [8] = '{-11, 34, 32, -192, -29, 646, 732, 236};
  int h      [8] = '{-236, 732, -646, -29, 192, 32, -34, -11};

  tdl_filter dut (.clk(clk), .rst_n(rst_n), .x(x), .ctrl(ctrl), .en(en), .first(first), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv, t;
    ctrl = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < 1000; f++) begin
      automatic bit hp = f[0];
      expv = 0;
      for (int k = 0; k < 8; k++) begin
        @(negedge clk);
        x     = 8'($urandom);
        if (f < 4) x = (f < 2) ? 8'sd127 : -8'sd128;   // extremes
        if (f >= 4 && f < 6) x = (((k % 2) == 0) == (f == 4)) ? 8'sd127 : -8'sd128;
        t     = hp ? 7 - k : k;
        ctrl  = '{sel: '{s3: 2'(tbl_s3[t]), s2: 2'(tbl_s2[t]), s1: 2'(tbl_s1[t]), s0: 2'(tbl_s0[t])},
                  neg: hp ? h_neg[k][0] : g_neg[k][0]};
        en    = 1;
        first = (k == 0);
        expv += (hp ? h[k] : g[k]) * int'(x);
      end
      @(negedge clk);
      en = 0;
      // Idle cycles must leave the accumulator alone.
      x = 8'($urandom);
      repeat ($urandom % 3) @(negedge clk);
      checks++;
      if (int'(acc) != expv) begin
        failures++;
        if (failures < 10) $display("frame %0d hp=%0d acc=%0d exp=%0d", f, hp, acc, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
