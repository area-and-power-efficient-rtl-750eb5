// tb_controller: drives random sample offers and checks, cycle by cycle,
// the ready/accept handshake, the tap counter 0..7 after each accepted sample,
// the frame_done pulse one cycle after tap 7, and the decoded select lines
// against the design's table (lowpass) and the reversed, sign-alternated
// table (highpass). Also checks the rate: back-to-back accepts are exactly
// eight cycles apart.
module tb_controller;
  import db4_pkg::*;
  logic clk = 0, rst_n = 0, x_valid = 0;
  logic x_ready, x_accept, busy, first, frame_done;
  logic [2:0] addr;
  tap_ctrl_t g_sel, h_sel;
  int checks = 0, failures = 0;

  int tbl_s0 [8] = '{1, 0, 3, 3, 2, 0, 2, 1};
  int tbl_s1 [8] = '{1, 0, 0, 1, 0, 0, 1, 3};
  int tbl_s2 [8] = '{1, 1, 3, 2, 0, 2, 2, 1};
  int tbl_s3 [8] = '{0, 1, 0, 0, 0, 1, 2, 2};
  int g_neg  [8] = '{1, 1, 1, 0, 1, 0, 1, 0};
  int h_neg  [8] = '{1, 1, 1, 1, 1, 1, 0, 1};

  controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
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

  function automatic remb_sel_t tsel(input int k);
    return '{s3: 2'(tbl_s3[k]), s2: 2'(tbl_s2[k]), s1: 2'(tbl_s1[k]), s0: 2'(tbl_s0[k])};
  endfunction

  // Reference model: phase = -1 idle, 0..7 = tap being processed.
  int phase = -1;
  int prev_done = 0;
  int last_acc_cycle = -100, cycle = 0, b2b = 0, accepts = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      cycle++;
      chk(x_ready == (phase < 0 || phase == 7), "x_ready");
      chk(x_accept == (x_valid && x_ready), "x_accept");
      chk(busy == (phase >= 0), "busy");
      chk(frame_done == (prev_done != 0), "frame_done");
      if (phase >= 0) begin
        chk(addr == 3'(phase), "addr");
        chk(first == (phase == 0), "first");
        chk(g_sel.sel == tsel(phase) && g_sel.neg == g_neg[phase][0], "g_sel");
        chk(h_sel.sel == tsel(7 - phase) && h_sel.neg == h_neg[phase][0], "h_sel");
      end
      prev_done = (phase == 7);
      if (x_accept) begin
        accepts++;
        if (cycle - last_acc_cycle == 8) b2b++;
        chk(cycle - last_acc_cycle >= 8, "accept spacing");
        last_acc_cycle = cycle;
        phase = 0;
      end else if (phase >= 0) begin
        phase = (phase == 7) ? -1 : phase + 1;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      x_valid = (i < 400) ? 1'b1 : (($urandom % 4) == 0);
    end
    @(negedge clk) x_valid = 0;
    repeat (12) @(posedge clk);
    $display("accepts=%0d back_to_back=%0d", accepts, b2b);
    chk(b2b > 10, "back-to-back accepts seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
