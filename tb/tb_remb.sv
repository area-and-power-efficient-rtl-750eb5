// tb_remb: exhaustive check of the reconfigurable multiplier block.
// For every signed 8-bit input and every decoder setting of the lowpass table,
// the product must be x times the expected ReMB constant (before the sign mux):
//   11, -34, -32, -192, 29, 646, -732, 236.
// Also checks that the don't-care S1 of tap 2 really does not matter.
module tb_remb;
  import db4_pkg::*;
  logic signed [7:0]  x;
  remb_sel_t          sel;
  logic signed [18:0] y;
  int checks = 0, failures = 0;

  // Select lines S0, S1, S2, S3 per tap, written out from the design's table.
  int tbl_s0 [8] = '{1, 0, 3, 3, 2, 0, 2, 1};
  int tbl_s1 [8] = '{1, 0, 0, 1, 0, 0, 1, 3};
  int tbl_s2 [8] = '{1, 1, 3, 2, 0, 2, 2, 1};
  int tbl_s3 [8] = '{0, 1, 0, 0, 0, 1, 2, 2};
  int mult   [8] = '{11, -34, -32, -192, 29, 646, -732, 236};

  remb dut (.x(x), .sel(sel), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int k, input int xv);
    int expv;
    expv = mult[k] * xv;
    checks++;
    if (int'(y) !== expv) begin
      failures++;
      if (failures < 10) $display("mismatch k=%0d x=%0d y=%0d exp=%0d", k, xv, y, expv);
    end
  endtask

  initial begin
    for (int k = 0; k < 8; k++) begin
      for (int xv = -128; xv < 128; xv++) begin
        x   = 8'(xv);
        sel = '{s3: 2'(tbl_s3[k]), s2: 2'(tbl_s2[k]), s1: 2'(tbl_s1[k]), s0: 2'(tbl_s0[k])};
        #1;
        check(k, xv);
      end
    end
    for (int s1 = 0; s1 < 4; s1++) begin
      for (int xv = -128; xv < 128; xv += 17) begin
        x   = 8'(xv);
        sel = '{s3: 2'd0, s2: 2'd3, s1: 2'(s1), s0: 2'd3};
        #1;
        check(2, xv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
