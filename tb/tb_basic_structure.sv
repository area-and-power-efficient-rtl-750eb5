// tb_basic_structure: random self-check of the 4:1 mux + add/sub cell.
// Expected result: a + d[sel] for even sel, a - d[sel] for odd sel (mod 2^W).
module tb_basic_structure;
  localparam int W = 19;
  logic [W-1:0]      a, s;
  logic [3:0][W-1:0] d;
  logic [1:0]        sel;
  int checks = 0, failures = 0;
  logic [W-1:0] exp_s;
  int hits [4] = '{0, 0, 0, 0};

  basic_structure dut (.a(a), .d(d), .sel(sel), .s(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      a   = W'($urandom);
      for (int j = 0; j < 4; j++) d[j] = W'($urandom);
      if (i < 8) begin a = W'(i * 5); d = {W'(1), W'(2), W'(3), W'(4)}; end
      sel = 2'(i);
      #1;
      case (sel)
        2'd0: exp_s = a + d[0];
        2'd1: exp_s = a - d[1];
        2'd2: exp_s = a + d[2];
        default: exp_s = a - d[3];
      endcase
      hits[sel]++;
      checks++;
      if (s !== exp_s) begin
        failures++;
        if (failures < 10) $display("mismatch sel=%0d a=%h s=%h exp=%h", sel, a, s, exp_s);
      end
    end
    $display("sel hits: %0d %0d %0d %0d", hits[0], hits[1], hits[2], hits[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
