// tb_input_memory: random shifts and reads of the tap-delay line, compared
// with a queue model where tap k is the k-th most recent sample (0 after reset).
module tb_input_memory;
  logic clk = 0, rst_n = 0, shift_en = 0;
  logic signed [7:0] wr_data = 0, rd_data;
  logic [2:0] rd_addr = 0;
  int checks = 0, failures = 0;
  logic signed [7:0] model [8];
  int n_shift = 0;

  input_memory dut (.clk(clk), .rst_n(rst_n), .shift_en(shift_en), .wr_data(wr_data),
                    .rd_addr(rd_addr), .rd_data(rd_data));

  always #10 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      // Check every tap against the model.
      for (int k = 0; k < 8; k++) begin
        rd_addr = 3'(k);
        #1;
        checks++;
        if (rd_data !== model[k]) begin
          failures++;
          if (failures < 10) $display("tap %0d: got %0d exp %0d", k, rd_data, model[k]);
        end
      end
      rd_addr  = 3'($urandom);
      shift_en = ($urandom % 3) != 0;
      wr_data  = 8'($urandom);
      @(posedge clk);
      if (shift_en) begin
        for (int k = 7; k > 0; k--) model[k] = model[k-1];
        model[0] = wr_data;
        n_shift++;
      end
    end
    $display("shifts=%0d", n_shift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
