// tb_register_bank: five rounds of accumulation into random columns (the
// first round loads), then reads every column and checks the sum arrives one
// clock after the read index.
module tb_register_bank;
  localparam int N = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic acc_en = 0, first = 0;
  logic [4:0] idx = '0, rd_idx = '0;
  logic [15:0] val = '0, rd_data;
  int model [N];

  register_bank #(.N(N)) dut (.clk, .acc_en, .first, .idx, .val, .rd_idx, .rd_data);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 5; r++)
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        acc_en = ($urandom_range(0, 4) != 0) || r == 0;
        first = (r == 0);
        idx = 5'(i);
        val = 16'($urandom_range(0, 9000));
        if (acc_en) model[i] = (r == 0) ? int'(val) : model[i] + int'(val);
      end
    @(negedge clk);
    acc_en = 0;
    for (int i = 0; i < N; i++) begin
      rd_idx = 5'(i);
      @(negedge clk);
      checks++;
      if (int'(rd_data) != model[i]) begin
        failures++; $display("col %0d got %0d expected %0d", i, rd_data, model[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
