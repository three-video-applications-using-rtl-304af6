// tb_data_memory: writes random words to random addresses, then reads every
// written address back and checks the data arrives exactly one clock after
// the address, and that a read during a write returns the old word.
module tb_data_memory;
  import pyr_pkg::*;
  localparam int DEPTH = 1000;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we = 0;
  addr_t addr = '0;
  pixel_t wdata = '0, rdata;
  int model [DEPTH];

  data_memory #(.DEPTH(DEPTH)) dut (.clk, .we, .addr, .wdata, .rdata);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = $urandom_range(0, 255);
      @(negedge clk);
      we = 1; addr = addr_t'(a); wdata = pixel_t'(model[a]);
    end
    @(negedge clk);
    we = 0;
    for (int k = 0; k < 500; k++) begin
      automatic int a = $urandom_range(0, DEPTH - 1);
      addr = addr_t'(a);
      @(negedge clk);
      checks++;
      if (int'(rdata) != model[a]) begin
        failures++;
        $display("addr %0d read %0d expected %0d", a, rdata, model[a]);
      end
    end
    // read during write returns the old word, the new word one access later
    addr = addr_t'(17); we = 1; wdata = pixel_t'(model[17] ^ 8'hff);
    @(negedge clk);
    we = 0;
    checks++;
    if (int'(rdata) != model[17]) begin failures++; $display("read-during-write"); end
    @(negedge clk);
    checks++;
    if (int'(rdata) != (model[17] ^ 255)) begin failures++; $display("write lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
