// tb_correlation_function: all 65536 pixel pairs in the three modes against
// |a-b| and (a-b)^2 (energy 0), and a*b with energy a*a.
module tb_correlation_function;
  import pyr_pkg::*;
  int checks = 0, failures = 0;
  corr_mode_e mode;
  pixel_t a, b;
  logic [15:0] cost, energy;
  correlation_function dut (.mode, .a, .b, .cost, .energy);
  initial begin
    for (int md = 0; md < 3; md++)
      for (int x = 0; x < 256; x++)
        for (int y = 0; y < 256; y++) begin
          automatic int d = (x > y) ? x - y : y - x;
          mode = corr_mode_e'(md); a = pixel_t'(x); b = pixel_t'(y);
          #1;
          checks++;
          if (int'(cost) != (md == 2 ? x * y : (md ? d * d : d))
              || int'(energy) != (md == 2 ? x * x : 0)) begin
            failures++;
            if (failures < 10) $display("mode %0d a %0d b %0d got %0d", md, x, y, cost);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
