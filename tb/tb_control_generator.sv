// tb_control_generator: for output rows 0..5 and virtual input rows -2..14,
// the generator must be active exactly for the five rows 2j-2..2j+2, select
// mask row vrow-2j+2, pass that row through and flag first and last.
module tb_control_generator;
  import pyr_pkg::*;
  int checks = 0, failures = 0;
  logic signed [15:0] vrow;
  logic [15:0] orow;
  logic [2:0] rom_row, unused_row;
  coef_row_t rom_coef, unused_coef, coef;
  logic active, first, last;

  control_generator dut (.vrow, .orow, .rom_row, .rom_coef, .active, .first, .last, .coef);
  coeff_rom u_rom (.row0(rom_row), .row1(3'd0), .coef0(rom_coef), .coef1(unused_coef));

  initial begin
    for (int j = 0; j < 6; j++)
      for (int v = -2; v <= 14; v++) begin
        automatic int tap = v - 2 * j + 2;
        automatic bit act = (tap >= 0 && tap <= 4);
        vrow = 16'(v); orow = 16'(j);
        #1;
        checks += 4;
        if (active != act) begin failures++; $display("active j=%0d v=%0d", j, v); end
        if (first != (act && tap == 0) || last != (act && tap == 4)) begin
          failures++; $display("flags j=%0d v=%0d", j, v);
        end
        if (act && int'(rom_row) != tap) begin failures++; $display("row j=%0d v=%0d", j, v); end
        if (act ? (coef != rom_coef || coef == '0) : (coef != '0)) begin
          failures++; $display("coef j=%0d v=%0d", j, v);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
