// local_comparator: best of the four correlation registers.
//
// Among the candidates whose valid bit is set it returns the best value,
// its energy sum and its index (lowest index on a tie); any is low when
// none is valid. "Best" is the smallest sum for SAD and SSD and the largest
// normalised correlation for NCC, decided by corr_better. Combinational.
module local_comparator
  import pyr_pkg::*;
(
  input  corr_mode_e       mode,
  input  logic [3:0][31:0] acc,
  input  logic [3:0][31:0] acc2,
  input  logic [3:0]       valid,
  output logic [31:0]      best,
  output logic [31:0]      best2,
  output logic [1:0]       idx,
  output logic             any
);
  always_comb begin
    best  = '1;
    best2 = '0;
    idx   = '0;
    any   = 1'b0;
    for (int q = 0; q < 4; q++)
      if (valid[q] && (!any || corr_better(mode, acc[q], acc2[q], best, best2))) begin
        best  = acc[q];
        best2 = acc2[q];
        idx   = 2'(q);
        any   = 1'b1;
      end
  end
endmodule
