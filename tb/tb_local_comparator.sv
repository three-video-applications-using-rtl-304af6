// tb_local_comparator: random values (many ties) and valid masks against a
// reference search with lowest-index tie breaking, in all three modes: the
// smallest sum for SAD/SSD; for NCC the largest n^2/d (n the product sum, d
// the energy sum, candidates with d = 0 only when nothing else is valid),
// compared here exactly in 64-bit integers on values below 2^20.
module tb_local_comparator;
  import pyr_pkg::*;
  int checks = 0, failures = 0;
  corr_mode_e mode;
  logic [3:0][31:0] acc, acc2;
  logic [3:0] valid;
  logic [31:0] best, best2;
  logic [1:0] idx;
  logic any;
  local_comparator dut (.mode, .acc, .acc2, .valid, .best, .best2, .idx, .any);

  // reference order: does candidate q beat candidate b?
  function automatic bit beats(int md, longint n, longint d, longint bn, longint bd);
    if (md != 2) return n < bn;
    if (d == 0) return 0;
    if (bd == 0) return 1;
    return n * n * bd > bn * bn * d;
  endfunction

  initial begin
    for (int k = 0; k < 6000; k++) begin
      automatic int bi = -1;
      automatic int md = k % 3;
      mode = corr_mode_e'(md);
      for (int q = 0; q < 4; q++) begin
        if (md == 2) begin
          acc[q]  = (k % 2) ? 32'($urandom_range(0, 1 << 20)) : 32'($urandom_range(0, 6));
          acc2[q] = (k % 2) ? 32'($urandom_range(0, 1 << 20)) : 32'($urandom_range(0, 6));
        end else begin
          acc[q]  = (k % 2) ? $urandom : 32'($urandom_range(0, 5));
          acc2[q] = '0;
        end
      end
      valid = 4'($urandom);
      for (int q = 0; q < 4; q++)
        if (valid[q] && (bi < 0 || beats(md, acc[q], acc2[q], acc[bi], acc2[bi]))) bi = q;
      #1;
      checks++;
      if (any != (bi >= 0) ||
          (bi >= 0 && (int'(idx) != bi || best != acc[bi] || best2 != acc2[bi]))) begin
        failures++; $display("mode %0d mask %b got idx %0d expected %0d", md, valid, idx, bi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
