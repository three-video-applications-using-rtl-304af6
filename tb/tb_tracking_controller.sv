// tb_tracking_controller: model engines answer the controller's start
// pulses after a few cycles. A first frame must run pyramid, take the initial
// positions, update every target and vote, with no correlation. A second
// frame must run pyramid, one correlation per target (positions and
// movements from the answers), one update per target at the new position,
// and the vote. The bus owner must follow the phases.
module tb_tracking_controller;
  import pyr_pkg::*;
  localparam int MT = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0, first_frame = 0, busy, done, tmem_wr;
  logic [2:0] num_targets = 3'd3, slot;
  logic [15:0] init_row [MT], init_col [MT], pos_row [MT], pos_col [MT];
  owner_e owner;
  logic pyr_start, pyr_done = 0, mr_start, mr_done = 0, up_start, up_done = 0;
  logic vote_start, vote_valid = 0;
  logic [15:0] mr_row = '0, mr_col = '0, up_row, up_col;
  logic signed [15:0] dy [MT], dx [MT];
  int n_pyr, n_mr, n_up, n_vote, bad_owner;
  int ans_r [MT], ans_c [MT];
  string log_seq;

  tracking_controller #(.MAX_TARGETS(MT)) dut (
    .clk, .rst, .start, .first_frame, .num_targets, .init_row, .init_col, .busy, .done,
    .owner, .tmem_wr, .pyr_start, .pyr_done, .mr_start, .slot, .mr_done, .mr_row, .mr_col,
    .up_start, .up_row, .up_col, .up_done, .vote_start, .vote_valid, .pos_row, .pos_col, .dy, .dx);

  // model engines
  always @(posedge clk) begin
    pyr_done <= 0; mr_done <= 0; up_done <= 0; vote_valid <= 0;
    if (pyr_start) begin n_pyr++; log_seq = {log_seq, "P"}; fork begin repeat (4) @(posedge clk); pyr_done <= 1; end join_none end
    if (mr_start) begin
      automatic int s = int'(slot);
      n_mr++; log_seq = {log_seq, "C"};
      fork begin repeat (3) @(posedge clk); mr_row <= 16'(ans_r[s]); mr_col <= 16'(ans_c[s]); mr_done <= 1; end join_none
    end
    if (up_start) begin
      n_up++; log_seq = {log_seq, "U"};
      checks++;
      if (up_row != pos_row[slot] || up_col != pos_col[slot]) begin failures++; $display("update position"); end
      fork begin repeat (2) @(posedge clk); up_done <= 1; end join_none
    end
    if (vote_start) begin n_vote++; log_seq = {log_seq, "V"}; vote_valid <= 1; end
    if (pyr_start && owner != OWN_PYRAMID) bad_owner++;
    if ((mr_start || up_start) && owner != OWN_TRACKER) bad_owner++;
    if (up_start && !tmem_wr) bad_owner++;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(input bit first);
    n_pyr = 0; n_mr = 0; n_up = 0; n_vote = 0; log_seq = "";
    @(negedge clk);
    first_frame = first; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    bad_owner = 0;
    for (int t = 0; t < MT; t++) begin
      init_row[t] = 16'(10 + 20 * t); init_col[t] = 16'(50 + 7 * t);
      ans_r[t] = 10 + 20 * t + t - 1; ans_c[t] = 50 + 7 * t - 2 * t;
    end
    @(negedge clk);
    rst = 0;
    frame(1);
    checks += 2;
    if (log_seq != "PUUUV") begin failures++; $display("first frame sequence %s", log_seq); end
    if (owner != OWN_HOST) begin failures++; $display("owner not host when idle"); end
    for (int t = 0; t < MT; t++) begin
      checks++;
      if (pos_row[t] != init_row[t] || pos_col[t] != init_col[t] || dy[t] != 0 || dx[t] != 0) begin
        failures++; $display("initial position %0d", t);
      end
    end
    frame(0);
    checks++;
    if (log_seq != "PCCCUUUV") begin failures++; $display("frame sequence %s", log_seq); end
    for (int t = 0; t < 3; t++) begin
      checks++;
      if (int'(pos_row[t]) != ans_r[t] || int'(pos_col[t]) != ans_c[t]
          || int'(dy[t]) != t - 1 || int'(dx[t]) != -2 * t) begin
        failures++; $display("target %0d at (%0d,%0d) moved (%0d,%0d)", t, pos_row[t], pos_col[t], dy[t], dx[t]);
      end
    end
    checks++;
    if (bad_owner != 0) begin failures++; $display("bus owner wrong %0d times", bad_owner); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
