// voting_system: resolves one global movement vector from several targets.
//
// Each target's movement (dy,dx) since the last frame is compared with every
// other one; two vectors agree when both components differ by at most TOL
// pixels. The target with the most agreeing targets (itself included; the
// lowest index on a tie) represents the majority group and its vector is the
// global movement vector, so a single target that was lost or mistracked does
// not move the result. The grouping by majority follows the text; the
// tolerance and taking the representative's vector (not an average) are this
// design's choices. start latches the result at the next edge, valid then
// pulses for one cycle.
module voting_system #(
  parameter int unsigned MAX_TARGETS = 5,
  parameter int unsigned TOL         = 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  logic [2:0]               n,       // targets in use, 1..MAX_TARGETS
  input  logic signed [15:0]       dy [MAX_TARGETS],
  input  logic signed [15:0]       dx [MAX_TARGETS],
  output logic                     valid,
  output logic signed [15:0]       gdy,
  output logic signed [15:0]       gdx,
  output logic [2:0]               votes,   // size of the winning group
  output logic [2:0]               winner   // target representing it
);
  logic [2:0] cnt [MAX_TARGETS];
  logic [2:0] best_cnt, best_i;

  localparam int signed T = TOL;

  function automatic logic close(logic signed [15:0] a, logic signed [15:0] b);
    int signed d;
    d = int'(a) - int'(b);
    return (d <= T) && (d >= -T);
  endfunction

  always_comb begin
    best_cnt = '0;
    best_i   = '0;
    for (int i = 0; i < MAX_TARGETS; i++) begin
      cnt[i] = '0;
      if (i < 32'(n))
        for (int j = 0; j < MAX_TARGETS; j++)
          if (j < 32'(n) && close(dy[i], dy[j]) && close(dx[i], dx[j]))
            cnt[i] = cnt[i] + 3'd1;
      if (cnt[i] > best_cnt) begin
        best_cnt = cnt[i];
        best_i   = 3'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid  <= 1'b0;
      gdy    <= '0;
      gdx    <= '0;
      votes  <= '0;
      winner <= '0;
    end else begin
      valid <= start;
      if (start) begin
        gdy    <= dy[best_i];
        gdx    <= dx[best_i];
        votes  <= best_cnt;
        winner <= best_i;
      end
    end
  end
endmodule
