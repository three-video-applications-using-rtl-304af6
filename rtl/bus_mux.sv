// bus_mux: the multiplexor that isolates the memory bus.
//
// N masters (host, pyramid architecture, tracking hardware) each present a
// memory request; sel names the one connected to the memory, all others are
// cut off. grant tells each master whether it owns the bus, and conflict
// flags a request from a master that does not own it (it is dropped).
// Combinational.
module bus_mux
  import pyr_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic [$clog2(N)-1:0] sel,
  input  mem_req_t             m_req [N],
  output mem_req_t             s_req,
  output logic [N-1:0]         grant,
  output logic                 conflict
);
  always_comb begin
    s_req    = '0;
    grant    = '0;
    conflict = 1'b0;
    for (int k = 0; k < N; k++) begin
      if (sel == k[$clog2(N)-1:0]) begin
        s_req    = m_req[k];
        grant[k] = 1'b1;
      end else if (m_req[k].re || m_req[k].we) begin
        conflict = 1'b1;
      end
    end
  end
endmodule
