// tb_bus_mux: random requests from three masters; the memory side must carry
// exactly the selected master's request, grant must be one-hot on it and
// conflict must flag a request from any other master.
module tb_bus_mux;
  import pyr_pkg::*;
  int checks = 0, failures = 0;
  logic [1:0] sel;
  mem_req_t m_req [3];
  mem_req_t s_req;
  logic [2:0] grant;
  logic conflict;
  bus_mux #(.N(3)) dut (.sel, .m_req, .s_req, .grant, .conflict);

  initial begin
    for (int k = 0; k < 500; k++) begin
      automatic bit c = 0;
      sel = 2'($urandom_range(0, 2));
      for (int m = 0; m < 3; m++) begin
        m_req[m] = '{re: 1'($urandom_range(0, 1)), we: 1'($urandom_range(0, 1)) & 1'($urandom_range(0, 1)),
                     addr: addr_t'($urandom), wdata: pixel_t'($urandom)};
        if (m != int'(sel) && (m_req[m].re || m_req[m].we)) c = 1;
      end
      #1;
      checks += 3;
      if (s_req != m_req[sel]) begin failures++; $display("request not passed"); end
      if (grant != (3'b001 << sel)) begin failures++; $display("grant %b", grant); end
      if (conflict != c) begin failures++; $display("conflict %b", conflict); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
