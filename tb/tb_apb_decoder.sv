// tb_apb_decoder: address decoding of the default map, steering of the
// select, the response mux and the error for unmapped addresses.
module tb_apb_decoder;
  import poetic_pkg::*;
  apb_req_t       m_req;
  apb_rsp_t       m_rsp;
  apb_req_t [3:0] s_req;
  apb_rsp_t [3:0] s_rsp;
  int checks = 0, failures = 0;

  apb_decoder dut (.*);

  function automatic int target(logic [31:0] a);
    if (a < 32'h0001_0000) return 0;
    if (a >= 32'h0001_0000 && a < 32'h0001_0100) return 1;
    if (a >= 32'h0001_0100 && a < 32'h0001_0200) return 2;
    if (a >= 32'h0001_0200 && a < 32'h0001_0300) return 3;
    return -1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int t;
      logic [31:0] a;
      case (it % 3)
        0: a = 32'($urandom) & 32'h0000_FFFF;
        1: a = 32'h0001_0000 + ($urandom % 32'h400);
        default: a = $urandom;
      endcase
      m_req = '{paddr: a, psel: 1'b1, penable: 1'($urandom), pwrite: 1'($urandom),
                pwdata: $urandom};
      for (int s = 0; s < 4; s++)
        s_rsp[s] = '{prdata: 32'(s * 32'h1111_1111) ^ a, pready: 1'b1, pslverr: 1'b0};
      #1;
      t = target(a);
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (s_req[s].psel !== (s == t) || s_req[s].paddr !== a || s_req[s].pwdata !== m_req.pwdata)
          failures++;
      end
      checks++;
      if (t >= 0) begin
        if (m_rsp.prdata !== (32'(t * 32'h1111_1111) ^ a) || m_rsp.pslverr) failures++;
      end else begin
        if (m_rsp.pslverr !== m_req.penable || !m_rsp.pready) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
