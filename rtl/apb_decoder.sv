// apb_decoder: the on-chip AMBA bus, one master (the processor) and NS
// slaves, in the APB form.
//
// The master's select is steered to the slave whose address window holds
// PADDR (window s: (PADDR & MASK[s]) == BASE[s]); the other signals are
// broadcast, and the selected slave's read data, ready and error come back.
// An address no slave claims completes at once with PSLVERR. Purely
// combinational. The default map (array, multiplier, two timers) matches
// poetic_pkg; APB and the map are this design's choices.
module apb_decoder
  import poetic_pkg::*;
#(
  parameter int unsigned NS = 4,
  parameter logic [NS-1:0][31:0] BASE = {ADDR_TIMER1, ADDR_TIMER0, ADDR_MUL, ADDR_ARRAY},
  parameter logic [NS-1:0][31:0] MASK = {32'hFFFF_FF00, 32'hFFFF_FF00, 32'hFFFF_FF00, 32'hFFFF_0000}
) (
  input  apb_req_t          m_req,
  output apb_rsp_t          m_rsp,
  output apb_req_t [NS-1:0] s_req,
  input  apb_rsp_t [NS-1:0] s_rsp
);

  logic [NS-1:0] hit;

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      hit[s]          = ((m_req.paddr & MASK[s]) == BASE[s]);
      s_req[s]        = m_req;
      s_req[s].psel   = m_req.psel && hit[s];
    end
    m_rsp.prdata  = '0;
    m_rsp.pready  = 1'b1;
    m_rsp.pslverr = m_req.psel && m_req.penable;
    for (int s = NS - 1; s >= 0; s--) begin
      if (hit[s]) m_rsp = s_rsp[s];
    end
  end

  // APB rule: the access phase (PENABLE) only exists inside a selected transfer
  always_comb begin
    a_penable_needs_psel: assert (!m_req.penable || m_req.psel)
      else $error("PENABLE without PSEL");
  end

endmodule
