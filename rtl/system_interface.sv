// system_interface: the bus slave that maps the configuration bits and the
// state of every molecule into the processor's address space.
//
// Each molecule owns four 32-bit words at byte address 16*index + 4*word;
// words 0..2 hold its 76 configuration bits (layout in poetic_pkg), word 3
// reads as zero and ignores writes. The live flip-flop value appears in
// word 2, so a read returns the state of the evolved circuit.
//
// Bus: AMBA APB with no wait states, so a write takes two clocks (setup and
// access), and the configuration of one molecule three writes. The write
// reaches the array on the access clock. An address beyond the last
// molecule answers with PSLVERR. APB, the address layout and the error
// response are this design's choices; the parallel word access and the
// two-clock write are from the design description.
module system_interface
  import poetic_pkg::*;
#(
  parameter int unsigned N_MOL = 200,
  localparam int unsigned MW   = (N_MOL > 1) ? $clog2(N_MOL) : 1
) (
  input  apb_req_t        req,
  output apb_rsp_t        rsp,
  // towards the array
  output logic            wr_en,
  output logic [MW-1:0]   wr_mol,
  output logic [1:0]      wr_word,
  output logic [31:0]     wr_data,
  output logic [MW-1:0]   rd_mol,
  output logic [1:0]      rd_word,
  input  logic [31:0]     rd_data
);

  logic [11:0] mol;
  logic        in_range;

  assign mol      = req.paddr[15:4];
  assign in_range = (32'(mol) < N_MOL);

  assign wr_mol  = MW'(mol);
  assign rd_mol  = MW'(mol);
  assign wr_word = req.paddr[3:2];
  assign rd_word = req.paddr[3:2];
  assign wr_data = req.pwdata;
  assign wr_en   = req.psel && req.penable && req.pwrite && in_range &&
                   (req.paddr[3:2] != 2'd3);

  assign rsp.pready  = 1'b1;
  assign rsp.pslverr = req.psel && req.penable && !in_range;
  assign rsp.prdata  = (in_range && req.paddr[3:2] != 2'd3) ? rd_data : 32'd0;

endmodule
