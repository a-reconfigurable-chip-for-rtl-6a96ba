// timer16: 16-bit down-counting timer, as a bus peripheral.
//
// When enabled, COUNT decreases by one each clock. On the clock where it is
// zero the timer sets its expired flag and either reloads LOAD (auto-reload)
// or stops. The interrupt output is the flag gated by the interrupt enable.
//
// Registers (byte offsets): 0x0 CTRL {irq_en, auto_reload, enable} in bits
// 2:0; 0x4 LOAD; 0x8 COUNT (a write loads the counter); 0xC STATUS bit 0 =
// expired, cleared by writing 1. APB, no wait states. Only the name and the
// 16-bit width are given for this unit; its registers and behaviour are
// this design's choices.
module timer16
  import poetic_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  apb_req_t req,
  output apb_rsp_t rsp,
  output logic     irq
);

  logic [2:0]  ctrl_q;
  logic [15:0] load_q, count_q;
  logic        flag_q;
  logic        wr;

  assign wr = req.psel && req.penable && req.pwrite;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q  <= '0;
      load_q  <= '0;
      count_q <= '0;
      flag_q  <= 1'b0;
    end else begin
      if (ctrl_q[0]) begin
        if (count_q == 16'd0) begin
          flag_q <= 1'b1;
          if (ctrl_q[1]) count_q <= load_q;
          else           ctrl_q[0] <= 1'b0;
        end else begin
          count_q <= count_q - 16'd1;
        end
      end
      if (wr) begin
        unique case (req.paddr[3:2])
          2'd0: ctrl_q  <= req.pwdata[2:0];
          2'd1: load_q  <= req.pwdata[15:0];
          2'd2: count_q <= req.pwdata[15:0];
          2'd3: if (req.pwdata[0]) flag_q <= 1'b0;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (req.paddr[3:2])
      2'd0:    rsp.prdata = {29'd0, ctrl_q};
      2'd1:    rsp.prdata = {16'd0, load_q};
      2'd2:    rsp.prdata = {16'd0, count_q};
      default: rsp.prdata = {31'd0, flag_q};
    endcase
  end
  assign rsp.pready  = 1'b1;
  assign rsp.pslverr = 1'b0;
  assign irq         = flag_q && ctrl_q[2];

endmodule
