// booth_mul16: 16 x 16 signed multiplier with radix-4 Booth recoding, as a
// bus peripheral.
//
// The multiplier B is recoded into eight digits in {-2,-1,0,+1,+2}, one per
// overlapping bit triple {b[2i+1], b[2i], b[2i-1]}; each digit selects 0,
// +-A or +-2A, shifted by 2i, and the eight partial products are summed
// into the 32-bit two's-complement product.
//
// Registers (byte offsets): 0x0 A (bits 15:0), 0x4 B (bits 15:0), 0x8
// product (read only). The product is valid on the clock after the second
// operand is written. APB, no wait states. Only the name and the 16 x 16
// size are given for this unit; signed operands and the register map are
// this design's choices.
module booth_mul16
  import poetic_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  apb_req_t req,
  output apb_rsp_t rsp
);

  logic signed [15:0] a_q, b_q;
  logic signed [31:0] prod;

  // radix-4 Booth product
  always_comb begin
    logic [16:0]        bx;
    logic signed [31:0] a32, pp;
    bx   = {b_q, 1'b0};
    a32  = 32'(a_q);
    prod = '0;
    for (int i = 0; i < 8; i++) begin
      unique case (bx[2*i +: 3])
        3'b001, 3'b010: pp = a32;
        3'b011:         pp = a32 <<< 1;
        3'b100:         pp = -(a32 <<< 1);
        3'b101, 3'b110: pp = -a32;
        default:        pp = '0;
      endcase
      prod = prod + (pp <<< (2 * i));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else if (req.psel && req.penable && req.pwrite) begin
      unique case (req.paddr[3:2])
        2'd0:    a_q <= req.pwdata[15:0];
        2'd1:    b_q <= req.pwdata[15:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (req.paddr[3:2])
      2'd0:    rsp.prdata = 32'(a_q);
      2'd1:    rsp.prdata = 32'(b_q);
      2'd2:    rsp.prdata = prod;
      default: rsp.prdata = '0;
    endcase
  end
  assign rsp.pready  = 1'b1;
  assign rsp.pslverr = 1'b0;

endmodule
