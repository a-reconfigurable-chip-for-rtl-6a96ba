// input_select: the four multiplexers that feed the LUT inputs of a molecule.
//
// Every input picks one of the eight long-distance lines with 3 configuration
// bits (lut_sel[3k+2:3k] for input k), in the order N0, N1, E0, E1, S0, S1,
// W0, W1. Inputs 0 and 1 have extra sources behind 2-to-1 multiplexers, each
// group switched by one more configuration bit (14 bits in all):
//   input 0, special_input = 1: code 0 carry_in, 1 lut_msb, 2 config_in,
//                               3 DFF_out, 4 constant 0 (5..7 unchanged)
//   input 1: code 1 is the constant 1 instead of N1;
//            direct_in = 1:     code 0..3 = direct outputs of the N, E, S, W
//                               neighbours (4..7 unchanged)
// The pairing of the sources follows the drawing of the first two inputs;
// inputs 2 and 3 are not drawn and are plain line multiplexers here. With the
// lowest select bit and the two extra bits at 0, every input chooses among
// N0, E0, S0 and W0 with 2 bits, the reduced set used for evolution.
// The drawing also shows the select of input 1 and the output of input 0
// depending on the operational mode; that sharing is not reproduced: every
// input uses its own select bits in all modes.
//
// Purely combinational. line_in[d][l]: d = N,E,S,W, l = line.
module input_select
  import poetic_pkg::*;
(
  input  logic [3:0][1:0] line_in,
  input  logic [3:0]      d_in,      // direct neighbour outputs, N,E,S,W
  input  logic            carry_in,
  input  logic            lut_msb,
  input  logic            config_in,
  input  logic            dff_out,
  input  lut_inputs_t     inp,
  output logic [3:0]      lut_in
);

  logic [7:0] lines;
  assign lines = {line_in[3][1], line_in[3][0], line_in[2][1], line_in[2][0],
                  line_in[1][1], line_in[1][0], line_in[0][1], line_in[0][0]};

  logic [7:0] src0, src1;

  always_comb begin
    src0 = lines;
    if (inp.special_input) begin
      src0[0] = carry_in;
      src0[1] = lut_msb;
      src0[2] = config_in;
      src0[3] = dff_out;
      src0[4] = 1'b0;
    end
    src1    = lines;
    src1[1] = 1'b1;
    if (inp.direct_in) src1[3:0] = d_in;
  end

  assign lut_in[0] = src0[inp.lut_sel[2:0]];
  assign lut_in[1] = src1[inp.lut_sel[5:3]];
  assign lut_in[2] = lines[inp.lut_sel[8:6]];
  assign lut_in[3] = lines[inp.lut_sel[11:9]];

endmodule
