// switch_box: the multiplexer switch box of one molecule.
//
// Each of the four cardinal directions has two long-distance input lines and
// two output lines. Every one of the eight outputs is an 8-to-1 multiplexer
// with its own 3 configuration bits (24 bits in all), choosing among the six
// input lines of the other three directions, the molecule's output or its
// inverse. Built from multiplexers only, no configuration can short two
// drivers together.
//
// Select encoding (this design's choice; the drawing names the inputs but not
// their select codes): for the output of direction D, line L, with select s,
//   s[1:0] = 0,1,2 : line s[2] of the 1st, 2nd, 3rd other direction, taken in
//                    the order N, E, S, W with D left out
//   s[1:0] = 3     : func_out when s[2] = 0, its inverse when s[2] = 1
// With s[2] fixed to 0 every output chooses among the line-0 inputs of the
// three other directions and func_out, which is the reduced 2-bit subset
// used for evolution.
//
// Interface: line_in[d][l] and line_out[d][l] with d = N,E,S,W (0..3) and
// l = line 0/1; sb[3*(2d+l) +: 3] configures output (d,l). Purely
// combinational.
module switch_box (
  input  logic [3:0][1:0] line_in,
  input  logic            func_out,
  input  logic [23:0]     sb,
  output logic [3:0][1:0] line_out
);

  always_comb begin
    for (int d = 0; d < 4; d++) begin
      for (int l = 0; l < 2; l++) begin
        logic [2:0] s;
        logic [1:0] od;
        s  = sb[3*(2*d+l) +: 3];
        // s[1:0]-th direction other than d, in N, E, S, W order
        od = (s[1:0] < d[1:0]) ? s[1:0] : s[1:0] + 2'd1;
        if (s[1:0] == 2'd3) line_out[d][l] = func_out ^ s[2];
        else                line_out[d][l] = line_in[od][s[2]];
      end
    end
  end

endmodule
