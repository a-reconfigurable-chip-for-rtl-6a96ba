// molecule: one basic element of the reconfigurable array.
//
// A molecule joins its configuration register (molecule_config), the four
// LUT input multiplexers (input_select), the functional unit with its
// flip-flop (molecule_core) and the switch box. Its output goes straight to
// the four neighbours (func_out) and into the switch box, which drives the
// two long-distance lines towards each direction.
//
// Interface: line_in/line_out[d][l] long lines (d = N,E,S,W, l = 0/1);
// d_in[d] the direct outputs of the neighbours; carry_in/carry_out the
// 3-LUT and Comm chain (carry_in from the south neighbour, this design's
// choice); nb_cfg_* / cfg_*_out the serial partial reconfiguration between
// neighbours; route_in/route_out/trigger_out the signals to the routing
// plane; wr_* and rd_* the processor's word port to the 76 configuration
// bits. Configuration writes take effect at the next rising clock edge.
//
// The molecule output can reach its own LUT inputs through the neighbours
// and the long lines, so tools see combinational loops through lut_in; only
// a configuration that selects such a path closes one (see organic_array).
module molecule
  import poetic_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_en,
  input  logic [1:0]      wr_word,
  input  logic [31:0]     wr_data,
  input  logic [1:0]      rd_word,
  output logic [31:0]     rd_data,
  input  logic [3:0][1:0] line_in,
  output logic [3:0][1:0] line_out,
  input  logic [3:0]      d_in,
  output logic            func_out,
  input  logic            carry_in,
  output logic            carry_out,
  input  logic [3:0]      nb_cfg_data,
  input  logic [3:0]      nb_cfg_shift,
  output logic            cfg_data_out,
  output logic            cfg_shift_out,
  input  logic            route_in,
  output logic            route_out,
  output logic            trigger_out
);

  mol_cfg_t    cfg;
  logic        config_in;
  logic        lut_we;
  logic [15:0] lut_next;
  logic        ff_q, ff_load, ff_load_val;
  logic [3:0]  lut_in;

  molecule_config u_cfg (
    .clk, .rst_n,
    .wr_en, .wr_word, .wr_data, .rd_word, .rd_data,
    .nb_cfg_data, .nb_cfg_shift, .config_in,
    .lut_we, .lut_next,
    .ff_q, .ff_load, .ff_load_val,
    .cfg
  );

  input_select u_inp (
    .line_in,
    .d_in,
    .carry_in,
    .lut_msb   (cfg.lut[15]),
    .config_in,
    .dff_out   (ff_q),
    .inp       (cfg.inp),
    .lut_in
  );

  molecule_core u_core (
    .clk, .rst_n,
    .cfg,
    .lut_in,
    .d_in,
    .route_in,
    .ff_load, .ff_load_val,
    .func_out,
    .ff_q,
    .aux_out (carry_out),
    .lut_we, .lut_next,
    .cfg_data_out, .cfg_shift_out,
    .route_out, .trigger_out
  );

  switch_box u_sb (
    .line_in,
    .func_out,
    .sb       (cfg.sb),
    .line_out
  );

endmodule
