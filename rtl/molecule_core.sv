// molecule_core: the functional part of a molecule, its 16-bit look-up table
// used in one of eight operational modes, and its configurable flip-flop.
//
// Modes (3 configuration bits):
//   4-LUT     out = lut[{in3,in2,in1,in0}]
//   3-LUT     two 3-input LUTs on {in2,in1,in0}: lut[7:0] gives out,
//             lut[15:8] gives aux_out (a carry towards the north neighbour)
//   Shift     16-bit shift register: when in1 = 1, in0 enters at bit 0;
//             out = lut[15]
//   Comm      lut[7:0] is a 3-LUT giving out; lut[15:8] is an 8-bit shift
//             register taking in3 every enabled clock, aux_out = lut[15]
//   Configure shifts like Shift; lut[15] is sent to the neighbours as
//             partial configuration data, with in1 as the shift strobe
//   Input     out = the bit from the routing plane (route_in)
//   Output    out = in0, also sent to the routing plane (route_out)
//   Trigger   the LUT rotates every enabled clock and lut[15] is sent to the
//             routing plane as its synchronisation pulse (trigger_out), so
//             the LUT pattern sets the pulse train
// The mode list and its meaning are from the design description; which
// input does what inside each mode, the carry direction and the Trigger
// pattern are this design's choices.
//
// Flip-flop (the "other bits"): D is the mode's combinational result; the
// molecule output is the flip-flop or the combinational result (seq_out).
// It updates when the molecule is enabled (mol_en) and, if dff_en_used,
// when in3 = 1. clk_edge picks the rising or falling clock edge (two
// registers, one per edge, the configured one is used). The local reset,
// when lrst_en, comes from one of eight sources (lrst_origin: 0..3 direct
// outputs of the N, E, S, W neighbours, 4..7 LUT inputs 0..3), and loads
// rst_value either at the clock edge or at once (async_rst). The chip reset
// clears it. ff_load/ff_load_val load it from the configuration port; with
// the falling edge selected that load lands on the next falling edge.
// LUT contents change only on rising edges, and only when mol_en.
module molecule_core
  import poetic_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  mol_cfg_t    cfg,
  input  logic [3:0]  lut_in,
  input  logic [3:0]  d_in,
  input  logic        route_in,
  input  logic        ff_load,
  input  logic        ff_load_val,
  output logic        func_out,
  output logic        ff_q,
  output logic        aux_out,
  output logic        lut_we,
  output logic [15:0] lut_next,
  output logic        cfg_data_out,
  output logic        cfg_shift_out,
  output logic        route_out,
  output logic        trigger_out
);

  logic [15:0] lut;
  logic        comb;
  logic        ff_en;
  logic        lrst_src, lrst_sync, lrst_async;
  logic        arst, arst_val;
  logic        ff_p, ff_n;
  logic        ld_pend, ld_val;
  others_t     o;

  assign lut = cfg.lut;
  assign o   = cfg.oth;

  // combinational result and LUT update
  always_comb begin
    comb          = 1'b0;
    aux_out       = 1'b0;
    lut_we        = 1'b0;
    lut_next      = lut;
    cfg_data_out  = 1'b0;
    cfg_shift_out = 1'b0;
    route_out     = 1'b0;
    trigger_out   = 1'b0;
    unique case (cfg.mode)
      MODE_LUT4: comb = lut[lut_in];
      MODE_LUT3: begin
        comb    = lut[{1'b0, lut_in[2:0]}];
        aux_out = lut[{1'b1, lut_in[2:0]}];
      end
      MODE_SHIFT: begin
        comb     = lut[15];
        lut_we   = o.mol_en && lut_in[1];
        lut_next = {lut[14:0], lut_in[0]};
      end
      MODE_COMM: begin
        comb     = lut[{1'b0, lut_in[2:0]}];
        aux_out  = lut[15];
        lut_we   = o.mol_en;
        lut_next = {lut[14:8], lut_in[3], lut[7:0]};
      end
      MODE_CONFIG: begin
        comb          = lut[15];
        lut_we        = o.mol_en && lut_in[1];
        lut_next      = {lut[14:0], lut_in[0]};
        cfg_data_out  = lut[15];
        cfg_shift_out = o.mol_en && lut_in[1];
      end
      MODE_INPUT: comb = route_in;
      MODE_OUTPUT: begin
        comb      = lut_in[0];
        route_out = lut_in[0];
      end
      MODE_TRIGGER: begin
        comb        = lut[15];
        trigger_out = lut[15];
        lut_we      = o.mol_en;
        lut_next    = {lut[14:0], lut[15]};
      end
      default: ;
    endcase
  end

  assign ff_en      = o.mol_en && (!o.dff_en_used || lut_in[3]);
  assign lrst_src   = o.lrst_origin[2] ? lut_in[o.lrst_origin[1:0]] : d_in[o.lrst_origin[1:0]];
  assign lrst_sync  = o.lrst_en && !o.async_rst && lrst_src;
  assign lrst_async = o.lrst_en &&  o.async_rst && lrst_src;

  // chip reset and asynchronous local reset share one asynchronous load
  assign arst     = !rst_n || lrst_async;
  assign arst_val = rst_n && o.rst_value;

  // rising-edge flip-flop
  always_ff @(posedge clk or posedge arst) begin
    if (arst)            ff_p <= arst_val;
    else if (ff_load)    ff_p <= ff_load_val;
    else if (lrst_sync)  ff_p <= o.rst_value;
    else if (ff_en)      ff_p <= comb;
  end

  // configuration-port load waiting for the falling edge
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_pend <= 1'b0;
      ld_val  <= 1'b0;
    end else begin
      ld_pend <= ff_load;
      ld_val  <= ff_load_val;
    end
  end

  // falling-edge flip-flop
  always_ff @(negedge clk or posedge arst) begin
    if (arst)            ff_n <= arst_val;
    else if (ld_pend)    ff_n <= ld_val;
    else if (lrst_sync)  ff_n <= o.rst_value;
    else if (ff_en)      ff_n <= comb;
  end

  assign ff_q     = o.clk_edge ? ff_n : ff_p;
  assign func_out = o.seq_out ? ff_q : comb;

endmodule
