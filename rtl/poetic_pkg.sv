// poetic_pkg: types and constants shared by the POEtic molecule array and its
// bus peripherals.
//
// A molecule is defined by 76 configuration bits (table of five partially
// reconfigurable blocks plus three global bits). The processor sees them as
// three 32-bit words, 20 bits of which are unused and read as zero:
//
//   word 0  [15:0]  lut            [16] lut block enable
//           [30:17] lut input selection (14 bits)
//           [31]    lut-input block enable
//   word 1  [23:0]  switch box (8 muxes x 3 bits)   [24] switch box enable
//   word 2  [2:0]   operational mode   [3] mode block enable
//           [14:4]  other bits (11)    [15] other block enable
//           [17:16] configuration input origin   [18] global partial enable
//
// The order of the blocks inside the three words follows the drawing of the
// bit stream (lut at the low end, then lut inputs, switch box, mode, other
// bits); the exact bit positions, and the enable bit being the top bit of
// its block, are this design's choice.
package poetic_pkg;

  // Operational modes, in the order the modes are listed.
  typedef enum logic [2:0] {
    MODE_LUT4    = 3'd0,
    MODE_LUT3    = 3'd1,
    MODE_SHIFT   = 3'd2,
    MODE_COMM    = 3'd3,
    MODE_CONFIG  = 3'd4,
    MODE_INPUT   = 3'd5,
    MODE_OUTPUT  = 3'd6,
    MODE_TRIGGER = 3'd7
  } mode_e;

  // Cardinal directions, used for the configuration input origin and the
  // local reset origin.
  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  // The 14 bits that select the four LUT inputs.
  typedef struct packed {
    logic        direct_in;     // input 1: pick the direct neighbour outputs
    logic        special_input; // input 0: pick the special signals
    logic [11:0] lut_sel;       // 3 bits per input, input k at [3k+2:3k]
  } lut_inputs_t;

  // The eleven "other" bits.
  typedef struct packed {
    logic       seq_out;      // 1: output taken from the flip-flop
    logic       rst_value;    // value loaded by a reset
    logic       dff_en_used;  // 1: flip-flop enabled by LUT input 3
    logic       clk_edge;     // 0: rising edge, 1: falling edge
    logic [2:0] lrst_origin;  // source of the local reset
    logic       lrst_en;      // local reset enable
    logic       async_rst;    // 1: local reset is asynchronous
    logic       mol_en;       // molecule enable
    logic       ff_value;     // value of the flip-flop
  } others_t;

  // The whole configuration of a molecule, 76 bits.
  typedef struct packed {
    logic        glob_en;  // accept partial configuration from a neighbour
    dir_e        origin;   // neighbour the partial configuration comes from
    logic        lut_en;
    logic [15:0] lut;
    logic        inp_en;
    lut_inputs_t inp;
    logic        sb_en;
    logic [23:0] sb;
    logic        mode_en;
    mode_e       mode;
    logic        oth_en;
    others_t     oth;
  } mol_cfg_t;

  // Pack a configuration into the three bus words.
  function automatic logic [31:0] cfg_word(input mol_cfg_t c, input logic [1:0] w);
    logic [31:0] r;
    unique case (w)
      2'd0:    r = {c.inp_en, c.inp, c.lut_en, c.lut};
      2'd1:    r = {7'd0, c.sb_en, c.sb};
      2'd2:    r = {13'd0, c.glob_en, c.origin, c.oth_en, c.oth, c.mode_en, c.mode};
      default: r = 32'd0;
    endcase
    return r;
  endfunction

  // Replace one bus word of a configuration.
  function automatic mol_cfg_t cfg_set_word(input mol_cfg_t c, input logic [1:0] w,
                                            input logic [31:0] d);
    mol_cfg_t r;
    r = c;
    unique case (w)
      2'd0: {r.inp_en, r.inp, r.lut_en, r.lut} = d;
      2'd1: {r.sb_en, r.sb} = d[24:0];
      2'd2: begin
        r.glob_en = d[18];
        r.origin  = dir_e'(d[17:16]);
        r.oth_en  = d[15];
        r.oth     = d[14:4];
        r.mode_en = d[3];
        r.mode    = mode_e'(d[2:0]);
      end
      default: ;
    endcase
    return r;
  endfunction

  // Processor bus: an AMBA APB transfer takes two clocks (setup, access).
  typedef struct packed {
    logic [31:0] paddr;
    logic        psel;
    logic        penable;
    logic        pwrite;
    logic [31:0] pwdata;
  } apb_req_t;

  typedef struct packed {
    logic [31:0] prdata;
    logic        pready;
    logic        pslverr;
  } apb_rsp_t;

  // Peripheral address map on the bus (byte addresses).
  localparam logic [31:0] ADDR_ARRAY  = 32'h0000_0000; // 64 KiB window
  localparam logic [31:0] ADDR_MUL    = 32'h0001_0000;
  localparam logic [31:0] ADDR_TIMER0 = 32'h0001_0100;
  localparam logic [31:0] ADDR_TIMER1 = 32'h0001_0200;

endpackage
