// molecule_config: the 76 configuration bits of one molecule.
//
// The bits are held in the five blocks of the configuration table (lut, lut
// inputs, switch box, mode, other bits) plus three global bits (global
// partial enable, configuration input origin). They are reached in two ways:
//
// * Parallel, from the processor: three 32-bit words (layout in poetic_pkg).
//   A write replaces one word in one clock; a read is combinational. The
//   "value of the flip-flop" bit reads the molecule's live flip-flop, and
//   writing it loads that flip-flop, so the state of a circuit can be read
//   back and set.
// * Serial partial reconfiguration from a neighbour in Configure mode. When
//   glob_en is set, the neighbour named by `origin` provides a data bit and a
//   shift strobe. On each strobe the blocks whose own enable bit is set form
//   one shift chain, in table order lut -> lut inputs -> switch box -> mode ->
//   other bits; the data bit enters at bit 0 of the first enabled block and
//   the top bit of each block moves to bit 0 of the next enabled one. The
//   three global bits and the five enable bits themselves never shift, so a
//   neighbour cannot take the molecule away from its processor-set policy.
//   The serial format (bit order, strobe) is this design's choice.
//
// The functional unit may rewrite the 16 LUT bits (shift-register modes)
// through lut_we/lut_next. Priority on a clock: processor write, then
// partial reconfiguration, then the functional update. All bits reset to 0.
// The storage also has an initial value of 0. The array's combinational
// loops are closed only by configuration, so random power-up bits could
// make a simulation oscillate before reset. Hardware does not rely on this
// initial value: the reset clears the same bits.
module molecule_config
  import poetic_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // processor port
  input  logic        wr_en,
  input  logic [1:0]  wr_word,
  input  logic [31:0] wr_data,
  input  logic [1:0]  rd_word,
  output logic [31:0] rd_data,
  // partial reconfiguration from the four neighbours (N, E, S, W)
  input  logic [3:0]  nb_cfg_data,
  input  logic [3:0]  nb_cfg_shift,
  output logic        config_in,     // selected neighbour's data bit
  // functional LUT update
  input  logic        lut_we,
  input  logic [15:0] lut_next,
  // flip-flop value
  input  logic        ff_q,
  output logic        ff_load,
  output logic        ff_load_val,
  // current configuration (ff_value field = live flip-flop)
  output mol_cfg_t    cfg
);

  // Starts cleared so that no random power-up pattern closes an oscillating
  // loop through the array before the first reset.
  mol_cfg_t cfg_q = '0;
  mol_cfg_t cfg_d;
  logic     pc_shift;

  always_comb begin
    cfg       = cfg_q;
    cfg.oth.ff_value = ff_q;
  end

  assign config_in = nb_cfg_data[cfg_q.origin];
  assign pc_shift  = cfg_q.glob_en && nb_cfg_shift[cfg_q.origin];
  assign rd_data   = cfg_word(cfg, rd_word);

  always_comb begin
    logic       carry;
    logic [2:0] m;
    carry       = config_in;
    m           = cfg.mode;
    cfg_d       = cfg;
    ff_load     = 1'b0;
    ff_load_val = ff_q;
    if (lut_we) cfg_d.lut = lut_next;
    if (pc_shift) begin
      if (cfg.lut_en) begin
        {carry, cfg_d.lut} = {cfg.lut, carry};
      end
      if (cfg.inp_en) begin
        {carry, cfg_d.inp} = {cfg.inp, carry};
      end
      if (cfg.sb_en) begin
        {carry, cfg_d.sb} = {cfg.sb, carry};
      end
      if (cfg.mode_en) begin
        {carry, m} = {cfg.mode, carry};
        cfg_d.mode = mode_e'(m);
      end
      if (cfg.oth_en) begin
        {carry, cfg_d.oth} = {cfg.oth, carry};
        ff_load     = 1'b1;
        ff_load_val = cfg_d.oth.ff_value;
      end
    end
    if (wr_en) begin
      cfg_d = cfg_set_word(cfg_d, wr_word, wr_data);
      if (wr_word == 2'd2) begin
        ff_load     = 1'b1;
        ff_load_val = wr_data[4];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg_q <= '0;
    else        cfg_q <= cfg_d;
  end

endmodule
