// organic_array: the reconfigurable array (organic subsystem), a ROWS x COLS
// grid of molecules.
//
// Every molecule sends its output straight to its four neighbours and drives
// two long-distance lines towards each neighbour through its switch box;
// lines at the border of the array become ports, so that arrays can be
// joined. Row 0 is the north edge, column 0 the west edge, and molecule
// (r,c) has index r*COLS+c. The 3-LUT/Comm chain runs from south to north,
// and the serial partial-configuration signals of each molecule go to its
// four neighbours. Signals towards the routing plane (Input, Output and
// Trigger modes) are ports, one per molecule.
//
// Configuration port: one 32-bit word of one molecule is written per clock
// (wr_en, wr_mol, wr_word); rd_data shows word rd_word of molecule rd_mol
// combinationally. Molecules beyond ROWS*COLS are ignored and read as zero.
//
// Like any array of configurable cells, the wiring contains combinational
// paths that close into loops for some configurations (a line routed back
// to itself through switch boxes, or a molecule output fed back to its own
// LUT input); tools report these structural loops. A configuration that
// actually closes one is the user's choice, as in any FPGA fabric, and is
// what an unconstrained evolution may produce.
//
// The final chip was planned with about 200 molecules; the 10 x 20 shape of
// the default is this design's choice.
module organic_array
  import poetic_pkg::*;
#(
  parameter int unsigned ROWS = 10,
  parameter int unsigned COLS = 20,
  localparam int unsigned N   = ROWS * COLS,
  localparam int unsigned MW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // processor configuration port
  input  logic                  wr_en,
  input  logic [MW-1:0]         wr_mol,
  input  logic [1:0]            wr_word,
  input  logic [31:0]           wr_data,
  input  logic [MW-1:0]         rd_mol,
  input  logic [1:0]            rd_word,
  output logic [31:0]           rd_data,
  // long lines at the edges, [position][line]
  input  logic [COLS-1:0][1:0]  north_in,
  output logic [COLS-1:0][1:0]  north_out,
  input  logic [COLS-1:0][1:0]  south_in,
  output logic [COLS-1:0][1:0]  south_out,
  input  logic [ROWS-1:0][1:0]  east_in,
  output logic [ROWS-1:0][1:0]  east_out,
  input  logic [ROWS-1:0][1:0]  west_in,
  output logic [ROWS-1:0][1:0]  west_out,
  // carry chain ends
  input  logic [COLS-1:0]       carry_in_south,
  output logic [COLS-1:0]       carry_out_north,
  // routing plane and observation, one bit per molecule
  input  logic [N-1:0]          route_in,
  output logic [N-1:0]          route_out,
  output logic [N-1:0]          trigger_out,
  output logic [N-1:0]          mol_out
);

  logic [3:0][1:0] lin  [ROWS][COLS];
  logic [3:0][1:0] lout [ROWS][COLS];
  logic            fout [ROWS][COLS];
  logic            cout [ROWS][COLS];
  logic            cdat [ROWS][COLS];
  logic            csh  [ROWS][COLS];
  logic [31:0]     rdat [N];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned IDX = r * COLS + c;
      logic [3:0] d_in, nb_dat, nb_sh;
      logic       cin;

      // long lines in: N, E, S, W
      assign lin[r][c][0] = (r == 0)        ? north_in[c] : lout[r-1][c][2];
      assign lin[r][c][1] = (c == COLS - 1) ? east_in[r]  : lout[r][c+1][3];
      assign lin[r][c][2] = (r == ROWS - 1) ? south_in[c] : lout[r+1][c][0];
      assign lin[r][c][3] = (c == 0)        ? west_in[r]  : lout[r][c-1][1];

      assign d_in[0]   = (r == 0)        ? 1'b0 : fout[r-1][c];
      assign d_in[1]   = (c == COLS - 1) ? 1'b0 : fout[r][c+1];
      assign d_in[2]   = (r == ROWS - 1) ? 1'b0 : fout[r+1][c];
      assign d_in[3]   = (c == 0)        ? 1'b0 : fout[r][c-1];

      assign nb_dat[0] = (r == 0)        ? 1'b0 : cdat[r-1][c];
      assign nb_dat[1] = (c == COLS - 1) ? 1'b0 : cdat[r][c+1];
      assign nb_dat[2] = (r == ROWS - 1) ? 1'b0 : cdat[r+1][c];
      assign nb_dat[3] = (c == 0)        ? 1'b0 : cdat[r][c-1];

      assign nb_sh[0]  = (r == 0)        ? 1'b0 : csh[r-1][c];
      assign nb_sh[1]  = (c == COLS - 1) ? 1'b0 : csh[r][c+1];
      assign nb_sh[2]  = (r == ROWS - 1) ? 1'b0 : csh[r+1][c];
      assign nb_sh[3]  = (c == 0)        ? 1'b0 : csh[r][c-1];

      assign cin = (r == ROWS - 1) ? carry_in_south[c] : cout[r+1][c];

      molecule u_mol (
        .clk, .rst_n,
        .wr_en         (wr_en && (wr_mol == MW'(IDX))),
        .wr_word,
        .wr_data,
        .rd_word,
        .rd_data       (rdat[IDX]),
        .line_in       (lin[r][c]),
        .line_out      (lout[r][c]),
        .d_in,
        .func_out      (fout[r][c]),
        .carry_in      (cin),
        .carry_out     (cout[r][c]),
        .nb_cfg_data   (nb_dat),
        .nb_cfg_shift  (nb_sh),
        .cfg_data_out  (cdat[r][c]),
        .cfg_shift_out (csh[r][c]),
        .route_in      (route_in[IDX]),
        .route_out     (route_out[IDX]),
        .trigger_out   (trigger_out[IDX])
      );

      assign mol_out[IDX] = fout[r][c];
    end
  end

  for (genvar c = 0; c < COLS; c++) begin : g_ns
    assign north_out[c]       = lout[0][c][0];
    assign south_out[c]       = lout[ROWS-1][c][2];
    assign carry_out_north[c] = cout[0][c];
  end
  for (genvar r = 0; r < ROWS; r++) begin : g_ew
    assign east_out[r] = lout[r][COLS-1][1];
    assign west_out[r] = lout[r][0][3];
  end

  always_comb begin
    rd_data = '0;
    for (int i = 0; i < N; i++)
      if (rd_mol == MW'(i)) rd_data = rdat[i];
  end

endmodule
