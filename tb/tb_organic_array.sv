// tb_organic_array: a 3 x 4 array. Word access to every molecule, a signal
// carried across a row of switch boxes with one inverting molecule, the
// carry chain up a column, direct neighbour input, and a Configure molecule
// copying its 16-bit pattern into its east neighbour's LUT.
module tb_organic_array;
  import poetic_pkg::*;
  localparam int unsigned ROWS = 3, COLS = 4, N = ROWS * COLS, MW = $clog2(N);
  logic                 clk = 0, rst_n = 0;
  logic                 wr_en = 0;
  logic [MW-1:0]        wr_mol = 0, rd_mol = 0;
  logic [1:0]           wr_word = 0, rd_word = 0;
  logic [31:0]          wr_data = 0, rd_data;
  logic [COLS-1:0][1:0] north_in = '0, north_out, south_in = '0, south_out;
  logic [ROWS-1:0][1:0] east_in = '0, east_out, west_in = '0, west_out;
  logic [COLS-1:0]      carry_in_south = '0, carry_out_north;
  logic [N-1:0]         route_in = '0, route_out, trigger_out, mol_out;
  int checks = 0, failures = 0;

  organic_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  task automatic wr(int m, int w, logic [31:0] d);
    @(negedge clk);
    wr_en = 1; wr_mol = MW'(m); wr_word = 2'(w); wr_data = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic load(int m, mol_cfg_t c);
    for (int w = 0; w < 3; w++) wr(m, w, cfg_word(c, 2'(w)));
  endtask

  task automatic rd(int m, int w, output logic [31:0] d);
    rd_mol = MW'(m); rd_word = 2'(w);
    #1 d = rd_data;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] mem [N][3];
    mol_cfg_t c;
    logic [15:0] pat;
    logic [31:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- word access to every molecule (flip-flop bit left at 0)
    for (int m = 0; m < N; m++)
      for (int w = 0; w < 3; w++) begin
        mem[m][w] = $urandom & ((w == 0) ? 32'hFFFF_FFFF : (w == 1) ? 32'h01FF_FFFF : 32'h0007_FFEF);
        mem[m][w] = (w == 2) ? (mem[m][w] & ~32'h0000_8000 & ~32'h0004_0000) : mem[m][w];
        if (w == 2) mem[m][w][2:0] = 3'd0;   // 4-LUT, nothing shifts
        if (w == 2) mem[m][w][5+4] = 1'b0;   // flip-flop on the rising edge
        if (w == 2) mem[m][w][1+4] = 1'b0;   // molecule disabled: state stays 0
        if (w == 2) mem[m][w][10+4] = 1'b1;  // registered output: no combinational loops
        wr(m, w, mem[m][w]);
      end
    for (int m = 0; m < N; m++)
      for (int w = 0; w < 3; w++) begin
        rd(m, w, d);
        check("word read back", d == mem[m][w]);
      end
    rd(N, 0, d);
    check("beyond last molecule reads 0", d == 0);
    // clear all
    for (int m = 0; m < N; m++) load(m, '0);
    // ---- row 1: W0 -> E0 through every switch box, molecule (1,2) inverts
    for (int col = 0; col < COLS; col++) begin
      c = '0;
      c.sb[3*2 +: 3] = 3'd2;                 // E0 <- W0 in
      if (col == 2) begin
        c.mode = MODE_LUT4;
        c.lut = 16'h00FF;                    // not input 3
        c.inp.lut_sel[11:9] = 3'd6;          // input 3 = W0
        c.sb[3*2 +: 3] = 3'd3;               // E0 <- out
        c.oth.mol_en = 1;
      end
      load(1 * COLS + col, c);
    end
    for (int i = 0; i < 8; i++) begin
      west_in[1][0] = i[0];
      #1 check("row routing with inverter", east_out[1][0] == !i[0]);
    end
    // ---- column 3: carry passes from south to north
    for (int r = 0; r < ROWS; r++) begin
      c = '0;
      c.mode = MODE_LUT3;
      c.lut = 16'hAA00;                      // upper LUT = input 0
      c.inp.special_input = 1;               // input 0 code 0 = carry_in
      c.oth.mol_en = 1;
      load(r * COLS + 3, c);
    end
    for (int i = 0; i < 4; i++) begin
      carry_in_south[3] = i[0];
      #1 check("carry chain", carry_out_north[3] == i[0]);
    end
    // ---- direct neighbour: (0,2) copies the output of (1,2) below it
    c = '0;
    c.mode = MODE_LUT4;
    c.lut = 16'hCCCC;                        // copy input 1
    c.inp.direct_in = 1;
    c.inp.lut_sel[5:3] = 3'd2;               // direct S
    c.oth.mol_en = 1;
    load(0 * COLS + 2, c);
    for (int i = 0; i < 4; i++) begin
      west_in[1][0] = i[0];
      #1 check("direct neighbour", mol_out[2] == !i[0]);
    end
    // ---- Configure molecule (2,0) writes its pattern into (2,1)'s LUT
    pat = 16'hC3A5;
    c = '0;
    c.mode = MODE_CONFIG;
    c.lut = pat;
    c.inp.special_input = 1;
    c.inp.lut_sel[2:0] = 3'd1;               // input 0 = own lut msb: rotate
    c.inp.lut_sel[5:3] = 3'd6;               // input 1 = W0 = strobe from the edge
    c.oth.mol_en = 1;
    load(2 * COLS + 0, c);
    c = '0;
    c.glob_en = 1;
    c.origin = DIR_W;
    c.lut_en = 1;
    c.lut = 16'h0000;
    c.mode = MODE_LUT4;
    load(2 * COLS + 1, c);
    @(negedge clk);
    west_in[2][0] = 1;
    repeat (16) @(negedge clk);
    west_in[2][0] = 0;
    rd(2 * COLS + 1, 0, d);
    check("partial reconfiguration copied the pattern", d[15:0] == pat);
    rd(2 * COLS + 0, 0, d);
    check("source pattern rotated back", d[15:0] == pat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
