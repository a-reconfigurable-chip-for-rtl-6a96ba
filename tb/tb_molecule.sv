// tb_molecule: a whole molecule configured through its three words: a
// 4-input XOR of the long lines routed out through the switch box, a 3-LUT
// full adder with carry, direct neighbour inputs, a registered output read
// back through the configuration word, Input/Output modes, and a Configure
// molecule's serial stream.
module tb_molecule;
  import poetic_pkg::*;
  logic            clk = 0, rst_n = 0;
  logic            wr_en = 0;
  logic [1:0]      wr_word = 0, rd_word = 0;
  logic [31:0]     wr_data = 0, rd_data;
  logic [3:0][1:0] line_in = '0, line_out;
  logic [3:0]      d_in = '0, nb_cfg_data = '0, nb_cfg_shift = '0;
  logic            func_out, carry_in = 0, carry_out, cfg_data_out, cfg_shift_out;
  logic            route_in = 0, route_out, trigger_out;
  int checks = 0, failures = 0;

  molecule dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  task automatic load(mol_cfg_t c);
    for (int w = 0; w < 3; w++) begin
      @(negedge clk);
      wr_en = 1; wr_word = 2'(w); wr_data = cfg_word(c, 2'(w));
    end
    @(negedge clk);
    wr_en = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mol_cfg_t c;
    logic a, b, ci, x;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- 4-LUT XOR of N0, E0, S0, W0; outputs: N0/S0 = out, E0 = N0_in, W1 = not out
    c = '0;
    c.mode = MODE_LUT4;
    c.lut = 16'h6996;
    c.inp.lut_sel = {3'd6, 3'd4, 3'd2, 3'd0};
    c.oth.mol_en = 1;
    c.sb = {3'd7, 3'd0, 3'd0, 3'd3, 3'd4, 3'd0, 3'd0, 3'd3};
    //       W1    W0    S1    S0    E1    E0    N1    N0
    load(c);
    for (int it = 0; it < 200; it++) begin
      line_in = 8'($urandom);
      #1;
      x = line_in[0][0] ^ line_in[1][0] ^ line_in[2][0] ^ line_in[3][0];
      check("4-LUT xor", func_out == x);
      check("N0 out", line_out[0][0] == x);
      check("S0 out", line_out[2][0] == x);
      check("W1 out inverted", line_out[3][1] == !x);
      check("E0 from N0 in", line_out[1][0] == line_in[0][0]);
      check("E1 from N1 in", line_out[1][1] == line_in[0][1]);
    end
    // ---- 3-LUT full adder: sum out, carry to the north; inputs N0, direct E, carry
    c = '0;
    c.mode = MODE_LUT3;
    c.lut = {8'hE8, 8'h96};
    c.inp.special_input = 1;
    c.inp.direct_in = 1;
    c.inp.lut_sel = {3'd0, 3'd0, 3'd1, 3'd0};   // in0 carry, in1 direct E, in2 N0
    c.inp.lut_sel[5:3] = 3'd1;
    c.inp.lut_sel[8:6] = 3'd0;
    c.oth.mol_en = 1;
    load(c);
    for (int it = 0; it < 64; it++) begin
      {a, b, ci} = 3'(it);
      line_in = '0; line_in[0][0] = a;
      d_in = '0; d_in[1] = b;
      carry_in = ci;
      #1;
      check("adder sum", func_out == (a ^ b ^ ci));
      check("adder carry", carry_out == ((a & b) | (a & ci) | (b & ci)));
    end
    // ---- registered output, state read back in word 2 bit 4
    c = '0;
    c.mode = MODE_LUT4;
    c.lut = 16'hAAAA;            // copy input 0 = N0
    c.oth.mol_en = 1;
    c.oth.seq_out = 1;
    load(c);
    line_in = '0; line_in[0][0] = 1;
    @(negedge clk);
    rd_word = 2;
    #1 check("state read back 1", rd_data[4] == 1 && func_out == 1);
    line_in[0][0] = 0;
    @(negedge clk);
    #1 check("state read back 0", rd_data[4] == 0);
    // ---- Input and Output modes
    c = '0;
    c.mode = MODE_INPUT;
    c.oth.mol_en = 1;
    load(c);
    route_in = 1; #1 check("input mode", func_out == 1);
    route_in = 0; #1 check("input mode 0", func_out == 0);
    c.mode = MODE_OUTPUT;
    c.inp.lut_sel[2:0] = 3'd2;   // E0
    load(c);
    line_in = '0; line_in[1][0] = 1;
    #1 check("output mode", route_out == 1 && func_out == 1);
    // ---- Configure: a 16-bit pattern streams out under the strobe on input 1
    c = '0;
    c.mode = MODE_CONFIG;
    c.lut = 16'b1011_0011_1000_1111;
    c.inp.lut_sel[5:3] = 3'd1;   // input 1 = constant 1: shift every clock
    c.inp.lut_sel[2:0] = 3'd0;   // data in from N0 = 0
    c.oth.mol_en = 1;
    load(c);
    line_in = '0;
    for (int i = 15; i >= 0; i--) begin
      #1 check("configure stream", cfg_data_out == c.lut[i] && cfg_shift_out == 1);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
