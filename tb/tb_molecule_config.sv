// tb_molecule_config: the three configuration words (write, read back,
// unused bits read as zero, flip-flop value bit), serial partial
// reconfiguration from each neighbour with random block enables against a
// bit-list model, the blocking by the global enable, and the priority of
// processor writes and LUT updates.
module tb_molecule_config;
  import poetic_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        wr_en = 0;
  logic [1:0]  wr_word = 0, rd_word = 0;
  logic [31:0] wr_data = 0, rd_data;
  logic [3:0]  nb_cfg_data = 0, nb_cfg_shift = 0;
  logic        config_in, lut_we = 0;
  logic [15:0] lut_next = 0;
  logic        ff_q = 0, ff_load, ff_load_val;
  mol_cfg_t    cfg;
  int checks = 0, failures = 0;

  molecule_config dut (.*);
  always #5 clk = ~clk;

  // expected 76-bit contents as the three words (ff value bit kept apart)
  logic [31:0] ew [3];
  logic        e_ff;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s t=%0t", what, $time);
    end
  endtask

  task automatic write_word(int w, logic [31:0] d);
    @(negedge clk);
    wr_en = 1; wr_word = 2'(w); wr_data = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic compare_all(string what);
    for (int w = 0; w < 3; w++) begin
      rd_word = 2'(w);
      #1 check(what, rd_data == ew[w]);
    end
  endtask

  // the shiftable blocks as (word, lsb, width), in chain order
  int blk_w [5] = '{0, 0, 1, 2, 2};
  int blk_l [5] = '{0, 17, 0, 0, 4};
  int blk_n [5] = '{16, 14, 24, 3, 11};
  int blk_e [5] = '{16, 31, 24, 3, 15};   // position of the block's enable bit

  // one serial step of the model: gather enabled bits, shift, scatter back
  task automatic model_shift(logic din);
    logic q[$];
    ew[2][4] = ff_q;
    for (int b = 0; b < 5; b++)
      if (ew[blk_w[b]][blk_e[b]])
        for (int i = 0; i < blk_n[b]; i++) q.push_back(ew[blk_w[b]][blk_l[b] + i]);
    if (q.size() > 0) begin
      q.push_front(din);
      void'(q.pop_back());
    end
    for (int b = 0; b < 5; b++)
      if (ew[blk_w[b]][blk_e[b]])
        for (int i = 0; i < blk_n[b]; i++) ew[blk_w[b]][blk_l[b] + i] = q.pop_front();
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the flip-flop is modelled here: it takes every load
  always @(posedge clk) if (ff_load) ff_q <= ff_load_val;

  initial begin
    ew[0] = 0; ew[1] = 0; ew[2] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    compare_all("reset to zero");
    // ---- word access
    for (int it = 0; it < 200; it++) begin
      int w;
      logic [31:0] d;
      w = $urandom % 3;
      d = $urandom;
      write_word(w, d);
      ew[w] = d & ((w == 0) ? 32'hFFFF_FFFF : (w == 1) ? 32'h01FF_FFFF : 32'h0007_FFFF);
      compare_all("word access");
      if (w == 2) check("ff value loaded", ff_q == d[4]);
    end
    // ---- partial reconfiguration from each neighbour
    for (int it = 0; it < 120; it++) begin
      int org;
      logic [31:0] w0, w1, w2;
      org = it % 4;
      w0 = $urandom; w1 = $urandom; w2 = $urandom;
      w2[18] = 1'b1;                // global enable
      w2[17:16] = 2'(org);
      write_word(0, w0); write_word(1, w1 & 32'h01FF_FFFF); write_word(2, w2 & 32'h0007_FFFF);
      ew[0] = w0; ew[1] = w1 & 32'h01FF_FFFF; ew[2] = w2 & 32'h0007_FFFF;
      for (int s = 0; s < 40; s++) begin
        logic bit_in;
        logic [3:0] other_sh;
        bit_in = 1'($urandom);
        @(negedge clk);
        nb_cfg_data = 4'($urandom);
        nb_cfg_data[org] = bit_in;
        other_sh = 4'($urandom);
        other_sh[org] = (s % 3 != 2);
        nb_cfg_shift = other_sh;
        #1 check("config_in follows origin", config_in == bit_in);
        if (nb_cfg_shift[org]) model_shift(bit_in);
        @(posedge clk); #1;
        nb_cfg_shift = 0;
        ew[2][4] = ff_q;
        compare_all("partial reconfiguration");
      end
    end
    // ---- global enable off: strobes ignored
    write_word(2, 32'h0000_8008);      // mode and other blocks enabled, global off
    ew[2] = 32'h0000_8008;
    ew[2][4] = ff_q;
    @(negedge clk);
    nb_cfg_shift = 4'hF; nb_cfg_data = 4'hF;
    repeat (5) @(negedge clk);
    nb_cfg_shift = 0;
    compare_all("global enable blocks neighbours");
    // ---- LUT update from the functional unit, and write priority
    @(negedge clk);
    lut_we = 1; lut_next = 16'h1234;
    @(negedge clk);
    ew[0][15:0] = 16'h1234;
    compare_all("lut update");
    wr_en = 1; wr_word = 0; wr_data = 32'h0000_5678;
    @(negedge clk);
    wr_en = 0; lut_we = 0;
    ew[0] = 32'h0000_5678;
    compare_all("processor write wins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
