// tb_molecule_core: the eight operational modes against a reference model
// (combinational result, second output, LUT update, configuration and
// routing-plane signals), then the flip-flop options: registered output,
// rising/falling edge, enable input, molecule enable, synchronous and
// asynchronous local reset, and loading from the configuration port.
module tb_molecule_core;
  import poetic_pkg::*;
  logic        clk = 0, rst_n = 0;
  mol_cfg_t    cfg;
  logic [3:0]  lut_in, d_in;
  logic        route_in, ff_load = 0, ff_load_val = 0;
  logic        func_out, ff_q, aux_out, lut_we, cfg_data_out, cfg_shift_out;
  logic        route_out, trigger_out;
  logic [15:0] lut_next;
  int checks = 0, failures = 0;

  molecule_core dut (.*);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (mode %0d, t=%0t)", what, cfg.mode, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] l;
    logic        e_out, e_aux, e_we;
    logic [15:0] e_next;
    cfg = '0;
    lut_in = '0; d_in = '0; route_in = 0;
    #10 rst_n = 1;
    // ---- combinational behaviour of every mode
    for (int it = 0; it < 4000; it++) begin
      cfg.mode       = mode_e'(it % 8);
      cfg.lut        = 16'($urandom);
      cfg.oth        = '0;
      cfg.oth.mol_en = 1'($urandom);
      lut_in         = 4'($urandom);
      route_in       = 1'($urandom);
      l = cfg.lut;
      e_aux = 0; e_we = 0; e_next = l;
      case (it % 8)
        0: e_out = l[lut_in];
        1: begin e_out = l[lut_in[2:0]]; e_aux = l[8 + lut_in[2:0]]; end
        2, 4: begin
          e_out = l[15];
          e_we = cfg.oth.mol_en & lut_in[1];
          e_next = {l[14:0], lut_in[0]};
        end
        3: begin
          e_out = l[lut_in[2:0]]; e_aux = l[15];
          e_we = cfg.oth.mol_en;
          e_next = {l[14:8], lut_in[3], l[7:0]};
        end
        5: e_out = route_in;
        6: e_out = lut_in[0];
        default: begin
          e_out = l[15]; e_we = cfg.oth.mol_en; e_next = {l[14:0], l[15]};
        end
      endcase
      #1;
      check("comb out", func_out == e_out);
      check("aux out", aux_out == e_aux);
      check("lut we", lut_we == e_we);
      if (e_we) check("lut next", lut_next == e_next);
      check("config stream", cfg_data_out == ((it % 8 == 4) ? l[15] : 1'b0) &&
            cfg_shift_out == ((it % 8 == 4) ? e_we : 1'b0));
      check("route out", route_out == ((it % 8 == 6) ? lut_in[0] : 1'b0));
      check("trigger out", trigger_out == ((it % 8 == 7) ? l[15] : 1'b0));
    end
    // ---- flip-flop: 4-LUT copying input 0, registered output
    cfg = '0;
    cfg.mode = MODE_LUT4;
    cfg.lut = 16'hAAAA;
    cfg.oth.seq_out = 1;
    cfg.oth.mol_en = 1;
    cfg.oth.rst_value = 1;
    lut_in = 4'b0001;
    @(negedge clk);
    @(negedge clk);
    check("ff captured 1", func_out == 1 && ff_q == 1);
    lut_in = 4'b0000;
    #1 check("registered output holds", func_out == 1);
    @(posedge clk); #1;
    check("ff captured 0 at rising edge", func_out == 0);
    // molecule disabled: hold
    cfg.oth.mol_en = 0;
    lut_in = 4'b0001;
    @(posedge clk); #1;
    check("molecule enable holds", ff_q == 0);
    cfg.oth.mol_en = 1;
    // enable input (input 3)
    cfg.oth.dff_en_used = 1;
    lut_in = 4'b0001;
    @(posedge clk); #1;
    check("enable input low holds", ff_q == 0);
    lut_in = 4'b1001;
    @(posedge clk); #1;
    check("enable input high loads", ff_q == 1);
    cfg.oth.dff_en_used = 0;
    // falling edge
    cfg.oth.clk_edge = 1;
    lut_in = 4'b0000;
    @(posedge clk); #1;
    @(negedge clk); #1;
    check("falling edge captures", ff_q == 0);
    lut_in = 4'b0001;
    @(posedge clk); #1;
    check("falling edge ignores rising", ff_q == 0);
    @(negedge clk); #1;
    check("falling edge loads", ff_q == 1);
    cfg.oth.clk_edge = 0;
    // synchronous local reset from LUT input 2 (origin 6), rst_value 0
    @(posedge clk); #1;
    cfg.oth.rst_value = 0;
    cfg.oth.lrst_en = 1;
    cfg.oth.lrst_origin = 3'd6;
    lut_in = 4'b0101;
    #1 check("sync reset waits for edge", ff_q == 1);
    @(posedge clk); #1;
    check("sync reset", ff_q == 0);
    lut_in = 4'b0001;
    @(posedge clk); #1;
    check("runs after sync reset", ff_q == 1);
    // asynchronous local reset from the west neighbour (origin 3)
    cfg.oth.async_rst = 1;
    cfg.oth.lrst_origin = 3'd3;
    @(negedge clk);
    #2 d_in = 4'b1000;
    #1 check("async reset acts at once", ff_q == 0);
    @(posedge clk); #1;
    check("async reset holds", ff_q == 0);
    d_in = 4'b0000;
    @(posedge clk); #1;
    check("runs after async reset", ff_q == 1);
    cfg.oth.lrst_en = 0;
    // load from the configuration port
    lut_in = 4'b0001;
    @(negedge clk);
    ff_load = 1; ff_load_val = 0;
    @(posedge clk); #1;
    ff_load = 0;
    check("configuration load wins", ff_q == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always #5 clk = ~clk;
endmodule
