// tb_evolution: a small genetic algorithm evolving the 22-bit basic cell of
// molecule (0,0) on the full-size chip, with the testbench as the
// processor's program.
//
// Each individual is a 64-bit genome (configuration words 0 and 1). It is
// merged with the fixed part through the genome mask, loaded into the
// molecule with two back-to-back bus writes (four clocks, checked), and
// scored on the four combinations of its north and west inputs against
// the target N0 XOR W0, both on the molecule output and on its north
// output line (eight points). Its east and south neighbours are set up to send
// constant 1 and 0. Random numbers come from the chip's generator. The
// algorithm uses tournament selection of two, one-point crossover,
// per-bit mutation and elitism. The test passes if a perfect cell
// appears, and if every phenotype read back keeps the fixed part intact.
module tb_evolution;
  import poetic_pkg::*;
  localparam int unsigned ROWS = 10, COLS = 20, N = ROWS * COLS;
  localparam int POP = 8, MAX_GEN = 300;

  logic                 clk = 0, rst_n = 0;
  apb_req_t             cpu_req = '0;
  apb_rsp_t             cpu_rsp;
  logic                 prng_next = 0, prng_seed_we = 0;
  logic [31:0]          prng_seed = 0, prng_value;
  logic [1:0]           timer_irq;
  logic [COLS-1:0][1:0] north_in = '0, north_out, south_in = '0, south_out;
  logic [ROWS-1:0][1:0] east_in = '0, east_out, west_in = '0, west_out;
  logic [COLS-1:0]      carry_in_south = '0, carry_out_north;
  logic [N-1:0]         route_in = '0, route_out, trigger_out, mol_out;

  poetic_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;
  int bus_clocks = 0;
  always @(posedge clk) if (cpu_req.psel) bus_clocks++;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // back-to-back APB writes: setup and access phase for each, no idle clock
  task automatic write_burst(logic [31:0] a [], logic [31:0] d []);
    for (int i = 0; i < a.size(); i++) begin
      @(negedge clk);
      cpu_req = '{paddr: a[i], psel: 1'b1, penable: 1'b0, pwrite: 1'b1, pwdata: d[i]};
      @(negedge clk);
      cpu_req.penable = 1'b1;
    end
    @(negedge clk);
    cpu_req = '0;
  endtask

  task automatic read_word(logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    cpu_req = '{paddr: a, psel: 1'b1, penable: 1'b0, pwrite: 1'b0, pwdata: '0};
    @(negedge clk);
    cpu_req.penable = 1'b1;
    #1 d = cpu_rsp.prdata;
    @(negedge clk);
    cpu_req = '0;
  endtask

  task automatic rnd(output logic [31:0] v);
    @(negedge clk);
    v = prng_value;
    prng_next = 1;
    @(negedge clk);
    prng_next = 0;
  endtask

  logic [63:0] mask, fixed;

  task automatic evaluate(logic [63:0] g, output int fit);
    logic [63:0] p;
    int t0;
    p = (g & mask) | (fixed & ~mask);
    t0 = bus_clocks;
    write_burst('{32'h0, 32'h4}, '{p[31:0], p[63:32]});
    check("two writes take four bus clocks", bus_clocks - t0 == 4);
    fit = 0;
    for (int v = 0; v < 4; v++) begin
      north_in[0][0] = v[0];
      west_in[0][0]  = v[1];
      #1;
      if (mol_out[0] == (v[0] ^ v[1])) fit++;
      if (north_out[0][0] == (v[0] ^ v[1])) fit++;
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] pop [POP], nxt [POP];
    int          fit [POP];
    logic [31:0] r, r2, d;
    mol_cfg_t    m;
    int best, gen;

    repeat (3) @(negedge clk);
    rst_n = 1;
    // constant neighbours: (0,1) sends 1 west, (1,0) sends 0 north
    m = '0; m.oth.mol_en = 1; m.lut = 16'hFFFF; m.sb[18 +: 3] = 3'd3;
    write_burst('{32'(16 * 1), 32'(16 * 1 + 4), 32'(16 * 1 + 8)},
                '{cfg_word(m, 0), cfg_word(m, 1), cfg_word(m, 2)});
    m = '0; m.oth.mol_en = 1; m.sb[0 +: 3] = 3'd3;
    write_burst('{32'(16 * COLS), 32'(16 * COLS + 4), 32'(16 * COLS + 8)},
                '{cfg_word(m, 0), cfg_word(m, 1), cfg_word(m, 2)});
    // fixed part of the cell: 3-LUT mode, enabled; word 2 never evolves
    m = '0; m.oth.mol_en = 1; m.mode = MODE_LUT3;
    write_burst('{32'h8}, '{cfg_word(m, 2)});
    fixed = {cfg_word(m, 1), cfg_word(m, 0)};
    mask[31:0]  = 32'h0000_00FF | (32'h3 << 18) | (32'h3 << 21) | (32'h3 << 24);
    mask[63:32] = (32'h3 << 0) | (32'h3 << 6) | (32'h3 << 12) | (32'h3 << 18);
    check("22 evolved bits", $countones(mask) == 22);
    prng_seed_we = 1; prng_seed = 32'h2468_ACE1;
    @(negedge clk);
    prng_seed_we = 0;

    for (int i = 0; i < POP; i++) begin
      rnd(r); rnd(r2);
      pop[i] = {r2, r};
    end
    best = 0;
    for (gen = 0; gen < MAX_GEN; gen++) begin
      best = 0;
      for (int i = 0; i < POP; i++) begin
        evaluate(pop[i], fit[i]);
        if (fit[i] > fit[best]) best = i;
      end
      if (fit[best] == 8) break;
      nxt[0] = pop[best];                    // elitism
      for (int i = 1; i < POP; i++) begin
        int a, b, pa, pb, cut;
        logic [63:0] child;
        rnd(r);
        a = int'(r[2:0]) % POP; b = int'(r[5:3]) % POP;
        pa = (fit[a] >= fit[b]) ? a : b;
        a = int'(r[8:6]) % POP; b = int'(r[11:9]) % POP;
        pb = (fit[a] >= fit[b]) ? a : b;
        cut = int'(r[17:12]);
        for (int k = 0; k < 64; k++) child[k] = (k < cut) ? pop[pa][k] : pop[pb][k];
        // mutation: on average two evolved bits flip
        for (int k = 0; k < 64; k++) begin
          if (mask[k]) begin
            rnd(r2);
            if (r2[3:0] < 4'd2) child[k] = !child[k];
          end
        end
        nxt[i] = child;
      end
      pop = nxt;
    end
    $display("generations: %0d, best fitness %0d of 8", gen, fit[best]);
    check("perfect cell evolved", fit[best] == 8);
    // the winner, loaded again, keeps the fixed part and computes the XOR
    evaluate(pop[best], fit[best]);
    check("winner re-evaluated", fit[best] == 8);
    read_word(32'h0, d);
    check("fixed part of word 0 intact", (d & ~mask[31:0]) == (fixed[31:0] & ~mask[31:0]));
    read_word(32'h4, d);
    check("fixed part of word 1 intact", (d & ~mask[63:32]) == (fixed[63:32] & ~mask[63:32]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
