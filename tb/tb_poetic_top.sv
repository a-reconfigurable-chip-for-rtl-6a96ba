// tb_poetic_top: end-to-end test of the whole chip at its default size
// (10 x 20 molecules), with the testbench acting as the processor on the
// bus.
//
// It runs the genome-to-phenotype flow of the evolvable basic cell: random
// 96-bit genomes from the on-chip generator are merged with the fixed part
// through the genome mask (22 relevant bits: 8 switch box, 6 input
// selection, 8 LUT), written with three bus writes, read back, and the
// resulting 3-input cell and its switch box outputs are checked against the
// genome. It then uses every operational mode, the switch boxes across a
// full row, the carry chain up a full column, serial partial
// reconfiguration between neighbours, the flip-flop options (read back and
// write of the state, falling edge, local reset), the multiplier, both
// timers, the generator and bus errors. Each mechanism is counted, and one
// that never happened counts as a failure.
module tb_poetic_top;
  import poetic_pkg::*;
  localparam int unsigned ROWS = 10, COLS = 20, N = ROWS * COLS;

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

  typedef enum int {
    M_GENOME, M_LUT4, M_LUT3, M_SHIFT, M_COMM, M_CONFIG, M_INPUT, M_OUTPUT, M_TRIGGER,
    M_ROUTE, M_CARRY, M_PARTIAL, M_READBACK, M_STATE_WRITE, M_NEGEDGE, M_LRESET,
    M_MUL, M_TIMER0, M_TIMER1, M_PRNG, M_BUSERR, M_COUNT
  } mech_e;
  int seen [M_COUNT];

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  task automatic apb(logic [31:0] a, logic w, logic [31:0] d, output logic [31:0] r,
                     output logic err);
    @(negedge clk);
    cpu_req = '{paddr: a, psel: 1'b1, penable: 1'b0, pwrite: w, pwdata: d};
    @(negedge clk);
    cpu_req.penable = 1'b1;
    #1 begin r = cpu_rsp.prdata; err = cpu_rsp.pslverr; end
    @(negedge clk);
    cpu_req = '0;
  endtask

  task automatic wr(logic [31:0] a, logic [31:0] d);
    logic [31:0] r;
    logic e;
    apb(a, 1'b1, d, r, e);
    check("write accepted", !e);
  endtask

  task automatic rd(logic [31:0] a, output logic [31:0] d);
    logic e;
    apb(a, 1'b0, 0, d, e);
    check("read accepted", !e);
  endtask

  function automatic logic [31:0] maddr(int r, int c, int w);
    return 32'(16 * (r * COLS + c) + 4 * w);
  endfunction

  task automatic load(int r, int c, mol_cfg_t m);
    for (int w = 0; w < 3; w++) wr(maddr(r, c, w), cfg_word(m, 2'(w)));
  endtask

  function automatic mol_cfg_t blank();
    mol_cfg_t m;
    m = '0;
    m.oth.mol_en = 1;
    return m;
  endfunction

  // generator step, written as a shift with explicit feedback taps
  function automatic logic [31:0] lfsr_step(logic [31:0] s);
    logic [31:0] r;
    r = s >> 1;
    if (s[0]) r = r ^ ((32'd1 << 31) | (32'd1 << 21) | (32'd1 << 1) | 32'd1);
    return r;
  endfunction

  task automatic rand_word(output logic [31:0] v);
    @(negedge clk);
    v = prng_value;
    prng_next = 1;
    @(negedge clk);
    prng_next = 0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, d2, g [3], f [3], msk [3], p [3];
    logic err;
    mol_cfg_t m;
    int t0, t1, ones;

    repeat (3) @(negedge clk);
    rst_n = 1;

    // ================= genome -> phenotype on molecule (0,0)
    // neighbours as constant sources: (0,1) sends 1 west, (1,0) sends 0 north
    m = blank(); m.lut = 16'hFFFF; m.sb[3*6 +: 3] = 3'd3; load(0, 1, m);
    m = blank(); m.lut = 16'h0000; m.sb[3*0 +: 3] = 3'd3; load(1, 0, m);
    // fixed part: 3-LUT mode, molecule enabled, everything else 0
    m = blank(); m.mode = MODE_LUT3;
    for (int w = 0; w < 3; w++) f[w] = cfg_word(m, 2'(w));
    // genome mask: LUT bits 7:0, top two select bits of inputs 0..2,
    // low two select bits of the N0, E0, S0, W0 outputs
    msk[0] = 32'h0000_00FF | (32'h3 << 18) | (32'h3 << 21) | (32'h3 << 24);
    msk[1] = (32'h3 << 0) | (32'h3 << 6) | (32'h3 << 12) | (32'h3 << 18);
    msk[2] = 32'h0;
    ones = $countones(msk[0]) + $countones(msk[1]) + $countones(msk[2]);
    check("22 evolved bits", ones == 22);
    prng_seed_we = 1; prng_seed = 32'h1357_9BDF;
    @(negedge clk);
    prng_seed_we = 0;
    d2 = 32'h1357_9BDF;
    for (int gi = 0; gi < 40; gi++) begin
      for (int w = 0; w < 3; w++) begin
        rand_word(g[w]);
        check("generator sequence", g[w] == d2);
        d2 = lfsr_step(d2);
        seen[M_PRNG]++;
      end
      for (int w = 0; w < 3; w++) begin
        p[w] = (g[w] & msk[w]) | (f[w] & ~msk[w]);
        wr(maddr(0, 0, w), p[w]);
      end
      for (int w = 0; w < 3; w++) begin
        rd(maddr(0, 0, w), d);
        // word 2 bit 4 is the live flip-flop, not a stored bit
        check("phenotype read back", (d & ((w == 2) ? ~32'h10 : '1)) == (p[w] & ((w == 2) ? ~32'h10 : '1)));
      end
      for (int v = 0; v < 4; v++) begin
        logic [3:0] src;       // N0, E0, S0, W0 seen by molecule (0,0)
        logic [2:0] idx;
        logic       e_out, e_n, e_w;
        north_in[0][0] = v[0];
        west_in[0][0]  = v[1];
        src = {v[1], 1'b0, 1'b1, v[0]};
        for (int k = 0; k < 3; k++) idx[k] = src[p[0][17 + 3 * k + 1 +: 2]];
        e_out = p[0][idx];
        // N0 out: E0, S0, W0, out ; W0 out: N0, E0, S0, out
        case (p[1][1:0])
          2'd0: e_n = src[1];
          2'd1: e_n = src[2];
          2'd2: e_n = src[3];
          default: e_n = e_out;
        endcase
        case (p[1][19:18])
          2'd0: e_w = src[0];
          2'd1: e_w = src[1];
          2'd2: e_w = src[2];
          default: e_w = e_out;
        endcase
        #1;
        check("evolved cell output", mol_out[0] == e_out);
        check("evolved north output", north_out[0][0] == e_n);
        check("evolved west output", west_out[0][0] == e_w);
      end
      seen[M_GENOME]++;
      seen[M_LUT3]++;
    end
    north_in = '0; west_in = '0;

    // ================= row 5: W0 -> E0 through 20 switch boxes, (5,10) inverts
    for (int c = 0; c < COLS; c++) begin
      m = '0;
      m.sb[3*2 +: 3] = 3'd2;
      if (c == 10) begin
        m = blank();
        m.mode = MODE_LUT4;
        m.lut = 16'h00FF;
        m.inp.lut_sel[11:9] = 3'd6;
        m.sb[3*2 +: 3] = 3'd3;
      end
      load(5, c, m);
    end
    for (int i = 0; i < 4; i++) begin
      west_in[5][0] = i[0];
      #1 check("row routing", east_out[5][0] == !i[0]);
      seen[M_ROUTE]++;
      seen[M_LUT4]++;
    end

    // ================= column 19: carry from the south edge to the north edge
    for (int r = 0; r < ROWS; r++) begin
      m = blank();
      m.mode = MODE_LUT3;
      m.lut = 16'hAA00;
      m.inp.special_input = 1;
      load(r, 19, m);
    end
    for (int i = 0; i < 4; i++) begin
      carry_in_south[19] = i[0];
      #1 check("carry chain", carry_out_north[19] == i[0]);
      seen[M_CARRY]++;
    end

    // ================= modes on row 0, driven from the north edge
    // 4-LUT (0,15): XOR of N0 and N1
    m = blank();
    m.mode = MODE_LUT4;
    m.lut = 16'h1008;
    m.inp.lut_sel = {3'd1, 3'd1, 3'd0, 3'd0};
    load(0, 15, m);
    for (int i = 0; i < 4; i++) begin
      north_in[15] = 2'(i);
      #1 check("4-LUT", mol_out[15] == (i[0] ^ i[1]));
      seen[M_LUT4]++;
    end
    // Input (0,11) and Output (0,13)
    m = blank(); m.mode = MODE_INPUT; load(0, 11, m);
    m = blank(); m.mode = MODE_OUTPUT; load(0, 13, m);
    for (int i = 0; i < 4; i++) begin
      route_in[11] = i[0];
      north_in[13][0] = i[1];
      #1;
      check("input mode", mol_out[11] == i[0]);
      check("output mode", route_out[13] == i[1] && mol_out[13] == i[1]);
      seen[M_INPUT]++;
      seen[M_OUTPUT]++;
    end
    // Shift memory (0,7): data on N1, shift enable on N0
    begin
      logic [15:0] pat;
      pat = 16'hB38E;
      m = blank();
      m.mode = MODE_SHIFT;
      m.inp.lut_sel[2:0] = 3'd1;             // input 0 = N1 = data
      m.inp.lut_sel[5:3] = 3'd0;             // input 1 = N0 = shift enable
      load(0, 7, m);
      @(negedge clk);
      north_in[7][0] = 1;
      for (int i = 15; i >= 0; i--) begin
        north_in[7][1] = pat[i];
        @(negedge clk);
      end
      north_in[7][0] = 0;
      rd(maddr(0, 7, 0), d);
      check("shift memory holds the stream", d[15:0] == pat);
      north_in[7][0] = 1;
      for (int i = 15; i >= 0; i--) begin
        #1 check("shift memory streams out", mol_out[7] == pat[i]);
        @(negedge clk);
      end
      north_in[7][0] = 0;
      seen[M_SHIFT]++;
      m = '0;
      load(0, 7, m);
    end
    // Comm (0,5): 3-LUT copies N0; 8-bit register fed from N1 every clock,
    // its last bit goes north as the second output
    begin
      logic [39:0] hist;
      m = blank();
      m.mode = MODE_COMM;
      m.lut = 16'h00F0;                      // lower 3-LUT = input 2 = N0
      m.inp.lut_sel = {3'd1, 3'd0, 3'd0, 3'd0};
      load(0, 5, m);
      hist = '0;
      for (int i = 0; i < 40; i++) begin
        hist[i] = 1'($urandom);
        north_in[5][1] = hist[i];
        north_in[5][0] = i[0];
        #1 check("comm 3-LUT", mol_out[5] == i[0]);
        if (i >= 8) check("comm register delays by 8", carry_out_north[5] == hist[i - 8]);
        @(negedge clk);
      end
      seen[M_COMM]++;
      m = '0;
      load(0, 5, m);
    end
    // Trigger (0,9): a single 1 in the LUT gives a pulse every 16 clocks
    m = blank();
    m.mode = MODE_TRIGGER;
    m.lut = 16'h0001;
    load(0, 9, m);
    @(posedge trigger_out[9]);
    t0 = cyc;
    @(negedge clk);
    @(posedge trigger_out[9]);
    t1 = cyc;
    check("trigger period 16", t1 - t0 == 16);
    seen[M_TRIGGER]++;
    m = '0;
    load(0, 9, m);
    // Configure (0,17) writes its LUT into (0,18): 16 strobes from N0 of (0,17)
    begin
      logic [15:0] pat;
      pat = 16'h9E37;
      m = blank();
      m.mode = MODE_CONFIG;
      m.lut = pat;
      m.inp.special_input = 1;
      m.inp.lut_sel[2:0] = 3'd1;             // input 0 = own lut msb: rotate
      m.inp.lut_sel[5:3] = 3'd0;             // input 1 = N0 = strobe
      load(0, 17, m);
      m = blank();
      m.glob_en = 1;
      m.origin = DIR_W;
      m.lut_en = 1;
      load(0, 18, m);
      @(negedge clk);
      north_in[17][0] = 1;
      repeat (16) @(negedge clk);
      north_in[17][0] = 0;
      rd(maddr(0, 18, 0), d);
      check("partial reconfiguration", d[15:0] == pat && d[16] == 1'b1);
      rd(maddr(0, 18, 2), d);
      check("global bits untouched", d[18] == 1'b1 && d[17:16] == 2'(DIR_W));
      seen[M_CONFIG]++;
      seen[M_PARTIAL]++;
    end

    // ================= flip-flop on (0,3): copy N0, registered
    m = blank();
    m.mode = MODE_LUT4;
    m.lut = 16'hAAAA;
    m.oth.seq_out = 1;
    m.oth.rst_value = 1;
    load(0, 3, m);
    north_in[3][0] = 1;
    @(negedge clk);
    rd(maddr(0, 3, 2), d);
    check("state read back 1", d[4] == 1'b1);
    north_in[3][0] = 0;
    @(negedge clk);
    rd(maddr(0, 3, 2), d);
    check("state read back 0", d[4] == 1'b0);
    seen[M_READBACK]++;
    // write the state with the molecule disabled, read it back
    m.oth.mol_en = 0;
    m.oth.ff_value = 1;
    wr(maddr(0, 3, 2), cfg_word(m, 2'd2));
    rd(maddr(0, 3, 2), d);
    check("state written", d[4] == 1'b1 && mol_out[3] == 1'b1);
    seen[M_STATE_WRITE]++;
    // falling edge
    m.oth.mol_en = 1;
    m.oth.ff_value = 0;
    m.oth.clk_edge = 1;
    wr(maddr(0, 3, 2), cfg_word(m, 2'd2));
    @(negedge clk);
    #1 north_in[3][0] = 1;
    @(posedge clk);
    #1 check("falling edge: not at rising", mol_out[3] == 1'b0);
    @(negedge clk);
    #1 check("falling edge: at falling", mol_out[3] == 1'b1);
    seen[M_NEGEDGE]++;
    // synchronous local reset from LUT input 2 = N1, reset value 0
    m.oth.clk_edge = 0;
    m.oth.rst_value = 0;
    m.oth.lrst_en = 1;
    m.oth.lrst_origin = 3'd6;
    m.inp.lut_sel[8:6] = 3'd1;
    load(0, 3, m);
    north_in[3] = 2'b01;
    @(negedge clk);
    #1 check("running before local reset", mol_out[3] == 1'b1);
    north_in[3] = 2'b11;
    @(negedge clk);
    #1 check("local reset", mol_out[3] == 1'b0);
    north_in[3] = 2'b01;
    @(negedge clk);
    #1 check("running after local reset", mol_out[3] == 1'b1);
    seen[M_LRESET]++;

    // ================= multiplier
    for (int i = 0; i < 20; i++) begin
      logic signed [15:0] a, b;
      a = 16'($urandom);
      b = 16'($urandom);
      wr(ADDR_MUL + 0, 32'(a));
      wr(ADDR_MUL + 4, 32'(b));
      rd(ADDR_MUL + 8, d);
      check("multiplier", $signed(d) == 32'(a) * 32'(b));
      seen[M_MUL]++;
    end

    // ================= timers: 30 and 12 clocks, timer 1 must expire first
    begin
      int ti0, ti1;
      ti0 = 0; ti1 = 0;
      wr(ADDR_TIMER1 + 4, 32'd777);
      rd(ADDR_TIMER1 + 4, d);
      check("timer 1 register", d == 32'd777);
      rd(ADDR_TIMER0 + 4, d);
      check("timer 0 register apart", d == 32'd0);
      wr(ADDR_TIMER0 + 8, 32'd30);
      wr(ADDR_TIMER1 + 8, 32'd12);
      wr(ADDR_TIMER0 + 0, 32'h5);
      wr(ADDR_TIMER1 + 0, 32'h5);
      fork
        begin wait (timer_irq[0]); ti0 = cyc; seen[M_TIMER0]++; end
        begin wait (timer_irq[1]); ti1 = cyc; seen[M_TIMER1]++; end
        begin repeat (200) @(negedge clk); end
      join_any
      repeat (40) @(negedge clk);
      check("both timers expired", timer_irq == 2'b11);
      check("timer 1 first", ti1 > 0 && ti0 > ti1);
      wr(ADDR_TIMER0 + 12, 32'd1);
      wr(ADDR_TIMER1 + 12, 32'd1);
      check("timer interrupts cleared", timer_irq == 2'b00);
    end

    // ================= bus errors: unmapped address and molecule 200
    apb(32'h0002_0000, 1'b0, 0, d, err);
    check("unmapped address error", err);
    apb(32'(16 * N), 1'b1, 32'hFFFF_FFFF, d, err);
    check("missing molecule error", err);
    seen[M_BUSERR]++;

    // ================= every mechanism happened
    for (int i = 0; i < M_COUNT; i++) begin
      mech_e e;
      e = mech_e'(i);
      $display("  %-14s %0d", e.name(), seen[i]);
      check("mechanism exercised", seen[i] > 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
