// tb_prng: the generator against a bit-serial model of the same LFSR,
// seeding (including the zero seed), hold without `next`, and no repeat of
// the reset state within 20000 steps.
module tb_prng;
  logic        clk = 0, rst_n = 0, next = 0, seed_we = 0;
  logic [31:0] seed = '0, value;
  logic [31:0] model;
  int checks = 0, failures = 0;

  prng dut (.*);
  always #5 clk = ~clk;

  // one step: shift right, the bit shifted out is fed back into bits 31, 21, 1, 0
  function automatic logic [31:0] step(logic [31:0] s);
    logic fb;
    logic [31:0] r;
    fb = s[0];
    r  = {1'b0, s[31:1]};
    r[31] = fb;
    r[21] = r[21] ^ fb;
    r[1]  = r[1] ^ fb;
    r[0]  = r[0] ^ fb;
    return r;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s value=%h model=%h", what, value, model);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = 32'd1;
    @(negedge clk);
    check("reset", value == model);
    next = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      model = step(model);
      if (i < 500) check("sequence", value == model);
      if (value == 32'd1) check("early repeat", 1'b0);
    end
    check("sequence end", value == model);
    next = 0;
    repeat (3) @(negedge clk);
    check("hold", value == model);
    seed_we = 1; seed = 32'hDEAD_BEEF;
    @(negedge clk);
    seed_we = 0; model = 32'hDEAD_BEEF;
    check("seed", value == model);
    next = 1;
    repeat (10) begin
      @(negedge clk);
      model = step(model);
      check("seeded sequence", value == model);
    end
    next = 0; seed_we = 1; seed = 0;
    @(negedge clk);
    seed_we = 0; model = 32'd1;
    check("zero seed", value == model);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
