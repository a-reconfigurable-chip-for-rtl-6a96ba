// tb_timer16: down-count, expiry flag and interrupt, the reload period of
// LOAD+1 clocks, one-shot stop, flag clear and interrupt gating.
module tb_timer16;
  import poetic_pkg::*;
  logic     clk = 0, rst_n = 0, irq;
  apb_req_t req;
  apb_rsp_t rsp;
  int checks = 0, failures = 0;
  int cyc = 0;

  timer16 dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  task automatic apb_write(logic [31:0] a, logic [31:0] d);
    @(negedge clk);
    req = '{paddr: a, psel: 1'b1, penable: 1'b0, pwrite: 1'b1, pwdata: d};
    @(negedge clk);
    req.penable = 1'b1;
    @(negedge clk);
    req = '0;
  endtask

  task automatic apb_read(logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    req = '{paddr: a, psel: 1'b1, penable: 1'b0, pwrite: 1'b0, pwdata: '0};
    @(negedge clk);
    req.penable = 1'b1;
    #1 d = rsp.prdata;
    @(negedge clk);
    req = '0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int t0, t1;
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    apb_write(ADDR_TIMER0 + 4, 32'd20);
    apb_read (ADDR_TIMER0 + 4, d);
    check("load readback", d == 32'd20);
    apb_write(ADDR_TIMER0 + 8, 32'd20);
    apb_write(ADDR_TIMER0 + 0, 32'h7);   // irq, reload, enable
    apb_read (ADDR_TIMER0 + 8, d);
    check("counting down", d < 32'd20 && d > 32'd10);
    check("no irq yet", !irq);
    wait (irq);
    t0 = cyc;
    apb_write(ADDR_TIMER0 + 12, 32'd1);  // clear
    check("flag cleared", !irq);
    wait (irq);
    t1 = cyc;
    check("reload period is LOAD+1 clocks", (t1 - t0) == 21);
    // one shot
    apb_write(ADDR_TIMER0 + 0, 32'h0);
    apb_write(ADDR_TIMER0 + 12, 32'd1);
    apb_write(ADDR_TIMER0 + 8, 32'd5);
    apb_write(ADDR_TIMER0 + 0, 32'h5);   // irq, enable, no reload
    repeat (12) @(negedge clk);
    check("one-shot expired", irq);
    apb_read (ADDR_TIMER0 + 0, d);
    check("one-shot stopped", d[0] == 1'b0);
    apb_read (ADDR_TIMER0 + 8, d);
    check("count stays 0", d == 0);
    apb_write(ADDR_TIMER0 + 0, 32'h0);
    check("irq gated by enable", !irq);
    apb_read (ADDR_TIMER0 + 12, d);
    check("flag still set", d[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
