// tb_system_interface: APB transfers against a word memory standing in for
// the array: the write strobe on the access clock only, two clocks per
// write, molecule/word decoding, word 3 and out-of-range addresses.
module tb_system_interface;
  import poetic_pkg::*;
  localparam int unsigned N_MOL = 12;
  localparam int unsigned MW = $clog2(N_MOL);
  logic            clk = 0;
  apb_req_t        req;
  apb_rsp_t        rsp;
  logic            wr_en;
  logic [MW-1:0]   wr_mol, rd_mol;
  logic [1:0]      wr_word, rd_word;
  logic [31:0]     wr_data, rd_data;
  logic [31:0]     mem [N_MOL][3];
  logic [31:0]     ref_mem [N_MOL][3];
  int checks = 0, failures = 0;
  int writes_seen = 0;

  system_interface #(.N_MOL(N_MOL)) dut (.*);
  always #5 clk = ~clk;

  // the stand-in array
  always @(posedge clk) if (wr_en) begin
    mem[wr_mol][wr_word] <= wr_data;
    writes_seen++;
  end
  assign rd_data = (rd_word < 3) ? mem[rd_mol][rd_word] : 32'hBAD0_BAD0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic apb(logic [31:0] a, logic w, logic [31:0] d, output logic [31:0] r,
                     output logic err);
    @(negedge clk);
    req = '{paddr: a, psel: 1'b1, penable: 1'b0, pwrite: w, pwdata: d};
    #1 check("no strobe in setup", !wr_en);
    @(negedge clk);
    req.penable = 1'b1;
    #1 begin r = rsp.prdata; err = rsp.pslverr; end
    check("ready", rsp.pready);
    @(negedge clk);
    req = '0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    logic err;
    int n;
    req = '0;
    for (int m = 0; m < N_MOL; m++)
      for (int w = 0; w < 3; w++) begin
        mem[m][w] = '0;
        ref_mem[m][w] = '0;
      end
    for (int it = 0; it < 400; it++) begin
      int m, w;
      logic [31:0] d;
      m = $urandom % N_MOL;
      w = $urandom % 4;
      d = $urandom;
      n = writes_seen;
      apb(32'(16 * m + 4 * w), 1'b1, d, r, err);
      check("no error", !err);
      if (w < 3) begin
        ref_mem[m][w] = d;
        check("one strobe per write", writes_seen == n + 1);
      end else begin
        check("word 3 ignored", writes_seen == n);
      end
      m = $urandom % N_MOL;
      w = $urandom % 4;
      apb(32'(16 * m + 4 * w), 1'b0, 0, r, err);
      check("read data", r == ((w < 3) ? ref_mem[m][w] : 32'd0));
    end
    n = writes_seen;
    apb(32'(16 * N_MOL), 1'b1, 32'hFFFF_FFFF, r, err);
    check("out of range error", err);
    check("out of range not written", writes_seen == n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
