// tb_booth_mul16: products of corner and random signed operands written over
// the bus against the arithmetic product; register read-back.
module tb_booth_mul16;
  import poetic_pkg::*;
  logic     clk = 0, rst_n = 0;
  apb_req_t req;
  apb_rsp_t rsp;
  int checks = 0, failures = 0;

  booth_mul16 dut (.*);
  always #5 clk = ~clk;

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
    logic signed [15:0] a, b;
    logic signed [31:0] p;
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      case (i)
        0: begin a = 16'sh7FFF; b = 16'sh7FFF; end
        1: begin a = -16'sh8000; b = -16'sh8000; end
        2: begin a = -16'sh8000; b = 16'sh7FFF; end
        3: begin a = 16'sd0; b = -16'sd1; end
        4: begin a = -16'sd1; b = -16'sd1; end
        5: begin a = 16'sd12345; b = -16'sd321; end
        default: begin a = 16'($urandom); b = 16'($urandom); end
      endcase
      p = 32'(a) * 32'(b);
      apb_write(ADDR_MUL + 0, 32'(a));
      apb_write(ADDR_MUL + 4, 32'(b));
      apb_read(ADDR_MUL + 8, d);
      checks++;
      if (d !== p) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d = %0d got %0d", a, b, p, $signed(d));
      end
    end
    apb_read(ADDR_MUL + 0, d);
    checks++;
    if (d[15:0] !== a) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
