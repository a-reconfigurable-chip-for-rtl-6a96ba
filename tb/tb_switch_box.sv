// tb_switch_box: random check of all eight output multiplexers of the switch
// box against a table of the six line inputs of the other directions, the
// molecule output and its inverse.
module tb_switch_box;
  logic [3:0][1:0] line_in, line_out;
  logic            func_out;
  logic [23:0]     sb;
  int checks = 0, failures = 0;

  switch_box dut (.line_in, .func_out, .sb, .line_out);

  // other directions of d, in N, E, S, W order
  function automatic int other(int d, int k);
    int t[4][3] = '{'{1, 2, 3}, '{0, 2, 3}, '{0, 1, 3}, '{0, 1, 2}};
    return t[d][k];
  endfunction

  function automatic logic expect_out(int d, int l);
    logic [2:0] s;
    s = sb[3*(2*d+l) +: 3];
    case (s)
      3'd0, 3'd1, 3'd2: return line_in[other(d, int'(s))][0];
      3'd3:             return func_out;
      3'd4, 3'd5, 3'd6: return line_in[other(d, int'(s) - 4)][1];
      default:          return !func_out;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // every select code on every output, then random traffic
    for (int it = 0; it < 3000; it++) begin
      line_in  = 8'($urandom);
      func_out = 1'($urandom);
      if (it < 8) sb = {8{it[2:0]}};
      else        sb = 24'($urandom);
      #1;
      for (int d = 0; d < 4; d++)
        for (int l = 0; l < 2; l++) begin
          checks++;
          if (line_out[d][l] !== expect_out(d, l)) begin
            failures++;
            if (failures < 10)
              $display("mismatch d=%0d l=%0d sb=%h in=%b f=%b got=%b", d, l, sb, line_in,
                       func_out, line_out[d][l]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
