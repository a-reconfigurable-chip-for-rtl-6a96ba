// tb_input_select: random check of the four LUT input multiplexers,
// including the special sources of input 0 and the direct neighbour
// sources of input 1.
module tb_input_select;
  import poetic_pkg::*;
  logic [3:0][1:0] line_in;
  logic [3:0]      d_in, lut_in;
  logic            carry_in, lut_msb, config_in, dff_out;
  lut_inputs_t     inp;
  int checks = 0, failures = 0;

  input_select dut (.*);

  function automatic logic ln(int code);
    // N0 N1 E0 E1 S0 S1 W0 W1
    return line_in[code / 2][code % 2];
  endfunction

  function automatic logic exp_in(int k);
    int code;
    code = int'(inp.lut_sel[3*k +: 3]);
    if (k == 0 && inp.special_input && code <= 4) begin
      case (code)
        0: return carry_in;
        1: return lut_msb;
        2: return config_in;
        3: return dff_out;
        default: return 1'b0;
      endcase
    end
    if (k == 1 && inp.direct_in && code <= 3) return d_in[code];
    if (k == 1 && code == 1) return 1'b1;
    return ln(code);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 4000; it++) begin
      line_in   = 8'($urandom);
      d_in      = 4'($urandom);
      {carry_in, lut_msb, config_in, dff_out} = 4'($urandom);
      inp       = 14'($urandom);
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (lut_in[k] !== exp_in(k)) begin
          failures++;
          if (failures < 10) $display("mismatch input %0d inp=%h", k, inp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
