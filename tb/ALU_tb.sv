// ALU_tb: exhaustive self-checking test of the ALU.
//
// Two instances are driven with the same operands: one at the default
// configuration (optional codes disabled, so codes 6, 8, B and D must act as
// ZERO) and one with OPTIONAL_OPS = 1. Every Alu_Ctrl code is applied with
// every pair of 8-bit operands, and Result, C and Z of both are compared
// with a reference model written on plain integers. The ALU is
// combinational, so outputs are sampled 1 ns after the inputs change.
// A watchdog ends the run with a failure if it does not finish in time.
module ALU_tb;

  logic [7:0] acca, data;
  logic [3:0] ctrl;
  logic [7:0] res_d, res_o;
  logic       c_d, z_d, c_o, z_o;

  int checks = 0;
  int failures = 0;

  ALU dut_default (
    .ACCA(acca), .Data_Out(data), .Alu_Ctrl(ctrl),
    .Result(res_d), .C(c_d), .Z(z_d)
  );

  ALU #(.OPTIONAL_OPS(1'b1)) dut_optional (
    .ACCA(acca), .Data_Out(data), .Alu_Ctrl(ctrl),
    .Result(res_o), .C(c_o), .Z(z_o)
  );

  // Reference: returns {carry, result} for operands a, d (0..255).
  function automatic logic [8:0] model(int code, int a, int d, bit opt);
    int r;
    bit c;
    if (!opt && (code == 6 || code == 8 || code == 11 || code == 13))
      code = 0;                              // unused code -> ZERO
    c = 0;
    case (code)
      0:  r = 0;
      1:  r = 255;
      2:  r = d;
      3:  begin r = a + d; c = (r > 255); end
      4:  begin r = a - d; c = (a < d); end
      5:  begin r = 255 - a; c = 1; end
      6:  begin r = -a; c = (a != 0); end
      7:  begin r = a | d; c = (a != 0 || d != 0); end
      8:  begin r = a ^ d; c = ((a != 0) != (d != 0)); end
      9:  begin r = a & d; c = (a != 0 && d != 0); end
      10: begin r = a + 1; c = (a == 255); end
      11: begin r = a - 1; c = (a == 0); end
      12: begin r = a / 2; c = (a % 2) != 0; end
      13, 14: begin r = a * 2; c = (a >= 128); end
      15: begin r = a / 2 + (a >= 128 ? 128 : 0); c = (a % 2) != 0; end
      default: r = 0;
    endcase
    r = ((r % 256) + 256) % 256;
    return {c, r[7:0]};
  endfunction

  task automatic check(string tag, logic [7:0] r, logic cf, logic zf, bit opt);
    logic [8:0] exp;
    exp = model(int'(ctrl), int'(acca), int'(data), opt);
    checks++;
    if (r !== exp[7:0] || cf !== exp[8] || zf !== (exp[7:0] == 8'h00)) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s ctrl=%h acca=%h data=%h: got R=%h C=%b Z=%b, want R=%h C=%b Z=%b",
                 tag, ctrl, acca, data, r, cf, zf, exp[7:0], exp[8], exp[7:0] == 8'h00);
    end
  endtask

  initial begin
    for (int op = 0; op < 16; op++) begin
      for (int a = 0; a < 256; a++) begin
        for (int d = 0; d < 256; d++) begin
          ctrl = 4'(op);
          acca = 8'(a);
          data = 8'(d);
          #1;
          check("default",  res_d, c_d, z_d, 1'b0);
          check("optional", res_o, c_o, z_o, 1'b1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: the sweep needs 16*256*256 ns.
  initial begin
    #(16 * 256 * 256 + 1000);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
