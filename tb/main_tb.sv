// main_tb: end-to-end test of the board-level ALU top at its defaults.
//
// Drives every Alu_Ctrl code with every ACCA value (the second operand is
// the top's hard-wired 0xAA) and reads the result back from the two
// 7-segment outputs, as a person would from the displays. The expected
// result, carry and zero flag come from an integer model of the lab's
// instruction table; the expected segment patterns come from a font written
// here as the letters of the lit segments of each digit. The test also
// counts how often each mechanism of the design was exercised: each of the
// twelve instructions, carry set, zero set, a borrow in SUBA, and an unused
// code falling back to ZERO. A mechanism that never happened is a failure.
module main_tb;

  localparam int DATA = 'hAA;    // the top's default Data_Out

  logic [7:0] acca;
  logic [3:0] ctrl;
  logic [6:0] seg_hi, seg_lo;
  logic       c, z;

  int checks = 0;
  int failures = 0;

  // Mechanism counters.
  int op_seen [16];
  int n_carry = 0, n_zero = 0, n_borrow = 0, n_unused = 0;

  main dut (
    .ACCA(acca), .Alu_Ctrl(ctrl),
    .Seg_Hi(seg_hi), .Seg_Lo(seg_lo), .C(c), .Z(z)
  );

  // Lit segments of each hex digit in the usual font.
  function automatic logic [6:0] font(logic [3:0] d);
    string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg",
                        "acdefg", "abc", "abcdefg", "abcdfg", "abcefg",
                        "cdefg", "adef", "bcdeg", "adefg", "aefg"};
    logic [6:0] s = '0;
    for (int k = 0; k < lit[d].len(); k++) s[int'(lit[d][k]) - int'("a")] = 1'b1;
    return s;
  endfunction

  // Instruction table; returns {carry, result}. Codes 6, 8, 11, 13 are
  // optional in the opcode map and disabled by default: they act as ZERO.
  function automatic logic [8:0] model(int code, int a, int d);
    int r;
    bit cy = 0;
    case (code)
      1:  r = 255;                                   // RST
      2:  r = d;                                     // LDDA
      3:  begin r = a + d; cy = r > 255; end         // ADDA
      4:  begin r = a - d; cy = a < d; end           // SUBA
      5:  begin r = 255 - a; cy = 1; end             // COMA
      7:  begin r = a | d; cy = a != 0 || d != 0; end  // ORAA
      9:  begin r = a & d; cy = a != 0 && d != 0; end  // ANDA
      10: begin r = a + 1; cy = a == 255; end        // INCA
      12: begin r = a / 2; cy = (a % 2) != 0; end    // LSRA
      14: begin r = a * 2; cy = a >= 128; end        // LSLA
      15: begin r = a / 2 + (a >= 128 ? 128 : 0); cy = (a % 2) != 0; end  // ASRA
      default: r = 0;                                // ZERO and unused codes
    endcase
    r = ((r % 256) + 256) % 256;
    return {cy, r[7:0]};
  endfunction

  initial begin
    logic [8:0] exp;
    for (int op = 0; op < 16; op++) op_seen[op] = 0;
    for (int op = 0; op < 16; op++) begin
      for (int a = 0; a < 256; a++) begin
        ctrl = 4'(op);
        acca = 8'(a);
        #1;
        exp = model(op, a, DATA);
        checks++;
        if (seg_hi !== font(exp[7:4]) || seg_lo !== font(exp[3:0]) ||
            c !== exp[8] || z !== (exp[7:0] == 8'h00)) begin
          failures++;
          if (failures <= 10)
            $display("FAIL ctrl=%h acca=%h: segs=%b/%b C=%b Z=%b, want result %h C=%b Z=%b",
                     ctrl, acca, seg_hi, seg_lo, c, z, exp[7:0], exp[8], exp[7:0] == 8'h00);
        end
        op_seen[op]++;
        if (c) n_carry++;
        if (z) n_zero++;
        if (op == 4 && c) n_borrow++;
        if ((op == 6 || op == 8 || op == 11 || op == 13) && z && !c) n_unused++;
      end
    end

    // Every instruction of the table must have run.
    foreach (op_seen[op]) begin
      checks++;
      if (op_seen[op] == 0) begin
        failures++;
        $display("FAIL code %h never applied", op);
      end
    end
    checks++; if (n_carry  == 0) begin failures++; $display("FAIL carry never set");  end
    checks++; if (n_zero   == 0) begin failures++; $display("FAIL zero never set");   end
    checks++; if (n_borrow == 0) begin failures++; $display("FAIL SUBA never borrowed"); end
    checks++; if (n_unused == 0) begin failures++; $display("FAIL unused code never defaulted"); end
    $display("mechanisms: carry=%0d zero=%0d borrow=%0d unused_default=%0d",
             n_carry, n_zero, n_borrow, n_unused);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(16 * 256 + 1000);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
