// seven_seg_tb: self-checking test of the hex 7-segment decoder.
//
// The expected patterns are built independently of the decoder: for each
// segment A..G the test lists the digits on which that segment is dark in
// the usual hex font (0-9, A, b, C, d, E, F) and lights it on all others.
// Both polarities are checked on all 16 digits.
module seven_seg_tb;

  logic [3:0] digit;
  logic [6:0] seg_hi, seg_lo;

  int checks = 0;
  int failures = 0;

  seven_seg                      dut_high (.digit(digit), .seg(seg_hi));
  seven_seg #(.ACTIVE_LOW(1'b1)) dut_low  (.digit(digit), .seg(seg_lo));

  // Digits on which each segment is off, one 16-bit mask per segment.
  function automatic logic [6:0] expected(logic [3:0] d);
    logic [15:0] off [7];
    logic [6:0]  s;
    off[0] = (16'b1 << 1) | (16'b1 << 4) | (16'b1 << 11) | (16'b1 << 13);           // A
    off[1] = (16'b1 << 5) | (16'b1 << 6) | (16'b1 << 11) | (16'b1 << 12)
           | (16'b1 << 14) | (16'b1 << 15);                                         // B
    off[2] = (16'b1 << 2) | (16'b1 << 12) | (16'b1 << 14) | (16'b1 << 15);          // C
    off[3] = (16'b1 << 1) | (16'b1 << 4) | (16'b1 << 7) | (16'b1 << 10)
           | (16'b1 << 15);                                                         // D
    off[4] = (16'b1 << 1) | (16'b1 << 3) | (16'b1 << 4) | (16'b1 << 5)
           | (16'b1 << 7) | (16'b1 << 9);                                           // E
    off[5] = (16'b1 << 1) | (16'b1 << 2) | (16'b1 << 3) | (16'b1 << 7)
           | (16'b1 << 13);                                                         // F
    off[6] = (16'b1 << 0) | (16'b1 << 1) | (16'b1 << 7) | (16'b1 << 12);            // G
    for (int k = 0; k < 7; k++) s[k] = !off[k][d];
    return s;
  endfunction

  initial begin
    for (int d = 0; d < 16; d++) begin
      digit = 4'(d);
      #1;
      checks++;
      if (seg_hi !== expected(digit)) begin
        failures++;
        $display("FAIL active-high digit %h: got %b want %b", d, seg_hi, expected(digit));
      end
      checks++;
      if (seg_lo !== ~expected(digit)) begin
        failures++;
        $display("FAIL active-low digit %h: got %b want %b", d, seg_lo, ~expected(digit));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
