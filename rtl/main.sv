// main: board-level top of the ALU lab.
//
// The 8-bit accumulator value ACCA and the 4-bit function select Alu_Ctrl
// come from twelve DIP switches; the ALU's second operand is fixed at DATA
// (0xAA, 1010_1010, as the lab prescribes). The 8-bit Result is shown as two
// hexadecimal digits on two 7-segment displays, each driven directly by its
// own decoder: Seg_Hi shows Result[7:4], Seg_Lo shows Result[3:0]. That is
// 12 inputs + 14 segment outputs, the 26 board pins the lab budgets.
// The carry and zero flags are brought out as C and Z as well; they need
// two more pins if wired to LEDs and may be left unassigned otherwise.
// Which display shows which nibble, the segment order ({G..A}, bit 0 = A)
// and the polarity are this design's choices. Fully combinational: the
// displays follow the switches with only gate delay.
module main #(
  parameter logic [7:0] DATA           = 8'hAA,  // hard-wired Data_Out
  parameter bit         OPTIONAL_OPS   = 1'b0,   // see ALU
  parameter bit         SEG_ACTIVE_LOW = 1'b0    // see seven_seg
) (
  input  logic [7:0] ACCA,
  input  logic [3:0] Alu_Ctrl,
  output logic [6:0] Seg_Hi,    // display for Result[7:4]
  output logic [6:0] Seg_Lo,    // display for Result[3:0]
  output logic       C,
  output logic       Z
);

  logic [7:0] result;

  ALU #(
    .WIDTH        (8),
    .OPTIONAL_OPS (OPTIONAL_OPS)
  ) u_alu (
    .ACCA     (ACCA),
    .Data_Out (DATA),
    .Alu_Ctrl (Alu_Ctrl),
    .Result   (result),
    .C        (C),
    .Z        (Z)
  );

  seven_seg #(.ACTIVE_LOW(SEG_ACTIVE_LOW)) u_seg_hi (
    .digit (result[7:4]),
    .seg   (Seg_Hi)
  );

  seven_seg #(.ACTIVE_LOW(SEG_ACTIVE_LOW)) u_seg_lo (
    .digit (result[3:0]),
    .seg   (Seg_Lo)
  );

endmodule
