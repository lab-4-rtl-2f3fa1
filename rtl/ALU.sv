// ALU: combinational accumulator ALU with carry and zero flags.
//
// Alu_Ctrl selects one of the instructions of alu_pkg::alu_op_t and the
// unit computes Result, the carry C and the zero flag Z from the accumulator
// ACCA and the data-bus operand Data_Out within the same cycle (no clock, no
// state). The result is meant to be written back into ACCA by the register
// that holds it; that register is not part of this module.
//
// Instructions and flags (W = WIDTH):
//   ZERO  Result 0, C 0           RST   Result = all ones, C 0
//   LDDA  Result Data_Out, C 0    COMA  Result ~ACCA, C 1
//   ADDA  {C,Result} = ACCA + Data_Out (C = carry out)
//   SUBA  {C,Result} = ACCA - Data_Out (C = borrow, 1 when Data_Out > ACCA)
//   ANDA  Result bitwise AND, C = (ACCA != 0) && (Data_Out != 0)
//   ORAA  Result bitwise OR,  C = (ACCA != 0) || (Data_Out != 0)
//   INCA  {C,Result} = ACCA + 1
//   LSLA  shift left,  0 in at the LSB, C = old MSB
//   LSRA  shift right, 0 in at the MSB, C = old LSB
//   ASRA  shift right, MSB kept,        C = old LSB
//   Z = (Result == 0) for every instruction.
// The instruction list, the operand names, the 8-bit width, the opcode
// values and the flag rules of ZERO, RST, ADDA, ANDA, ORAA, COMA, the
// shifts and Z follow the lab. SUBA's carry as a borrow, C = 0 for LDDA and
// C = carry out for INCA are this design's reading where the lab is brief.
//
// The optional instructions COMA2 (C = borrow of 0 - ACCA), XORA (C =
// logical XOR of the operands), DECA (C = borrow) and ASLA (same as LSLA)
// are decoded only when OPTIONAL_OPS = 1; their flag rules are this
// design's choice. Any code that is not implemented runs DEFAULT_ALU (ZERO).
module ALU
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH        = 8,     // operand and result width
  parameter bit          OPTIONAL_OPS = 1'b0   // decode codes 6, 8, B, D
) (
  input  logic [WIDTH-1:0] ACCA,      // accumulator operand
  input  logic [WIDTH-1:0] Data_Out,  // data-bus operand
  input  logic [3:0]       Alu_Ctrl,  // function select
  output logic [WIDTH-1:0] Result,
  output logic             C,         // carry / borrow / shifted-out bit
  output logic             Z          // Result is zero
);

  alu_op_t op;

  // Unused codes are mapped onto the default instruction before decoding.
  always_comb begin
    op = alu_op_t'(Alu_Ctrl);
    if (!OPTIONAL_OPS && is_optional(op)) op = DEFAULT_ALU;
  end

  logic a_nz, d_nz;
  assign a_nz = |ACCA;
  assign d_nz = |Data_Out;

  always_comb begin
    Result = '0;
    C      = 1'b0;
    case (op)
      ALU_ZERO:  begin Result = '0;               C = 1'b0; end
      ALU_ONES:  begin Result = '1;               C = 1'b0; end  // 0xFF at 8 bits
      ALU_LOAD:  begin Result = Data_Out;         C = 1'b0; end
      ALU_ADDA:  {C, Result} = {1'b0, ACCA} + {1'b0, Data_Out};
      ALU_SUBA:  {C, Result} = {1'b0, ACCA} - {1'b0, Data_Out};
      ALU_COMA:  begin Result = ~ACCA;            C = 1'b1; end
      ALU_COMA2: {C, Result} = {(WIDTH+1){1'b0}} - {1'b0, ACCA};
      ALU_ORAA:  begin Result = ACCA | Data_Out;  C = a_nz || d_nz; end
      ALU_XORA:  begin Result = ACCA ^ Data_Out;  C = a_nz ^ d_nz;  end
      ALU_ANDA:  begin Result = ACCA & Data_Out;  C = a_nz && d_nz; end
      ALU_INCA:  {C, Result} = {1'b0, ACCA} + (WIDTH+1)'(1);
      ALU_DECA:  {C, Result} = {1'b0, ACCA} - (WIDTH+1)'(1);
      ALU_LSRA:  {Result, C} = {1'b0, ACCA};
      ALU_ASLA,
      ALU_LSLA:  {C, Result} = {ACCA, 1'b0};
      ALU_ASRA:  {Result, C} = {ACCA[WIDTH-1], ACCA};
      default:   begin Result = '0;               C = 1'b0; end
    endcase
  end

  assign Z = (Result == '0);

endmodule
