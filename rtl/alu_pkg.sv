// alu_pkg: shared encodings of the 8-bit accumulator ALU.
//
// The 4-bit function codes are the lab's standard ALU opcode map, so that
// a later control unit can drive Alu_Ctrl with the same values. Codes 6, 8,
// B and D are optional instructions; the ALU only honours them when its
// OPTIONAL_OPS parameter is set, otherwise they count as unused codes and
// run DEFAULT_ALU. The map names code D an arithmetic shift left (ASLA);
// that name is this design's reading of an ambiguous entry in the map.
package alu_pkg;

  typedef enum logic [3:0] {
    ALU_ZERO  = 4'h0,  // Result = 0                 (ZERO)
    ALU_ONES  = 4'h1,  // Result = all ones, 0xFF    (RST)
    ALU_LOAD  = 4'h2,  // Result = Data_Out          (LDDA)
    ALU_ADDA  = 4'h3,  // Result = ACCA + Data_Out
    ALU_SUBA  = 4'h4,  // Result = ACCA - Data_Out
    ALU_COMA  = 4'h5,  // Result = ~ACCA
    ALU_COMA2 = 4'h6,  // optional: Result = -ACCA
    ALU_ORAA  = 4'h7,  // Result = ACCA | Data_Out
    ALU_XORA  = 4'h8,  // optional: Result = ACCA ^ Data_Out
    ALU_ANDA  = 4'h9,  // Result = ACCA & Data_Out
    ALU_INCA  = 4'hA,  // Result = ACCA + 1
    ALU_DECA  = 4'hB,  // optional: Result = ACCA - 1
    ALU_LSRA  = 4'hC,  // logical shift right
    ALU_ASLA  = 4'hD,  // optional: arithmetic shift left
    ALU_LSLA  = 4'hE,  // logical shift left
    ALU_ASRA  = 4'hF   // arithmetic shift right (MSB kept)
  } alu_op_t;

  // Instruction executed for any code the ALU does not implement.
  localparam alu_op_t DEFAULT_ALU = ALU_ZERO;

  // True for the codes that are optional in the opcode map.
  function automatic logic is_optional(alu_op_t op);
    return op inside {ALU_COMA2, ALU_XORA, ALU_DECA, ALU_ASLA};
  endfunction

endpackage
