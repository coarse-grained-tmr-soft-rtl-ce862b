// neo430_asm_pkg: tiny MSP430 instruction encoder for the testbenches.
//
// Each function returns one 16-bit instruction word in the MSP430 formats:
// double operand {op, src, Ad, B/W, As, dst}, single operand
// {000100, op, B/W, As, reg} and jump {001, cond, 10-bit word offset}.
// Extension words (immediates, indexes, absolute addresses) are emitted
// separately by the caller, in the order source first, then destination.
package neo430_asm_pkg;

  localparam logic [3:0] PC = 4'd0, SP = 4'd1, SR = 4'd2, CG = 4'd3;
  localparam logic [3:0] MOV = 4'h4, ADD = 4'h5, ADDC = 4'h6, SUBC = 4'h7,
                         SUB = 4'h8, CMP = 4'h9, DADD = 4'hA, BIT = 4'hB,
                         BIC = 4'hC, BIS = 4'hD, XOR = 4'hE, AND = 4'hF;
  localparam logic [2:0] RRC = 3'd0, SWPB = 3'd1, RRA = 3'd2, SXT = 3'd3,
                         PUSH = 3'd4, CALL = 3'd5, RETI = 3'd6;
  localparam logic [2:0] JNE = 3'd0, JEQ = 3'd1, JNC = 3'd2, JC = 3'd3,
                         JN = 3'd4, JGE = 3'd5, JL = 3'd6, JMP = 3'd7;
  // addressing modes (As)
  localparam logic [1:0] M_REG = 2'd0, M_IDX = 2'd1, M_IND = 2'd2, M_INC = 2'd3;

  function automatic logic [15:0] f1(input logic [3:0] op, input logic [3:0] src,
                                     input logic ad, input logic bw,
                                     input logic [1:0] as_m, input logic [3:0] dst);
    return {op, src, ad, bw, as_m, dst};
  endfunction

  function automatic logic [15:0] f2(input logic [2:0] op, input logic bw,
                                     input logic [1:0] as_m, input logic [3:0] r);
    return {6'b000100, op, bw, as_m, r};
  endfunction

  // jump from the instruction at byte address `at` to byte address `to`
  function automatic logic [15:0] jmp(input logic [2:0] cond, input logic [15:0] at,
                                      input logic [15:0] to);
    logic [15:0] d;
    d = 16'((int'(to) - int'(at) - 2) / 2);
    return {3'b001, cond, d[9:0]};
  endfunction

endpackage
