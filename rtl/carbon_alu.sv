// carbon_alu: 32-bit ALU of a CARBON coarse-grain element.
//
// Combinational.  Computes op(a, b, imm) and truncates the result to
// width_m1+1 bits (zero-extending above), which is how the architecture
// keeps Verilog semantics for signals narrower than 32 bits.  Left shifts go
// through the multiplier (a * 2^b), as in the original CG.  The opcode set
// (carbon_pkg::op_e) is this design's own.  STORE passes operand B, the
// data; the CG takes the R write address from operand A.  LOAD passes
// operand A, the address; the CG uses it for the next instruction's read.
module carbon_alu
  import carbon_pkg::*;
(
  input  op_e               op,
  input  logic [4:0]        width_m1,
  input  word_t             a,
  input  word_t             b,
  input  logic [IMM_W-1:0]  imm,
  output word_t             y
);
  word_t raw, mask, pow2;

  always_comb begin
    pow2 = word_t'(1) << b[4:0];
    unique case (op)
      OP_ADD:  raw = a + b;
      OP_SUB:  raw = a - b;
      OP_MUL:  raw = a * b;
      OP_AND:  raw = a & b;
      OP_OR:   raw = a | b;
      OP_XOR:  raw = a ^ b;
      OP_NOT:  raw = ~a;
      OP_SHL:  raw = a * pow2;
      OP_SHR:  raw = a >> b[4:0];
      OP_SRA:  raw = word_t'($signed(a) >>> b[4:0]);
      OP_EQ:   raw = word_t'(a == b);
      OP_NE:   raw = word_t'(a != b);
      OP_LTU:  raw = word_t'(a < b);
      OP_LTS:  raw = word_t'($signed(a) < $signed(b));
      OP_PASS: raw = a;
      OP_LDI:  raw = word_t'(imm);
      OP_LDHI: raw = {imm, a[15:0]};
      OP_ADDI: raw = a + word_t'(imm);
      OP_STORE: raw = b;
      OP_LOAD:  raw = a;
      default: raw = '0;
    endcase
    mask = (width_m1 == 5'd31) ? '1 : ((word_t'(1) << (width_m1 + 5'd1)) - 1'b1);
    y = raw & mask;
  end
endmodule
