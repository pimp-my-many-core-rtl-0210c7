// rv_alu: RV64I integer ALU of the execute stage.
//
// Combinational. word=1 selects the 32-bit (*W) form: the operation works on
// the low 32 bits (shift amount 5 bits) and the result is sign-extended to 64.
module rv_alu
  import pimp_pkg::*;
(
  input  alu_op_e     op,
  input  logic        word,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y
);
  logic [63:0] r64;
  logic [31:0] r32;
  logic [5:0]  sh64;
  logic [4:0]  sh32;

  assign sh64 = b[5:0];
  assign sh32 = b[4:0];

  always_comb begin
    unique case (op)
      ALU_ADD:   r64 = a + b;
      ALU_SUB:   r64 = a - b;
      ALU_SLL:   r64 = a << sh64;
      ALU_SLT:   r64 = 64'($signed(a) < $signed(b));
      ALU_SLTU:  r64 = 64'(a < b);
      ALU_XOR:   r64 = a ^ b;
      ALU_SRL:   r64 = a >> sh64;
      ALU_SRA:   r64 = 64'($signed(a) >>> sh64);
      ALU_OR:    r64 = a | b;
      ALU_AND:   r64 = a & b;
      default:   r64 = b;      // ALU_PASSB (lui)
    endcase
    unique case (op)
      ALU_SUB:   r32 = a[31:0] - b[31:0];
      ALU_SLL:   r32 = a[31:0] << sh32;
      ALU_SRL:   r32 = a[31:0] >> sh32;
      ALU_SRA:   r32 = 32'($signed(a[31:0]) >>> sh32);
      default:   r32 = a[31:0] + b[31:0];
    endcase
    y = word ? {{32{r32[31]}}, r32} : r64;
  end
endmodule
