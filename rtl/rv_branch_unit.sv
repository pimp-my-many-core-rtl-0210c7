// rv_branch_unit: condition test of the ordinary RV64I conditional branches.
// Combinational; its outcome enters the PIMP branch multiplexer in execute.
module rv_branch_unit
  import pimp_pkg::*;
(
  input  cmp_op_e     op,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic        taken
);
  always_comb begin
    unique case (op)
      CMP_EQ:  taken = (a == b);
      CMP_NE:  taken = (a != b);
      CMP_LT:  taken = ($signed(a) <  $signed(b));
      CMP_GE:  taken = ($signed(a) >= $signed(b));
      CMP_LTU: taken = (a <  b);
      default: taken = (a >= b);
    endcase
  end
endmodule
