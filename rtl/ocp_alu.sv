// ocp_alu: the coprocessor's address ALU.
//
// Works out the addresses of the call sequences: a VMT entry (base plus four
// times the method index), a static method target (instruction address plus 8
// plus four times a signed 15-bit word offset, as an ARM branch counts), and
// the next word of the coprocessor's overflow stack (minus or plus 4).
// Combinational.
//
// An ALU that indexes method addresses is from the description; the operation
// set and the ARM-branch-like offset are this design's choices.
module ocp_alu
  import ocp_pkg::*;
(
  input  alu_op_e         op,
  input  logic [XLEN-1:0] a,    // base: VMT pointer, instruction address or stack pointer
  input  logic [14:0]     b,    // method index or word offset from the OI
  output logic [XLEN-1:0] y
);

  logic [XLEN-1:0] idx_x4;
  logic [XLEN-1:0] off_x4;

  always_comb begin
    idx_x4 = {{(XLEN-17){1'b0}}, b, 2'b00};
    off_x4 = {{(XLEN-17){b[14]}}, b, 2'b00};
    unique case (op)
      ALU_INDEX: y = a + idx_x4;
      ALU_PCREL: y = a + 32'd8 + off_x4;
      ALU_DEC4:  y = a - 32'd4;
      ALU_INC4:  y = a + 32'd4;
      default:   y = a;
    endcase
  end

endmodule
