// alu: the arithmetic/logic unit of the FASTCHART CPU.
//
// Purely combinational. Operand a is the destination register, operand b the source
// register or an immediate. Operations: ADD, SUB, AND, OR, XOR, MOV (pass b), NOT (invert b)
// and CMP (a - b, the CPU discards the result and keeps the flags). The shift codes select
// MOV here; the shifter behind the ALU then shifts the value. Carry out is the unsigned carry
// of ADD and the borrow of SUB/CMP; overflow is the two's-complement overflow. Zero and
// negative are formed by the CPU from the shifter output.
//
// The FASTCHART description names the ALU in its CPU schematic and lists ALU operations among the
// instructions; the operation set and flag rules are this design's own choice.
module alu
  import fastchart_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  alu_op_e op,
  output word_t   y,
  output logic    c,
  output logic    v
);

  logic [DATA_W:0] sum;
  logic [DATA_W:0] diff;

  always_comb begin
    sum  = {1'b0, a} + {1'b0, b};
    diff = {1'b0, a} - {1'b0, b};
    y = '0;
    c = 1'b0;
    v = 1'b0;
    unique case (op)
      ALU_ADD: begin
        y = sum[DATA_W-1:0];
        c = sum[DATA_W];
        v = (a[DATA_W-1] == b[DATA_W-1]) && (y[DATA_W-1] != a[DATA_W-1]);
      end
      ALU_SUB, ALU_CMP: begin
        y = diff[DATA_W-1:0];
        c = diff[DATA_W];
        v = (a[DATA_W-1] != b[DATA_W-1]) && (y[DATA_W-1] != a[DATA_W-1]);
      end
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_NOT: y = ~b;
      default: y = b;  // MOV and the shift operations
    endcase
  end

endmodule
