// shifter: the one-bit shifter that follows the ALU in the FASTCHART CPU.
//
// Purely combinational. It passes the ALU result unchanged or shifts it by one place left
// (logical), right (logical) or right (arithmetic). c_out is the bit shifted out; the CPU
// uses it as the carry flag of a shift instruction.
//
// The FASTCHART description places a SHIFTER after the ALU and lists shifter operations among the
// instructions; the choice of one-place shifts is this design's own.
module shifter
  import fastchart_pkg::*;
(
  input  word_t     a,
  input  shift_op_e op,
  output word_t     y,
  output logic      c_out
);

  always_comb begin
    unique case (op)
      SH_SHL:  begin y = {a[DATA_W-2:0], 1'b0};          c_out = a[DATA_W-1]; end
      SH_SHR:  begin y = {1'b0, a[DATA_W-1:1]};          c_out = a[0];        end
      SH_ASR:  begin y = {a[DATA_W-1], a[DATA_W-1:1]};   c_out = a[0];        end
      default: begin y = a;                              c_out = 1'b0;        end
    endcase
  end

endmodule
