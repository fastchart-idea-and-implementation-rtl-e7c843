// tb_shifter: every shift operation on random values and on the edge bits, compared with
// a model built from integer multiplication and division.
`timescale 1ns/1ps
module tb_shifter;
  import fastchart_pkg::*;
  word_t a, y;
  logic c;
  shift_op_e op;
  int checks = 0, failures = 0;

  shifter dut (.a, .op, .y, .c_out(c));

  initial begin
    #100000 failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      int unsigned u;
      word_t ey; logic ec;
      a  = (i < 4) ? word_t'(i == 0 ? 16'h8001 : i == 1 ? 16'h0001 : i == 2 ? 16'h8000 : 16'hFFFF)
                   : word_t'($urandom);
      op = shift_op_e'(i % 4);
      u = a;
      case (op)
        SH_SHL: begin ey = word_t'(u * 2); ec = (u >= 32768); end
        SH_SHR: begin ey = word_t'(u / 2); ec = (u % 2) == 1; end
        SH_ASR: begin ey = word_t'(u / 2) | (a & 16'h8000); ec = (u % 2) == 1; end
        default: begin ey = a; ec = 1'b0; end
      endcase
      #1;
      checks++;
      if (y !== ey || c !== ec) begin
        failures++;
        $display("FAIL op=%0d a=%h: y=%h c=%b expected %h %b", op, a, y, c, ey, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
