// tb_alu: random operands through every ALU operation, compared with an independent model
// of 17-bit arithmetic; also the directed corner cases of carry, borrow and overflow.
`timescale 1ns/1ps
module tb_alu;
  import fastchart_pkg::*;
  word_t a, b, y;
  logic c, v;
  alu_op_e op;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .op, .y, .c, .v);

  task automatic expect_(word_t ey, logic ec, logic ev);
    #1;
    checks++;
    if (y !== ey || c !== ec || v !== ev) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h: y=%h c=%b v=%b, expected %h %b %b", op, a, b, y, c, v, ey, ec, ev);
    end
  endtask

  initial begin
    #100000 failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed corner cases
    a = 16'hFFFF; b = 16'h0001; op = ALU_ADD; expect_(16'h0000, 1'b1, 1'b0);
    a = 16'h7FFF; b = 16'h0001; op = ALU_ADD; expect_(16'h8000, 1'b0, 1'b1);
    a = 16'h0000; b = 16'h0001; op = ALU_SUB; expect_(16'hFFFF, 1'b1, 1'b0);
    a = 16'h8000; b = 16'h0001; op = ALU_CMP; expect_(16'h7FFF, 1'b0, 1'b1);
    for (int i = 0; i < 2000; i++) begin
      int unsigned ua, ub, s;
      word_t ey; logic ec, ev;
      a = word_t'($urandom); b = word_t'($urandom);
      op = alu_op_e'($urandom_range(0, 10));
      ua = a; ub = b; ec = 0; ev = 0;
      case (op)
        ALU_ADD: begin s = ua + ub; ey = s[15:0]; ec = s[16];
                 ev = (a[15] == b[15]) && (ey[15] != a[15]); end
        ALU_SUB, ALU_CMP: begin ey = word_t'(ua - ub); ec = (ua < ub);
                 ev = (a[15] != b[15]) && (ey[15] != a[15]); end
        ALU_AND: ey = a & b;
        ALU_OR:  ey = a | b;
        ALU_XOR: ey = a ^ b;
        ALU_NOT: ey = ~b;
        default: ey = b;
      endcase
      expect_(ey, ec, ev);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
