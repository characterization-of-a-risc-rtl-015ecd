// tb_rv_alu: self-checking test of one ALU copy against a reference model of the RV32I
// arithmetic, shift, compare and branch-condition semantics, on random and corner operands.
`timescale 1ns/1ps
module tb_rv_alu;
  import soc_pkg::*;
  alu_op_e op;
  cmp_op_e cop;
  logic [31:0] a, b, ca, cb, y;
  logic        cmp;
  int checks = 0, failures = 0;

  rv_alu dut (.op, .cmp_op(cop), .a, .b, .ca, .cb, .result(y), .cmp);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] pick();
    int sel;
    sel = $urandom_range(0, 5);
    unique case (sel)
      0: return 32'h0;
      1: return 32'hFFFF_FFFF;
      2: return 32'h8000_0000;
      3: return 32'h7FFF_FFFF;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 4000; t++) begin
      logic [31:0] e;
      logic ec;
      int sh;
      a = pick(); b = pick(); ca = pick(); cb = (t % 7 == 0) ? ca : pick();
      op = alu_op_e'($urandom_range(0, 9));
      sh = $urandom_range(0, 5);
      unique case (sh)
        0: cop = CMP_EQ; 1: cop = CMP_NE; 2: cop = CMP_LT; 3: cop = CMP_GE; 4: cop = CMP_LTU; default: cop = CMP_GEU;
      endcase
      #1;
      sh = int'(b[4:0]);
      unique case (op)
        ALU_ADD:  e = a + b;
        ALU_SUB:  e = a - b;
        ALU_SLL:  e = a << sh;
        ALU_SLT:  e = (int'(a) < int'(b)) ? 1 : 0;
        ALU_SLTU: e = (longint'(a) < longint'(b)) ? 1 : 0;
        ALU_XOR:  e = a ^ b;
        ALU_SRL:  e = a >> sh;
        ALU_SRA:  begin e = a >> sh; if (a[31]) for (int i = 0; i < sh; i++) e[31 - i] = 1'b1; end
        ALU_OR:   e = a | b;
        default:  e = a & b;
      endcase
      unique case (cop)
        CMP_EQ:  ec = ca == cb;
        CMP_NE:  ec = ca != cb;
        CMP_LT:  ec = int'(ca) < int'(cb);
        CMP_GE:  ec = int'(ca) >= int'(cb);
        CMP_LTU: ec = longint'(ca) < longint'(cb);
        default: ec = longint'(ca) >= longint'(cb);
      endcase
      check(y == e, $sformatf("op %s a=%h b=%h got %h expected %h", op.name(), a, b, y, e));
      check(cmp == ec, $sformatf("cmp %s", cop.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
