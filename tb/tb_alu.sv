// tb_alu: random and corner-case check of every ALU operation and branch
// condition against a reference computed in the testbench.
module tb_alu;
  import pim_pkg::*;
  alu_op_e op; logic [31:0] a, b, y, ca, cb; logic [2:0] f3; logic taken;
  int checks = 0, failures = 0;
  alu dut (.op, .a, .b, .y, .br_funct3(f3), .cmp_a(ca), .cmp_b(cb), .br_taken(taken));

  function automatic logic [31:0] ref_y(alu_op_e o, logic [31:0] x, logic [31:0] z);
    case (o)
      ALU_ADD: return x + z;            ALU_SUB: return x - z;
      ALU_SLL: return x << z[4:0];      ALU_SLT: return ($signed(x) < $signed(z)) ? 1 : 0;
      ALU_SLTU: return (x < z) ? 1 : 0; ALU_XOR: return x ^ z;
      ALU_SRL: return x >> z[4:0];
      ALU_SRA: begin logic [63:0] e = {{32{x[31]}}, x}; return 32'(e >> z[4:0]); end
      ALU_OR: return x | z;             ALU_AND: return x & z;
      ALU_MUL: return x * z;
      default: return z;
    endcase
  endfunction
  function automatic logic ref_t(logic [2:0] f, logic [31:0] x, logic [31:0] z);
    case (f)
      3'b000: return x == z; 3'b001: return x != z;
      3'b100: return $signed(x) < $signed(z); 3'b101: return $signed(x) >= $signed(z);
      3'b110: return x < z;  3'b111: return x >= z;
      default: return 0;
    endcase
  endfunction

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic logic [31:0] corners [6] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff, 32'h1f};
    for (int i = 0; i < 3000; i++) begin
      op = alu_op_e'(i % 12);
      a = (i % 7 == 0) ? corners[$urandom_range(0,5)] : $urandom;
      b = (i % 5 == 0) ? corners[$urandom_range(0,5)] : $urandom;
      f3 = 3'($urandom);
      ca = $urandom; cb = (i % 3 == 0) ? ca : ((i % 4 == 0) ? corners[$urandom_range(0,5)] : $urandom);
      #1;
      checks++;
      if (y !== ref_y(op, a, b)) begin failures++; if (failures < 10) $display("ALU %s %h %h -> %h", op.name(), a, b, y); end
      checks++;
      if (taken !== ref_t(f3, ca, cb)) begin failures++; if (failures < 10) $display("BR f3=%0d %h %h -> %b", f3, ca, cb, taken); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
