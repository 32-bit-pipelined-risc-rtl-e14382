// tb_alu: checks every ALU operation on random and corner operands against results and
// flags computed here with plain integer arithmetic.
module tb_alu;
  import risc_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e op;
  logic [31:0] a, b, y;
  alu_flags_t flags;

  alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(alu_op_e o, logic [31:0] x, logic [31:0] z);
    longint sx, sz, sr;
    logic [31:0] ey; logic ec, ev;
    int s;
    op = o; a = x; b = z;
    #1;
    sx = longint'($signed(x)); sz = longint'($signed(z));
    s = int'(z[4:0]);
    ec = 0; ev = 0;
    case (o)
      ALU_ADD: begin ey = x + z; ec = (longint'(x) + longint'(z)) > 64'hFFFF_FFFF;
                     sr = sx + sz; ev = (sr != longint'($signed(ey))); end
      ALU_SUB: begin ey = x - z; ec = (x >= z);
                     sr = sx - sz; ev = (sr != longint'($signed(ey))); end
      ALU_AND: ey = x & z;
      ALU_OR:  ey = x | z;
      ALU_XOR: ey = x ^ z;
      ALU_NOT: ey = ~z;
      ALU_SHL: begin ey = 32'(longint'(x) * (64'd1 << s)); ec = s ? x[32-s] : 0; end
      ALU_SHR: begin ey = 32'(longint'(x) / (64'd1 << s)); ec = s ? x[s-1] : 0; end
      ALU_SAR: begin ey = 32'(sx >>> s); ec = s ? x[s-1] : 0; end
      default: ey = z;
    endcase
    checks++;
    if (y !== ey || flags.c !== ec || flags.v !== ev || flags.z !== (ey == 0) || flags.n !== ey[31]) begin
      failures++;
      if (failures < 10)
        $display("%s a=%h b=%h: y=%h c%b v%b z%b n%b, expected y=%h c%b v%b", o.name(), x, z,
                 y, flags.c, flags.v, flags.z, flags.n, ey, ec, ev);
    end
  endtask

  initial begin
    alu_op_e ops [10] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOT,
                          ALU_SHL, ALU_SHR, ALU_SAR, ALU_PASS};
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h1F};
    foreach (ops[i]) begin
      foreach (corner[j]) foreach (corner[k]) check_one(ops[i], corner[j], corner[k]);
      repeat (300) check_one(ops[i], $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
