// Testbench for the control unit: all 2048 opcode values with zero = 0 and
// 1. The expected signals come from a copy of the per-instruction control
// table held here; don't-care entries are not checked.
module tb_control;
  import legv8_pkg::*;
  int checks = 0, failures = 0;
  logic [10:0] opcode;
  logic zero, brtaken, illegal, arith;
  ctrl_t ctrl;

  control dut (.opcode, .zero, .ctrl, .brtaken, .illegal, .arith);

  // One row per instruction: Reg2Loc ALUSrc MemToReg RegWrite MemWrite
  // BrTaken UncondBr, as characters '0', '1', 'x' or 'z' (BrTaken = zero).
  function automatic string row(int kind);
    case (kind)
      0: return "100100x";  // ADD
      1: return "100100x";  // SUB
      2: return "x11100x";  // LDUR
      3: return "01x010x";  // STUR
      4: return "xxx0011";  // B
      5: return "00x00z0";  // CBZ
      default: return "xxx000x";
    endcase
  endfunction

  function automatic int kind_of(logic [10:0] o);
    if (o == 11'b10001011000) return 0;
    if (o == 11'b11001011000) return 1;
    if (o == 11'b11111000010) return 2;
    if (o == 11'b11111000000) return 3;
    if (o[10:5] == 6'b000101) return 4;
    if (o[10:3] == 8'b10110100) return 5;
    return 6;
  endfunction

  task automatic chk(logic got, byte e, logic z, string what);
    logic exp;
    if (e == "x") return;
    exp = (e == "1") || (e == "z" && z);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL opcode=%b zero=%b %s: got %b expected %b", opcode, z, what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_kind [7] = '{default: 0};
    for (int o = 0; o < 2048; o++) begin
      for (int z = 0; z < 2; z++) begin
        string r;
        int k;
        opcode = 11'(o); zero = z[0];
        #1;
        k = kind_of(opcode);
        n_kind[k]++;
        r = row(k);
        chk(ctrl.reg2loc,  r[0], zero, "Reg2Loc");
        chk(ctrl.alusrc,   r[1], zero, "ALUSrc");
        chk(ctrl.memtoreg, r[2], zero, "MemToReg");
        chk(ctrl.regwrite, r[3], zero, "RegWrite");
        chk(ctrl.memwrite, r[4], zero, "MemWrite");
        chk(brtaken,       r[5], zero, "BrTaken");
        chk(ctrl.uncondbr, r[6], zero, "UncondBr");
        chk(illegal, (k == 6) ? "1" : "0", zero, "illegal");
        chk(arith, (k <= 1) ? "1" : "0", zero, "arith");
        checks++;
        case (k)
          0, 2, 3: if (ctrl.aluop != ALU_ADD) begin failures++; $display("FAIL aluop %b", opcode); end
          1:       if (ctrl.aluop != ALU_SUB) begin failures++; $display("FAIL aluop %b", opcode); end
          5:       if (ctrl.aluop != ALU_PASSB) begin failures++; $display("FAIL aluop %b", opcode); end
          default: ;
        endcase
      end
    end
    // every instruction was decoded at least once (B: 32 opcodes, CBZ: 8)
    checks++;
    if (n_kind[4] != 64 || n_kind[5] != 16 || n_kind[0] != 2) begin
      failures++;
      $display("FAIL decode coverage %p", n_kind);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
