// Test helper: encoders for the six instructions of the LEGv8 subset and a
// small instruction-set reference model used by the processor testbenches
// to predict, instruction by instruction, what the hardware must do.
package legv8_asm_pkg;

  function automatic logic [31:0] i_add(int rd, int rn, int rm);
    return {11'b100_0101_1000, 5'(rm), 6'd0, 5'(rn), 5'(rd)};
  endfunction

  function automatic logic [31:0] i_sub(int rd, int rn, int rm);
    return {11'b110_0101_1000, 5'(rm), 6'd0, 5'(rn), 5'(rd)};
  endfunction

  function automatic logic [31:0] i_ldur(int rd, int rn, int off);
    return {11'b111_1100_0010, 9'(off), 2'b00, 5'(rn), 5'(rd)};
  endfunction

  function automatic logic [31:0] i_stur(int rd, int rn, int off);
    return {11'b111_1100_0000, 9'(off), 2'b00, 5'(rn), 5'(rd)};
  endfunction

  // Offsets are in instructions (words), as in the BrAddr26 field.
  function automatic logic [31:0] i_b(int off);
    return {6'b00_0101, 26'(off)};
  endfunction

  function automatic logic [31:0] i_cbz(int rd, int off);
    return {8'b1011_0100, 19'(off), 5'(rd)};
  endfunction

  // Effect of one instruction, as predicted by the reference model.
  typedef struct {
    logic [63:0] next_pc;
    bit          rf_we;
    logic [4:0]  rf_waddr;
    logic [63:0] rf_wdata;
    bit          dm_we;
    logic [63:0] dm_addr;
    logic [63:0] dm_wdata;
    bit          exc;
    int          cause;     // 0 none, 1 undefined, 2 overflow, 3 I/O
    int          kind;      // 0 ADD 1 SUB 2 LDUR 3 STUR 4 B 5 CBZ 6 other
    bit          taken;
  } effect_t;

  // Architectural state of the reference model. Data memory is indexed by
  // doubleword and wraps with DWORDS words, like the hardware.
  class legv8_model;
    logic [63:0] x[32];
    logic [63:0] dmem[];
    logic [63:0] pc;
    logic [63:0] epc;
    int          cause;
    int          dwords;

    function new(int dwords_i);
      dwords = dwords_i;
      dmem = new[dwords];
      foreach (x[i]) x[i] = '0;
      foreach (dmem[i]) dmem[i] = '0;
      pc = '0; epc = '0; cause = 0;
    endfunction

    function logic [63:0] rd_reg(logic [4:0] r);
      return (r == 5'd31) ? 64'd0 : x[r];
    endfunction

    function int didx(logic [63:0] a);
      return int'((a >> 3) % 64'(dwords));
    endfunction

    // Work out the effect of `ins` at the current PC, with interrupt
    // request `irq`, and apply it to the state.
    function effect_t step(logic [31:0] ins, bit irq);
      effect_t e;
      logic [10:0] op;
      logic [63:0] a, b, r, off;
      bit ovf;
      e = '{default: '0};
      op = ins[31:21];
      e.next_pc = pc + 64'd4;
      e.kind = 6;
      if (op == 11'b100_0101_1000 || op == 11'b110_0101_1000) begin
        a = rd_reg(ins[9:5]); b = rd_reg(ins[20:16]);
        if (op[9]) begin
          r = a - b; e.kind = 1;
          ovf = (a[63] != b[63]) && (r[63] != a[63]);
        end else begin
          r = a + b; e.kind = 0;
          ovf = (a[63] == b[63]) && (r[63] != a[63]);
        end
        if (ovf) begin e.exc = 1; e.cause = 2; end
        else begin e.rf_we = 1; e.rf_waddr = ins[4:0]; e.rf_wdata = r; end
      end else if (op == 11'b111_1100_0010 || op == 11'b111_1100_0000) begin
        off = {{55{ins[20]}}, ins[20:12]};
        a = rd_reg(ins[9:5]) + off;
        if (op[1]) begin
          e.kind = 2; e.rf_we = 1; e.rf_waddr = ins[4:0]; e.rf_wdata = dmem[didx(a)];
        end else begin
          e.kind = 3; e.dm_we = 1; e.dm_addr = a; e.dm_wdata = rd_reg(ins[4:0]);
        end
      end else if (ins[31:26] == 6'b00_0101) begin
        e.kind = 4; e.taken = 1;
        e.next_pc = pc + ({{38{ins[25]}}, ins[25:0]} << 2);
      end else if (ins[31:24] == 8'b1011_0100) begin
        e.kind = 5;
        if (rd_reg(ins[4:0]) == 0) begin
          e.taken = 1;
          e.next_pc = pc + ({{45{ins[23]}}, ins[23:5]} << 2);
        end
      end else begin
        e.exc = 1; e.cause = 1;
      end
      if (!e.exc && irq) begin
        e.exc = 1; e.cause = 3; e.rf_we = 0; e.dm_we = 0; e.taken = 0;
      end
      if (e.exc) begin
        e.rf_we = 0; e.dm_we = 0; e.taken = 0;
        e.next_pc = (e.cause == 1) ? 64'hC000_0000 :
                    (e.cause == 2) ? 64'hC000_0020 : 64'hC000_0040;
        epc = pc; cause = e.cause;
      end
      if (e.rf_we && e.rf_waddr != 5'd31) x[e.rf_waddr] = e.rf_wdata;
      if (e.dm_we) dmem[didx(e.dm_addr)] = e.dm_wdata;
      pc = e.next_pc;
      return e;
    endfunction
  endclass

endpackage
