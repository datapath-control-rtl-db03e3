// Exception unit. Hardware detects three events and reacts by saving state
// and jumping to a handler:
//
//   undefined instruction   -> PC = C0000000, cause UNDEF
//   arithmetic overflow     -> PC = C0000020, cause OVF   (ADD/SUB only)
//   I/O device request (irq)-> PC = C0000040, cause IO
//
// In the cycle an event is taken, `take` is high: the faulting (or, for an
// interrupt, the not yet executed) instruction is cancelled, so the
// general-purpose registers and memory are left untouched, and `vector`
// is the handler address. At the clock edge the instruction's PC is saved
// in EPC and the event in the cause register.
//
// Priority (undefined, then overflow, then the interrupt), the level-
// sensitive irq that stays pending until the device drops it, the cause
// encoding and the reset values are this design's choices. There is no
// return-from-exception instruction in the six-instruction subset; EPC and
// cause are outputs for the handler to read. With ENABLE = 0 no event is
// ever taken.
module exception_unit
  import legv8_pkg::*;
#(
  parameter bit ENABLE = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [XLEN-1:0] pc,
  input  logic            illegal,
  input  logic            arith,
  input  logic            overflow,
  input  logic            irq,
  output logic            take,
  output logic [XLEN-1:0] vector,
  output logic [XLEN-1:0] epc,
  output cause_e          cause
);
  cause_e cause_now;

  always_comb begin
    cause_now = CAUSE_NONE;
    vector    = '0;
    if (ENABLE) begin
      if (illegal) begin
        cause_now = CAUSE_UNDEF;
        vector    = VEC_UNDEF;
      end else if (arith && overflow) begin
        cause_now = CAUSE_OVF;
        vector    = VEC_OVF;
      end else if (irq) begin
        cause_now = CAUSE_IO;
        vector    = VEC_IO;
      end
    end
  end

  assign take = (cause_now != CAUSE_NONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      epc   <= '0;
      cause <= CAUSE_NONE;
    end else if (take) begin
      epc   <= pc;
      cause <= cause_now;
    end
  end
endmodule
