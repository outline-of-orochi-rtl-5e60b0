// int_alu: one integer functional unit of the OROCHI back end (slots 0..3).
//
// Executes the internal instruction types E (ALU), S (shift), a (address
// generation), L (load/store) and s (select). It is purely combinational: the
// operands are read from the register file in the issue cycle and the result is
// written back at the end of that same cycle, so every internal instruction
// finishes in one clock, as the source design requires of decomposed ARM work.
//
// Interface: u is the internal instruction, en is "valid and condition passed",
// a/b/c are the register values of src1/src2/src3, fi the thread's flags.
// The second operand is imm when u.use_imm is set. A load returns mem_rdata
// (the aligned word) in the same cycle; a store drives mem_we/mem_be/mem_wdata.
// The unit types per slot, the select encoding and the byte lane handling are
// this design's choices; the source design gives only the unit classes.
module int_alu
  import orochi_pkg::*;
(
  input  uop_t            u,
  input  logic            en,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic [XLEN-1:0] c,
  input  flags_t          fi,
  input  logic [XLEN-1:0] mem_rdata,
  output logic [XLEN-1:0] result,
  output logic            wr,
  output flags_t          fo,
  output logic            fwe,
  output logic            mem_access,
  output logic            mem_we,
  output logic [3:0]      mem_be,
  output logic [XLEN-1:0] mem_addr,
  output logic [XLEN-1:0] mem_wdata
);
  logic [XLEN-1:0] opb;
  logic [XLEN-1:0] ea;
  logic [7:0]      amt;

  always_comb begin
    opb        = u.use_imm ? u.imm : b;
    amt        = u.use_imm ? u.imm[7:0] : c[7:0];
    ea         = a + opb;
    result     = '0;
    fo         = fi;
    fwe        = 1'b0;
    mem_access = 1'b0;
    mem_we     = 1'b0;
    mem_be     = 4'b0000;
    mem_addr   = ea;
    mem_wdata  = c;
    unique case (u.itype)
      IT_E: begin
        alu_e(u.op, a, opb, fi, result, fo);
        fwe = u.setflags;
      end
      IT_S: result = shift_s(u.op, b, amt, fi.c);
      IT_A: result = (u.op == A_SUB) ? a - opb : a + opb;
      IT_L: begin
        mem_access = 1'b1;
        mem_we     = u.op[0];
        if (u.op[1]) begin
          mem_be    = 4'b0001 << ea[1:0];
          mem_wdata = {4{c[7:0]}};
          result    = {24'd0, mem_rdata[8*ea[1:0] +: 8]};
        end else begin
          mem_be    = 4'b1111;
          result    = mem_rdata;
        end
      end
      IT_s: result = cond_pass(u.op, fi) ? a : opb;
      default: result = '0;
    endcase
    wr = en && u.wr_en && !(u.itype == IT_L && u.op[0]);
    if (!en) begin
      fwe        = 1'b0;
      mem_access = 1'b0;
      mem_we     = 1'b0;
    end
  end
endmodule
