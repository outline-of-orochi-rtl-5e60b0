// branch_unit: one of the two branch units of the OROCHI back end (slots 8, 9).
//
// Executes B, the PC offset conditional branch. The translator or the VLIW
// decoder has already turned the offset into an absolute target in u.imm (or,
// without use_imm, the target is the src1 register). When en (valid and
// condition passed) the branch is taken and, with op[0] (link), the return
// address is written to dst: the next ARM instruction (pc + 4) or the next VLIW
// packet (pc + 32). Combinational; the redirect itself is done by issue_unit.
// The source design names the unit; the absolute-target form is this design's.
module branch_unit
  import orochi_pkg::*;
(
  input  uop_t            u,
  input  logic            en,
  input  logic [XLEN-1:0] a,
  output logic            taken,
  output logic [XLEN-1:0] target,
  output logic [XLEN-1:0] link,
  output logic            wr
);
  always_comb begin
    taken  = en && u.itype == IT_B;
    target = u.use_imm ? u.imm : a;
    link   = u.pc + ((u.thread == THR_ARM) ? 32'd4 : 32'd32);
    wr     = taken && u.op[0] && u.wr_en;
  end
endmodule
