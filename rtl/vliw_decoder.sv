// vliw_decoder: the simple decoder of the VLIW thread.
//
// A VLIW packet holds VLIW_OPS 32-bit operations, each already one internal
// instruction, so nothing is translated: every operation is unpacked into a
// uop_t and steered into a slot of the queue line whose functional unit can
// run it. Placement is done in three passes so that operations with one kind
// of unit find room first: loads/stores (slots 0-1), then address, multiply
// and branch operations, then ALU, shift and select operations, which may use
// any integer or media slot. Empty slots are left for ARM internal
// instructions. overflow reports a packet that does not fit (the compiler's
// job to avoid); such operations are dropped. Combinational.
//
// Operation format (this design's own; the source design does not give one):
//   [31] valid  [30:28] type  [27:24] sub-op  [23:20] condition  [19] set flags
//   [18:13] dst  [12:7] src1  [6] immediate  [5:0] src2 or signed imm6
// Per type: S shifts src1 by src2 (or imm6 as an unsigned amount); L accesses
// src1 + imm6, stores dst; B jumps to pc + 32*imm6 (or to src1), links into
// dst; every type reads dst as its third operand.
module vliw_decoder
  import orochi_pkg::*;
(
  input  logic [VLIW_OPS-1:0][31:0] packet,
  input  logic [31:0]               pc,
  output uop_t                      line [NUM_SLOTS],
  output logic                      overflow
);
  function automatic uop_t unpack_op(input logic [31:0] w, input logic [31:0] ppc);
    uop_t u;
    logic [31:0] simm;
    simm       = {{26{w[5]}}, w[5:0]};
    u          = '0;
    u.valid    = w[31];
    u.thread   = THR_VLIW;
    u.itype    = itype_e'(w[30:28]);
    u.op       = w[27:24];
    u.cond     = w[23:20];
    u.setflags = w[19];
    u.dst      = w[18:13];
    u.src1     = w[12:7];
    u.src2     = w[5:0];
    u.src3     = w[18:13];
    u.use_imm  = w[6];
    u.imm      = simm;
    u.pc       = ppc;
    u.wr_en    = 1'b1;
    unique case (u.itype)
      IT_E: u.wr_en = !(w[27:26] == 2'b10);
      IT_S: begin
        u.src2 = w[12:7];
        u.src3 = w[5:0];
        u.imm  = {26'd0, w[5:0]};
      end
      IT_L: begin
        u.use_imm = 1'b1;
        u.wr_en   = !w[24];
      end
      IT_B: begin
        u.imm   = ppc + {simm[26:0], 5'd0};
        u.wr_en = w[24];
      end
      default: ;
    endcase
    return u;
  endfunction

  always_comb begin
    uop_t u;
    logic placed;
    for (int s = 0; s < NUM_SLOTS; s++) line[s] = '0;
    u      = '0;
    placed = 1'b0;
    overflow = 1'b0;
    for (int pass = 0; pass < 3; pass++) begin
      for (int o = 0; o < VLIW_OPS; o++) begin
        u = unpack_op(packet[o], pc);
        if (u.valid &&
            ((pass == 0 && u.itype == IT_L) ||
             (pass == 1 && u.itype inside {IT_A, IT_M, IT_m, IT_B}) ||
             (pass == 2 && u.itype inside {IT_E, IT_S, IT_s}))) begin
          placed = 1'b0;
          for (int s = 0; s < NUM_SLOTS; s++)
            if (!placed && !line[s].valid && slot_accepts(s, u.itype)) begin
              line[s] = u;
              placed  = 1'b1;
            end
          if (!placed) overflow = 1'b1;
        end
      end
    end
  end
endmodule
