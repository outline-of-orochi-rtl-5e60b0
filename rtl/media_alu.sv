// media_alu: one media functional unit of the OROCHI back end (slots 4..7).
//
// Executes E (ALU), S (shift), s (select) and the two multiply types that
// decomposed ARM multiplies use: M, a 32-bit x 8-bit partial product, and m,
// the support operations around it. The source design fixes that a multiply is
// split into 32b x 8b partial products and their accumulation, each finishing
// in one clock, and that there are eight kinds of M; the encodings below are
// this design's own. The floating-point and SIMD media operations of the
// FR-V 550 units this back end is modelled on are not built; only the
// integer work above is.
//
// M: op[1:0] = byte k of b, op[2] = return the upper word, op[3] = no carry-in.
//    P = a * b[8k+7:8k] placed at bit 8k of a 64-bit value. The lower kind
//    returns P[31:0]. The upper kind returns P[63:32] plus the carry out of
//    c + P[31:0], where c is the running low accumulator; this lets a 64-bit
//    accumulation be done with 32-bit adds (the low add happens in a later m).
// m: ACC y = a + b; ABS y = |a|; NEGLO y = c<0 ? -a : a;
//    NEGHI y = c<0 ? ~a + (b==0) : a (upper word of a 64-bit negate, b = low
//    word); MOV y = a.
// Combinational, one cycle. Ports as int_alu without the memory side.
module media_alu
  import orochi_pkg::*;
(
  input  uop_t            u,
  input  logic            en,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic [XLEN-1:0] c,
  input  flags_t          fi,
  output logic [XLEN-1:0] result,
  output logic            wr,
  output flags_t          fo,
  output logic            fwe
);
  logic [XLEN-1:0] opb;
  logic [7:0]      amt;
  logic [7:0]      mbyte;
  logic [39:0]     pp;
  logic [63:0]     pshift;
  logic [XLEN:0]   lowsum;

  always_comb begin
    opb    = u.use_imm ? u.imm : b;
    amt    = u.use_imm ? u.imm[7:0] : c[7:0];
    mbyte  = b[8*u.op[1:0] +: 8];
    pp     = {8'd0, a} * {32'd0, mbyte};
    pshift = {24'd0, pp} << (8 * u.op[1:0]);
    lowsum = {1'b0, c} + {1'b0, pshift[31:0]};
    result = '0;
    fo     = fi;
    fwe    = 1'b0;
    unique case (u.itype)
      IT_E: begin
        alu_e(u.op, a, opb, fi, result, fo);
        fwe = u.setflags;
      end
      IT_S: result = shift_s(u.op, b, amt, fi.c);
      IT_s: result = cond_pass(u.op, fi) ? a : opb;
      IT_M: begin
        if (u.op[2])
          result = pshift[63:32] + {31'd0, lowsum[XLEN] & !u.op[3]};
        else
          result = pshift[31:0];
      end
      IT_m: begin
        unique case (u.op)
          MA_ACC:   result = a + opb;
          MA_ABS:   result = a[31] ? -a : a;
          MA_NEGLO: result = c[31] ? -a : a;
          MA_NEGHI: result = c[31] ? ~a + {31'd0, (b == '0)} : a;
          default:  result = a;
        endcase
        // Flags of a multiply with S: N and Z of the written word.
        fo.n = result[31];
        fo.z = (result == '0);
        fwe  = u.setflags;
      end
      default: result = '0;
    endcase
    wr = en && u.wr_en;
    if (!en) fwe = 1'b0;
  end
endmodule
