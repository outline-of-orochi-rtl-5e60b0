// orochi_pkg: types and constants shared by the OROCHI processor.
//
// OROCHI runs two threads on one VLIW back end: a VLIW (media) thread whose
// packets carry up to eight operations, and a conventional ARMv4 thread whose
// instructions are broken into single-cycle "internal instructions" and slotted
// into the empty positions of the VLIW lines. Everything that travels through
// the instruction queue is a uop_t, the internal instruction.
//
// From the source design: the eight internal instruction types E S M m a L B s,
// the line of 4 integer, 4 media and 2 branch slots, 64 registers per thread,
// up to 8 operations per VLIW packet and up to 4 internal instructions out of a
// translator per cycle. This design's own choices: the field layout of uop_t,
// the sub-operation codes, which slot takes which type, and the shared
// functions for condition checks, the ALU and the shifter.
package orochi_pkg;

  localparam int unsigned XLEN        = 32;
  localparam int unsigned NUM_INT     = 4;   // integer ALU slots 0..3
  localparam int unsigned NUM_MEDIA   = 4;   // media ALU slots 4..7
  localparam int unsigned NUM_BR      = 2;   // branch slots 8..9
  localparam int unsigned NUM_SLOTS   = NUM_INT + NUM_MEDIA + NUM_BR;
  localparam int unsigned NUM_MEM     = 2;   // slots 0 and 1 reach the data cache
  localparam int unsigned VLIW_OPS    = 8;   // operations per VLIW packet
  localparam int unsigned NUM_REGS    = 64;  // registers per thread bank
  localparam int unsigned RA_W        = 6;   // register address width
  localparam int unsigned GROUP_W     = 4;   // internal instructions per translator cycle
  localparam int unsigned ARM_ARCH    = 16;  // ARM registers r0..r15
  localparam int unsigned NUM_TEMPS   = NUM_REGS - ARM_ARCH; // rename registers r16..r63
  localparam int unsigned MAX_TEMPS   = 6;   // most temporaries one ARM instruction needs
  localparam int unsigned CNT_W       = 6;   // width of an internal instruction count (max 35)

  localparam logic THR_VLIW = 1'b0;
  localparam logic THR_ARM  = 1'b1;

  // Internal instruction types (Table 1 of the source design).
  typedef enum logic [2:0] {
    IT_E = 3'd0,  // 3-operand ALU arithmetic / logic
    IT_S = 3'd1,  // shift / rotate
    IT_M = 3'd2,  // 32b x 8b partial product
    IT_m = 3'd3,  // multiply support: accumulate, absolute, sign handling, move
    IT_A = 3'd4,  // address generation (may write the base register)
    IT_L = 3'd5,  // load / store
    IT_B = 3'd6,  // PC offset conditional branch
    IT_s = 3'd7   // select one of two registers
  } itype_e;

  // E sub-operations use the ARM data-processing opcode.
  localparam logic [3:0] E_AND = 4'd0,  E_EOR = 4'd1,  E_SUB = 4'd2,  E_RSB = 4'd3,
                         E_ADD = 4'd4,  E_ADC = 4'd5,  E_SBC = 4'd6,  E_RSC = 4'd7,
                         E_TST = 4'd8,  E_TEQ = 4'd9,  E_CMP = 4'd10, E_CMN = 4'd11,
                         E_ORR = 4'd12, E_MOV = 4'd13, E_BIC = 4'd14, E_MVN = 4'd15;
  // S sub-operations: ARM shift type, plus rotate-right-extended.
  localparam logic [3:0] S_LSL = 4'd0, S_LSR = 4'd1, S_ASR = 4'd2, S_ROR = 4'd3, S_RRX = 4'd4;
  // M sub-operation: [1:0] byte of the multiplier, [2] upper word, [3] no carry-in.
  // m sub-operations.
  localparam logic [3:0] MA_ACC = 4'd0, MA_ABS = 4'd1, MA_NEGLO = 4'd2,
                         MA_NEGHI = 4'd3, MA_MOV = 4'd4;
  // a sub-operations.
  localparam logic [3:0] A_ADD = 4'd0, A_SUB = 4'd1;
  // L sub-operation: [0] store, [1] byte.
  // B sub-operation: [0] link.

  localparam logic [3:0] COND_AL = 4'he;

  typedef struct packed {
    logic        n, z, c, v;
  } flags_t;

  typedef struct packed {
    logic              valid;
    logic              thread;    // THR_VLIW or THR_ARM
    itype_e            itype;
    logic [3:0]        op;
    logic [3:0]        cond;      // ARM condition code, AL = always
    logic              setflags;
    logic              wr_en;     // writes dst
    logic [RA_W-1:0]   dst;
    logic [RA_W-1:0]   src1;
    logic [RA_W-1:0]   src2;
    logic [RA_W-1:0]   src3;
    logic              use_imm;   // second operand is imm instead of src2
    logic [XLEN-1:0]   imm;
    logic [XLEN-1:0]   pc;        // address of the instruction it came from
    logic              last;      // last internal instruction of an ARM instruction
    logic [2:0]        ntemps;    // temporaries released when 'last' issues
  } uop_t;

  typedef uop_t line_t [NUM_SLOTS];

  // Which slot may hold which internal instruction type.
  function automatic logic slot_accepts(input int unsigned slot, input itype_e t);
    if (slot < NUM_MEM)
      return t inside {IT_E, IT_S, IT_A, IT_L, IT_s};
    else if (slot < NUM_INT)
      return t inside {IT_E, IT_S, IT_A, IT_s};
    else if (slot < NUM_INT + NUM_MEDIA)
      return t inside {IT_E, IT_S, IT_M, IT_m, IT_s};
    else
      return t == IT_B;
  endfunction

  function automatic logic cond_pass(input logic [3:0] cond, input flags_t f);
    unique case (cond)
      4'h0: return f.z;
      4'h1: return !f.z;
      4'h2: return f.c;
      4'h3: return !f.c;
      4'h4: return f.n;
      4'h5: return !f.n;
      4'h6: return f.v;
      4'h7: return !f.v;
      4'h8: return f.c && !f.z;
      4'h9: return !f.c || f.z;
      4'ha: return f.n == f.v;
      4'hb: return f.n != f.v;
      4'hc: return !f.z && (f.n == f.v);
      4'hd: return f.z || (f.n != f.v);
      4'he: return 1'b1;
      default: return 1'b0;   // 4'hf: never
    endcase
  endfunction

  // E: ARM-style ALU. Logical operations keep C and V.
  function automatic void alu_e(input logic [3:0] op, input logic [XLEN-1:0] a,
                                input logic [XLEN-1:0] b, input flags_t fi,
                                output logic [XLEN-1:0] y, output flags_t fo);
    logic [XLEN:0] s;
    logic          arith;
    s     = '0;
    arith = 1'b1;
    unique case (op)
      E_AND, E_TST: begin y = a & b;  arith = 1'b0; end
      E_EOR, E_TEQ: begin y = a ^ b;  arith = 1'b0; end
      E_ORR:        begin y = a | b;  arith = 1'b0; end
      E_MOV:        begin y = b;      arith = 1'b0; end
      E_BIC:        begin y = a & ~b; arith = 1'b0; end
      E_MVN:        begin y = ~b;     arith = 1'b0; end
      E_SUB, E_CMP: s = {1'b0, a} + {1'b0, ~b} + 33'd1;
      E_RSB:        s = {1'b0, b} + {1'b0, ~a} + 33'd1;
      E_ADD, E_CMN: s = {1'b0, a} + {1'b0, b};
      E_ADC:        s = {1'b0, a} + {1'b0, b} + {32'd0, fi.c};
      E_SBC:        s = {1'b0, a} + {1'b0, ~b} + {32'd0, fi.c};
      default:      s = {1'b0, b} + {1'b0, ~a} + {32'd0, fi.c};  // E_RSC
    endcase
    if (arith) y = s[XLEN-1:0];
    fo.n = y[XLEN-1];
    fo.z = (y == '0);
    if (arith) begin
      fo.c = s[XLEN];
      unique case (op)
        E_ADD, E_CMN, E_ADC:        fo.v = (a[31] == b[31]) && (y[31] != a[31]);
        E_RSB, E_RSC:               fo.v = (b[31] != a[31]) && (y[31] != b[31]);
        default:                    fo.v = (a[31] != b[31]) && (y[31] != a[31]);
      endcase
    end else begin
      fo.c = fi.c;
      fo.v = fi.v;
    end
  endfunction

  // S: barrel shifter with ARM register-shift semantics for amounts >= 32.
  function automatic logic [XLEN-1:0] shift_s(input logic [3:0] op, input logic [XLEN-1:0] v,
                                              input logic [7:0] amt, input logic cin);
    logic [XLEN-1:0] r;
    unique case (op)
      S_LSL:   r = (amt >= 8'd32) ? '0 : v << amt[4:0];
      S_LSR:   r = (amt >= 8'd32) ? '0 : v >> amt[4:0];
      S_ASR:   r = (amt >= 8'd32) ? {XLEN{v[31]}} : XLEN'($signed(v) >>> amt[4:0]);
      S_ROR:   r = (v >> amt[4:0]) | (v << (6'd32 - {1'b0, amt[4:0]}));
      default: r = {cin, v[XLEN-1:1]};   // S_RRX
    endcase
    return r;
  endfunction

  // Data memory request of one memory slot.
  typedef struct packed {
    logic            req;     // the head line holds an active load/store in this slot
    logic            commit;  // the line issues this cycle: perform the access
    logic            we;
    logic [3:0]      be;
    logic [XLEN-1:0] addr;
    logic [XLEN-1:0] wdata;
  } dmem_req_t;

endpackage
