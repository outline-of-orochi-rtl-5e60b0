// arm_translator: ARM instruction translator and decomposer.
//
// Takes one ARMv4 instruction and turns it into the single-cycle internal
// instructions of the back end, following the decomposition patterns of the
// source design:
//
//   ALU without shift                        E                1
//   ALU with shift                           S E              2
//   MUL / MLA (32x32(+32) -> 32)             [M m] x4         8
//   UMULL / UMLAL (32x32(+64) -> 64)         [M m] x8 m       17
//   SMULL (signed 32x32 -> 64)               m m [M m] x8 E m m m  22
//   LDR/STR post-index, no shift             L a              2
//   LDR/STR pre-index, no shift              a L              2
//   LDR/STR post-index, shifted register     L S a            3
//   LDR/STR pre-index, shifted register      S a L            3
//   LDM/STM of N registers                   a a [a L] xN a   2N+3
//   B / BL                                   B                1
//
// Structure: the instruction's fields (Op, Dst, Src1..3, Imm1..Imm5) are
// decoded in parallel, a block-transfer decoder finds the n-th register of the
// register list, and a selector builds internal instructions step*4 .. step*4+3
// each cycle, so one instruction is emitted over ceil(count/4) cycles. The
// extra registers an instruction needs come from the free list: the caller
// passes the ring index in_tbase and temporary j is register
// ARM_ARCH + (in_tbase + j) mod NUM_TEMPS. Every internal instruction keeps the
// ARM condition code; the last one carries the number of temporaries to free.
//
// Handshake: in_ready is high when idle; an instruction is taken on
// in_valid & in_ready. out_valid/out_uops present a group of up to GROUP_W
// internal instructions (unused entries have valid = 0); out_last marks the
// group that ends the instruction; out_accept consumes the group. flush drops
// the instruction in progress. Latency: the first group appears the cycle
// after the instruction is taken.
//
// Own choices where the source design is silent: the way an instruction that
// is not in the table (halfword transfers, swap, status register moves,
// coprocessor and software interrupt, SMLAL) becomes a single no-operation E;
// the addressing-mode arithmetic of LDM/STM; the order of the multiply steps
// that makes a 64-bit sum out of 32-bit adds (see media_alu); and reading r15
// as the instruction address + 8 outside this block.
module arm_translator
  import orochi_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          flush,
  input  logic                          in_valid,
  input  logic [31:0]                   in_instr,
  input  logic [XLEN-1:0]               in_pc,
  input  logic [$clog2(NUM_TEMPS)-1:0]  in_tbase,
  output logic                          in_ready,
  output logic [2:0]                    in_ntemps,
  output logic                          out_valid,
  output uop_t                          out_uops [GROUP_W],
  output logic                          out_last,
  input  logic                          out_accept
);
  localparam int unsigned TW = $clog2(NUM_TEMPS);

  typedef enum logic [2:0] { C_DP, C_MUL, C_MULL, C_SDT, C_BDT, C_BR, C_NOP } aclass_e;

  function automatic aclass_e classify(input logic [31:0] i);
    if (i[27:25] == 3'b101) return C_BR;
    if (i[27:25] == 3'b100) return C_BDT;
    if (i[27:26] == 2'b01)  return C_SDT;
    if (i[27:22] == 6'b000000 && i[7:4] == 4'b1001) return C_MUL;
    if (i[27:23] == 5'b00001 && i[7:4] == 4'b1001)
      return (i[22] && i[21]) ? C_NOP : C_MULL;          // SMLAL is not in the table
    if (i[27:26] == 2'b00) begin
      if (!i[25] && i[7] && i[4]) return C_NOP;           // halfword transfer, swap
      if (i[24:23] == 2'b10 && !i[20]) return C_NOP;      // status register moves
      return C_DP;
    end
    return C_NOP;                                         // coprocessor, SWI
  endfunction

  function automatic logic [4:0] popcount16(input logic [15:0] v);
    logic [4:0] n;
    n = '0;
    for (int k = 0; k < 16; k++) n = n + {4'd0, v[k]};
    return n;
  endfunction

  // Register shift by immediate: returns shift type and amount (LSR/ASR #0
  // mean #32, ROR #0 means RRX).
  function automatic void imm_shift(input logic [31:0] i, output logic [3:0] op,
                                    output logic [31:0] amt);
    op  = {2'b00, i[6:5]};
    amt = {27'd0, i[11:7]};
    if (i[11:7] == 5'd0) begin
      if (i[6:5] == 2'b01 || i[6:5] == 2'b10) amt = 32'd32;
      if (i[6:5] == 2'b11) op = S_RRX;
    end
  endfunction

  function automatic logic dp_shifted(input logic [31:0] i);
    return !i[25] && (i[4] || i[11:7] != 5'd0 || i[6:5] != 2'b00);
  endfunction

  function automatic logic sdt_shifted(input logic [31:0] i);
    return i[25] && (i[11:7] != 5'd0 || i[6:5] != 2'b00);
  endfunction

  function automatic logic [CNT_W-1:0] uop_count(input logic [31:0] i);
    unique case (classify(i))
      C_DP:    return dp_shifted(i) ? 6'd2 : 6'd1;
      C_MUL:   return 6'd8;
      C_MULL:  return i[22] ? 6'd22 : 6'd17;
      C_SDT:   return sdt_shifted(i) ? 6'd3 : 6'd2;
      C_BDT:   return {popcount16(i[15:0]), 1'b0} + 6'd3;
      default: return 6'd1;
    endcase
  endfunction

  function automatic logic [2:0] temp_count(input logic [31:0] i);
    unique case (classify(i))
      C_DP:    return dp_shifted(i) ? 3'd1 : 3'd0;
      C_MUL:   return 3'd2;
      C_MULL:  return i[22] ? 3'd6 : 3'd3;
      C_SDT:   return 3'({2'b00, sdt_shifted(i)} + {2'b00, i[24] && !i[21]});
      C_BDT:   return 3'd2;
      default: return 3'd0;
    endcase
  endfunction

  function automatic logic [RA_W-1:0] temp_reg(input logic [TW-1:0] b, input int j);
    int unsigned r;
    r = (int'(b) + j) % NUM_TEMPS;
    return RA_W'(ARM_ARCH + r);
  endfunction

  // Register number of the n-th set bit of a register list.
  function automatic logic [3:0] nth_reg(input logic [15:0] list, input int n);
    int cnt;
    logic [3:0] r;
    cnt = 0;
    r   = '0;
    for (int k = 0; k < 16; k++)
      if (list[k]) begin
        if (cnt == n) r = 4'(k);
        cnt++;
      end
    return r;
  endfunction

  // Internal instruction number idx of instruction i at address pc.
  function automatic uop_t make_uop(input logic [31:0] i, input logic [XLEN-1:0] pc,
                                    input int idx, input logic [TW-1:0] tb);
    uop_t u;
    int   cnt;
    logic [3:0] rn, rd, rs, rm, sop;
    logic [31:0] amt;
    cnt = int'(uop_count(i));
    rn = i[19:16]; rd = i[15:12]; rs = i[11:8]; rm = i[3:0];
    u = '0;
    u.valid    = (idx < cnt);
    u.thread   = THR_ARM;
    u.cond     = i[31:28];
    u.pc       = pc;
    u.wr_en    = 1'b1;
    u.last     = (idx == cnt - 1);
    u.ntemps   = u.last ? temp_count(i) : 3'd0;
    imm_shift(i, sop, amt);
    unique case (classify(i))
      C_DP: begin
        if (dp_shifted(i) && idx == 0) begin
          u.itype = IT_S;
          u.src2  = {2'b00, rm};
          u.dst   = temp_reg(tb, 0);
          if (i[4]) begin
            u.op   = {2'b00, i[6:5]};
            u.src3 = {2'b00, rs};
          end else begin
            u.op      = sop;
            u.use_imm = 1'b1;
            u.imm     = amt;
          end
        end else begin
          u.itype    = IT_E;
          u.op       = i[24:21];
          u.setflags = i[20];
          u.wr_en    = !(i[24:23] == 2'b10);
          u.src1     = {2'b00, rn};
          u.dst      = {2'b00, rd};
          if (i[25]) begin
            u.use_imm = 1'b1;
            u.imm     = ({24'd0, i[7:0]} >> {i[11:8], 1'b0})
                      | ({24'd0, i[7:0]} << (6'd32 - {1'b0, i[11:8], 1'b0}));
          end else if (dp_shifted(i)) begin
            u.src2 = temp_reg(tb, 0);
          end else begin
            u.src2 = {2'b00, rm};
          end
        end
      end

      C_MUL: begin
        // rn is the accumulate register, rd (bits 19:16) the destination.
        if (idx % 2 == 0) begin
          u.itype = IT_M;
          u.op    = {2'b00, 2'(idx / 2)};
          u.src1  = {2'b00, rm};
          u.src2  = {2'b00, rs};
          u.dst   = temp_reg(tb, 0);
        end else begin
          u.itype = IT_m;
          u.op    = MA_ACC;
          if (idx == 1) begin
            if (i[21]) begin
              u.src1 = {2'b00, i[15:12]};
              u.src2 = temp_reg(tb, 0);
            end else begin
              u.src1    = temp_reg(tb, 0);
              u.use_imm = 1'b1;
            end
          end else begin
            u.src1 = temp_reg(tb, 1);
            u.src2 = temp_reg(tb, 0);
          end
          u.dst      = (idx == 7) ? {2'b00, i[19:16]} : temp_reg(tb, 1);
          u.setflags = (idx == 7) && i[20];
        end
      end

      C_MULL: begin
        // t0 = partial product, t1 = low sum, t2 = high sum,
        // t3/t4 = |Rm|/|Rs|, t5 = sign (SMULL only).
        logic sgn, acc;
        logic [RA_W-1:0] ma, mb, rdlo, rdhi;
        int j, k, r;
        sgn  = i[22];
        acc  = i[21] && !sgn;
        rdhi = {2'b00, i[19:16]};
        rdlo = {2'b00, i[15:12]};
        ma   = sgn ? temp_reg(tb, 3) : {2'b00, rm};
        mb   = sgn ? temp_reg(tb, 4) : {2'b00, rs};
        j    = sgn ? idx - 2 : idx;
        k    = j / 4;
        r    = j % 4;
        if (sgn && idx < 2) begin
          u.itype = IT_m;
          u.op    = MA_ABS;
          u.src1  = (idx == 0) ? {2'b00, rm} : {2'b00, rs};
          u.dst   = temp_reg(tb, 3 + idx);
        end else if (j < 16) begin
          if (r == 0 || r == 2) begin
            u.itype = IT_M;
            u.op    = {(r == 0) && (k == 0) && !acc, r == 0, 2'(k)};
            u.src1  = ma;
            u.src2  = mb;
            u.src3  = (k == 0) ? rdlo : temp_reg(tb, 1);
            u.dst   = temp_reg(tb, 0);
          end else begin
            u.itype = IT_m;
            u.op    = MA_ACC;
            if (k == 0) begin
              if (acc) begin
                u.src1 = (r == 1) ? rdhi : rdlo;
                u.src2 = temp_reg(tb, 0);
              end else begin
                u.src1    = temp_reg(tb, 0);
                u.use_imm = 1'b1;
              end
            end else begin
              u.src1 = (r == 1) ? temp_reg(tb, 2) : temp_reg(tb, 1);
              u.src2 = temp_reg(tb, 0);
            end
            if (r == 1)                  u.dst = temp_reg(tb, 2);
            else if (k == 3 && !sgn)     u.dst = rdlo;
            else                         u.dst = temp_reg(tb, 1);
          end
        end else if (!sgn) begin         // idx 16: high word out
          u.itype = IT_m;
          u.op    = MA_MOV;
          u.src1  = temp_reg(tb, 2);
          u.dst   = rdhi;
        end else if (idx == 18) begin    // sign of the product
          u.itype = IT_E;
          u.op    = E_EOR;
          u.src1  = {2'b00, rm};
          u.src2  = {2'b00, rs};
          u.dst   = temp_reg(tb, 5);
        end else if (idx == 19) begin
          u.itype = IT_m;
          u.op    = MA_NEGHI;
          u.src1  = temp_reg(tb, 2);
          u.src2  = temp_reg(tb, 1);
          u.src3  = temp_reg(tb, 5);
          u.dst   = temp_reg(tb, 0);
        end else if (idx == 20) begin
          u.itype = IT_m;
          u.op    = MA_NEGLO;
          u.src1  = temp_reg(tb, 1);
          u.src3  = temp_reg(tb, 5);
          u.dst   = rdlo;
        end else begin
          u.itype = IT_m;
          u.op    = MA_MOV;
          u.src1  = temp_reg(tb, 0);
          u.dst   = rdhi;
        end
      end

      C_SDT: begin
        logic pre, wb_tmp, sh;
        int   pos;
        pre    = i[24];
        wb_tmp = pre && !i[21];          // offset addressing: address into a temporary
        sh     = sdt_shifted(i);
        // Position of this step: S, a, L in the order of the pattern.
        pos    = idx;
        if (!pre) pos = (idx == 0) ? 2 : (sh ? idx - 1 : 1);   // L first
        else if (!sh) pos = idx + 1;                            // no S step
        unique case (pos)
          0: begin
            u.itype   = IT_S;
            u.op      = sop;
            u.src2    = {2'b00, rm};
            u.use_imm = 1'b1;
            u.imm     = amt;
            u.dst     = temp_reg(tb, 0);
          end
          1: begin
            u.itype = IT_A;
            u.op    = i[23] ? A_ADD : A_SUB;
            u.src1  = {2'b00, rn};
            if (!i[25]) begin
              u.use_imm = 1'b1;
              u.imm     = {20'd0, i[11:0]};
            end else begin
              u.src2 = sh ? temp_reg(tb, 0) : {2'b00, rm};
            end
            u.dst = wb_tmp ? temp_reg(tb, sh ? 1 : 0) : {2'b00, rn};
          end
          default: begin
            u.itype   = IT_L;
            u.op      = {2'b00, i[22], !i[20]};
            u.src1    = wb_tmp ? temp_reg(tb, sh ? 1 : 0) : {2'b00, rn};
            u.use_imm = 1'b1;
            u.src3    = {2'b00, rd};
            u.dst     = {2'b00, rd};
            u.wr_en   = i[20];
          end
        endcase
      end

      C_BDT: begin
        logic [4:0]  n;
        logic [31:0] n4;
        n  = popcount16(i[15:0]);
        n4 = {25'd0, n, 2'b00};
        u.itype   = IT_A;
        u.op      = A_ADD;
        u.use_imm = 1'b1;
        if (idx == 0) begin
          u.src1 = {2'b00, rn};
          unique case ({i[24], i[23]})
            2'b01:   u.imm = -32'd4;          // increment after
            2'b11:   u.imm = 32'd0;           // increment before
            2'b00:   u.imm = -n4;             // decrement after
            default: u.imm = -n4 - 32'd4;     // decrement before
          endcase
          u.dst = temp_reg(tb, 0);
        end else if (idx == 1) begin
          u.src1 = {2'b00, rn};
          u.imm  = i[23] ? n4 : -n4;
          u.dst  = temp_reg(tb, 1);
        end else if (idx == cnt - 1) begin
          u.src1 = temp_reg(tb, 1);
          u.dst  = (i[21] && !(i[20] && i[{1'b0, rn}])) ? {2'b00, rn} : temp_reg(tb, 1);
        end else if (idx % 2 == 0) begin
          u.src1 = temp_reg(tb, 0);
          u.imm  = 32'd4;
          u.dst  = temp_reg(tb, 0);
        end else begin
          logic [3:0] r;
          r       = nth_reg(i[15:0], (idx - 3) / 2);
          u.itype = IT_L;
          u.op    = {3'b000, !i[20]};
          u.src1  = temp_reg(tb, 0);
          u.imm   = 32'd0;
          u.src3  = {2'b00, r};
          u.dst   = {2'b00, r};
          u.wr_en = i[20];
        end
      end

      C_BR: begin
        u.itype   = IT_B;
        u.op      = {3'b000, i[24]};
        u.use_imm = 1'b1;
        u.imm     = pc + 32'd8 + {{6{i[23]}}, i[23:0], 2'b00};
        u.dst     = 6'd14;
        u.wr_en   = i[24];
      end

      default: begin                     // not decomposed: no operation
        u.itype = IT_E;
        u.op    = E_MOV;
        u.wr_en = 1'b0;
      end
    endcase
    return u;
  endfunction

  logic             busy_q;
  logic [31:0]      instr_q;
  logic [XLEN-1:0]  pc_q;
  logic [TW-1:0]    tbase_q;
  logic [CNT_W-1:0] step_q;       // index of the first internal instruction of the group
  logic [CNT_W-1:0] count;

  assign in_ready  = !busy_q;
  assign in_ntemps = temp_count(in_instr);
  assign count     = uop_count(instr_q);
  assign out_valid = busy_q;
  assign out_last  = (step_q + CNT_W'(GROUP_W)) >= count;

  always_comb begin
    for (int g = 0; g < GROUP_W; g++) begin
      out_uops[g] = make_uop(instr_q, pc_q, int'(step_q) + g, tbase_q);
      if (!busy_q) out_uops[g].valid = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      busy_q  <= 1'b0;
      step_q  <= '0;
      instr_q <= '0;
      pc_q    <= '0;
      tbase_q <= '0;
    end else if (!busy_q) begin
      if (in_valid) begin
        busy_q  <= 1'b1;
        instr_q <= in_instr;
        pc_q    <= in_pc;
        tbase_q <= in_tbase;
        step_q  <= '0;
      end
    end else if (out_accept) begin
      if (out_last) busy_q <= 1'b0;
      step_q <= step_q + CNT_W'(GROUP_W);
    end
  end
endmodule
