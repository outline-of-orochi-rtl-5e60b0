// orochi_top_tb: end-to-end test of the OROCHI processor.
//
// Runs an ARMv4 program and a VLIW program at the same time on one core with
// every parameter at its default. The ARM program exercises each
// decomposition pattern (ALU with and without shift, register-specified
// shifts, MUL/MLA, UMULL/UMLAL/SMULL, pre/post-indexed loads and stores with
// and without shifted offsets and writeback, byte transfers, LDM/STM in all
// four modes, conditional execution, B/BL, return through r15 and an LDM that
// loads r15). The VLIW program runs a loop with loads, stores, shifts, partial
// products and a conditional branch. The data cache answers with random miss
// latencies.
//
// Reference: two instruction-set simulators written here, one for the ARM
// subset and one for the VLIW operation format, run the same programs on their
// own copy of memory. When both threads reach their final self-branch the
// registers of both thread banks and both data regions are compared.
// Mechanisms counted (each must occur): line stall on a miss, ARM internal
// instructions placed beside VLIW operations, multi-cycle decomposition, two
// translator groups in one cycle, ARM and VLIW branch flushes, condition-failed
// slots, a full queue holding the VLIW front end back.
module orochi_top_tb;
  import orochi_pkg::*;

  localparam int unsigned MEMW   = 8192;           // data memory words (32 KiB)
  localparam int unsigned AWORDS = 256;            // ARM program words
  localparam int unsigned VPKTS  = 32;             // VLIW program packets
  localparam logic [31:0] ARM_DATA  = 32'h1000;
  localparam logic [31:0] VLIW_DATA = 32'h3000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic arm_run = 1'b0, vliw_run = 1'b0;
  logic [31:0] arm_imem_addr, vliw_imem_addr;
  logic [1:0][31:0] arm_imem_data;
  logic [VLIW_OPS-1:0][31:0] vliw_imem_data;
  dmem_req_t [NUM_MEM-1:0] dmem_req;
  logic [NUM_MEM-1:0] dmem_ready;
  logic [NUM_MEM-1:0][31:0] dmem_rdata;
  logic stall, vliw_overflow, arm_retire;

  int checks = 0, failures = 0;

  orochi_top dut (.*);

  always #5 clk = !clk;

  // ---------------- memories ----------------
  logic [31:0] aimem [AWORDS];
  logic [VLIW_OPS-1:0][31:0] vimem [VPKTS];
  logic [31:0] dmem  [MEMW];
  logic [31:0] dmem0 [MEMW];   // initial image

  assign arm_imem_data[0] = (arm_imem_addr[31:2] < AWORDS) ? aimem[arm_imem_addr[31:2]] : 32'h0;
  assign arm_imem_data[1] = (arm_imem_addr[31:2] + 1 < AWORDS) ? aimem[arm_imem_addr[31:2] + 1] : 32'h0;
  assign vliw_imem_data = (vliw_imem_addr[31:5] < VPKTS) ? vimem[vliw_imem_addr[31:5]] : '0;

  // Data cache model: each access waits a random number of cycles (a miss)
  // one time in three.
  logic [NUM_MEM-1:0] pend;
  int lat [NUM_MEM];
  int nextlat [NUM_MEM];
  for (genvar p = 0; p < NUM_MEM; p++) begin : g_dc
    assign dmem_ready[p] = dmem_req[p].req && (pend[p] ? lat[p] == 0 : nextlat[p] == 0);
    assign dmem_rdata[p] = dmem[dmem_req[p].addr[14:2]];
    always_ff @(posedge clk) begin
      if (rst) begin
        pend[p]    <= 1'b0;
        lat[p]     <= 0;
        nextlat[p] <= 2;
      end else if (dmem_req[p].commit) begin
        pend[p]    <= 1'b0;
        nextlat[p] <= ($urandom % 3 == 0) ? 1 + int'($urandom % 4) : 0;
        for (int b = 0; b < 4; b++)
          if (dmem_req[p].we && dmem_req[p].be[b])
            dmem[dmem_req[p].addr[14:2]][8*b +: 8] <= dmem_req[p].wdata[8*b +: 8];
      end else if (dmem_req[p].req) begin
        pend[p] <= 1'b1;
        lat[p]  <= pend[p] ? ((lat[p] > 0) ? lat[p] - 1 : 0) : nextlat[p] - 1;
      end
    end
  end

  // ---------------- ARM assembler ----------------
  localparam logic [3:0] EQ = 0, NE = 1, CS = 2, CC = 3, MI = 4, GE = 10, LT = 11, GT = 12, AL = 14;
  localparam logic [3:0] AND = 0, EOR = 1, SUB = 2, RSB = 3, ADD = 4, ADC = 5, SBC = 6, RSC = 7,
                         TST = 8, TEQ = 9, CMP = 10, CMN = 11, ORR = 12, MOV = 13, BIC = 14, MVN = 15;
  localparam logic [1:0] LSL = 0, LSR = 1, ASR = 2, ROR = 3;

  int apc;   // assembly address
  function automatic void emit(input logic [31:0] w);
    aimem[apc >> 2] = w;
    apc += 4;
  endfunction
  function automatic logic [31:0] dpi(logic [3:0] c, logic [3:0] op, logic s, logic [3:0] rn,
                                      logic [3:0] rd, logic [3:0] rot, logic [7:0] imm);
    return {c, 3'b001, op, s, rn, rd, rot, imm};
  endfunction
  function automatic logic [31:0] dpr(logic [3:0] c, logic [3:0] op, logic s, logic [3:0] rn,
                                      logic [3:0] rd, logic [3:0] rm, logic [1:0] sh, logic [4:0] amt);
    return {c, 3'b000, op, s, rn, rd, amt, sh, 1'b0, rm};
  endfunction
  function automatic logic [31:0] dprr(logic [3:0] c, logic [3:0] op, logic s, logic [3:0] rn,
                                       logic [3:0] rd, logic [3:0] rm, logic [1:0] sh, logic [3:0] rs);
    return {c, 3'b000, op, s, rn, rd, rs, 1'b0, sh, 1'b1, rm};
  endfunction
  function automatic logic [31:0] mul(logic [3:0] c, logic a, logic s, logic [3:0] rd,
                                      logic [3:0] rn, logic [3:0] rs, logic [3:0] rm);
    return {c, 6'b000000, a, s, rd, rn, rs, 4'b1001, rm};
  endfunction
  function automatic logic [31:0] mull(logic [3:0] c, logic sg, logic a, logic [3:0] hi,
                                       logic [3:0] lo, logic [3:0] rs, logic [3:0] rm);
    return {c, 5'b00001, sg, a, 1'b0, hi, lo, rs, 4'b1001, rm};
  endfunction
  function automatic logic [31:0] sdti(logic [3:0] c, logic p, logic u, logic b, logic w, logic l,
                                       logic [3:0] rn, logic [3:0] rd, logic [11:0] off);
    return {c, 3'b010, p, u, b, w, l, rn, rd, off};
  endfunction
  function automatic logic [31:0] sdtr(logic [3:0] c, logic p, logic u, logic b, logic w, logic l,
                                       logic [3:0] rn, logic [3:0] rd, logic [3:0] rm,
                                       logic [1:0] sh, logic [4:0] amt);
    return {c, 3'b011, p, u, b, w, l, rn, rd, amt, sh, 1'b0, rm};
  endfunction
  function automatic logic [31:0] bdt(logic [3:0] c, logic p, logic u, logic w, logic l,
                                      logic [3:0] rn, logic [15:0] list);
    return {c, 3'b100, p, u, 1'b0, w, l, rn, list};
  endfunction
  function automatic logic [31:0] br(logic [3:0] c, logic l, int target);
    int off;
    off = (target - (apc + 8)) / 4;
    return {c, 3'b101, l, 24'(off)};
  endfunction

  // ---------------- VLIW assembler ----------------
  function automatic logic [31:0] vop(itype_e t, logic [3:0] op, logic [3:0] c, logic sf,
                                      logic [5:0] dst, logic [5:0] s1, logic im, logic [5:0] s2);
    return {1'b1, t, op, c, sf, dst, s1, im, s2};
  endfunction
  localparam logic [31:0] VNOP = 32'h0;

  // ---------------- ARM reference simulator ----------------
  logic [31:0] ar [16];
  logic        an, az, ac, av;
  logic [31:0] apc_ref;
  logic [31:0] amem [MEMW];

  function automatic logic acond(logic [3:0] c);
    case (c)
      0: return az;            1: return !az;
      2: return ac;            3: return !ac;
      4: return an;            5: return !an;
      6: return av;            7: return !av;
      8: return ac && !az;     9: return !ac || az;
      10: return an == av;     11: return an != av;
      12: return !az && an == av; 13: return az || an != av;
      14: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction
  function automatic logic [31:0] rd_reg(int n);
    return (n == 15) ? apc_ref + 8 : ar[n];
  endfunction
  function automatic logic [31:0] ashift(logic [31:0] v, logic [1:0] sh, int amt, logic is_imm);
    if (is_imm) begin
      if (amt == 0) begin
        if (sh == LSL) return v;
        if (sh == ROR) return {ac, v[31:1]};
        amt = 32;
      end
    end
    case (sh)
      LSL: return (amt >= 32) ? 0 : v << amt;
      LSR: return (amt >= 32) ? 0 : v >> amt;
      ASR: return (amt >= 32) ? {32{v[31]}} : 32'($signed(v) >>> amt);
      default: begin
        amt = amt % 32;
        return (amt == 0) ? v : ((v >> amt) | (v << (32 - amt)));
      end
    endcase
  endfunction
  function automatic logic [31:0] aload(logic [31:0] a, logic b);
    logic [31:0] w;
    w = amem[a[14:2]];
    return b ? {24'd0, w[8*a[1:0] +: 8]} : w;
  endfunction
  function automatic void astore(logic [31:0] a, logic b, logic [31:0] d);
    if (b) amem[a[14:2]][8*a[1:0] +: 8] = d[7:0];
    else   amem[a[14:2]] = d;
  endfunction
  function automatic void arm_step();
    logic [31:0] i, op2, a, res, addr, off, npc, base;
    logic [32:0] s;
    logic [63:0] p;
    int n, k;
    logic arith;
    i   = aimem[apc_ref >> 2];
    npc = apc_ref + 4;
    if (acond(i[31:28])) begin
      if (i[27:25] == 3'b101) begin
        if (i[24]) ar[14] = apc_ref + 4;
        npc = apc_ref + 8 + {{6{i[23]}}, i[23:0], 2'b00};
      end else if (i[27:25] == 3'b100) begin
        n = $countones(i[15:0]);
        base = ar[i[19:16]];
        case ({i[24], i[23]})
          2'b01: addr = base;
          2'b11: addr = base + 4;
          2'b00: addr = base - 4 * n + 4;
          default: addr = base - 4 * n;
        endcase
        for (k = 0; k < 16; k++)
          if (i[k]) begin
            if (i[20]) begin
              if (k == 15) npc = aload(addr, 0) & ~32'd3;
              else ar[k] = aload(addr, 0);
            end else astore(addr, 0, rd_reg(k));
            addr += 4;
          end
        if (i[21] && !(i[20] && i[i[19:16]]))
          ar[i[19:16]] = i[23] ? base + 4 * n : base - 4 * n;
      end else if (i[27:26] == 2'b01) begin
        off  = i[25] ? ashift(ar[i[3:0]], i[6:5], int'(i[11:7]), 1'b1) : {20'd0, i[11:0]};
        base = rd_reg(int'(i[19:16]));
        addr = i[23] ? base + off : base - off;
        a    = i[24] ? addr : base;
        if (i[20]) begin
          res = aload(a, i[22]);
          if (!i[24] || i[21]) ar[i[19:16]] = addr;
          if (i[15:12] == 15) npc = res & ~32'd3; else ar[i[15:12]] = res;
        end else begin
          astore(a, i[22], rd_reg(int'(i[15:12])));
          if (!i[24] || i[21]) ar[i[19:16]] = addr;
        end
      end else if (i[27:22] == 0 && i[7:4] == 4'b1001) begin
        res = ar[i[3:0]] * ar[i[11:8]] + (i[21] ? ar[i[15:12]] : 0);
        ar[i[19:16]] = res;
        if (i[20]) begin an = res[31]; az = res == 0; end
      end else if (i[27:23] == 5'b00001 && i[7:4] == 4'b1001) begin
        if (i[22]) p = 64'($signed({{32{ar[i[3:0]][31]}}, ar[i[3:0]]}) * $signed({{32{ar[i[11:8]][31]}}, ar[i[11:8]]}));
        else       p = {32'd0, ar[i[3:0]]} * {32'd0, ar[i[11:8]]};
        if (i[21] && !i[22]) p = p + {ar[i[19:16]], ar[i[15:12]]};
        ar[i[15:12]] = p[31:0];
        ar[i[19:16]] = p[63:32];
      end else if (i[27:26] == 2'b00) begin
        if (i[25]) op2 = ({24'd0, i[7:0]} >> (2 * i[11:8])) | ({24'd0, i[7:0]} << (32 - 2 * i[11:8]));
        else if (i[4]) op2 = ashift(rd_reg(int'(i[3:0])), i[6:5], int'(ar[i[11:8]][7:0]), 1'b0);
        else op2 = ashift(rd_reg(int'(i[3:0])), i[6:5], int'(i[11:7]), 1'b1);
        if (i[25] && i[11:8] == 0) op2 = {24'd0, i[7:0]};
        a = rd_reg(int'(i[19:16]));
        arith = 1'b1;
        s = '0;
        case (i[24:21])
          AND, TST: begin res = a & op2; arith = 0; end
          EOR, TEQ: begin res = a ^ op2; arith = 0; end
          ORR: begin res = a | op2; arith = 0; end
          MOV: begin res = op2; arith = 0; end
          BIC: begin res = a & ~op2; arith = 0; end
          MVN: begin res = ~op2; arith = 0; end
          SUB, CMP: s = {1'b0, a} - {1'b0, op2};
          RSB: s = {1'b0, op2} - {1'b0, a};
          ADD, CMN: s = {1'b0, a} + {1'b0, op2};
          ADC: s = {1'b0, a} + {1'b0, op2} + ac;
          SBC: s = {1'b0, a} - {1'b0, op2} - !ac;
          default: s = {1'b0, op2} - {1'b0, a} - !ac;
        endcase
        if (arith) begin
          res = s[31:0];
          if (i[20]) begin
            case (i[24:21])
              ADD, CMN, ADC: begin
                ac = s[32];
                av = (a[31] == op2[31]) && (res[31] != a[31]);
              end
              RSB, RSC: begin
                ac = !s[32];
                av = (a[31] != op2[31]) && (res[31] != op2[31]);
              end
              default: begin
                ac = !s[32];
                av = (a[31] != op2[31]) && (res[31] != a[31]);
              end
            endcase
          end
        end
        if (i[20]) begin an = res[31]; az = (res == 0); end
        if (i[24:23] != 2'b10) begin
          if (i[15:12] == 15) npc = res & ~32'd3; else ar[i[15:12]] = res;
        end
      end
    end
    apc_ref = npc;
  endfunction

  // ---------------- VLIW reference simulator ----------------
  logic [31:0] vr [64];
  flags_t      vf;
  logic [31:0] vpc_ref;
  logic [31:0] vmem [MEMW];

  function automatic logic vcond(logic [3:0] c, flags_t f);
    case (c)
      0: return f.z;   1: return !f.z;   2: return f.c;   3: return !f.c;
      4: return f.n;   5: return !f.n;   10: return f.n == f.v;  11: return f.n != f.v;
      12: return !f.z && f.n == f.v;      13: return f.z || f.n != f.v;
      14: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction
  function automatic void vliw_step();
    logic [31:0] nr [64];
    flags_t nf;
    logic [31:0] npc, w, a, b, c, res, simm, ea;
    logic [32:0] s;
    logic [63:0] p;
    logic wr;
    nr  = vr;
    nf  = vf;
    npc = vpc_ref + 32;
    for (int o = 0; o < VLIW_OPS; o++) begin
      w = vimem[vpc_ref >> 5][o];
      if (w[31] && vcond(w[23:20], vf)) begin
        simm = {{26{w[5]}}, w[5:0]};
        a    = vr[w[12:7]];
        b    = w[6] ? simm : vr[w[5:0]];
        c    = vr[w[18:13]];
        wr   = 1'b1;
        res  = '0;
        case (w[30:28])
          3'd0: begin   // E
            s = '0;
            case (w[27:24])
              AND: res = a & b;  EOR: res = a ^ b;  ORR: res = a | b;  MOV: res = b;
              BIC: res = a & ~b; MVN: res = ~b;
              ADD: begin s = {1'b0, a} + {1'b0, b}; res = s[31:0]; end
              SUB, CMP: begin s = {1'b0, a} - {1'b0, b}; res = s[31:0]; end
              default: $fatal(1, "op not used by the test");
            endcase
            if (w[27:24] == CMP) wr = 1'b0;
            if (w[19]) begin
              nf.n = res[31]; nf.z = res == 0;
              if (w[27:24] == ADD) begin nf.c = s[32]; nf.v = (a[31] == b[31]) && (res[31] != a[31]); end
              if (w[27:24] == SUB || w[27:24] == CMP) begin nf.c = !s[32]; nf.v = (a[31] != b[31]) && (res[31] != a[31]); end
            end
          end
          3'd1: res = ashift(a, w[25:24], w[6] ? int'(w[5:0]) : int'(vr[w[5:0]][7:0]), 1'b0);
          3'd2: begin   // M
            p = {32'd0, a} * {56'd0, vr[w[5:0]][8*w[25:24] +: 8]};
            p = p << (8 * w[25:24]);
            if (w[26]) res = p[63:32] + ((w[27] == 0 && ({1'b0, c} + {1'b0, p[31:0]}) > 33'hFFFFFFFF) ? 1 : 0);
            else res = p[31:0];
          end
          3'd3: res = (w[27:24] == 1) ? (a[31] ? -a : a) : a + b;   // m: ABS or ACC
          3'd4: res = (w[27:24] == 1) ? a - b : a + b;               // a
          3'd5: begin   // L
            ea = a + simm;
            if (w[24]) begin
              wr = 1'b0;
              vmem[ea[14:2]] = c;
            end else res = vmem[ea[14:2]];
          end
          3'd6: begin   // B
            npc = w[6] ? vpc_ref + {simm[26:0], 5'd0} : a;
            wr  = w[24];
            res = vpc_ref + 32;
          end
          default: res = vcond(w[27:24], vf) ? a : b;   // s
        endcase
        if (wr) nr[w[18:13]] = res;
      end
    end
    vr = nr;
    vf = nf;
    vpc_ref = npc;
  endfunction

  // ---------------- programs ----------------
  int arm_end, vliw_end;
  task automatic build_arm();
    int loop, func;
    for (int k = 0; k < AWORDS; k++) aimem[k] = 32'h0;
    apc = 0;
    emit(dpi(AL, MOV, 0, 0, 0, 0, 0));                 // r0 = 0
    emit(dpi(AL, MOV, 0, 0, 1, 0, 10));                // r1 = 10
    emit(dpi(AL, MOV, 0, 0, 2, 10, 8'h01));            // r2 = 0x1000 (1 ror 20)
    emit(dpi(AL, MOV, 0, 0, 13, 10, 8'h02));           // sp = 0x2000
    emit(dpi(AL, MVN, 0, 0, 8, 0, 8'h39));             // r8 = ~0x39
    loop = apc;
    emit(dpr(AL, ADD, 0, 0, 0, 1, LSL, 2));            // r0 += r1 << 2
    emit(dpi(AL, SUB, 1, 1, 1, 0, 1));                 // SUBS r1, r1, #1
    emit(sdti(AL, 0, 1, 0, 0, 0, 2, 0, 12'd4));        // STR r0, [r2], #4
    emit(br(NE, 0, loop));                             // BNE loop
    emit(mul(AL, 1, 1, 3, 2, 0, 0));                   // MLAS r3 = r0*r0 + r2
    emit(mul(AL, 0, 0, 9, 0, 8, 3));                   // MUL r9 = r3*r8
    emit(mull(AL, 0, 0, 5, 4, 3, 0));                  // UMULL r4,r5 = r0*r3
    emit(mull(AL, 0, 1, 5, 4, 3, 3));                  // UMLAL r4,r5 += r3*r3
    emit(mull(AL, 1, 0, 7, 6, 8, 3));                  // SMULL r6,r7 = r3*r8
    emit(mull(AL, 1, 0, 11, 10, 8, 8));                // SMULL r10,r11 = r8*r8
    emit(sdti(AL, 1, 0, 0, 1, 1, 2, 12, 12'd8));       // LDR r12, [r2, #-8]!
    emit(dpi(AL, MOV, 0, 0, 1, 0, 4));                 // r1 = 4
    emit(sdtr(AL, 1, 1, 0, 0, 1, 2, 10, 1, LSL, 2));   // LDR r10, [r2, r1, LSL #2]
    emit(sdtr(AL, 0, 0, 0, 0, 1, 2, 11, 1, LSL, 1));   // LDR r11, [r2], -r1, LSL #1
    emit(sdtr(AL, 1, 1, 0, 1, 0, 2, 9, 1, LSL, 1));    // STR r9, [r2, r1, LSL #1]!
    emit(sdtr(AL, 0, 1, 1, 0, 0, 2, 6, 1, LSL, 0));    // STRB r6, [r2], r1
    emit(sdti(AL, 1, 1, 1, 0, 1, 2, 12, 12'd5));       // LDRB r12, [r2, #5]
    emit(sdti(AL, 1, 1, 0, 0, 1, 2, 14, 12'd0));       // LDR r14, [r2]
    emit(dprr(AL, ADD, 1, 12, 12, 0, ROR, 1));         // ADDS r12, r12, r0 ROR r1
    emit(dpr(AL, ADC, 0, 12, 12, 0, ROR, 0));          // ADC r12, r12, r0 RRX
    emit(dpr(AL, CMP, 1, 1, 0, 1, LSL, 0));            // CMP r1, r1
    emit(dpi(NE, MOV, 0, 0, 0, 0, 8'h55));             // MOVNE r0 (skipped)
    emit(dpr(EQ, RSB, 0, 0, 0, 3, LSR, 3));            // RSBEQ r0, r0, r3 LSR #3
    emit(dpr(AL, SBC, 1, 0, 5, 6, ASR, 0));            // SBCS r5, r0, r6 ASR #32
    emit(dpr(GT, EOR, 0, 5, 5, 7, LSL, 7));            // EORGT
    emit(dpr(LT, BIC, 0, 5, 5, 7, LSR, 9));            // BICLT
    emit(bdt(AL, 1, 0, 1, 0, 13, 16'h40ff));           // STMDB sp!, {r0-r7, lr}
    emit(bdt(AL, 0, 1, 0, 0, 2, 16'h0e00));            // STMIA r2, {r9-r11}
    emit(bdt(AL, 1, 1, 1, 0, 2, 16'h0007));            // STMIB r2!, {r0-r2}
    emit(bdt(AL, 0, 0, 1, 1, 2, 16'h00f0));            // LDMDA r2!, {r4-r7}
    func = 4 * 60;
    emit(br(AL, 1, func));                             // BL func
    emit(dpr(AL, ORR, 0, 0, 9, 0, LSL, 0));            // r9 |= r0 after return
    emit(bdt(AL, 0, 1, 1, 1, 13, 16'h00ff));           // LDMIA sp!, {r0-r7}
    emit(dpi(AL, MOV, 0, 0, 14, 0, 8'd0));
    emit(bdt(AL, 1, 0, 1, 0, 13, 16'h0001));           // STMDB sp!, {r0}  (push)
    emit(sdti(AL, 1, 0, 0, 1, 0, 13, 1, 12'd4));       // STR r1, [sp, #-4]!
    emit(dpi(AL, ADD, 0, 15, 3, 0, 8'd0));             // r3 = pc + 8 (reads r15)
    emit(dpi(AL, MOV, 0, 0, 1, 0, 8'd0));              // (landing)
    arm_end = apc;
    emit(br(AL, 0, arm_end));                          // end: B end
    // func: stores r0 at the stack, then returns through an LDM that loads pc.
    apc = func;
    emit(dpi(AL, MOV, 0, 0, 0, 0, 8'd77));             // r0 = 77
    emit(bdt(AL, 1, 0, 1, 0, 13, 16'h4002));           // STMDB sp!, {r1, lr}
    emit(dpi(AL, ADD, 0, 1, 1, 0, 8'd1));              // r1 += 1
    emit(bdt(AL, 0, 1, 1, 1, 13, 16'h8002));           // LDMIA sp!, {r1, pc}
    emit(dpi(AL, MOV, 0, 0, 0, 0, 8'd99));             // never executed
  endtask

  task automatic build_vliw();
    for (int k = 0; k < VPKTS; k++) vimem[k] = '0;
    // packet 0: constants
    vimem[0] = {VNOP, VNOP, VNOP, VNOP,
                vop(IT_E, MOV, AL, 0, 6'd9, 0, 1, 6'd3),      // r9 = 3
                vop(IT_E, MOV, AL, 0, 6'd1, 0, 1, 6'd12),     // r1 = 12 (loop count)
                vop(IT_E, MOV, AL, 0, 6'd3, 0, 1, 6'd0),      // r3 = 0
                vop(IT_E, MVN, AL, 0, 6'd5, 0, 1, 6'd6)};     // r5 = ~6
    // packet 1: r10 = 3 << 12 = 0x3000, r11 = r10-ish, r20 = 1000 ...
    vimem[1] = {VNOP, VNOP, VNOP, VNOP, VNOP,
                vop(IT_S, 4'(LSL), AL, 0, 6'd10, 6'd9, 1, 6'd12),
                vop(IT_S, 4'(LSL), AL, 0, 6'd20, 6'd9, 1, 6'd9),
                vop(IT_E, ADD, AL, 0, 6'd6, 6'd5, 1, 6'd31)};
    // packet 2 (loop): load, accumulate, partial products, count down.
    vimem[2] = {vop(IT_L, 4'd0, AL, 0, 6'd4, 6'd10, 1, 6'd0),   // r4 = [r10]
                vop(IT_E, ADD, AL, 0, 6'd3, 6'd3, 0, 6'd1),     // r3 += r1
                vop(IT_E, SUB, AL, 1, 6'd1, 6'd1, 1, 6'd1),     // SUBS r1, r1, 1
                vop(IT_M, 4'd1, AL, 0, 6'd7, 6'd20, 0, 6'd4),   // r7 = r20 * r4.byte1 << 8
                vop(IT_M, 4'd6, AL, 0, 6'd8, 6'd20, 0, 6'd4),   // r8 = upper, byte2, carry from r8
                vop(IT_m, 4'd0, AL, 0, 6'd12, 6'd12, 0, 6'd7),  // r12 += r7
                vop(IT_S, 4'(ROR), AL, 0, 6'd13, 6'd4, 0, 6'd1),// r13 = r4 ror r1
                vop(IT_A, 4'd0, AL, 0, 6'd10, 6'd10, 1, 6'd4)}; // r10 += 4
    // packet 3: store and conditional loop back.
    vimem[3] = {VNOP, VNOP, VNOP, VNOP,
                vop(IT_L, 4'd1, AL, 0, 6'd3, 6'd10, 1, 6'd60),  // [r10 - 4] = r3
                vop(IT_s, 4'(GT), AL, 0, 6'd14, 6'd13, 0, 6'd12),
                vop(IT_m, 4'd1, AL, 0, 6'd15, 6'd6, 0, 6'd0),   // r15 = |r6|
                vop(IT_B, 4'd0, NE, 0, 6'd0, 6'd0, 1, 6'h3f)};  // BNE packet 2
    // packet 4: link branch to packet 6
    vimem[4] = {VNOP, VNOP, VNOP, VNOP, VNOP, VNOP,
                vop(IT_E, ADD, AL, 0, 6'd16, 6'd3, 0, 6'd12),
                vop(IT_B, 4'd1, AL, 0, 6'd17, 6'd0, 1, 6'd2)};  // BL +2 packets
    vimem[5] = {VNOP, VNOP, VNOP, VNOP, VNOP, VNOP, VNOP,
                vop(IT_E, MOV, AL, 0, 6'd18, 0, 1, 6'd21)};     // skipped
    vimem[6] = {VNOP, VNOP, VNOP, VNOP, VNOP, VNOP,
                vop(IT_L, 4'd1, AL, 0, 6'd16, 6'd10, 1, 6'd0),  // [r10] = r16
                vop(IT_E, EOR, AL, 0, 6'd19, 6'd16, 0, 6'd17)};
    vliw_end = 7 * 32;
    vimem[7] = {VNOP, VNOP, VNOP, VNOP, VNOP, VNOP, VNOP,
                vop(IT_B, 4'd0, AL, 0, 6'd0, 6'd0, 1, 6'd0)};   // end: B .
  endtask

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_shared = 0, n_multicycle = 0, n_dualgrp = 0, n_arm_flush = 0,
      n_vliw_flush = 0, n_condfail = 0, n_qfull = 0, n_cycles = 0;
  always_ff @(posedge clk) if (!rst) begin
    n_cycles <= n_cycles + 1;
    if (stall) n_stall <= n_stall + 1;
    if (dut.arm_shared != 0) n_shared <= n_shared + int'(dut.arm_shared);
    for (int t = 0; t < 2; t++)
      if (dut.tr_out_accept[t] && !dut.tr_out_last[t]) n_multicycle <= n_multicycle + 1;
    if (dut.grp_accept == 2'b11) n_dualgrp <= n_dualgrp + 1;
    if (dut.flush_thr[THR_ARM]) n_arm_flush <= n_arm_flush + 1;
    if (dut.flush_thr[THR_VLIW]) n_vliw_flush <= n_vliw_flush + 1;
    if (dut.issue)
      for (int s = 0; s < NUM_SLOTS; s++)
        if (dut.head[s].valid && !dut.slot_en[s]) n_condfail <= n_condfail + 1;
    if (dut.vf_valid && !dut.vf_ready) n_qfull <= n_qfull + 1;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  task automatic mech(input string what, input int n);
    checks++;
    $display("  %-40s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic arm_done, vliw_done;
  always_ff @(posedge clk) begin
    if (rst) begin
      arm_done  <= 1'b0;
      vliw_done <= 1'b0;
    end else begin
      if (dut.redirect_arm && dut.arm_target == arm_end) arm_done <= 1'b1;
      if (dut.redirect_vliw && dut.vliw_target == vliw_end) vliw_done <= 1'b1;
    end
  end

  initial begin
    int steps;
    build_arm();
    build_vliw();
    for (int k = 0; k < MEMW; k++) dmem0[k] = 32'h9e3779b9 * (k + 1);
    dmem = dmem0;
    amem = dmem0;
    vmem = dmem0;
    // Reference runs.
    for (int k = 0; k < 16; k++) ar[k] = 0;
    {an, az, ac, av} = 4'b0;
    apc_ref = 0;
    steps = 0;
    while (apc_ref != arm_end && steps < 5000) begin arm_step(); steps++; end
    for (int k = 0; k < 64; k++) vr[k] = 0;
    vf = '0;
    vpc_ref = 0;
    steps = 0;
    while (vpc_ref != vliw_end && steps < 5000) begin vliw_step(); steps++; end

    repeat (3) @(posedge clk);
    rst = 1'b0;
    arm_run = 1'b1;
    vliw_run = 1'b1;
    wait (arm_done && vliw_done);
    repeat (20) @(posedge clk);
    $display("finished after %0d cycles", n_cycles);

    for (int k = 0; k < 15; k++)
      check($sformatf("ARM r%0d", k), dut.u_rf.regs[THR_ARM][k], ar[k]);
    check("ARM flags", {28'd0, dut.u_issue.flags_q[THR_ARM]}, {28'd0, an, az, ac, av});
    for (int k = 0; k < 64; k++)
      check($sformatf("VLIW r%0d", k), dut.u_rf.regs[THR_VLIW][k], vr[k]);
    for (int k = 0; k < MEMW; k++) begin
      if (k < VLIW_DATA / 4) begin
        if (dmem[k] !== amem[k]) check($sformatf("ARM mem[%0h]", 4 * k), dmem[k], amem[k]);
      end else begin
        if (dmem[k] !== vmem[k]) check($sformatf("VLIW mem[%0h]", 4 * k), dmem[k], vmem[k]);
      end
    end
    checks++;   // the memory image as a whole
    $display("mechanisms:");
    mech("line stalls on a data cache miss", n_stall);
    mech("ARM ops placed beside VLIW ops", n_shared);
    mech("multi-cycle decomposition groups", n_multicycle);
    mech("two translator groups in one cycle", n_dualgrp);
    mech("ARM branch flushes", n_arm_flush);
    mech("VLIW branch flushes", n_vliw_flush);
    mech("condition-failed slots", n_condfail);
    mech("VLIW front end held by a full queue", n_qfull);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
