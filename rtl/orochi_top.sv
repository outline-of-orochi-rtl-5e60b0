// orochi_top: the OROCHI processor, a VLIW core that also runs an ARMv4
// thread in the empty slots of its VLIW lines (two-instruction-set SMT).
//
// Front ends. The VLIW thread: fetch_unit fetches a packet of eight operations,
// vliw_decoder places each in a slot of a new queue line. The ARM thread:
// fetch_unit fetches two consecutive instructions per cycle and hands them to
// the two arm_translator instances (one each when both are free, else one to
// the free translator whose turn it is); each decomposes its instruction into
// single-cycle internal instructions, up to four per cycle, with scratch
// registers from temp_free_list. The translators' groups leave in program
// order (the older one first; the younger one in the same cycle when the older
// finishes), so two short ARM instructions can enter the queue per cycle.
//
// Back end. inst_queue holds DEPTH lines of ten slots (4 integer, 4 media,
// 2 branch) and inserts ARM internal instructions into free slots, each in a
// line after the previous one. issue_unit issues the head line whole, or
// stalls it on a data cache miss. The ten slots read register_file (one bank
// per thread), execute in int_alu / media_alu / branch_unit in the same cycle
// and write back at the clock edge, so a line takes one cycle to issue and
// execute. Slots 0 and 1 reach the data cache through dmem_*.
//
// Memories are outside: arm_imem_* and vliw_imem_* return the addressed word
// or packet in the same cycle; each data port holds dmem_req[p].req while the
// head line waits on it, the cache answers dmem_ready[p] (with dmem_rdata[p]
// for loads) when the access can complete, and the access is performed in the
// cycle dmem_req[p].commit is high. The status outputs report a stalled line,
// a VLIW packet that did not fit a line, and the retirement of ARM
// instructions.
module orochi_top
  import orochi_pkg::*;
#(
  parameter int unsigned DEPTH     = 6,
  parameter logic [31:0] ARM_PC0   = 32'h0,
  parameter logic [31:0] VLIW_PC0  = 32'h0
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic                            arm_run,
  input  logic                            vliw_run,
  output logic [31:0]                     arm_imem_addr,
  input  logic [1:0][31:0]                arm_imem_data,  // words at addr, addr+4
  output logic [31:0]                     vliw_imem_addr,
  input  logic [VLIW_OPS-1:0][31:0]       vliw_imem_data,
  output dmem_req_t [NUM_MEM-1:0]         dmem_req,
  input  logic [NUM_MEM-1:0]              dmem_ready,
  input  logic [NUM_MEM-1:0][XLEN-1:0]    dmem_rdata,
  output logic                            stall,
  output logic                            vliw_overflow,
  output logic                            arm_retire
);
  localparam int unsigned TW = $clog2(NUM_TEMPS);

  // ---------------- issue / retire control signals ----------------
  logic                 issue;
  logic [NUM_SLOTS-1:0] slot_en;
  flags_t [1:0]         flags;
  logic                 redirect_vliw, redirect_arm;
  logic [XLEN-1:0]      vliw_target, arm_target;
  logic [1:0]           flush_thr;
  logic [2:0]           release_n;

  // ---------------- VLIW front end ----------------
  logic                       vf_valid, vf_ready;
  logic [VLIW_OPS*32-1:0]     vf_data;
  logic [31:0]                vf_pc;
  uop_t                       vline [NUM_SLOTS];

  fetch_unit #(.WIDTH(VLIW_OPS * 32), .STEP(32), .RESET_PC(VLIW_PC0)) u_vliw_fetch (
    .clk, .rst, .run(vliw_run), .redirect(redirect_vliw), .redirect_pc(vliw_target),
    .imem_addr(vliw_imem_addr), .imem_data(vliw_imem_data),
    .out_valid(vf_valid), .out_data(vf_data), .out_pc(vf_pc),
    .out_take({1'b0, vf_valid && vf_ready}));

  vliw_decoder u_vliw_dec (.packet(vf_data), .pc(vf_pc), .line(vline), .overflow(vliw_overflow));

  // ---------------- ARM front end ----------------
  logic         af_valid;
  logic [63:0]  af_data;
  logic [31:0]  af_pc;
  logic         disp_q, turn_q;          // translator for the next instruction / next to emit
  logic [1:0]   tr_in_ready, tr_in_valid, tr_out_valid, tr_out_last, tr_out_accept;
  logic [2:0]   tr_ntemps [2];
  logic [31:0]  tr_instr [2];
  logic [31:0]  tr_pc [2];
  logic [TW-1:0] tr_tbase [2];
  uop_t         tr_uops [2][GROUP_W];
  logic         fl_can_alloc;
  logic [TW-1:0] fl_base;
  logic [$clog2(NUM_TEMPS+1)-1:0] fl_free;
  logic [2:0]   n_first, n_second;
  logic         take0, take1;
  logic [3:0]   alloc_n;

  fetch_unit #(.WIDTH(64), .STEP(4), .RESET_PC(ARM_PC0)) u_arm_fetch (
    .clk, .rst, .run(arm_run), .redirect(redirect_arm), .redirect_pc(arm_target),
    .imem_addr(arm_imem_addr), .imem_data(arm_imem_data),
    .out_valid(af_valid), .out_data(af_data), .out_pc(af_pc),
    .out_take({take1, take0 && !take1}));

  // The older fetched instruction goes to translator disp_q, the younger to
  // the other one; the younger is taken only together with the older.
  always_comb begin
    for (int t = 0; t < 2; t++) begin
      tr_instr[t] = (t[0] == disp_q) ? af_data[31:0] : af_data[63:32];
      tr_pc[t]    = (t[0] == disp_q) ? af_pc : af_pc + 32'd4;
    end
    n_first  = tr_ntemps[disp_q];
    n_second = tr_ntemps[!disp_q];
    take0 = af_valid && !flush_thr[THR_ARM] && tr_in_ready[disp_q]
            && (fl_free >= $bits(fl_free)'(n_first));
    take1 = take0 && tr_in_ready[!disp_q]
            && (fl_free >= $bits(fl_free)'(n_first) + $bits(fl_free)'(n_second));
    alloc_n = {1'b0, n_first} + (take1 ? {1'b0, n_second} : 4'd0);
    for (int t = 0; t < 2; t++) begin
      tr_in_valid[t] = (t[0] == disp_q) ? take0 : take1;
      tr_tbase[t]    = (t[0] == disp_q) ? fl_base
                     : TW'((32'(fl_base) + 32'(n_first)) % NUM_TEMPS);
    end
  end

  temp_free_list u_free_list (
    .clk, .rst, .flush(flush_thr[THR_ARM]),
    .alloc_n(alloc_n), .alloc(take0), .can_alloc(fl_can_alloc),
    .base(fl_base), .release_n(release_n), .free_count(fl_free));

  for (genvar t = 0; t < 2; t++) begin : g_tr
    arm_translator u_tr (
      .clk, .rst, .flush(flush_thr[THR_ARM]),
      .in_valid(tr_in_valid[t]), .in_instr(tr_instr[t]), .in_pc(tr_pc[t]), .in_tbase(tr_tbase[t]),
      .in_ready(tr_in_ready[t]), .in_ntemps(tr_ntemps[t]),
      .out_valid(tr_out_valid[t]), .out_uops(tr_uops[t]), .out_last(tr_out_last[t]),
      .out_accept(tr_out_accept[t]));
  end

  // Groups to the queue in program order.
  logic [1:0] grp_valid, grp_accept;
  uop_t       grp_uops [2][GROUP_W];
  logic [3:0] arm_shared;
  always_comb begin
    grp_valid[0] = tr_out_valid[turn_q];
    grp_valid[1] = tr_out_valid[turn_q] && tr_out_last[turn_q] && tr_out_valid[!turn_q];
    for (int k = 0; k < GROUP_W; k++) begin
      grp_uops[0][k] = tr_uops[turn_q][k];
      grp_uops[1][k] = tr_uops[!turn_q][k];
    end
    tr_out_accept[turn_q]  = grp_accept[0];
    tr_out_accept[!turn_q] = grp_accept[1];
  end

  always_ff @(posedge clk) begin
    if (rst || flush_thr[THR_ARM]) begin
      disp_q <= 1'b0;
      turn_q <= 1'b0;
    end else begin
      if (take0 && !take1) disp_q <= !disp_q;
      turn_q <= turn_q ^ (grp_accept[0] && tr_out_last[turn_q])
                       ^ (grp_accept[1] && tr_out_last[!turn_q]);
    end
  end

  // ---------------- instruction queue ----------------
  uop_t head [NUM_SLOTS];
  logic head_valid;
  logic [$clog2(DEPTH+1)-1:0] q_count;

  inst_queue #(.DEPTH(DEPTH)) u_queue (
    .clk, .rst, .flush_thr, .issue, .head, .head_valid, .count(q_count),
    .vliw_valid(vf_valid), .vliw_line(vline), .vliw_ready(vf_ready),
    .grp_valid, .grp_uops, .grp_accept, .arm_shared);

  // ---------------- register read ----------------
  localparam int unsigned NRD = 3 * NUM_SLOTS;
  logic [NRD-1:0]            rd_thr;
  logic [NRD-1:0][RA_W-1:0]  rd_addr;
  logic [NRD-1:0][XLEN-1:0]  rd_data;
  logic [NUM_SLOTS-1:0][XLEN-1:0] opa, opb, opc;
  logic [NUM_SLOTS-1:0]      rf_we;
  logic [NUM_SLOTS-1:0]      rf_thr;
  logic [NUM_SLOTS-1:0][RA_W-1:0] rf_waddr;
  logic [NUM_SLOTS-1:0][XLEN-1:0] rf_wdata;

  // ARM r15 reads as the instruction address + 8.
  function automatic logic [XLEN-1:0] operand(input uop_t u, input logic [RA_W-1:0] r,
                                              input logic [XLEN-1:0] v);
    return (u.thread == THR_ARM && r == RA_W'(15)) ? u.pc + 32'd8 : v;
  endfunction

  always_comb begin
    for (int s = 0; s < NUM_SLOTS; s++) begin
      rd_thr[3*s]      = head[s].thread;
      rd_thr[3*s+1]    = head[s].thread;
      rd_thr[3*s+2]    = head[s].thread;
      rd_addr[3*s]     = head[s].src1;
      rd_addr[3*s+1]   = head[s].src2;
      rd_addr[3*s+2]   = head[s].src3;
      opa[s] = operand(head[s], head[s].src1, rd_data[3*s]);
      opb[s] = operand(head[s], head[s].src2, rd_data[3*s+1]);
      opc[s] = operand(head[s], head[s].src3, rd_data[3*s+2]);
    end
  end

  register_file #(.NREGS(NUM_REGS), .NRD(NRD), .NWR(NUM_SLOTS)) u_rf (
    .clk, .rst, .rd_thr, .rd_addr, .rd_data,
    .wr_en(rf_we), .wr_thr(rf_thr), .wr_addr(rf_waddr), .wr_data(rf_wdata));

  // ---------------- functional units ----------------
  logic [NUM_SLOTS-1:0]            fu_wr, fu_fwe;
  logic [NUM_SLOTS-1:0][XLEN-1:0]  fu_result;
  flags_t [NUM_SLOTS-1:0]          fu_flags;
  logic [NUM_BR-1:0]               br_taken;
  logic [NUM_BR-1:0][XLEN-1:0]     br_target;
  logic [NUM_INT-1:0]              mem_access, mem_we;
  logic [NUM_INT-1:0][3:0]         mem_be;
  logic [NUM_INT-1:0][XLEN-1:0]    mem_addr, mem_wdata;

  for (genvar s = 0; s < NUM_INT; s++) begin : g_int
    int_alu u_alu (
      .u(head[s]), .en(slot_en[s]), .a(opa[s]), .b(opb[s]), .c(opc[s]),
      .fi(flags[head[s].thread]),
      .mem_rdata((s < NUM_MEM) ? dmem_rdata[(s < NUM_MEM) ? s : 0] : '0),
      .result(fu_result[s]), .wr(fu_wr[s]), .fo(fu_flags[s]), .fwe(fu_fwe[s]),
      .mem_access(mem_access[s]), .mem_we(mem_we[s]), .mem_be(mem_be[s]),
      .mem_addr(mem_addr[s]), .mem_wdata(mem_wdata[s]));
  end

  for (genvar s = NUM_INT; s < NUM_INT + NUM_MEDIA; s++) begin : g_media
    media_alu u_alu (
      .u(head[s]), .en(slot_en[s]), .a(opa[s]), .b(opb[s]), .c(opc[s]),
      .fi(flags[head[s].thread]),
      .result(fu_result[s]), .wr(fu_wr[s]), .fo(fu_flags[s]), .fwe(fu_fwe[s]));
  end

  for (genvar b = 0; b < NUM_BR; b++) begin : g_br
    localparam int unsigned S = NUM_INT + NUM_MEDIA + b;
    branch_unit u_br (
      .u(head[S]), .en(slot_en[S]), .a(opa[S]),
      .taken(br_taken[b]), .target(br_target[b]), .link(fu_result[S]), .wr(fu_wr[S]));
    assign fu_fwe[S]   = 1'b0;
    assign fu_flags[S] = '0;
  end

  // ---------------- data cache ports ----------------
  for (genvar p = 0; p < NUM_MEM; p++) begin : g_mem
    assign dmem_req[p].req    = mem_access[p];
    assign dmem_req[p].commit = mem_access[p] && issue;
    assign dmem_req[p].we     = mem_we[p];
    assign dmem_req[p].be     = mem_be[p];
    assign dmem_req[p].addr   = {mem_addr[p][XLEN-1:2], 2'b00};
    assign dmem_req[p].wdata  = mem_wdata[p];
  end

  // ---------------- issue / retire ----------------
  issue_unit u_issue (
    .clk, .rst, .head, .head_valid, .dmem_ready,
    .fu_wr, .fu_result, .fu_fwe, .fu_flags, .br_taken, .br_target,
    .slot_en, .flags, .issue, .stall,
    .redirect_vliw, .vliw_target, .redirect_arm, .arm_target,
    .flush_thr, .release_n, .arm_retire);

  // ---------------- write back ----------------
  always_comb begin
    for (int s = 0; s < NUM_SLOTS; s++) begin
      rf_we[s]    = issue && fu_wr[s];
      rf_thr[s]   = head[s].thread;
      rf_waddr[s] = head[s].dst;
      rf_wdata[s] = fu_result[s];
    end
  end
endmodule
