// issue_unit_tb: self-checking test of the issue/retire unit.
// Random head lines (VLIW operations plus at most one ARM internal
// instruction, as serial insertion guarantees), random condition codes,
// random data cache readiness and random functional unit results. A
// reference model in the bench tracks both threads' flags and the pending
// ARM redirect, and every cycle the bench compares slot enables, stall,
// issue, flag state, VLIW and ARM redirects and targets, the flush vector,
// the number of temporaries released and the ARM retire pulse. Directed
// cases first: a miss on a load stalls the whole line, a miss on a slot
// whose condition fails does not, and an ARM write to r15 in a middle
// internal instruction redirects only when the last one issues.
module issue_unit_tb;
  import orochi_pkg::*;
  logic clk = 0, rst = 1;
  uop_t head [NUM_SLOTS];
  logic head_valid;
  logic [NUM_MEM-1:0] dmem_ready;
  logic [NUM_SLOTS-1:0] fu_wr, fu_fwe;
  logic [NUM_SLOTS-1:0][XLEN-1:0] fu_result;
  flags_t [NUM_SLOTS-1:0] fu_flags;
  logic [NUM_BR-1:0] br_taken;
  logic [NUM_BR-1:0][XLEN-1:0] br_target;
  logic [NUM_SLOTS-1:0] slot_en;
  flags_t [1:0] flags;
  logic issue, stall, redirect_vliw, redirect_arm, arm_retire;
  logic [XLEN-1:0] vliw_target, arm_target;
  logic [1:0] flush_thr;
  logic [2:0] release_n;
  int checks = 0, failures = 0;
  int n_stall = 0, n_redir_a = 0, n_redir_v = 0, n_condfail = 0;

  issue_unit dut (.*);
  always #5 clk = !clk;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h exp %0h at %0t", what, got, exp, $time);
    end
  endtask

  // reference state
  flags_t [1:0]    m_flags;
  logic            m_pend;
  logic [XLEN-1:0] m_pend_pc;

  function automatic logic m_cond(logic [3:0] c, flags_t f);
    case (c)
      4'h0: return f.z;            4'h1: return !f.z;
      4'h2: return f.c;            4'h3: return !f.c;
      4'h4: return f.n;            4'h5: return !f.n;
      4'h6: return f.v;            4'h7: return !f.v;
      4'h8: return f.c & !f.z;     4'h9: return !f.c | f.z;
      4'ha: return f.n == f.v;     4'hb: return f.n != f.v;
      4'hc: return !f.z & (f.n == f.v);
      4'hd: return f.z | (f.n != f.v);
      4'he: return 1;
      default: return 0;
    endcase
  endfunction

  function automatic void clear_line();
    for (int s = 0; s < NUM_SLOTS; s++) head[s] = '0;
    head_valid = 1;
    dmem_ready = '1;
    fu_wr = '0; fu_fwe = '0; br_taken = '0;
    fu_result = '0; fu_flags = '0; br_target = '0;
  endfunction

  function automatic void rand_line();
    int arm_slot;
    clear_line();
    head_valid = ($urandom % 8 != 0);
    arm_slot = $urandom % (NUM_SLOTS + 4);
    for (int s = 0; s < NUM_SLOTS; s++) begin
      if ($urandom % 2 == 0 || s == arm_slot) begin
        head[s].valid  = 1;
        head[s].thread = (s == arm_slot) ? THR_ARM : THR_VLIW;
        head[s].itype  = (s >= NUM_INT + NUM_MEDIA) ? IT_B : (s < NUM_MEM && $urandom % 2 == 0) ? IT_L : IT_E;
        head[s].cond   = ($urandom % 2 == 0) ? COND_AL : 4'($urandom);
        head[s].dst    = ($urandom % 4 == 0) ? RA_W'(15) : RA_W'($urandom);
        head[s].last   = $urandom % 2;
        head[s].ntemps = 3'($urandom % 7);
      end
    end
    dmem_ready = NUM_MEM'($urandom) | (($urandom % 2 == 0) ? '1 : '0);
    for (int s = 0; s < NUM_SLOTS; s++) begin
      fu_result[s] = $urandom;
      fu_flags[s]  = 4'($urandom);
    end
    for (int b = 0; b < NUM_BR; b++) br_target[b] = $urandom;
  endfunction

  // Drive unit outputs from the enables, as the functional units would.
  task automatic drive_units();
    #1;
    for (int s = 0; s < NUM_SLOTS; s++) begin
      fu_wr[s]  = slot_en[s] && s < NUM_INT + NUM_MEDIA && ($urandom % 2 == 0);
      fu_fwe[s] = slot_en[s] && s < NUM_INT + NUM_MEDIA && ($urandom % 3 == 0);
    end
    for (int b = 0; b < NUM_BR; b++) br_taken[b] = slot_en[NUM_INT + NUM_MEDIA + b] && ($urandom % 2 == 0);
    #1;
  endtask

  // Compare against the model, then advance the model and the clock.
  task automatic compare_and_step();
    logic [NUM_SLOTS-1:0] en;
    logic st, iss, rv, ra, ret, pend;
    logic [XLEN-1:0] vt, at, ppc;
    logic [2:0] rel;
    flags_t [1:0] fl;
    st = 0;
    for (int s = 0; s < NUM_SLOTS; s++) begin
      en[s] = head_valid && head[s].valid && m_cond(head[s].cond, m_flags[head[s].thread]);
      if (head_valid && head[s].valid && !en[s]) n_condfail++;
      if (s < NUM_MEM && en[s] && head[s].itype == IT_L && !dmem_ready[s]) st = 1;
    end
    iss = head_valid && !st;
    rv = 0; vt = 0; ra = 0; at = 0; rel = 0; ret = 0;
    fl = m_flags; pend = m_pend; ppc = m_pend_pc;
    if (iss) begin
      for (int s = 0; s < NUM_SLOTS; s++) if (fu_fwe[s]) fl[head[s].thread] = fu_flags[s];
      for (int b = 0; b < NUM_BR; b++)
        if (!rv && br_taken[b] && head[NUM_INT + NUM_MEDIA + b].thread == THR_VLIW) begin
          rv = 1; vt = br_target[b];
        end
      for (int s = 0; s < NUM_SLOTS; s++)
        if (head[s].valid && head[s].thread == THR_ARM) begin
          if (s >= NUM_INT + NUM_MEDIA) begin
            if (br_taken[s - NUM_INT - NUM_MEDIA]) begin pend = 1; ppc = br_target[s - NUM_INT - NUM_MEDIA]; end
          end else if (fu_wr[s] && head[s].dst == 15) begin
            pend = 1; ppc = fu_result[s];
          end
          if (head[s].last) begin
            ret = 1; rel = head[s].ntemps;
            if (pend) begin ra = 1; at = ppc & ~32'd3; pend = 0; end
          end
        end
    end
    chk("slot_en", slot_en, en);
    chk("stall", stall, st);
    chk("issue", issue, iss);
    chk("flags", flags, m_flags);
    chk("redirect_vliw", redirect_vliw, rv);
    if (rv) chk("vliw_target", vliw_target, vt);
    chk("redirect_arm", redirect_arm, ra);
    if (ra) chk("arm_target", arm_target, at);
    chk("flush_thr", flush_thr, {ra, rv});
    chk("release_n", release_n, rel);
    chk("arm_retire", arm_retire, ret);
    n_stall += st; n_redir_a += ra; n_redir_v += rv;
    @(posedge clk);
    m_flags = fl; m_pend = pend; m_pend_pc = ppc;
    @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_flags = '0; m_pend = 0; m_pend_pc = 0;
    clear_line();
    head_valid = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;

    // A load in slot 1 misses: the whole line (with a VLIW branch) holds.
    clear_line();
    head[1] = '{valid: 1, thread: THR_ARM, itype: IT_L, cond: COND_AL, last: 1, ntemps: 3'd2, default: '0};
    head[8] = '{valid: 1, thread: THR_VLIW, itype: IT_B, cond: COND_AL, default: '0};
    dmem_ready = 2'b01;
    br_taken = 2'b01; br_target[0] = 32'h400;
    #1 chk("miss stalls", stall, 1);
    chk("miss no issue", issue, 0);
    chk("miss no redirect", redirect_vliw, 0);
    chk("miss no release", release_n, 0);
    @(negedge clk);
    dmem_ready = 2'b11;
    #1 chk("hit issues", issue, 1);
    chk("branch redirects", redirect_vliw, 1);
    chk("branch target", vliw_target, 32'h400);
    chk("release", release_n, 2);
    @(negedge clk);
    // A load whose condition fails does not wait for the cache.
    clear_line();
    head[0] = '{valid: 1, thread: THR_ARM, itype: IT_L, cond: 4'h0, last: 1, default: '0}; // EQ, Z=0
    dmem_ready = 2'b00;
    #1 chk("cond-failed load no stall", stall, 0);
    chk("cond-failed load not enabled", slot_en[0], 0);
    @(negedge clk);
    // LDM-like: r15 written by a middle internal instruction, redirect at last.
    clear_line();
    head[0] = '{valid: 1, thread: THR_ARM, itype: IT_L, cond: COND_AL, dst: 6'd15, default: '0};
    fu_wr[0] = 1; fu_result[0] = 32'h1236;
    #1 chk("no redirect before last", redirect_arm, 0);
    @(negedge clk);
    clear_line();
    head[4] = '{valid: 1, thread: THR_ARM, itype: IT_m, cond: COND_AL, last: 1, ntemps: 3'd1, default: '0};
    #1 chk("redirect at last", redirect_arm, 1);
    chk("aligned target", arm_target, 32'h1234);
    chk("flush ARM", flush_thr, 2'b10);
    @(negedge clk);
    // restart the model from a known state
    rst = 1;
    clear_line(); head_valid = 0;
    @(negedge clk);
    rst = 0;
    m_flags = '0; m_pend = 0; m_pend_pc = 0;

    for (int c = 0; c < 20000; c++) begin
      rand_line();
      drive_units();
      compare_and_step();
    end
    $display("stalls %0d ARM redirects %0d VLIW redirects %0d condfail %0d", n_stall, n_redir_a, n_redir_v, n_condfail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
