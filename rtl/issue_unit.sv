// issue_unit: issues the head line of the instruction queue and retires it.
//
// VLIW issue: the whole head line leaves together or not at all. A slot is
// enabled when it holds a valid internal instruction whose condition passes
// against its thread's flags (each thread has its own N Z C V). The line is
// held, every slot of it, while an enabled load/store in slots 0-1 sees its
// data cache port not ready (a miss); this is the one stall of the back end,
// since every internal instruction finishes in one cycle.
//
// In the issue cycle the unit also retires the line:
//  - flags: an enabled instruction with set-flags updates its thread's flags
//    (the higher slot wins if two in a line do).
//  - VLIW branches: a taken B of the VLIW thread redirects VLIW fetch and
//    removes the younger VLIW slots from the queue (lower slot wins).
//  - ARM control flow: a taken B, or any internal instruction that writes
//    r15, sets the new ARM PC. The redirect and the flush of younger ARM work
//    wait for the last internal instruction of that ARM instruction, so a
//    decomposed instruction (e.g. LDM with r15 in the list) always completes.
//  - the extra registers of a finished ARM instruction go back to the free
//    list (release_n).
// The source design gives the line-wide issue and stall rule; the flag
// handling, the redirect timing and the flush are this design's.
module issue_unit
  import orochi_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst,
  input  uop_t                          head [NUM_SLOTS],
  input  logic                          head_valid,
  input  logic [NUM_MEM-1:0]            dmem_ready,
  // results of the functional units for the head line
  input  logic [NUM_SLOTS-1:0]          fu_wr,
  input  logic [NUM_SLOTS-1:0][XLEN-1:0] fu_result,
  input  logic [NUM_SLOTS-1:0]          fu_fwe,
  input  flags_t [NUM_SLOTS-1:0]        fu_flags,
  input  logic [NUM_BR-1:0]             br_taken,
  input  logic [NUM_BR-1:0][XLEN-1:0]   br_target,
  output logic [NUM_SLOTS-1:0]          slot_en,
  output flags_t [1:0]                  flags,
  output logic                          issue,
  output logic                          stall,
  output logic                          redirect_vliw,
  output logic [XLEN-1:0]               vliw_target,
  output logic                          redirect_arm,
  output logic [XLEN-1:0]               arm_target,
  output logic [1:0]                    flush_thr,
  output logic [2:0]                    release_n,
  output logic                          arm_retire     // an ARM instruction completed
);
  flags_t [1:0]    flags_q;
  logic            pend_q;
  logic [XLEN-1:0] pend_pc_q;
  logic            pend_n;
  logic [XLEN-1:0] pend_pc_n;
  flags_t [1:0]    flags_n;

  assign flags = flags_q;

  always_comb begin
    stall = 1'b0;
    for (int s = 0; s < NUM_SLOTS; s++) begin
      slot_en[s] = head_valid && head[s].valid && cond_pass(head[s].cond, flags_q[head[s].thread]);
      if (s < NUM_MEM && slot_en[s] && head[s].itype == IT_L && !dmem_ready[s]) stall = 1'b1;
    end
    issue = head_valid && !stall;
  end

  always_comb begin
    flags_n       = flags_q;
    pend_n        = pend_q;
    pend_pc_n     = pend_pc_q;
    redirect_vliw = 1'b0;
    vliw_target   = '0;
    redirect_arm  = 1'b0;
    arm_target    = '0;
    release_n     = 3'd0;
    arm_retire    = 1'b0;
    if (issue) begin
      for (int s = 0; s < NUM_SLOTS; s++)
        if (fu_fwe[s]) flags_n[head[s].thread] = fu_flags[s];
      for (int b = NUM_BR - 1; b >= 0; b--)
        if (br_taken[b] && head[NUM_INT + NUM_MEDIA + b].thread == THR_VLIW) begin
          redirect_vliw = 1'b1;
          vliw_target   = br_target[b];
        end
      for (int s = 0; s < NUM_SLOTS; s++)
        if (head[s].valid && head[s].thread == THR_ARM) begin
          if (s >= NUM_INT + NUM_MEDIA && br_taken[s - NUM_INT - NUM_MEDIA]) begin
            pend_n    = 1'b1;
            pend_pc_n = br_target[s - NUM_INT - NUM_MEDIA];
          end else if (s < NUM_INT + NUM_MEDIA && fu_wr[s] && head[s].dst == RA_W'(15)) begin
            pend_n    = 1'b1;
            pend_pc_n = fu_result[s];
          end
          if (head[s].last) begin
            arm_retire = 1'b1;
            release_n  = head[s].ntemps;
            if (pend_n) begin
              redirect_arm = 1'b1;
              arm_target   = {pend_pc_n[XLEN-1:2], 2'b00};
              pend_n       = 1'b0;
            end
          end
        end
    end
    flush_thr = {redirect_arm, redirect_vliw};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      flags_q   <= '0;
      pend_q    <= 1'b0;
      pend_pc_q <= '0;
    end else begin
      flags_q   <= flags_n;
      pend_q    <= pend_n;
      pend_pc_q <= pend_pc_n;
    end
  end

  // A stalled line holds: nothing of it retires.
  assert property (@(posedge clk) disable iff (rst) stall |-> !issue);
endmodule
