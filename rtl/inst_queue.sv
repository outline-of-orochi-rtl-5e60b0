// inst_queue: the instruction queue where VLIW lines and ARM internal
// instructions meet.
//
// Each entry is a line of NUM_SLOTS slots, one per functional unit (4 integer,
// 4 media, 2 branch). A decoded VLIW packet enters at the tail as a new line.
// The ARM translators' internal instructions are then inserted into empty
// slots whose unit can execute them, in existing lines or, when none fits, in
// a new empty line at the tail. This is the serial insertion method: each ARM
// internal instruction goes into a line strictly after the line that holds the
// previous one. Since every internal instruction completes in one cycle and
// lines issue in order, an ARM internal instruction then always sees the
// result of the one before it, so no dependency check is needed.
//
// Up to two groups (up to GROUP_W internal instructions each, from the two
// translators, in program order) are offered per cycle; a group is accepted
// whole or not at all, and the second only if the first was. The head line
// leaves when issue is high. flush_thr[t] removes every queued slot of thread
// t (after a taken branch of that thread); those slots stay as holes.
//
// Order within a cycle: flush, issue (shift by one line), VLIW enqueue, ARM
// insertion. All updates take effect at the clock edge. DEPTH is this
// design's choice (the figures draw six lines); the serial insertion method is
// the simplest of the candidates the source design lists.
module inst_queue
  import orochi_pkg::*;
#(
  parameter int unsigned DEPTH = 6
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [1:0]           flush_thr,
  input  logic                 issue,
  output uop_t                 head [NUM_SLOTS],
  output logic                 head_valid,
  output logic [$clog2(DEPTH+1)-1:0] count,
  input  logic                 vliw_valid,
  input  uop_t                 vliw_line [NUM_SLOTS],
  output logic                 vliw_ready,
  input  logic [1:0]           grp_valid,
  input  uop_t                 grp_uops [2][GROUP_W],
  output logic [1:0]           grp_accept,
  output logic [3:0]           arm_shared   // ARM internal instructions placed beside VLIW ops this cycle
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  uop_t lines_q [DEPTH][NUM_SLOTS];
  uop_t lines_n [DEPTH][NUM_SLOTS];
  uop_t tl      [DEPTH][NUM_SLOTS];
  int   count_q, count_n, tcount;
  int   last_q, last_n, tlast;   // position of the newest queued ARM internal instruction, -1 if none

  logic [DEPTH-1:0] has_vliw;   // line holds a VLIW operation (after this cycle's enqueue)

  always_comb begin
    logic ok, found;
    int   shared, tshared;
    lines_n    = lines_q;
    tl         = lines_q;
    tcount     = 0;
    tlast      = -1;
    tshared    = 0;
    ok         = 1'b0;
    found      = 1'b0;
    arm_shared = '0;
    count_n    = count_q;
    last_n     = last_q;
    grp_accept = 2'b00;
    shared     = 0;
    vliw_ready = 1'b0;

    // Flush.
    for (int p = 0; p < DEPTH; p++)
      for (int s = 0; s < NUM_SLOTS; s++)
        if (flush_thr[lines_n[p][s].thread]) lines_n[p][s].valid = 1'b0;
    if (flush_thr[THR_ARM]) last_n = -1;

    // Issue: the head line leaves.
    if (issue && count_n > 0) begin
      for (int p = 0; p < DEPTH - 1; p++) lines_n[p] = lines_n[p + 1];
      for (int s = 0; s < NUM_SLOTS; s++) lines_n[DEPTH-1][s] = '0;
      count_n = count_n - 1;
      last_n  = (last_n >= 0) ? last_n - 1 : -1;
    end

    // VLIW enqueue.
    vliw_ready = (count_n < DEPTH) && !flush_thr[THR_VLIW];
    if (vliw_valid && vliw_ready) begin
      lines_n[count_n] = vliw_line;
      count_n = count_n + 1;
    end

    // ARM insertion, serial method.
    for (int p = 0; p < DEPTH; p++) begin
      has_vliw[p] = 1'b0;
      for (int s = 0; s < NUM_SLOTS; s++)
        if (lines_n[p][s].valid && lines_n[p][s].thread == THR_VLIW) has_vliw[p] = 1'b1;
    end
    for (int g = 0; g < 2; g++) begin
      if (grp_valid[g] && (g == 0 || grp_accept[0]) && !flush_thr[THR_ARM]) begin
        tl      = lines_n;
        tcount  = count_n;
        tlast   = last_n;
        tshared = 0;
        ok      = 1'b1;
        for (int k = 0; k < GROUP_W; k++) begin
          if (grp_uops[g][k].valid && ok) begin
            found = 1'b0;
            for (int p = 0; p < DEPTH; p++) begin
              if (!found && p > tlast && p <= tcount && p < DEPTH) begin
                for (int s = 0; s < NUM_SLOTS; s++) begin
                  if (!found && !tl[p][s].valid && slot_accepts(s, grp_uops[g][k].itype)) begin
                    found = 1'b1;
                    if (has_vliw[p]) tshared = tshared + 1;
                    tl[p][s] = grp_uops[g][k];
                    tlast    = p;
                    if (p == tcount) tcount = tcount + 1;
                  end
                end
              end
            end
            if (!found) ok = 1'b0;
          end
        end
        if (ok) begin
          lines_n       = tl;
          count_n       = tcount;
          last_n        = tlast;
          shared        = shared + tshared;
          grp_accept[g] = 1'b1;
        end
      end
    end
    arm_shared = 4'(shared);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int p = 0; p < DEPTH; p++)
        for (int s = 0; s < NUM_SLOTS; s++)
          lines_q[p][s] <= '0;
      count_q <= 0;
      last_q  <= -1;
    end else begin
      lines_q <= lines_n;
      count_q <= count_n;
      last_q  <= last_n;
    end
  end

  always_comb begin
    for (int s = 0; s < NUM_SLOTS; s++) head[s] = lines_q[0][s];
  end
  assign head_valid = count_q > 0;
  assign count      = CW'(count_q);

  // A group is never taken unless the earlier one was.
  assert property (@(posedge clk) disable iff (rst) grp_accept[1] |-> grp_accept[0]);
endmodule
