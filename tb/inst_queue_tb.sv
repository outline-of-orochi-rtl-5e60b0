// inst_queue_tb: self-checking test of the instruction queue.
// Random traffic: VLIW lines (random slots filled), one or two ARM groups of
// 1-4 internal instructions of random type, random issue, and in the second
// phase random flushes of either thread. Every internal instruction carries a
// tag in imm. The bench keeps the accepted VLIW lines and ARM internal
// instructions in order and checks at each issued head line that:
//  - a VLIW line comes out whole, in order, in the slots it went in;
//  - ARM internal instructions come out in program order, at most one per
//    line (serial insertion), each in a slot whose unit can execute it;
//  - the count of lines matches and never exceeds DEPTH;
//  - a flushed thread's queued work never issues, the other thread's does;
//  - without flushes, the ARM-beside-VLIW count reported at insertion
//    equals what is seen issuing.
// Directed cases: a queue full of full VLIW lines rejects both VLIW and ARM
// work, and a second group is never taken without the first.
module inst_queue_tb;
  import orochi_pkg::*;
  localparam int unsigned DEPTH = 6;
  logic clk = 0, rst = 1;
  logic [1:0] flush_thr = 0;
  logic issue = 0;
  uop_t head [NUM_SLOTS];
  logic head_valid;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic vliw_valid = 0, vliw_ready;
  uop_t vliw_line [NUM_SLOTS];
  logic [1:0] grp_valid = 0, grp_accept;
  uop_t grp_uops [2][GROUP_W];
  logic [3:0] arm_shared;
  int checks = 0, failures = 0;

  inst_queue #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = !clk;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  typedef struct packed {
    logic [NUM_SLOTS-1:0] mask;   // slots the VLIW line filled
    logic [31:0]          tag;
  } vrec_t;
  vrec_t  vq [$];
  uop_t   aq [$];
  int     vtag = 1, atag = 1;
  int     shared_rep = 0, shared_seen = 0;
  int     issued_arm = 0, issued_vliw = 0, lines_model = 0;

  function automatic itype_e rand_type();
    itype_e t;
    t = itype_e'($urandom % 8);
    return t;
  endfunction

  function automatic void new_vliw_line();
    int n;
    n = 0;
    for (int s = 0; s < NUM_SLOTS; s++) begin
      vliw_line[s] = '0;
      if ($urandom % 3 == 0 || (s == NUM_SLOTS - 1 && n == 0)) begin
        vliw_line[s].valid  = 1'b1;
        vliw_line[s].thread = THR_VLIW;
        vliw_line[s].itype  = (s >= NUM_INT + NUM_MEDIA) ? IT_B : (s < NUM_MEM ? IT_L : IT_E);
        vliw_line[s].imm    = 32'(vtag);
        vliw_line[s].dst    = RA_W'(s);
        n++;
      end
    end
    vtag++;
  endfunction

  function automatic void new_group(int g);
    int n;
    n = 1 + $urandom % GROUP_W;
    for (int k = 0; k < GROUP_W; k++) begin
      grp_uops[g][k] = '0;
      if (k < n) begin
        grp_uops[g][k].valid  = 1'b1;
        grp_uops[g][k].thread = THR_ARM;
        grp_uops[g][k].itype  = rand_type();
        grp_uops[g][k].imm    = 32'(atag);
        atag++;
      end
    end
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock of traffic: inputs already set at the negedge; sample after them.
  task automatic step(bit allow_flush);
    int narm, nvl, slot_arm;
    bit had_vliw;
    vrec_t exp_line;
    #1;
    chk("count", count, lines_model);
    chk("head_valid", head_valid, lines_model > 0);
    if (grp_accept[1]) chk("second group only after first", grp_accept[0], 1);
    // issued head line
    if (issue && head_valid) begin
      narm = 0; nvl = 0; had_vliw = 0; slot_arm = -1;
      for (int s = 0; s < NUM_SLOTS; s++)
        if (head[s].valid) begin
          if (head[s].thread == THR_VLIW) had_vliw = 1;
          else begin narm++; slot_arm = s; end
        end
      chk("one ARM uop per line", narm <= 1, 1);
      if (narm == 1) begin
        issued_arm++;
        if (had_vliw) shared_seen++;
        chk("ARM slot fits type", slot_accepts(slot_arm, head[slot_arm].itype), 1);
        if (aq.size() == 0) chk("unexpected ARM uop", head[slot_arm].imm, 0);
        else begin
          chk("ARM order", head[slot_arm].imm, aq[0].imm);
          chk("ARM type kept", head[slot_arm].itype, aq[0].itype);
          void'(aq.pop_front());
        end
      end
      if (had_vliw) begin
        issued_vliw++;
        if (vq.size() == 0) chk("unexpected VLIW line", 1, 0);
        else begin
          exp_line = vq[0];
          for (int s = 0; s < NUM_SLOTS; s++)
            if (head[s].thread == THR_VLIW || !head[s].valid) begin
              chk($sformatf("VLIW slot %0d valid", s), head[s].valid, exp_line.mask[s]);
              if (exp_line.mask[s]) begin
                chk($sformatf("VLIW slot %0d tag", s), head[s].imm, exp_line.tag);
                chk($sformatf("VLIW slot %0d dst", s), head[s].dst, s);
              end
            end else chk("ARM in a VLIW slot", exp_line.mask[s], 0);
          void'(vq.pop_front());
        end
      end
      lines_model--;
    end
    // flushes
    if (flush_thr[THR_ARM]) aq.delete();
    if (flush_thr[THR_VLIW]) vq.delete();
    // enqueue
    if (vliw_valid && vliw_ready) begin
      vrec_t r;
      for (int s = 0; s < NUM_SLOTS; s++) r.mask[s] = vliw_line[s].valid;
      r.tag = 0;
      for (int s = 0; s < NUM_SLOTS; s++) if (vliw_line[s].valid) r.tag = vliw_line[s].imm;
      vq.push_back(r);
      lines_model++;
    end
    chk("vliw_ready", vliw_ready, lines_model - (vliw_valid && vliw_ready) < DEPTH && !flush_thr[THR_VLIW]);
    for (int g = 0; g < 2; g++)
      if (grp_accept[g]) begin
        chk("accept only offered", grp_valid[g], 1);
        for (int k = 0; k < GROUP_W; k++) if (grp_uops[g][k].valid) aq.push_back(grp_uops[g][k]);
      end
    shared_rep += arm_shared;
    @(posedge clk);
    // lines the queue added for ARM work: read back from the count
    #1 lines_model = count;
    // next inputs
    @(negedge clk);
    if (vliw_valid && vliw_ready) new_vliw_line();
    if (grp_accept[0]) begin
      if (grp_accept[1]) begin new_group(0); new_group(1); end
      else begin grp_uops[0] = grp_uops[1]; grp_valid[0] = grp_valid[1]; new_group(1); end
    end
    vliw_valid = ($urandom % 2 == 0);
    if (!grp_valid[0]) begin grp_valid[0] = ($urandom % 2 == 0); end
    grp_valid[1] = grp_valid[0] && ($urandom % 2 == 0);
    issue = ($urandom % 3 != 0);
    flush_thr = allow_flush ? {($urandom % 40 == 0), ($urandom % 40 == 0)} : 2'b00;
  endtask

  initial begin
    for (int s = 0; s < NUM_SLOTS; s++) vliw_line[s] = '0;
    for (int g = 0; g < 2; g++) for (int k = 0; k < GROUP_W; k++) grp_uops[g][k] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;

    // Directed: fill with full VLIW lines, then nothing more fits.
    for (int s = 0; s < NUM_SLOTS; s++) begin
      vliw_line[s] = '0;
      vliw_line[s].valid = 1; vliw_line[s].thread = THR_VLIW;
      vliw_line[s].itype = (s >= NUM_INT + NUM_MEDIA) ? IT_B : IT_E;
    end
    vliw_valid = 1;
    repeat (DEPTH) @(negedge clk);
    #1 chk("full count", count, DEPTH);
    chk("full vliw_ready", vliw_ready, 0);
    new_group(0);
    grp_valid = 2'b01;
    #1 chk("full rejects ARM", grp_accept, 0);
    // issue one: the ARM group now fits into the freed tail line only if
    // every uop fits one after another, so a single E is accepted
    vliw_valid = 0;
    for (int k = 1; k < GROUP_W; k++) grp_uops[0][k].valid = 0;
    grp_uops[0][0].itype = IT_E;
    issue = 1;
    #1 chk("accept after issue", grp_accept, 2'b01);
    @(negedge clk);
    issue = 0; grp_valid = 0;
    #1 chk("count after", count, DEPTH);
    // second group alone is never taken
    flush_thr = 2'b11;
    @(negedge clk);
    flush_thr = 0;
    issue = 1;
    repeat (DEPTH + 1) @(negedge clk);
    issue = 0;
    #1 chk("drained", count, 0);
    new_group(1);
    grp_valid = 2'b10;
    #1 chk("group 1 alone", grp_accept, 0);
    grp_valid = 0;
    atag = 1;

    // Random phase without flushes, then with.
    lines_model = 0;
    new_vliw_line(); new_group(0); new_group(1);
    for (int c = 0; c < 4000; c++) step(0);
    // drain
    vliw_valid = 0; grp_valid = 0;
    while (count != 0) begin issue = 1; step(0); vliw_valid = 0; grp_valid = 0; end
    chk("ARM all issued", aq.size(), 0);
    chk("VLIW all issued", vq.size(), 0);
    chk("shared count", shared_rep, shared_seen);
    for (int c = 0; c < 6000; c++) step(1);
    vliw_valid = 0; grp_valid = 0; flush_thr = 0;
    while (count != 0) begin issue = 1; step(0); vliw_valid = 0; grp_valid = 0; end
    chk("ARM all issued 2", aq.size(), 0);
    chk("VLIW all issued 2", vq.size(), 0);
    $display("issued ARM %0d VLIW lines %0d shared %0d", issued_arm, issued_vliw, shared_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
