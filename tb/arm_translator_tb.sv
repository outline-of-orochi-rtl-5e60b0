// arm_translator_tb: self-checking test of the ARM translator/decomposer.
// Feeds ARM instructions of every class and collects the internal
// instructions it emits, with random back-pressure on out_accept. For each it
// checks the type sequence and count against the decomposition table
// (E, SE, [Mm]x4, [Mm]x8 m, m m [Mm]x8 E m m m, La, aL, LSa, SaL,
// aa [aL]xN a, B), that it takes ceil(count/4) accepted groups, that the
// condition code is on every internal instruction, that only the last one is
// marked last and carries the temporaries count, and some fields: the rotated
// immediate, the branch target, the register order of LDM/STM and the
// temporaries drawn from the ring base.
module arm_translator_tb;
  import orochi_pkg::*;
  logic clk = 0, rst = 1, flush = 0;
  logic in_valid = 0, in_ready, out_valid, out_last, out_accept;
  logic [31:0] in_instr, in_pc;
  logic [5:0] in_tbase;
  logic [2:0] in_ntemps;
  uop_t out_uops [GROUP_W];
  int checks = 0, failures = 0;

  arm_translator dut (.*);
  always #5 clk = !clk;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask
  task automatic chks(string what, string got, string exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %s exp %s", what, got, exp); end
  endtask

  function automatic string tname(itype_e t);
    case (t)
      IT_E: return "E"; IT_S: return "S"; IT_M: return "M"; IT_m: return "m";
      IT_A: return "a"; IT_L: return "L"; IT_B: return "B"; default: return "s";
    endcase
  endfunction

  uop_t got [$];
  int   groups;

  task automatic translate(logic [31:0] i, logic [31:0] pc, logic [5:0] tb);
    got.delete();
    groups = 0;
    @(negedge clk);
    in_instr = i; in_pc = pc; in_tbase = tb; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    in_instr = 32'hFFFFFFFF;
    forever begin
      out_accept = ($urandom % 3 != 0);
      #1;
      if (out_valid && out_accept) begin
        groups++;
        for (int g = 0; g < GROUP_W; g++) if (out_uops[g].valid) got.push_back(out_uops[g]);
        if (out_last) begin
          @(negedge clk);
          out_accept = 0;
          break;
        end
      end
      @(negedge clk);
    end
  endtask

  task automatic expect_seq(string name, logic [31:0] i, string seq, int ntemps);
    string s;
    translate(i, 32'h200, 6'd45);
    s = "";
    foreach (got[k]) s = {s, tname(got[k].itype)};
    chks({name, " sequence"}, s, seq);
    chk({name, " groups"}, groups, (seq.len() + 3) / 4);
    foreach (got[k]) begin
      chk({name, " cond"}, int'(got[k].cond), int'(i[31:28]));
      chk({name, " last"}, int'(got[k].last), int'(k == got.size() - 1));
      chk({name, " thread"}, int'(got[k].thread), int'(THR_ARM));
    end
    chk({name, " temps"}, int'(got[got.size() - 1].ntemps), ntemps);
  endtask

  function automatic string rep(string s, int n);
    string r;
    r = "";
    for (int k = 0; k < n; k++) r = {r, s};
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] list;
    int n, k;
    out_accept = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    expect_seq("ADD imm",        32'he2821f05, "E", 0);            // ADD r1, r2, #5 ror 30
    chk("rotated imm", int'(got[0].imm), 32'h14);
    expect_seq("ADD reg",        32'he0821003, "E", 0);            // ADD r1, r2, r3
    expect_seq("ADD lsl #2",     32'he0821103, "SE", 1);           // ADD r1, r2, r3, LSL #2
    chk("S amount", int'(got[0].imm), 2);
    chk("S dst temp", int'(got[0].dst), 16 + 45);
    chk("E reads temp", int'(got[1].src2), 16 + 45);
    expect_seq("ADDNE lsl r4",   32'h10821413, "SE", 1);           // ADDNE r1, r2, r3, LSL r4
    chk("S amount reg", int'(got[0].src3), 4);
    expect_seq("CMP",            32'he1520003, "E", 0);
    chk("CMP no write", int'(got[0].wr_en), 0);
    expect_seq("MUL",            32'he0010392, "MmMmMmMm", 2);     // MUL r1, r2, r3
    chk("MUL dst", int'(got[7].dst), 1);
    expect_seq("MLA",            32'he0214392, "MmMmMmMm", 2);     // MLA r1, r2, r3, r4
    chk("MLA addend", int'(got[1].src1), 4);
    expect_seq("UMULL",          32'he0821394, {rep("Mm", 8), "m"}, 3);
    expect_seq("UMLAL",          32'he0a21394, {rep("Mm", 8), "m"}, 3);
    expect_seq("SMULL",          32'he0c21394, {"mm", rep("Mm", 8), "Emmm"}, 6);
    chk("SMULL lo", int'(got[20].dst), 1);
    chk("SMULL hi", int'(got[21].dst), 2);
    expect_seq("LDR post",       32'he4921004, "La", 0);           // LDR r1, [r2], #4
    expect_seq("LDR pre wb",     32'he5b21004, "aL", 0);           // LDR r1, [r2, #4]!
    chk("pre wb base", int'(got[0].dst), 2);
    expect_seq("LDR offset",     32'he5921004, "aL", 1);           // LDR r1, [r2, #4]
    expect_seq("LDR post shift", 32'he6921103, "LSa", 1);          // LDR r1, [r2], r3, LSL #2
    expect_seq("STR pre shift",  32'he7a21143, "SaL", 1);          // STR r1, [r2, r3, ASR #2]!
    chk("store data", int'(got[2].src3), 1);
    chk("store no write", int'(got[2].wr_en), 0);
    for (int t = 0; t < 6; t++) begin
      list = 16'($urandom) | 16'h1;
      if (t == 0) list = 16'hffff;
      n = $countones(list);
      expect_seq($sformatf("LDM %04h", list), {12'he8b, 4'd13, list}, {"aa", rep("aL", n), "a"}, 2);
      k = 0;
      for (int r = 0; r < 16; r++)
        if (list[r]) begin
          chk("LDM order", int'(got[3 + 2 * k].dst), r);
          k++;
        end
      // a load of the base register wins over the writeback
      if (list[13]) chk("LDM base loaded", int'(got[2 * n + 2].dst) >= 16, 1);
      else          chk("LDM writeback", int'(got[2 * n + 2].dst), 13);
    end
    expect_seq("STMDB",          32'he92d4003, "aaaLaLaLa", 2);    // STMDB sp!, {r0, r1, lr}
    chk("STMDB start", int'(got[0].imm), -16);
    expect_seq("BL",             32'heb000010, "B", 0);            // BL +0x40
    chk("B target", int'(got[0].imm), 32'h200 + 8 + 32'h40);
    chk("BL link", int'(got[0].wr_en), 1);
    expect_seq("SWI",            32'hef000000, "E", 0);
    chk("SWI no write", int'(got[0].wr_en), 0);
    // flush drops an instruction in progress
    @(negedge clk);
    in_instr = 32'he8bdffff; in_pc = 0; in_tbase = 0; in_valid = 1;
    @(negedge clk);
    in_valid = 0; out_accept = 1;
    @(negedge clk);
    flush = 1;
    @(negedge clk);
    flush = 0;
    #1 chk("flushed", int'(out_valid), 0);
    chk("ready after flush", int'(in_ready), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
