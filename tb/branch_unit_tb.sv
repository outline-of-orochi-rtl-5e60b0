// branch_unit_tb: self-checking test of a branch unit: taken only when
// enabled, absolute or register target, link address of the next ARM
// instruction (pc + 4) or the next VLIW packet (pc + 32), link write only when
// requested. Combinational: samples 1 ns after each change.
module branch_unit_tb;
  import orochi_pkg::*;
  uop_t u;
  logic en;
  logic [31:0] a, target, link;
  logic taken, wr;
  int checks = 0, failures = 0;

  branch_unit dut (.u, .en, .a, .taken, .target, .link, .wr);

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %08h exp %08h", what, got, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 100; it++) begin
      u = '0; u.valid = 1; u.itype = IT_B;
      u.thread = it[0]; u.op = {3'b0, it[1]}; u.wr_en = it[1];
      u.use_imm = it[2]; u.imm = $urandom; u.pc = $urandom; a = $urandom;
      en = (it % 3 != 0);
      #1;
      chk("taken", {31'd0, taken}, {31'd0, en});
      chk("target", target, it[2] ? u.imm : a);
      chk("link", link, u.pc + (it[0] ? 4 : 32));
      chk("wr", {31'd0, wr}, {31'd0, en && it[1]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
