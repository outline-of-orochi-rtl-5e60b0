// int_alu_tb: self-checking test of one integer functional unit.
// Drives random operands through every E operation (result and N Z C V), the
// four shifts and RRX, address generation, word/byte loads and stores and the
// select operation, and checks that a disabled slot writes nothing. Expected
// values are computed here with 33/64-bit arithmetic. Combinational unit: each
// check samples 1 ns after the inputs change.
module int_alu_tb;
  import orochi_pkg::*;
  uop_t u;
  logic en;
  logic [31:0] a, b, c, rdata, result, mem_addr, mem_wdata;
  flags_t fi, fo;
  logic wr, fwe, mem_access, mem_we;
  logic [3:0] mem_be;
  int checks = 0, failures = 0;

  int_alu dut (.u, .en, .a, .b, .c, .fi, .mem_rdata(rdata), .result, .wr, .fo, .fwe,
               .mem_access, .mem_we, .mem_be, .mem_addr, .mem_wdata);

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
    logic [32:0] s;
    logic [31:0] e;
    logic n, z, cc, v;
    en = 1; fi = '0; rdata = 0; c = 0;
    for (int it = 0; it < 400; it++) begin
      u = '0; u.valid = 1; u.wr_en = 1; u.setflags = 1; u.cond = COND_AL;
      a = $urandom; b = $urandom; c = $urandom;
      if (it % 7 == 0) b = a;
      fi = flags_t'(4'($urandom));
      u.itype = IT_E;
      u.op = 4'(it % 16);
      #1;
      cc = fi.c; v = fi.v;
      case (u.op)
        E_AND, E_TST: e = a & b;
        E_EOR, E_TEQ: e = a ^ b;
        E_ORR: e = a | b;
        E_MOV: e = b;
        E_BIC: e = a & ~b;
        E_MVN: e = ~b;
        E_ADD, E_CMN: begin s = {1'b0, a} + b; e = s[31:0]; cc = s[32]; v = (a[31] == b[31]) && (e[31] != a[31]); end
        E_ADC: begin s = {1'b0, a} + b + fi.c; e = s[31:0]; cc = s[32]; v = (a[31] == b[31]) && (e[31] != a[31]); end
        E_SUB, E_CMP: begin e = a - b; cc = a >= b; v = (a[31] != b[31]) && (e[31] != a[31]); end
        E_SBC: begin e = a - b - !fi.c; cc = {1'b0, a} >= {1'b0, b} + !fi.c; v = (a[31] != b[31]) && (e[31] != a[31]); end
        E_RSB: begin e = b - a; cc = b >= a; v = (a[31] != b[31]) && (e[31] != b[31]); end
        default: begin e = b - a - !fi.c; cc = {1'b0, b} >= {1'b0, a} + !fi.c; v = (a[31] != b[31]) && (e[31] != b[31]); end
      endcase
      n = e[31]; z = (e == 0);
      chk($sformatf("E op %0d result", u.op), result, e);
      chk($sformatf("E op %0d flags", u.op), {28'd0, fo}, {28'd0, n, z, cc, v});
      chk("E fwe", {31'd0, fwe}, 1);
    end
    // shifts: value in b (src2), amount in c (src3) or imm
    for (int it = 0; it < 200; it++) begin
      u = '0; u.valid = 1; u.wr_en = 1; u.itype = IT_S; u.op = 4'(it % 5);
      b = $urandom; c = $urandom % 40; fi = flags_t'(4'($urandom));
      #1;
      case (u.op)
        S_LSL: e = (c >= 32) ? 0 : b << c;
        S_LSR: e = (c >= 32) ? 0 : b >> c;
        S_ASR: e = (c >= 32) ? {32{b[31]}} : 32'($signed(b) >>> c);
        S_ROR: e = ({b, b} >> (c % 32));
        default: e = {fi.c, b[31:1]};
      endcase
      chk($sformatf("S op %0d amt %0d", u.op, c), result, e);
    end
    u.use_imm = 1; u.imm = 3; u.op = S_LSL; b = 32'h1; #1; chk("S imm", result, 8);
    // address generation
    u = '0; u.valid = 1; u.wr_en = 1; u.itype = IT_A; u.op = A_SUB; a = 100; b = 30; #1;
    chk("a sub", result, 70);
    u.op = A_ADD; u.use_imm = 1; u.imm = -32'd4; #1; chk("a add imm", result, 96);
    // loads and stores
    u = '0; u.valid = 1; u.wr_en = 1; u.itype = IT_L; u.use_imm = 1; u.imm = 6;
    a = 32'h100; rdata = 32'hAABBCCDD; #1;
    chk("ld word", result, 32'hAABBCCDD); chk("ld addr", mem_addr, 32'h106);
    chk("ld access", {30'd0, mem_access, mem_we}, 2'b10); chk("ld wr", {31'd0, wr}, 1);
    u.op = 4'b0010; #1; chk("ldb lane2", result, 32'hBB); chk("ldb be", {28'd0, mem_be}, 4'b0100);
    u.op = 4'b0011; c = 32'h12345678; #1;
    chk("stb data", mem_wdata, 32'h78787878); chk("stb we", {31'd0, mem_we}, 1); chk("st no wr", {31'd0, wr}, 0);
    u.op = 4'b0001; #1; chk("st word data", mem_wdata, 32'h12345678); chk("st be", {28'd0, mem_be}, 4'hf);
    // select
    u = '0; u.valid = 1; u.wr_en = 1; u.itype = IT_s; u.op = 4'h0; a = 11; b = 22;
    fi = '0; fi.z = 1; #1; chk("sel taken", result, 11);
    fi.z = 0; #1; chk("sel other", result, 22);
    // disabled slot
    u = '0; u.valid = 1; u.wr_en = 1; u.itype = IT_L; u.op = 4'b0001; en = 0; #1;
    chk("disabled", {29'd0, wr, mem_access, mem_we}, 0);
    u.itype = IT_E; u.setflags = 1; #1; chk("disabled fwe", {31'd0, fwe}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
