// media_alu_tb: self-checking test of one media functional unit.
// Checks the eight partial-product operations (byte k of the multiplier, lower
// or upper word, carry from a running low sum) against 64-bit products: the
// tb replays the M/m sequences the ARM translator uses for a 32x32->32 and a
// 32x32+64->64 multiply through the unit and compares with a*b. Also checks
// ABS, the 64-bit conditional negate pair, MOV, flags of a multiply with S,
// and E/S/select reuse. Combinational: each step samples 1 ns later.
module media_alu_tb;
  import orochi_pkg::*;
  uop_t u;
  logic en = 1;
  logic [31:0] a, b, c, result;
  flags_t fi = '0, fo;
  logic wr, fwe;
  int checks = 0, failures = 0;

  media_alu dut (.u, .en, .a, .b, .c, .fi, .result, .wr, .fo, .fwe);

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %08h exp %08h", what, got, exp); end
  endtask

  // One operation through the unit.
  task automatic run(itype_e t, logic [3:0] op, logic [31:0] va, logic [31:0] vb,
                     logic [31:0] vc, logic imm, output logic [31:0] r);
    u = '0; u.valid = 1; u.wr_en = 1; u.itype = t; u.op = op; u.use_imm = imm; u.imm = 0;
    a = va; b = vb; c = vc;
    #1 r = result;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x, y, t, lo, hi, acc, r;
    logic [63:0] p, q;
    for (int it = 0; it < 300; it++) begin
      x = $urandom; y = $urandom;
      if (it % 5 == 0) y = 32'hFFFFFFFF;
      // 32-bit product: sum of the four lower partial products
      acc = 0;
      for (int k = 0; k < 4; k++) begin
        run(IT_M, {2'b00, 2'(k)}, x, y, 0, 0, t);
        run(IT_m, MA_ACC, acc, t, 0, 0, acc);
      end
      chk("mul32", acc, x * y);
      // 64-bit product plus a 64-bit addend, upper words first (carry from lo)
      q  = {$urandom, $urandom};
      lo = q[31:0]; hi = q[63:32];
      for (int k = 0; k < 4; k++) begin
        run(IT_M, {2'b01, 2'(k)}, x, y, lo, 0, t);
        run(IT_m, MA_ACC, hi, t, 0, 0, hi);
        run(IT_M, {2'b00, 2'(k)}, x, y, 0, 0, t);
        run(IT_m, MA_ACC, lo, t, 0, 0, lo);
      end
      p = {32'd0, x} * {32'd0, y} + q;
      chk("mla64 lo", lo, p[31:0]);
      chk("mla64 hi", hi, p[63:32]);
      // no-carry kind ignores c
      run(IT_M, 4'b1100, x, y, 32'hFFFFFFFF, 0, t);
      p = {32'd0, x} * {56'd0, y[7:0]};
      chk("M upper no carry", t, p[63:32]);
      // abs and 64-bit negate
      run(IT_m, MA_ABS, x, 0, 0, 0, r);
      chk("abs", r, x[31] ? -x : x);
      p = {x, y};
      run(IT_m, MA_NEGHI, x, y, 32'h80000000, 0, hi);
      run(IT_m, MA_NEGLO, y, 0, 32'h80000000, 0, lo);
      q = -p;
      chk("neg64 hi", hi, q[63:32]);
      chk("neg64 lo", lo, q[31:0]);
      run(IT_m, MA_NEGHI, x, y, 32'h7fffffff, 0, hi);
      chk("neg64 keep", hi, x);
    end
    run(IT_m, MA_MOV, 32'h1234, 0, 0, 0, r); chk("mov", r, 32'h1234);
    u.setflags = 1; a = 0; #1; chk("m flags z", {31'd0, fo.z}, 1); chk("m fwe", {31'd0, fwe}, 1);
    run(IT_E, E_EOR, 32'hF0F0, 32'h0FF0, 0, 0, r); chk("E eor", r, 32'hFF00);
    run(IT_S, S_LSR, 0, 32'h80, 4, 0, r); chk("S lsr", r, 32'h8);
    en = 0; #1; chk("disabled", {30'd0, wr, fwe}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
