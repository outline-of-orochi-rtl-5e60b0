// orochi_pkg_tb: self-checking test of the shared functions in orochi_pkg.
// cond_pass is checked for all 16 condition codes and all 16 flag values
// against the ARM condition table written out here; alu_e for every opcode on
// random and corner operands against a 64-bit reference (result, N, Z, C, V,
// with logical operations keeping C and V); shift_s for every shift type and
// amounts 0..40; slot_accepts for every slot and type against the slot map
// (slots 0-1 E S a L s, slots 2-3 E S a s, slots 4-7 E S M m s, 8-9 B).
module orochi_pkg_tb;
  import orochi_pkg::*;
  int checks = 0, failures = 0;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h exp %0h", what, got, exp);
    end
  endtask

  function automatic bit ref_cond(int c, bit n, bit z, bit cy, bit v);
    case (c)
      0: return z;        1: return !z;       2: return cy;       3: return !cy;
      4: return n;        5: return !n;       6: return v;        7: return !v;
      8: return cy && !z; 9: return !cy || z; 10: return n == v;  11: return n != v;
      12: return !z && n == v;               13: return z || n != v;
      14: return 1;
      default: return 0;
    endcase
  endfunction

  function automatic bit ref_slot(int s, int t);
    string ok, names;
    names = "ESMmaLBs";
    if (s < 2)       ok = "ESaLs";
    else if (s < 4)  ok = "ESas";
    else if (s < 8)  ok = "ESMms";
    else             ok = "B";
    for (int k = 0; k < ok.len(); k++)
      if (ok[k] == names[t]) return 1;
    return 0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a, b, y, ey;
    flags_t fi, fo;
    longint sa, sb, r;
    bit ec, ev, logical;
    for (int c = 0; c < 16; c++)
      for (int f = 0; f < 16; f++) begin
        fi = 4'(f);
        chk($sformatf("cond %0d flags %0h", c, f), cond_pass(4'(c), fi), ref_cond(c, fi.n, fi.z, fi.c, fi.v));
      end
    for (int s = 0; s < NUM_SLOTS; s++)
      for (int t = 0; t < 8; t++)
        chk($sformatf("slot %0d type %0d", s, t), slot_accepts(s, itype_e'(t)), ref_slot(s, t));
    for (int it = 0; it < 3000; it++) begin
      a = (it % 5 == 0) ? 32'h7fffffff : (it % 7 == 0) ? 32'h80000000 : (it % 11 == 0) ? 32'h0 : $urandom;
      b = (it % 3 == 0) ? 32'h1 : (it % 13 == 0) ? 32'hffffffff : $urandom;
      fi = 4'($urandom);
      for (int op = 0; op < 16; op++) begin
        logical = 0;
        case (op)
          0, 8:  begin ey = a & b;  logical = 1; end
          1, 9:  begin ey = a ^ b;  logical = 1; end
          12:    begin ey = a | b;  logical = 1; end
          13:    begin ey = b;      logical = 1; end
          14:    begin ey = a & ~b; logical = 1; end
          15:    begin ey = ~b;     logical = 1; end
          default: ;
        endcase
        sa = longint'($signed(a)); sb = longint'($signed(b));
        ec = fi.c; ev = fi.v;
        if (!logical) begin
          longint ua, ub, u;
          ua = longint'(a); ub = longint'(b);
          case (op)
            2, 10: begin u = ua + (ub ^ 32'hffffffff) + 1; r = sa - sb; end
            3:     begin u = ub + (ua ^ 32'hffffffff) + 1; r = sb - sa; end
            4, 11: begin u = ua + ub; r = sa + sb; end
            5:     begin u = ua + ub + fi.c; r = sa + sb + fi.c; end
            6:     begin u = ua + (ub ^ 32'hffffffff) + fi.c; r = sa - sb - !fi.c; end
            default: begin u = ub + (ua ^ 32'hffffffff) + fi.c; r = sb - sa - !fi.c; end
          endcase
          ey = u[31:0];
          ec = u[32];
          ev = (r != longint'($signed(ey)));
        end
        alu_e(4'(op), a, b, fi, y, fo);
        chk($sformatf("alu %0d y", op), y, ey);
        chk($sformatf("alu %0d n", op), fo.n, ey[31]);
        chk($sformatf("alu %0d z", op), fo.z, ey == 0);
        chk($sformatf("alu %0d c", op), fo.c, ec);
        chk($sformatf("alu %0d v", op), fo.v, ev);
      end
      for (int amt = 0; amt <= 40; amt += 1 + it % 3) begin
        chk("lsl", shift_s(S_LSL, a, 8'(amt), 0), amt >= 32 ? 0 : longint'(a << amt) & 32'hffffffff);
        chk("lsr", shift_s(S_LSR, a, 8'(amt), 0), amt >= 32 ? 0 : a >> amt);
        chk("asr", shift_s(S_ASR, a, 8'(amt), 0),
            amt >= 32 ? (a[31] ? 32'hffffffff : 0) : longint'($signed(a) >>> amt) & 32'hffffffff);
        chk("ror", shift_s(S_ROR, a, 8'(amt), 0),
            longint'((a >> (amt % 32)) | (a << ((32 - amt % 32) % 32))) & 32'hffffffff);
      end
      chk("rrx", shift_s(S_RRX, a, 0, fi.c), {fi.c, a[31:1]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
