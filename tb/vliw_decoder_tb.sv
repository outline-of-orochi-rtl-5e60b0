// vliw_decoder_tb: self-checking test of the VLIW decoder. Builds packets of
// random valid operations from a fixed mix and checks that each operation
// lands exactly once, in a slot whose unit can run it, with its fields
// unpacked as the operation format says (S operand swap, L immediate offset,
// B absolute target), that empty slots stay empty, and that a packet with
// three loads (only two memory slots) reports overflow.
module vliw_decoder_tb;
  import orochi_pkg::*;
  logic [VLIW_OPS-1:0][31:0] packet;
  logic [31:0] pc;
  uop_t line [NUM_SLOTS];
  logic overflow;
  int checks = 0, failures = 0;

  vliw_decoder dut (.*);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  function automatic logic [31:0] op(itype_e t, int tag);
    // tag identifies the op: dst = tag, src1 = tag + 1, src2 = tag + 2
    return {1'b1, t, 4'(tag), 4'he, 1'b0, 6'(tag), 6'(tag + 1), 1'b0, 6'(tag + 2)};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    itype_e mix [8];
    int found;
    pc = 32'h400;
    for (int it = 0; it < 300; it++) begin
      // a legal mix: 2 L, 1 a, 1 M, 1 m, 1 B, and E/S/s
      mix = '{IT_L, IT_E, IT_M, IT_S, IT_B, IT_A, IT_s, IT_L};
      if (it % 3 == 1) mix[1] = IT_m;
      if (it % 4 == 2) mix[6] = IT_B;
      mix.shuffle();
      packet = '0;
      for (int o = 0; o < VLIW_OPS; o++)
        if ($urandom % 5 != 0) packet[o] = op(mix[o], 4 * o);
      #1;
      chk("no overflow", int'(overflow), 0);
      for (int o = 0; o < VLIW_OPS; o++) begin
        found = 0;
        for (int s = 0; s < NUM_SLOTS; s++)
          if (line[s].valid && line[s].dst == 6'(4 * o)) begin
            found++;
            chk("slot fits", int'(slot_accepts(s, line[s].itype)), 1);
            chk("type", int'(line[s].itype), int'(mix[o]));
            chk("thread", int'(line[s].thread), int'(THR_VLIW));
            if (mix[o] == IT_S) begin
              chk("S value reg", int'(line[s].src2), 4 * o + 1);
              chk("S amount reg", int'(line[s].src3), 4 * o + 2);
            end else if (mix[o] == IT_L) begin
              chk("L imm", int'(line[s].use_imm), 1);
              chk("L offset", int'(line[s].imm), 4 * o + 2);
            end else if (mix[o] != IT_B) begin
              chk("src1", int'(line[s].src1), 4 * o + 1);
              chk("src2", int'(line[s].src2), 4 * o + 2);
            end
          end
        chk($sformatf("op %0d placed once", o), found, packet[o][31] ? 1 : 0);
      end
    end
    // B with immediate: target pc + 32*imm6
    packet = '0;
    packet[3] = {1'b1, IT_B, 4'd1, 4'he, 1'b0, 6'd5, 6'd0, 1'b1, 6'h3e};
    #1;
    chk("B slot", int'(line[8].valid), 1);
    chk("B target", int'(line[8].imm), 32'h400 - 64);
    chk("B link", int'(line[8].wr_en), 1);
    // overflow: three loads
    packet = '0;
    for (int o = 0; o < 3; o++) packet[o] = op(IT_L, 4 * o);
    #1;
    chk("overflow", int'(overflow), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
