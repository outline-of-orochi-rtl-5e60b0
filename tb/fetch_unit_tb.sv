// fetch_unit_tb: self-checking test of the fetch unit in its ARM form
// (two words per cycle, 4-byte step). A model PC follows random take counts
// (0, 1, 2), redirects and run; every cycle the tb checks the address, the
// words passed on, out_valid and the PC after a redirect.
module fetch_unit_tb;
  logic clk = 0, rst = 1, run = 0, redirect = 0;
  logic [31:0] redirect_pc = 0, imem_addr, out_pc;
  logic [63:0] imem_data, out_data;
  logic out_valid;
  logic [1:0] out_take = 0;
  int checks = 0, failures = 0;
  logic [31:0] exp_pc;

  fetch_unit #(.WIDTH(64), .STEP(4), .RESET_PC(32'h100)) dut (.*);
  always #5 clk = !clk;
  // instruction memory: word at address A is A ^ 32'h5a5a0000
  assign imem_data = {imem_addr + 32'd4 ^ 32'h5a5a0000, imem_addr ^ 32'h5a5a0000};

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_pc = 32'h100;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      run = ($urandom % 8 != 0);
      redirect = ($urandom % 10 == 0);
      redirect_pc = {$urandom % 1024, 2'b00};
      out_take = 2'($urandom % 3);
      #1;
      chk("addr", imem_addr, exp_pc);
      chk("pc out", out_pc, exp_pc);
      chk("valid", out_valid, run && !redirect);
      chk("data", out_data, {exp_pc + 32'd4 ^ 32'h5a5a0000, exp_pc ^ 32'h5a5a0000});
      if (redirect) exp_pc = redirect_pc;
      else if (run) exp_pc = exp_pc + 4 * out_take;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
