// register_file_tb: self-checking test of the two-bank register file with
// reduced port counts (4 read, 3 write). Checks reset to zero, random writes
// through every port into both banks against a model array, read-after-write
// at the next cycle, and that the higher write port wins on a conflict.
module register_file_tb;
  import orochi_pkg::*;
  localparam int NRD = 4, NWR = 3;
  logic clk = 0, rst = 1;
  logic [NRD-1:0] rd_thr;
  logic [NRD-1:0][5:0] rd_addr;
  logic [NRD-1:0][31:0] rd_data;
  logic [NWR-1:0] wr_en = '0, wr_thr;
  logic [NWR-1:0][5:0] wr_addr;
  logic [NWR-1:0][31:0] wr_data;
  logic [31:0] model [2][64];
  int checks = 0, failures = 0;

  register_file #(.NRD(NRD), .NWR(NWR)) dut (.*);
  always #5 clk = !clk;

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %08h exp %08h", what, got, exp); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2; t++) for (int r = 0; r < 64; r++) model[t][r] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 64; k++) begin
      rd_thr = '1; rd_addr[0] = 6'(k); #1 chk("reset", rd_data[0], 0);
    end
    for (int it = 0; it < 500; it++) begin
      @(negedge clk);
      for (int w = 0; w < NWR; w++) begin
        wr_en[w] = $urandom % 2; wr_thr[w] = $urandom % 2;
        wr_addr[w] = 6'($urandom); wr_data[w] = $urandom;
      end
      if (it % 10 == 0) begin   // conflict: ports 0 and 2 same register
        wr_en[0] = 1; wr_en[2] = 1; wr_thr[2] = wr_thr[0]; wr_addr[2] = wr_addr[0];
      end
      for (int w = 0; w < NWR; w++)
        if (wr_en[w]) model[wr_thr[w]][wr_addr[w]] = wr_data[w];
      @(negedge clk);
      wr_en = '0;
      for (int r = 0; r < NRD; r++) begin
        rd_thr[r] = $urandom % 2;
        rd_addr[r] = (r < NWR) ? wr_addr[r] : 6'($urandom);
        if (r < NWR) rd_thr[r] = wr_thr[r];
      end
      #1;
      for (int r = 0; r < NRD; r++)
        chk($sformatf("read port %0d", r), rd_data[r], model[rd_thr[r]][rd_addr[r]]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
