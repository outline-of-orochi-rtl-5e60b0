// temp_free_list_tb: self-checking test of the ring free list of extra ARM
// registers. A queue in the tb holds the outstanding allocations; random
// allocations (1..12 entries, as two instructions may take at once) and
// in-order releases are checked against it: the base of every allocation,
// the free count, refusal when too few entries are free, wrap-around of the
// ring, and flush returning everything.
module temp_free_list_tb;
  import orochi_pkg::*;
  logic clk = 0, rst = 1, flush = 0, alloc = 0, can_alloc;
  logic [3:0] alloc_n = 0;
  logic [2:0] release_n = 0;
  logic [5:0] base, free_count;
  int checks = 0, failures = 0;
  int outstanding [$];
  int exp_base = 0, exp_free = 48, wraps = 0, refusals = 0;

  temp_free_list dut (.*);
  always #5 clk = !clk;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      chk("base", int'(base), exp_base);
      chk("free", int'(free_count), exp_free);
      alloc_n = 4'(1 + $urandom % 12);
      alloc   = ($urandom % 2 == 0);
      release_n = 0;
      if (outstanding.size() > 0 && outstanding[0] <= 6 && $urandom % 3 != 0)
        release_n = 3'(outstanding[0]);
      #1;
      chk("can_alloc", int'(can_alloc), int'(exp_free >= int'(alloc_n)));
      if (it == 1500) flush = 1;
      @(posedge clk);
      #1;
      if (flush) begin
        flush = 0;
        outstanding.delete();
        exp_base = 0; exp_free = 48;
        continue;
      end
      if (release_n != 0) begin
        void'(outstanding.pop_front());
        exp_free += int'(release_n);
      end
      if (alloc && exp_free - int'(release_n) >= int'(alloc_n)) begin
        outstanding.push_back(int'(alloc_n));
        if (exp_base + int'(alloc_n) >= 48) wraps++;
        exp_base = (exp_base + int'(alloc_n)) % 48;
        exp_free -= int'(alloc_n);
      end else if (alloc) refusals++;
      // split large allocations so that they can be released in one go
      if (outstanding.size() > 0 && outstanding[$] > 6) begin
        int n;
        n = outstanding.pop_back();
        outstanding.push_back(6);
        outstanding.push_back(n - 6);
      end
    end
    chk("ring wrapped", int'(wraps > 0), 1);
    chk("allocation refused", int'(refusals > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
