// temp_free_list: the free list of extra ARM registers (the "Free list" that
// feeds the translator's selector).
//
// Decomposed ARM instructions need scratch registers for intermediate values
// (a shifted operand, an effective address, partial products). ARM
// instructions enter and leave the queue in program order, so the free
// registers are kept as a ring: an instruction takes alloc_n consecutive
// entries at the allocation pointer and gives them back, in the same order,
// when its last internal instruction issues (release_n). Entry j of the ring
// is register ARM_ARCH + j. flush returns every entry (all ARM work in flight
// is discarded).
//
// Interface: base is the ring index of the first entry the next allocation
// gets; can_alloc tells whether alloc_n entries are free; alloc takes them at
// the clock edge (up to two instructions' worth at once). release_n may
// arrive in the same cycle. The source design
// states that the translator assigns additional registers and contains a free
// list; the ring organisation is this design's.
module temp_free_list
  import orochi_pkg::*;
#(
  parameter int unsigned NTEMPS = NUM_TEMPS
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       flush,
  input  logic [3:0]                 alloc_n,
  input  logic                       alloc,
  output logic                       can_alloc,
  output logic [$clog2(NTEMPS)-1:0]  base,
  input  logic [2:0]                 release_n,
  output logic [$clog2(NTEMPS+1)-1:0] free_count
);
  localparam int unsigned PW = $clog2(NTEMPS);
  localparam int unsigned CW = $clog2(NTEMPS + 1);

  logic [PW-1:0] head_q;
  logic [CW-1:0] free_q;

  function automatic logic [PW-1:0] wrap_add(input logic [PW-1:0] p, input logic [3:0] n);
    logic [PW:0] s;
    s = {1'b0, p} + {{(PW - 3){1'b0}}, n};
    if (s >= (PW + 1)'(NTEMPS)) s = s - (PW + 1)'(NTEMPS);
    return s[PW-1:0];
  endfunction

  assign base       = head_q;
  assign free_count = free_q;
  assign can_alloc  = free_q >= CW'(alloc_n);

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      head_q <= '0;
      free_q <= CW'(NTEMPS);
    end else begin
      if (alloc && can_alloc) head_q <= wrap_add(head_q, alloc_n);
      free_q <= free_q - ((alloc && can_alloc) ? CW'(alloc_n) : '0) + CW'(release_n);
    end
  end

  // The ring never holds more than it has.
  assert property (@(posedge clk) disable iff (rst || flush)
                   (CW + 1)'(free_q) + (CW + 1)'(release_n) <= (CW + 1)'(NTEMPS));
endmodule
