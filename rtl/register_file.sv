// register_file: the shared register file of the OROCHI back end.
//
// Each thread has its own bank of NUM_REGS 32-bit registers: the VLIW thread
// uses all 64 as its general registers; the ARM thread keeps r0..r14 in entries
// 0..14 and uses entries 16..63 as the extra registers the translator assigns
// to decomposed instructions (entry 15 is never read: r15 reads return the
// instruction address + 8, supplied outside this block).
//
// NRD asynchronous read ports (three per slot of the issued line) and NWR write
// ports, written on the rising clock edge. When two write ports hit the same
// register in one cycle, the higher-numbered port wins. Synchronous reset
// clears every register. 64 registers per thread follow the source design; the
// per-thread banking, port counts and reset are this design's.
module register_file
  import orochi_pkg::*;
#(
  parameter int unsigned NREGS = NUM_REGS,
  parameter int unsigned NRD   = 3 * NUM_SLOTS,
  parameter int unsigned NWR   = NUM_SLOTS
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [NRD-1:0]                rd_thr,
  input  logic [NRD-1:0][RA_W-1:0]      rd_addr,
  output logic [NRD-1:0][XLEN-1:0]      rd_data,
  input  logic [NWR-1:0]                wr_en,
  input  logic [NWR-1:0]                wr_thr,
  input  logic [NWR-1:0][RA_W-1:0]      wr_addr,
  input  logic [NWR-1:0][XLEN-1:0]      wr_data
);
  logic [XLEN-1:0] regs [2][NREGS];

  always_comb begin
    for (int i = 0; i < NRD; i++)
      rd_data[i] = regs[rd_thr[i]][rd_addr[i]];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int t = 0; t < 2; t++)
        for (int r = 0; r < NREGS; r++)
          regs[t][r] <= '0;
    end else begin
      for (int w = 0; w < NWR; w++)
        if (wr_en[w]) regs[wr_thr[w]][wr_addr[w]] <= wr_data[w];
    end
  end
endmodule
