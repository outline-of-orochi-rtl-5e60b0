// fetch_unit: instruction fetch for one thread of OROCHI.
//
// The processor has two of these: one fetches two consecutive 32-bit ARM
// instructions (WIDTH = 64, STEP = 4), one for each translator; the other
// fetches whole VLIW packets of eight 32-bit operations (WIDTH = 256,
// STEP = 32) for the VLIW decoder. The unit holds the program counter,
// presents it on imem_addr and passes what the instruction memory returns in
// the same cycle (imem_data) to the next stage. out_valid says the output is
// usable; the next stage answers with out_take, the number of STEP-sized units
// it consumed (0, 1 or 2), and the PC advances by that much. When a taken
// branch of its thread retires, redirect loads redirect_pc and the word on
// the output in that cycle is dropped. run gates fetching. The source design
// only names two fetch units; the zero-latency memory interface, the run input
// and the reset address parameter are this design's.
module fetch_unit #(
  parameter int unsigned WIDTH    = 32,
  parameter int unsigned STEP     = 4,
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              run,
  input  logic              redirect,
  input  logic [31:0]       redirect_pc,
  output logic [31:0]       imem_addr,
  input  logic [WIDTH-1:0]  imem_data,
  output logic              out_valid,
  output logic [WIDTH-1:0]  out_data,
  output logic [31:0]       out_pc,
  input  logic [1:0]        out_take
);
  logic [31:0] pc_q;

  assign imem_addr = pc_q;
  assign out_valid = run && !redirect;
  assign out_data  = imem_data;
  assign out_pc    = pc_q;

  always_ff @(posedge clk) begin
    if (rst)                         pc_q <= RESET_PC;
    else if (redirect)               pc_q <= redirect_pc;
    else if (out_valid)              pc_q <= pc_q + STEP * out_take;
  end
endmodule
