// mf_sram_bank_model: behavioural model of one local memory bank of the
// board (an external SRAM with separate read and write ports).
//
// Not synthesizable as an FPGA part; it stands for the off-chip memory in
// simulation. A read enable sampled at a clock edge returns the addressed
// word RD_LAT edges later (data held in a pipeline); a write enable writes
// at the edge. A read and a write to the same address in one cycle return
// the old word. peek() and poke() give testbenches direct access.
module mf_sram_bank_model #(
  parameter int unsigned DATA_W = 128,
  parameter int unsigned AW     = 18,
  parameter int unsigned RD_LAT = 2
) (
  input  logic              clk,
  input  logic              rd_en,
  input  logic [AW-1:0]     rd_addr,
  output logic [DATA_W-1:0] rd_data,
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_addr,
  input  logic [DATA_W-1:0] wr_data
);

  logic [DATA_W-1:0] mem  [2**AW];
  logic [DATA_W-1:0] pipe [RD_LAT];

  always_ff @(posedge clk) begin
    if (rd_en) pipe[0] <= mem[rd_addr];
    for (int i = 1; i < RD_LAT; i++) pipe[i] <= pipe[i-1];
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign rd_data = pipe[RD_LAT-1];

  function automatic logic [DATA_W-1:0] peek(input logic [AW-1:0] a);
    return mem[a];
  endfunction

  function automatic void poke(input logic [AW-1:0] a, input logic [DATA_W-1:0] d);
    mem[a] = d;
  endfunction

endmodule
