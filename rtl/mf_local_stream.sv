// mf_local_stream: sequential access (mode-3) served from local memory while
// the raw data is still being staged in.
//
// In the staged form of mode-3, raw data is copied from host memory into
// logical bank 0 (physical banks 0-1) by the transfer engine, and the user
// logic consumes it at the same time: transfer-in and processing overlap.
// Results go to logical bank 1 (banks 2-3) and are copied out after the
// run. This module gives the user logic the same signals as the host-direct
// stream port:
//   read side: each mem_rd_rq asks for the next block. A pending request is
//     turned into a bank read of address rd_ptr as soon as rd_ptr < avail,
//     the number of blocks the engine has already written; the bank mapper
//     returns the data RD_LAT cycles later as mem_rd_data_vld, in order. Requests
//     beyond what has arrived wait (a stall on transfer-in).
//   write side: mem_wr_ready is high while the run is active; each accepted
//     block is written to logical bank 1 at the next address; the write
//     data passes through unchanged.
// start clears both pointers at the beginning of each round.
// The pointer-against-progress check is this design's way of overlapping
// the two activities safely.
module mf_local_stream
  import mf_pkg::*;
#(
  parameter int unsigned DATA_W = mf_pkg::MF_DATA_W,
  parameter int unsigned LAW    = 20,
  parameter int unsigned VOL_W  = mf_pkg::MF_VOL_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              active,     // user_logic_go of the staged run
  input  logic [VOL_W-1:0]  avail,      // raw blocks already in logical bank 0
  // user side (read data returns straight from the bank mapper)
  input  logic              mem_rd_rq,
  input  logic              mem_wr_rq,
  input  logic [DATA_W-1:0] mem_wr_data,
  output logic              mem_wr_ready,
  // logical banks (through the user's bank mapper)
  output logic              lrd_en,
  output logic [LAW-1:0]    lrd_addr,
  output logic              lwr_en,
  output logic [LAW-1:0]    lwr_addr,
  output logic [DATA_W-1:0] lwr_data
);

  logic [VOL_W-1:0] rd_ptr, wr_ptr, pend;

  assign lrd_en          = active && (pend != '0) && (rd_ptr < avail);
  assign lrd_addr        = LAW'(rd_ptr);

  assign mem_wr_ready    = active;
  assign lwr_en          = active && mem_wr_rq;
  assign lwr_addr        = LAW'(wr_ptr);
  assign lwr_data        = mem_wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      pend   <= '0;
    end else if (start) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      pend   <= '0;
    end else begin
      pend <= pend + VOL_W'(active && mem_rd_rq) - VOL_W'(lrd_en);
      if (lrd_en) rd_ptr <= rd_ptr + 1'b1;
      if (lwr_en) wr_ptr <= wr_ptr + 1'b1;
    end
  end

  a_read_behind_stage_in: assert property (@(posedge clk) disable iff (!rst_n)
    lrd_en |-> (rd_ptr < avail));

endmodule
