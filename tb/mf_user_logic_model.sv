// mf_user_logic_model: behavioural user logic for framework testbenches.
//
// It stands in for the block-cipher user logic: each raw block x becomes
// xform(x) = {x[63:0], x[127:64]} ^ KEY, a cheap keyed permutation that
// makes misplaced or stale blocks visible. On each rising edge of
// user_logic_go it processes mem_rd_vol blocks:
//   random modes: reads logical addresses 0 .. vol-1 (a request in a cycle
//     with probability req_pct %), and writes each result to the address it
//     was read from as it returns (mode-2 writes land in logical bank 1);
//   sequential mode: requests vol blocks and writes the results in order
//     whenever mem_wr_ready is high.
// When all results have been written it pulses user_logic_done.
// It counts how often a write was held back by mem_wr_ready (wr_blocked).
module mf_user_logic_model
  import mf_pkg::*;
#(
  parameter int unsigned DATA_W = 128,
  parameter int unsigned LAW    = 20,
  parameter int unsigned VOL_W  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mode_e             mode,
  input  logic              user_logic_go,
  output logic              user_logic_done,
  output logic              mem_rd_rq,
  output logic [LAW-1:0]    mem_rd_addr,
  input  logic [VOL_W-1:0]  mem_rd_vol,
  input  logic              mem_rd_data_vld,
  input  logic [DATA_W-1:0] mem_rd_data,
  output logic              mem_wr_rq,
  output logic [LAW-1:0]    mem_wr_addr,
  input  logic              mem_wr_ready,
  output logic [DATA_W-1:0] mem_wr_data
);

  localparam logic [127:0] KEY = 128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3210;

  function automatic logic [DATA_W-1:0] xform(input logic [DATA_W-1:0] x);
    logic [127:0] y;
    y = 128'(x);
    return DATA_W'({y[63:0], y[127:64]} ^ KEY);
  endfunction

  int unsigned req_pct    = 100;
  int unsigned runs       = 0;
  int unsigned wr_blocked = 0;

  logic           go_q = 1'b0;
  bit             active = 0;
  int unsigned    vol, rq_sent, wr_done;
  logic [LAW-1:0] addr_q[$];
  typedef struct { logic [LAW-1:0] a; logic [DATA_W-1:0] d; } wr_t;
  wr_t            outq[$];

  // drive requests between clock edges
  always @(negedge clk) begin
    mem_rd_rq       = 1'b0;
    mem_wr_rq       = 1'b0;
    user_logic_done = 1'b0;
    if (active && user_logic_go) begin
      if (rq_sent < vol && ($urandom % 100) < req_pct) begin
        mem_rd_rq   = 1'b1;
        mem_rd_addr = LAW'(rq_sent);
        rq_sent++;
      end
      if (outq.size() != 0) begin
        mem_wr_rq   = 1'b1;
        mem_wr_addr = outq[0].a;
        mem_wr_data = outq[0].d;
      end
      if (wr_done == vol && outq.size() == 0) begin
        user_logic_done = 1'b1;
        active = 0;
      end
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      go_q <= 1'b0;
    end else begin
      go_q <= user_logic_go;
      if (user_logic_go && !go_q) begin
        active  = 1;
        vol     = int'(mem_rd_vol);
        rq_sent = 0;
        wr_done = 0;
        runs++;
        addr_q.delete();
        outq.delete();
      end
      if (mem_wr_rq) begin
        if (mode != MODE_SEQUENTIAL || mem_wr_ready) begin
          void'(outq.pop_front());
          wr_done++;
        end else begin
          wr_blocked++;
        end
      end
      if (mem_rd_rq) addr_q.push_back(mem_rd_addr);
      if (mem_rd_data_vld && addr_q.size() != 0) begin
        wr_t w;
        w.a = addr_q.pop_front();
        w.d = xform(mem_rd_data);
        outq.push_back(w);
      end
    end
  end

  initial begin
    mem_rd_rq = 1'b0; mem_wr_rq = 1'b0; user_logic_done = 1'b0;
    mem_rd_addr = '0; mem_wr_addr = '0; mem_wr_data = '0;
  end

endmodule
