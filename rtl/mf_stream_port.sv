// mf_stream_port: the sequential access mode (mode-3) ports.
//
// In sequential mode every access is in order, so the user logic sees just
// one read port and one write port and no addresses. Local memory is
// bypassed: raw blocks are read from host memory and handed to the user
// logic directly, and result blocks go straight back to host memory.
//
// Read side: after a start pulse the port fetches vol blocks from host
// blocks src_base, src_base+1, ... into a read FIFO, keeping requests in
// flight plus queued blocks within FIFO_DEPTH. mem_rd_vol (driven by the
// controller) tells the user logic how many blocks to expect. Each cycle
// the user logic asserts mem_rd_rq it asks for one more block; requests
// are counted, and the oldest queued block is delivered with
// mem_rd_data_vld for every pending request, at most one per cycle. A
// request is served at the earliest one cycle after it is made; when the
// FIFO is empty the request waits (a starved read).
// Write side: mem_wr_ready is high while the write FIFO has room; a block
// offered with mem_wr_rq while ready is queued and then written to host
// blocks dst_base, dst_base+1, ... with a valid/ready handshake. A write
// offered while not ready is refused. drained is high when nothing is left
// to write to host memory.
// The request/credit scheme on the user read side is this design's reading
// of the mem_rd_rq signal for this mode.
module mf_stream_port
  import mf_pkg::*;
#(
  parameter int unsigned DATA_W     = mf_pkg::MF_DATA_W,
  parameter int unsigned HADDR_W    = mf_pkg::MF_HADDR_W,
  parameter int unsigned VOL_W      = mf_pkg::MF_VOL_W,
  parameter int unsigned FIFO_DEPTH = 16,
  localparam int unsigned CW        = $clog2(FIFO_DEPTH) + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // control
  input  logic                start,
  input  logic [HADDR_W-1:0]  src_base,
  input  logic [HADDR_W-1:0]  dst_base,
  input  logic [VOL_W-1:0]    vol,
  output logic                drained,
  // user read side
  input  logic                mem_rd_rq,
  output logic                mem_rd_data_vld,
  output logic [DATA_W-1:0]   mem_rd_data,
  // user write side
  input  logic                mem_wr_rq,
  input  logic [DATA_W-1:0]   mem_wr_data,
  output logic                mem_wr_ready,
  // host memory read
  output logic                hrd_req_valid,
  input  logic                hrd_req_ready,
  output logic [HADDR_W-1:0]  hrd_req_addr,
  input  logic                hrd_rsp_valid,
  input  logic [DATA_W-1:0]   hrd_rsp_data,
  // host memory write
  output logic                hwr_valid,
  input  logic                hwr_ready,
  output logic [HADDR_W-1:0]  hwr_addr,
  output logic [DATA_W-1:0]   hwr_data
);

  logic [HADDR_W-1:0] src_q, dst_q;
  logic [VOL_W-1:0]   vol_q;
  logic [VOL_W-1:0]   issued;      // host read requests issued
  logic [CW-1:0]      inflight;    // host reads not yet answered
  logic [VOL_W-1:0]   pend;        // user read requests not yet served
  logic [VOL_W-1:0]   written;     // blocks written to host memory

  // ---------------- read side ----------------
  logic [DATA_W-1:0] rq_dout;
  logic              rq_empty, rq_full;
  logic [CW-1:0]     rq_count;
  logic              serve;

  assign hrd_req_valid = (issued != vol_q) && ((inflight + rq_count) < CW'(FIFO_DEPTH));
  assign hrd_req_addr  = src_q + HADDR_W'(issued);

  mf_sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_rdq (
    .clk, .rst_n,
    .push (hrd_rsp_valid),
    .din  (hrd_rsp_data),
    .pop  (serve),
    .dout (rq_dout),
    .empty(rq_empty),
    .full (rq_full),
    .count(rq_count)
  );

  assign serve = (pend != '0) && !rq_empty;

  // ---------------- write side ----------------
  logic              wq_empty, wq_full;
  logic [CW-1:0]     wq_count;
  logic              wq_pop;

  assign mem_wr_ready = !wq_full;

  mf_sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_wrq (
    .clk, .rst_n,
    .push (mem_wr_rq && mem_wr_ready),
    .din  (mem_wr_data),
    .pop  (wq_pop),
    .dout (hwr_data),
    .empty(wq_empty),
    .full (wq_full),
    .count(wq_count)
  );

  assign hwr_valid = !wq_empty;
  assign hwr_addr  = dst_q + HADDR_W'(written);
  assign wq_pop    = hwr_valid && hwr_ready;
  assign drained   = wq_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_q           <= '0;
      dst_q           <= '0;
      vol_q           <= '0;
      issued          <= '0;
      inflight        <= '0;
      pend            <= '0;
      written         <= '0;
      mem_rd_data_vld <= 1'b0;
      mem_rd_data     <= '0;
    end else begin
      mem_rd_data_vld <= serve;
      if (serve) mem_rd_data <= rq_dout;
      pend     <= pend + VOL_W'(mem_rd_rq) - VOL_W'(serve);
      inflight <= inflight + CW'(hrd_req_valid && hrd_req_ready) - CW'(hrd_rsp_valid);
      if (hrd_req_valid && hrd_req_ready) issued <= issued + 1'b1;
      if (wq_pop) written <= written + 1'b1;
      if (start) begin
        src_q   <= src_base;
        dst_q   <= dst_base;
        vol_q   <= vol;
        issued  <= '0;
        pend    <= VOL_W'(mem_rd_rq);
        written <= '0;
      end
    end
  end

  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    hrd_rsp_valid |-> (inflight != '0));
  a_no_rsp_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    hrd_rsp_valid |-> !rq_full);

endmodule
