// mf_transfer_engine: moves a range of data blocks between host memory and a
// logical local-memory bank.
//
// The framework, not the user logic, carries data between host memory and
// local memory: raw data is staged into a logical bank before the user logic
// starts, and result data is copied back after it has finished.
//
// A transfer is started with a one-cycle start pulse carrying its direction,
// logical bank, host base block address and block count; done pulses once
// when the last block has been written at the destination.
//   XFER_IN : read requests for host blocks base .. base+count-1 are issued
//             with a valid/ready handshake; the responses, which arrive in
//             request order and cannot be stalled, are written one per cycle
//             to logical addresses 0 .. count-1 (one cycle after arrival).
//   XFER_OUT: logical addresses 0 .. count-1 are read from the bank and the
//             returning data queued in a FIFO of FIFO_DEPTH blocks, which is
//             written to host blocks base .. base+count-1 with a valid/ready
//             handshake. A read is only issued while the blocks in flight
//             plus the queued blocks leave room in the FIFO, so host stalls
//             never lose data.
// Both directions sustain one block per cycle when the host side does.
// progress counts the blocks already written at the destination, so a
// reader may follow a stage-in block by block.
// The host port shape (request/response reads, valid/ready writes, block
// addresses) is this design's stand-in for the vendor interface block.
module mf_transfer_engine
  import mf_pkg::*;
#(
  parameter int unsigned DATA_W     = mf_pkg::MF_DATA_W,
  parameter int unsigned LAW        = 20,
  parameter int unsigned HADDR_W    = mf_pkg::MF_HADDR_W,
  parameter int unsigned VOL_W      = mf_pkg::MF_VOL_W,
  parameter int unsigned FIFO_DEPTH = 16,
  localparam int unsigned CW        = $clog2(FIFO_DEPTH) + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // control
  input  logic                start,
  input  xfer_dir_e           dir,
  input  logic                lbank,
  input  logic [HADDR_W-1:0]  host_base,
  input  logic [VOL_W-1:0]    count,
  output logic                busy,
  output logic                done,
  output logic [VOL_W-1:0]    progress,   // blocks written at the destination so far
  // host memory read: requests, then in-order responses
  output logic                hrd_req_valid,
  input  logic                hrd_req_ready,
  output logic [HADDR_W-1:0]  hrd_req_addr,
  input  logic                hrd_rsp_valid,
  input  logic [DATA_W-1:0]   hrd_rsp_data,
  // host memory write
  output logic                hwr_valid,
  input  logic                hwr_ready,
  output logic [HADDR_W-1:0]  hwr_addr,
  output logic [DATA_W-1:0]   hwr_data,
  // logical bank (through the bank mapper)
  output logic                lrd_en,
  output logic                lrd_lbank,
  output logic [LAW-1:0]      lrd_addr,
  input  logic                lrd_vld,
  input  logic [DATA_W-1:0]   lrd_data,
  output logic                lwr_en,
  output logic                lwr_lbank,
  output logic [LAW-1:0]      lwr_addr,
  output logic [DATA_W-1:0]   lwr_data
);

  xfer_dir_e          dir_q;
  logic               lbank_q;
  logic [HADDR_W-1:0] base_q;
  logic [VOL_W-1:0]   count_q;
  logic [VOL_W-1:0]   issue_cnt;   // requests issued (IN) / bank reads issued (OUT)
  logic [VOL_W-1:0]   fin_cnt;     // blocks written at the destination
  logic [CW-1:0]      inflight;    // OUT: bank reads not yet returned
  logic [VOL_W-1:0]   rsp_cnt;     // IN: host responses received

  assign progress = fin_cnt;

  // ---------------- XFER_IN ----------------
  assign hrd_req_valid = busy && (dir_q == XFER_IN) && (issue_cnt != count_q);
  assign hrd_req_addr  = base_q + HADDR_W'(issue_cnt);

  // ---------------- XFER_OUT ----------------
  logic [DATA_W-1:0] q_dout;
  logic              q_empty, q_full;
  logic [CW-1:0]     q_count;
  logic              q_pop;

  assign lrd_en    = busy && (dir_q == XFER_OUT) && (issue_cnt != count_q) &&
                     ((inflight + q_count) < CW'(FIFO_DEPTH));
  assign lrd_lbank = lbank_q;
  assign lrd_addr  = LAW'(issue_cnt);

  mf_sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_outq (
    .clk, .rst_n,
    .push (lrd_vld && busy && (dir_q == XFER_OUT)),
    .din  (lrd_data),
    .pop  (q_pop),
    .dout (q_dout),
    .empty(q_empty),
    .full (q_full),
    .count(q_count)
  );

  assign hwr_valid = !q_empty;
  assign hwr_data  = q_dout;
  assign hwr_addr  = base_q + HADDR_W'(fin_cnt);
  assign q_pop     = hwr_valid && hwr_ready;

  // ---------------- control ----------------
  logic last_in, last_out;
  assign last_in  = (dir_q == XFER_IN)  && lwr_en && (fin_cnt + 1'b1 == count_q);
  assign last_out = (dir_q == XFER_OUT) && q_pop  && (fin_cnt + 1'b1 == count_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      dir_q     <= XFER_IN;
      lbank_q   <= 1'b0;
      base_q    <= '0;
      count_q   <= '0;
      issue_cnt <= '0;
      fin_cnt   <= '0;
      inflight  <= '0;
      rsp_cnt   <= '0;
      lwr_en    <= 1'b0;
      lwr_lbank <= 1'b0;
      lwr_addr  <= '0;
      lwr_data  <= '0;
    end else begin
      done <= 1'b0;
      // registered write of an arriving host block into the bank
      lwr_en    <= busy && (dir_q == XFER_IN) && hrd_rsp_valid;
      lwr_lbank <= lbank_q;
      lwr_addr  <= LAW'(rsp_cnt);
      lwr_data  <= hrd_rsp_data;
      if (start && !busy) begin
        dir_q     <= dir;
        lbank_q   <= lbank;
        base_q    <= host_base;
        count_q   <= count;
        issue_cnt <= '0;
        fin_cnt   <= '0;
        inflight  <= '0;
        rsp_cnt   <= '0;
        if (count == '0) done <= 1'b1;
        else             busy <= 1'b1;
      end else if (busy) begin
        if (hrd_req_valid && hrd_req_ready) issue_cnt <= issue_cnt + 1'b1;
        if (lrd_en)                         issue_cnt <= issue_cnt + 1'b1;
        inflight <= inflight + CW'(lrd_en) - CW'(lrd_vld && (dir_q == XFER_OUT));
        if (hrd_rsp_valid && (dir_q == XFER_IN)) rsp_cnt <= rsp_cnt + 1'b1;
        if (lwr_en || q_pop) fin_cnt <= fin_cnt + 1'b1;
        if (last_in || last_out) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    (hrd_rsp_valid && busy && dir_q == XFER_IN) |-> (rsp_cnt != issue_cnt));
  a_ret_expected: assert property (@(posedge clk) disable iff (!rst_n)
    (lrd_vld && busy && dir_q == XFER_OUT) |-> (inflight != '0));

endmodule
