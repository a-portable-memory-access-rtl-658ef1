// mf_host_mem_model: behavioural model of host memory as seen through the
// platform's interface block.
//
// Read requests are taken with a valid/ready handshake and answered in
// order, each after a random latency of 1 to max_lat cycles, one response
// per cycle at most. Writes are taken with a valid/ready handshake. The
// ready signals are dropped at random with the percentages rd_stall_pct and
// wr_stall_pct, which a testbench may change at any time. A block never
// written holds init_word(address), so raw data needs no loading; the
// written blocks are kept in an associative array. stall counters report
// how often a valid was refused.
module mf_host_mem_model #(
  parameter int unsigned DATA_W  = 128,
  parameter int unsigned HADDR_W = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               hrd_req_valid,
  output logic               hrd_req_ready,
  input  logic [HADDR_W-1:0] hrd_req_addr,
  output logic               hrd_rsp_valid,
  output logic [DATA_W-1:0]  hrd_rsp_data,
  input  logic               hwr_valid,
  output logic               hwr_ready,
  input  logic [HADDR_W-1:0] hwr_addr,
  input  logic [DATA_W-1:0]  hwr_data
);

  int unsigned rd_stall_pct = 0;
  int unsigned wr_stall_pct = 0;
  int unsigned max_lat      = 1;
  int unsigned rd_stalls    = 0;
  int unsigned wr_stalls    = 0;
  int unsigned writes       = 0;

  logic [DATA_W-1:0] mem [logic [HADDR_W-1:0]];

  typedef struct {
    longint unsigned   due;
    logic [DATA_W-1:0] data;
  } rsp_t;
  rsp_t            rsp_q[$];
  longint unsigned now = 0;
  longint unsigned last_due = 0;

  function automatic logic [DATA_W-1:0] init_word(input logic [HADDR_W-1:0] a);
    logic [31:0] x;
    x = 32'(a) * 32'h9E3779B1 + 32'h7F4A7C15;
    return DATA_W'({x ^ 32'h0F1E2D3C, 32'(a), ~x, x + 32'h01234567});
  endfunction

  function automatic logic [DATA_W-1:0] peek(input logic [HADDR_W-1:0] a);
    if (mem.exists(a)) return mem[a];
    return init_word(a);
  endfunction

  function automatic bit written(input logic [HADDR_W-1:0] a);
    return mem.exists(a);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hrd_req_ready <= 1'b0;
      hwr_ready     <= 1'b0;
      hrd_rsp_valid <= 1'b0;
      hrd_rsp_data  <= '0;
    end else begin
      now <= now + 1;
      if (hrd_req_valid && !hrd_req_ready) rd_stalls <= rd_stalls + 1;
      if (hwr_valid && !hwr_ready)         wr_stalls <= wr_stalls + 1;
      if (hrd_req_valid && hrd_req_ready) begin
        rsp_t r;
        longint unsigned d;
        d = now + 64'(1 + ($urandom % max_lat));
        if (d <= last_due) d = last_due + 1;
        last_due = d;
        r.due  = d;
        r.data = peek(hrd_req_addr);
        rsp_q.push_back(r);
      end
      if (hwr_valid && hwr_ready) begin
        mem[hwr_addr] = hwr_data;
        writes <= writes + 1;
      end
      if (rsp_q.size() != 0 && rsp_q[0].due <= now) begin
        hrd_rsp_valid <= 1'b1;
        hrd_rsp_data  <= rsp_q[0].data;
        void'(rsp_q.pop_front());
      end else begin
        hrd_rsp_valid <= 1'b0;
      end
      hrd_req_ready <= (($urandom % 100) >= rd_stall_pct);
      hwr_ready     <= (($urandom % 100) >= wr_stall_pct);
    end
  end

endmodule
