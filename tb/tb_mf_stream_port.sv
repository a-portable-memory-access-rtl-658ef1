// tb_mf_stream_port: self-checking test of the sequential-mode ports.
//
// A stand-in user logic requests raw blocks with mem_rd_rq, checks that
// they arrive in host order, transforms each (xor with a constant, halves
// swapped) and writes the result whenever mem_wr_ready allows. Host memory
// must then hold the transformed stream at the destination, and nothing
// beyond it. Run 1 has an ideal host and a user that asks every cycle:
// vol blocks must pass in at most vol + 12 cycles. Run 2 has a slow,
// stalling host (so reads starve and mem_wr_ready drops) and a user that
// requests in bursts. Both events are counted and must occur.
module tb_mf_stream_port;
  import mf_pkg::*;

  localparam int unsigned DW = 128, HW = 32, VW = 32, FD = 8;
  localparam logic [DW-1:0] KEY = 128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3210;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, drained;
  logic [HW-1:0] src_base, dst_base;
  logic [VW-1:0] vol;
  logic mem_rd_rq, mem_rd_data_vld, mem_wr_rq, mem_wr_ready;
  logic [DW-1:0] mem_rd_data, mem_wr_data;
  logic hrd_req_valid, hrd_req_ready, hrd_rsp_valid, hwr_valid, hwr_ready;
  logic [HW-1:0] hrd_req_addr, hwr_addr;
  logic [DW-1:0] hrd_rsp_data, hwr_data;

  mf_stream_port #(.DATA_W(DW), .HADDR_W(HW), .VOL_W(VW), .FIFO_DEPTH(FD)) dut (
    .clk, .rst_n, .start, .src_base, .dst_base, .vol, .drained,
    .mem_rd_rq, .mem_rd_data_vld, .mem_rd_data,
    .mem_wr_rq, .mem_wr_data, .mem_wr_ready,
    .hrd_req_valid, .hrd_req_ready, .hrd_req_addr, .hrd_rsp_valid, .hrd_rsp_data,
    .hwr_valid, .hwr_ready, .hwr_addr, .hwr_data
  );

  mf_host_mem_model #(.DATA_W(DW), .HADDR_W(HW)) u_host (
    .clk, .rst_n, .hrd_req_valid, .hrd_req_ready, .hrd_req_addr,
    .hrd_rsp_valid, .hrd_rsp_data, .hwr_valid, .hwr_ready, .hwr_addr, .hwr_data
  );

  function automatic logic [DW-1:0] xform(logic [DW-1:0] x);
    return {x[63:0], x[127:64]} ^ KEY;
  endfunction

  int checks = 0, failures = 0;
  int starved = 0, wr_blocked = 0;

  // stand-in user logic
  int unsigned rq_sent, rx_cnt, req_pct;
  logic [DW-1:0] outq[$];
  bit running;

  always @(negedge clk) begin
    mem_rd_rq = 1'b0;
    mem_wr_rq = 1'b0;
    if (running) begin
      if (rq_sent < vol && ($urandom % 100) < req_pct) begin
        mem_rd_rq = 1'b1;
        rq_sent++;
      end
      if (outq.size() != 0) begin
        mem_wr_data = outq[0];
        mem_wr_rq = 1'b1;
      end
    end
  end

  always @(posedge clk) begin
    if (running) begin
      if (mem_wr_rq && mem_wr_ready) void'(outq.pop_front());
      if (mem_wr_rq && !mem_wr_ready) wr_blocked++;
      if (dut.pend != 0 && dut.rq_empty) starved++;
      if (mem_rd_data_vld) begin
        checks++;
        if (mem_rd_data !== u_host.peek(src_base + HW'(rx_cnt))) begin
          failures++;
          $display("FAIL: read block %0d out of order or wrong", rx_cnt);
        end
        outq.push_back(xform(mem_rd_data));
        rx_cnt++;
      end
    end
  end

  task automatic run(logic [HW-1:0] s, logic [HW-1:0] d, int n, int pct, output int cycles);
    @(negedge clk);
    src_base = s; dst_base = d; vol = VW'(n); start = 1'b1;
    rq_sent = 0; rx_cnt = 0; req_pct = pct;
    @(negedge clk);
    start = 1'b0; running = 1'b1;
    cycles = 1;
    while (!(rx_cnt == n && outq.size() == 0 && drained)) begin
      @(negedge clk);
      cycles++;
    end
    running = 1'b0;
    for (int i = 0; i < n; i++) begin
      checks++;
      if (!u_host.written(d + HW'(i)) || u_host.peek(d + HW'(i)) !== xform(u_host.peek(s + HW'(i)))) begin
        failures++;
        $display("FAIL: result block %0d wrong", i);
      end
    end
    checks++;
    if (u_host.written(d + HW'(n))) begin failures++; $display("FAIL: extra result"); end
  endtask

  initial begin
    int c;
    start = 0; src_base = '0; dst_base = '0; vol = '0; running = 0;
    mem_wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    run(32'h100, 32'h4000, 200, 100, c);
    checks++;
    $display("rate: 200 blocks in %0d cycles", c);
    if (c > 200 + 12) begin failures++; $display("FAIL: stream too slow"); end

    u_host.max_lat = 10; u_host.rd_stall_pct = 50; u_host.wr_stall_pct = 80;
    run(32'h900, 32'h6000, 150, 70, c);

    checks += 2;
    if (starved == 0)    begin failures++; $display("FAIL: no starved read seen"); end
    if (wr_blocked == 0) begin failures++; $display("FAIL: mem_wr_ready never dropped"); end
    $display("starved=%0d wr_blocked=%0d", starved, wr_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
