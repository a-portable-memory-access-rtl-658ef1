// tb_mf_transfer_engine: self-checking test of the staging engine.
//
// The engine is wired to a bank mapper in mode-1 over four small bank
// models and to the host memory model. Each pass stages a block range in
// (host -> logical bank 0), checks every bank word against host memory,
// then stages it out to another host region and checks every written host
// block. The first pass runs with an ideal host (one-cycle latency, no
// stalls) and checks the rate: count blocks must take at most
// count + 8 cycles in each direction. Later passes add random read latency
// and random request and write stalls. A zero-length transfer must finish
// at once.
module tb_mf_transfer_engine;
  import mf_pkg::*;

  localparam int unsigned DW = 128, NB = 4, BAW = 5, LAT = 2, HW = 32, VW = 32;
  localparam int unsigned LAW = BAW + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, lbank, busy, done;
  logic [31:0] progress;
  xfer_dir_e dir;
  logic [HW-1:0] host_base;
  logic [VW-1:0] count;
  logic hrd_req_valid, hrd_req_ready, hrd_rsp_valid, hwr_valid, hwr_ready;
  logic [HW-1:0] hrd_req_addr, hwr_addr;
  logic [DW-1:0] hrd_rsp_data, hwr_data;
  logic lrd_en, lrd_lbank, lrd_vld, lwr_en, lwr_lbank;
  logic [LAW-1:0] lrd_addr, lwr_addr;
  logic [DW-1:0] lrd_data, lwr_data;
  logic              b_rd_en [NB];
  logic [BAW-1:0]    b_rd_addr [NB];
  logic [DW-1:0]     b_rd_data [NB];
  logic              b_wr_en [NB];
  logic [BAW-1:0]    b_wr_addr [NB];
  logic [DW-1:0]     b_wr_data [NB];

  mf_transfer_engine #(.DATA_W(DW), .LAW(LAW), .HADDR_W(HW), .VOL_W(VW), .FIFO_DEPTH(8)) dut (
    .clk, .rst_n, .start, .dir, .lbank, .host_base, .count, .busy, .done, .progress,
    .hrd_req_valid, .hrd_req_ready, .hrd_req_addr, .hrd_rsp_valid, .hrd_rsp_data,
    .hwr_valid, .hwr_ready, .hwr_addr, .hwr_data,
    .lrd_en, .lrd_lbank, .lrd_addr, .lrd_vld, .lrd_data,
    .lwr_en, .lwr_lbank, .lwr_addr, .lwr_data
  );

  mf_bank_mapper #(.DATA_W(DW), .NUM_BANKS(NB), .BANK_AW(BAW), .RD_LAT(LAT)) u_map (
    .clk, .rst_n, .mode(MODE_DUAL_RANDOM), .mb(1'b0),
    .rd_en(lrd_en), .rd_lbank(lrd_lbank), .rd_addr(lrd_addr), .rd_vld(lrd_vld), .rd_data(lrd_data),
    .wr_en(lwr_en), .wr_lbank(lwr_lbank), .wr_addr(lwr_addr), .wr_data(lwr_data),
    .bank_rd_en(b_rd_en), .bank_rd_addr(b_rd_addr), .bank_rd_data(b_rd_data),
    .bank_wr_en(b_wr_en), .bank_wr_addr(b_wr_addr), .bank_wr_data(b_wr_data)
  );

  for (genvar g = 0; g < NB; g++) begin : g_bank
    mf_sram_bank_model #(.DATA_W(DW), .AW(BAW), .RD_LAT(LAT)) u_bank (
      .clk, .rd_en(b_rd_en[g]), .rd_addr(b_rd_addr[g]), .rd_data(b_rd_data[g]),
      .wr_en(b_wr_en[g]), .wr_addr(b_wr_addr[g]), .wr_data(b_wr_data[g])
    );
  end

  mf_host_mem_model #(.DATA_W(DW), .HADDR_W(HW)) u_host (
    .clk, .rst_n, .hrd_req_valid, .hrd_req_ready, .hrd_req_addr,
    .hrd_rsp_valid, .hrd_rsp_data, .hwr_valid, .hwr_ready, .hwr_addr, .hwr_data
  );

  int checks = 0, failures = 0;

  function automatic logic [DW-1:0] peek_bank(int b, logic [BAW-1:0] a);
    case (b)
      0: return g_bank[0].u_bank.peek(a);
      1: return g_bank[1].u_bank.peek(a);
      2: return g_bank[2].u_bank.peek(a);
      default: return g_bank[3].u_bank.peek(a);
    endcase
  endfunction

  task automatic run(xfer_dir_e d, logic [HW-1:0] base, int n, output int cycles);
    @(negedge clk);
    start = 1'b1; dir = d; lbank = 1'b0; host_base = base; count = VW'(n);
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  task automatic pass(int n, logic [HW-1:0] src, logic [HW-1:0] dst, bit check_rate);
    int cin, cout;
    run(XFER_IN, src, n, cin);
    checks++;
    if (progress != VW'(n)) begin failures++; $display("FAIL: progress %0d after %0d blocks", progress, n); end
    for (int a = 0; a < n; a++) begin
      checks++;
      if (peek_bank(a >> BAW, BAW'(a)) !== u_host.peek(src + HW'(a))) begin
        failures++;
        $display("FAIL: staged-in block %0d wrong", a);
      end
    end
    run(XFER_OUT, dst, n, cout);
    for (int a = 0; a < n; a++) begin
      checks++;
      if (!u_host.written(dst + HW'(a)) || u_host.peek(dst + HW'(a)) !== u_host.peek(src + HW'(a))) begin
        failures++;
        $display("FAIL: staged-out block %0d wrong", a);
      end
    end
    checks++;
    if (u_host.written(dst + HW'(n))) begin
      failures++;
      $display("FAIL: write past the end of the range");
    end
    if (check_rate) begin
      checks += 2;
      if (cin > n + 8)  begin failures++; $display("FAIL: stage-in of %0d took %0d cycles", n, cin); end
      if (cout > n + 8) begin failures++; $display("FAIL: stage-out of %0d took %0d cycles", n, cout); end
      $display("rate: %0d blocks in %0d / out %0d cycles", n, cin, cout);
    end
  endtask

  initial begin
    int c;
    start = 0; dir = XFER_IN; lbank = 0; host_base = '0; count = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    pass(128, 32'h1000, 32'h8000, 1'b1);                 // full bank, ideal host
    u_host.max_lat = 6; u_host.rd_stall_pct = 30; u_host.wr_stall_pct = 40;
    pass(77, 32'h2000, 32'h9000, 1'b0);
    u_host.max_lat = 12; u_host.rd_stall_pct = 60; u_host.wr_stall_pct = 70;
    pass(128, 32'h3000, 32'hA000, 1'b0);
    pass(1, 32'h4000, 32'hB000, 1'b0);
    checks++;
    if (u_host.wr_stalls == 0) begin failures++; $display("FAIL: no host write stall"); end

    run(XFER_IN, 32'h5000, 0, c);
    checks++;
    if (c > 2) begin failures++; $display("FAIL: empty transfer took %0d cycles", c); end

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
