// tb_mem_access_framework_full: the framework at its default size.
//
// The framework is built with every parameter at its default: 128-bit
// blocks and four local banks of 2^18 blocks (4 MB each), so the mode-1
// logical bank holds 2^20 blocks (16 MB) and each mode-2 logical bank 2^19
// blocks (8 MB). Around it are the host memory model, four bank models of
// that size and the stand-in user logic. One job per mode is run, each
// with slightly more raw data than a logical bank holds, so that every
// random-mode job takes two full rounds; mode-3 streams a long run through
// the bypass. Every result block in host memory is checked against the
// transformed raw block, and the mechanism counters of the end-to-end test
// must all be non-zero.
module tb_mem_access_framework_full;
  import mf_pkg::*;

  localparam int unsigned DW = 128, NB = 4, BAW = 18, LAT = 2, HW = 32, VW = 32;
  localparam int unsigned LAW = BAW + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic job_start, job_busy, job_done;
  mode_e job_mode;
  logic [VW-1:0] job_vol;
  logic [HW-1:0] job_src, job_dst;
  logic [15:0] job_rounds;
  logic user_logic_go, user_logic_done, mem_rd_rq, mem_rd_data_vld, mem_wr_rq, mem_wr_ready;
  logic [LAW-1:0] mem_rd_addr, mem_wr_addr;
  logic [VW-1:0] mem_rd_vol;
  logic [DW-1:0] mem_rd_data, mem_wr_data;
  logic hrd_req_valid, hrd_req_ready, hrd_rsp_valid, hwr_valid, hwr_ready;
  logic [HW-1:0] hrd_req_addr, hwr_addr;
  logic [DW-1:0] hrd_rsp_data, hwr_data;
  logic              b_rd_en [NB];
  logic [BAW-1:0]    b_rd_addr [NB];
  logic [DW-1:0]     b_rd_data [NB];
  logic              b_wr_en [NB];
  logic [BAW-1:0]    b_wr_addr [NB];
  logic [DW-1:0]     b_wr_data [NB];

  mem_access_framework dut (
    .clk, .rst_n,
    .job_start, .job_mode, .job_vol, .job_src, .job_dst, .job_busy, .job_done, .job_rounds,
    .user_logic_go, .user_logic_done, .mem_rd_rq, .mem_rd_addr, .mem_rd_vol,
    .mem_rd_data_vld, .mem_rd_data, .mem_wr_rq, .mem_wr_addr, .mem_wr_ready, .mem_wr_data,
    .hrd_req_valid, .hrd_req_ready, .hrd_req_addr, .hrd_rsp_valid, .hrd_rsp_data,
    .hwr_valid, .hwr_ready, .hwr_addr, .hwr_data,
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

  mf_user_logic_model #(.DATA_W(DW), .LAW(LAW), .VOL_W(VW)) u_user (
    .clk, .rst_n, .mode(job_mode), .user_logic_go, .user_logic_done,
    .mem_rd_rq, .mem_rd_addr, .mem_rd_vol, .mem_rd_data_vld, .mem_rd_data,
    .mem_wr_rq, .mem_wr_addr, .mem_wr_ready, .mem_wr_data
  );

  int checks = 0, failures = 0;
  // mechanism counters
  int n_multi_round = 0, n_stage_in = 0, n_stage_out = 0, n_bypass = 0, n_starve = 0;
  int n_mode[4] = '{0, 0, 0, 0};
  int bank_ops = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.eng_start && dut.eng_dir == XFER_IN)  n_stage_in++;
      if (dut.eng_start && dut.eng_dir == XFER_OUT) n_stage_out++;
      if (dut.u_str.pend != 0 && dut.u_str.rq_empty && dut.seq_mode) n_starve++;
      for (int b = 0; b < NB; b++) if (b_rd_en[b] || b_wr_en[b]) bank_ops++;
    end
  end

  task automatic job(mode_e m, int n, logic [HW-1:0] s, logic [HW-1:0] d, output int cycles);
    int ops0;
    ops0 = bank_ops;
    @(negedge clk);
    job_start = 1'b1; job_mode = m; job_vol = VW'(n); job_src = s; job_dst = d;
    @(negedge clk);
    job_start = 1'b0;
    cycles = 1;
    while (!job_done) begin
      @(negedge clk);
      cycles++;
    end
    n_mode[m]++;
    if (job_rounds > 1) n_multi_round++;
    if (m == MODE_SEQUENTIAL && bank_ops == ops0) n_bypass++;
    for (int i = 0; i < n; i++) begin
      checks++;
      if (!u_host.written(d + HW'(i)) ||
          u_host.peek(d + HW'(i)) !== u_user.xform(u_host.peek(s + HW'(i)))) begin
        failures++;
        if (failures < 10) $display("FAIL: %s job, result block %0d wrong", m.name(), i);
      end
    end
    checks++;
    if (u_host.written(d + HW'(n))) begin failures++; $display("FAIL: write beyond results"); end
    $display("%s job of %0d blocks: %0d rounds, %0d cycles", m.name(), n, job_rounds, cycles);
  endtask

  task automatic expect_rounds(int r);
    checks++;
    if (job_rounds != 16'(r)) begin failures++; $display("FAIL: %0d rounds, expected %0d", job_rounds, r); end
  endtask

  task automatic mech(string name, int n);
    checks++;
    $display("mechanism %-10s happened %0d times", name, n);
    if (n == 0) begin failures++; $display("FAIL: mechanism %s never happened", name); end
  endtask

  initial begin
    int c;
    job_start = 0; job_mode = MODE_NONE; job_vol = '0; job_src = '0; job_dst = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // ideal host: one block per cycle in mode-3
    job(MODE_SEQUENTIAL, 20000, 32'h1000_0000, 32'h2000_0000, c);
    checks++;
    if (c > 20000 + 40) begin failures++; $display("FAIL: mode-3 stream took %0d cycles", c); end
    job(MODE_DUAL_RANDOM, (1 << 20) + 300, 32'h3000_0000, 32'h4000_0000, c);
    expect_rounds(2);

    // slow, stalling host and a bursty user logic
    u_host.max_lat = 8; u_host.rd_stall_pct = 20; u_host.wr_stall_pct = 30;
    u_user.req_pct = 80;
    job(MODE_SINGLE_RANDOM, (1 << 19) + 200, 32'h5000_0000, 32'h6000_0000, c);
    expect_rounds(2);
    job(MODE_SEQUENTIAL, 3000, 32'h7000_0000, 32'h7800_0000, c);

    mech("rounds", n_multi_round);
    mech("stage_in", n_stage_in);
    mech("stage_out", n_stage_out);
    mech("mode1", n_mode[1]);
    mech("mode2", n_mode[2]);
    mech("mode3", n_mode[3]);
    mech("bypass", n_bypass);
    mech("starve", n_starve);
    mech("wr_block", int'(u_user.wr_blocked));
    mech("host_stall", int'(u_host.wr_stalls));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
