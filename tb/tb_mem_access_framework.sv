// tb_mem_access_framework: end-to-end test of the memory access framework.
//
// The framework runs with small banks (16 blocks each, so a mode-1 logical
// bank of 64 blocks) and multi-buffering on (mode-2 logical banks are
// windows of 8 blocks) between the host memory model, four bank models and
// the stand-in user logic. A series of jobs
// switches between the three access modes; after each job every result
// block in host memory must equal the transformed raw block, and no block
// beyond the result range may be written. The test counts the framework's
// mechanisms and fails if one never happened:
//   rounds      a random-mode job split into several user logic runs
//   stage_in / stage_out   staging transfers between host and local memory
//   modes       a job in each of mode-1, mode-2 and mode-3
//   bypass      a mode-3 job that never touched local memory
//   overlap     a transfer running while the user logic runs (mode-2)
//   starve      a mode-3 read request waiting for host data
//   wr_block    a mode-3 write held back by mem_wr_ready
//   host_stall  a host write refused by the host side
// With an ideal host, a mode-3 job of n blocks must finish within n + 24
// cycles (one block per cycle), and a one-round mode-1 job of n blocks
// within 3n + 40 cycles (stage-in, run and stage-out, not overlapped).
module tb_mem_access_framework;
  import mf_pkg::*;

  localparam int unsigned DW = 128, NB = 4, BAW = 4, LAT = 2, FD = 8, HW = 32, VW = 32;
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

  mem_access_framework #(
    .DATA_W(DW), .NUM_BANKS(NB), .BANK_AW(BAW), .RD_LAT(LAT), .FIFO_DEPTH(FD),
    .MULTI_BUFFER(1'b1), .HADDR_W(HW), .VOL_W(VW)
  ) dut (
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
  int n_overlap = 0;
  int n_multi_round = 0, n_stage_in = 0, n_stage_out = 0, n_bypass = 0, n_starve = 0;
  int n_mode[4] = '{0, 0, 0, 0};
  int bank_ops = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (user_logic_go && dut.u_eng.busy) n_overlap++;
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

    // ideal host: rate checks
    job(MODE_DUAL_RANDOM, 64, 32'h0000_1000, 32'h0001_0000, c);
    expect_rounds(1);
    checks++;
    if (c > 3 * 64 + 40) begin failures++; $display("FAIL: mode-1 round took %0d cycles", c); end
    job(MODE_SEQUENTIAL, 300, 32'h0000_2000, 32'h0002_0000, c);
    checks++;
    if (c > 300 + 24) begin failures++; $display("FAIL: mode-3 stream took %0d cycles", c); end

    // several rounds
    job(MODE_DUAL_RANDOM, 150, 32'h0000_3000, 32'h0003_0000, c);
    expect_rounds(3);
    job(MODE_SINGLE_RANDOM, 70, 32'h0000_4000, 32'h0004_0000, c);
    expect_rounds(9);

    // slow, stalling host and a bursty user logic
    u_host.max_lat = 8; u_host.rd_stall_pct = 40; u_host.wr_stall_pct = 75;
    u_user.req_pct = 60;
    job(MODE_SEQUENTIAL, 200, 32'h0000_5000, 32'h0005_0000, c);
    job(MODE_SINGLE_RANDOM, 33, 32'h0000_6000, 32'h0006_0000, c);
    expect_rounds(5);
    job(MODE_DUAL_RANDOM, 100, 32'h0000_7000, 32'h0007_0000, c);
    expect_rounds(2);
    job(MODE_SEQUENTIAL, 1, 32'h0000_8000, 32'h0008_0000, c);

    mech("rounds", n_multi_round);
    mech("stage_in", n_stage_in);
    mech("stage_out", n_stage_out);
    mech("mode1", n_mode[1]);
    mech("mode2", n_mode[2]);
    mech("mode3", n_mode[3]);
    mech("bypass", n_bypass);
    mech("overlap", n_overlap);
    mech("starve", n_starve);
    mech("wr_block", int'(u_user.wr_blocked));
    mech("host_stall", int'(u_host.wr_stalls));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
