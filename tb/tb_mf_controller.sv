// tb_mf_controller: self-checking test of the job sequencer.
//
// The transfer engine and the stream port are replaced by simple
// responders: a transfer finishes a few cycles after its start pulse, and
// the stream port reports itself drained some cycles after the user logic
// finishes. A stand-in user logic raises user_logic_done a few cycles after
// each rising edge of user_logic_go. With banks of 8 blocks (mode-1 logical
// bank of 32 blocks, mode-2 banks of 16) the test checks the exact list of
// transfer commands (direction, logical bank, host base, count), the number
// of rounds, mem_rd_vol in each round, the gap between user_logic_done and
// the stage-out, that nothing is transferred in sequential mode, that the
// job ends only once the stream has drained, and that an empty job ends at
// once. A second instance, built with SEQ_STAGED set, runs staged mode-3
// jobs: it must start the user logic together with each stage-in (with
// ls_start), stage results out of logical bank 1 only once both the run and
// the stage-in have ended, whichever ends last, and never start the stream
// port.
module tb_mf_controller;
  import mf_pkg::*;

  localparam int unsigned NB = 4, BAW = 3, LAT = 2, HW = 32, VW = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic job_start, job_busy, job_done, user_logic_go, user_logic_done, user_win, eng_win;
  mode_e job_mode, mode;
  logic [VW-1:0] job_vol, mem_rd_vol, eng_count;
  logic [HW-1:0] job_src, job_dst, eng_host_base, str_src, str_dst;
  logic [15:0] rounds;
  logic eng_start, eng_lbank, eng_done, str_start, str_drained;
  xfer_dir_e eng_dir;

  mf_controller #(.NUM_BANKS(NB), .BANK_AW(BAW), .RD_LAT(LAT), .HADDR_W(HW), .VOL_W(VW)) dut (
    .clk, .rst_n, .job_start, .job_mode, .job_vol, .job_src, .job_dst,
    .job_busy, .job_done, .rounds, .mode,
    .user_logic_go, .user_logic_done, .mem_rd_vol, .user_win,
    .eng_start, .eng_dir, .eng_lbank, .eng_host_base, .eng_count, .eng_win, .eng_done,
    .ls_start(), .str_start, .str_src, .str_dst, .str_drained
  );

  // staged mode-3 instance with its own responders
  logic s_start, s_busy, s_done, s_go, s_udone, s_eng_start, s_eng_lbank, s_eng_done, s_ls_start, s_str_start;
  mode_e s_mode;
  logic [VW-1:0] s_vol, s_eng_count;
  logic [HW-1:0] s_eng_base;
  logic [15:0] s_rounds;
  xfer_dir_e s_eng_dir;

  mf_controller #(.NUM_BANKS(NB), .BANK_AW(BAW), .RD_LAT(LAT), .SEQ_STAGED(1'b1),
                  .HADDR_W(HW), .VOL_W(VW)) dut_s (
    .clk, .rst_n, .job_start(s_start), .job_mode, .job_vol, .job_src, .job_dst,
    .job_busy(s_busy), .job_done(s_done), .rounds(s_rounds), .mode(s_mode),
    .user_logic_go(s_go), .user_logic_done(s_udone), .mem_rd_vol(s_vol), .user_win(),
    .eng_start(s_eng_start), .eng_dir(s_eng_dir), .eng_lbank(s_eng_lbank),
    .eng_host_base(s_eng_base), .eng_count(s_eng_count), .eng_win(), .eng_done(s_eng_done),
    .ls_start(s_ls_start), .str_start(s_str_start), .str_src(), .str_dst(), .str_drained(1'b1)
  );

  int checks = 0, failures = 0;

  // recorded transfer commands
  typedef struct { xfer_dir_e dir; logic lb; logic [HW-1:0] base; logic [VW-1:0] cnt; } cmd_t;
  cmd_t cmds[$];
  int   go_rises = 0, str_starts = 0;
  logic [VW-1:0] vols[$];
  longint unsigned cyc = 0, done_cyc = 0;
  int   eng_timer = -1, user_timer = -1, drain_timer = -1;
  logic go_q = 1'b0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      go_q <= user_logic_go;
      if (eng_start) begin
        cmds.push_back('{eng_dir, eng_lbank, eng_host_base, eng_count});
        if (eng_dir == XFER_OUT) begin
          checks++;
          if (cyc < done_cyc + LAT + 1) begin
            failures++;
            $display("FAIL: stage-out %0d cycles after user_logic_done", cyc - done_cyc);
          end
        end
      end
      if (str_start) str_starts++;
      if (user_logic_go && !go_q) begin
        go_rises++;
        vols.push_back(mem_rd_vol);
      end
      if (user_logic_done) done_cyc <= cyc;
    end
  end

  // responders, driven away from the clock edge
  always @(negedge clk) begin
    eng_done = 1'b0;
    user_logic_done = 1'b0;
    if (eng_start) eng_timer = 3 + int'(eng_count % 4);
    else if (eng_timer > 0) eng_timer--;
    else if (eng_timer == 0) begin eng_done = 1'b1; eng_timer = -1; end
    if (user_logic_go && !go_q && user_timer < 0) user_timer = 5;
    else if (user_timer > 0) user_timer--;
    else if (user_timer == 0 && user_logic_go) begin user_logic_done = 1'b1; user_timer = -1; end
    if (drain_timer > 0) begin drain_timer--; str_drained = 1'b0; end
    else str_drained = 1'b1;
  end

  // staged instance: command log and responders. s_eng_lat and s_user_lat set
  // how long the stage-in and the run take, so either may end first.
  cmd_t s_cmds[$];
  logic [VW-1:0] s_vols[$];
  int   s_eng_lat = 10, s_user_lat = 4, s_eng_t = -1, s_user_t = -1;
  int   s_ls = 0, s_str = 0, s_overlap = 0;
  logic s_go_q = 1'b0, s_in_busy = 1'b0;
  longint unsigned s_udone_cyc = 0, s_in_done_cyc = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      s_go_q <= s_go;
      if (s_ls_start) s_ls++;
      if (s_str_start) s_str++;
      if (s_go && s_in_busy) s_overlap++;
      if (s_go && !s_go_q) begin
        s_vols.push_back(s_vol);
        checks++;
        if (!s_in_busy) begin failures++; $display("FAIL: staged run started after its stage-in"); end
      end
      if (s_eng_start) begin
        s_cmds.push_back('{s_eng_dir, s_eng_lbank, s_eng_base, s_eng_count});
        if (s_eng_dir == XFER_IN) s_in_busy <= 1'b1;
        else begin
          checks++;
          if (s_in_busy || cyc < s_udone_cyc + LAT + 1 || s_go) begin
            failures++; $display("FAIL: staged stage-out before the run and the stage-in ended");
          end
        end
      end
      if (s_eng_done && s_in_busy) begin s_in_busy <= 1'b0; s_in_done_cyc <= cyc; end
      if (s_udone) s_udone_cyc <= cyc;
    end
  end

  always @(negedge clk) begin
    s_eng_done = 1'b0;
    s_udone = 1'b0;
    if (s_eng_start) s_eng_t = s_eng_lat;
    else if (s_eng_t > 0) s_eng_t--;
    else if (s_eng_t == 0) begin s_eng_done = 1'b1; s_eng_t = -1; end
    if (s_go && !s_go_q && s_user_t < 0) s_user_t = s_user_lat;
    else if (s_user_t > 0) s_user_t--;
    else if (s_user_t == 0 && s_go) begin s_udone = 1'b1; s_user_t = -1; end
  end

  task automatic s_job(int n, logic [HW-1:0] src, logic [HW-1:0] dst);
    @(negedge clk);
    s_start = 1'b1; job_mode = MODE_SEQUENTIAL; job_vol = VW'(n); job_src = src; job_dst = dst;
    @(negedge clk);
    s_start = 1'b0; job_src = 32'hFFFF_FFFF; job_dst = 32'hFFFF_FFFF;
    while (!s_done) @(negedge clk);
  endtask

  task automatic s_expect(xfer_dir_e d, logic lb, logic [HW-1:0] b, int n);
    cmd_t c;
    checks++;
    if (s_cmds.size() == 0) begin failures++; $display("FAIL: staged: missing command"); return; end
    c = s_cmds.pop_front();
    if (c.dir != d || c.lb != lb || c.base != b || c.cnt != VW'(n)) begin
      failures++;
      $display("FAIL: staged command %s lb%0d %h %0d, expected %s lb%0d %h %0d",
               c.dir.name(), c.lb, c.base, c.cnt, d.name(), lb, b, n);
    end
  endtask

  task automatic job(mode_e m, int n, logic [HW-1:0] s, logic [HW-1:0] d, output int cycles);
    @(negedge clk);
    job_start = 1'b1; job_mode = m; job_vol = VW'(n); job_src = s; job_dst = d;
    @(negedge clk);
    job_start = 1'b0; job_src = 32'hFFFF_FFFF; job_dst = 32'hFFFF_FFFF;  // must be latched
    cycles = 1;
    while (!job_done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  task automatic expect_cmd(xfer_dir_e d, logic lb, logic [HW-1:0] b, int n);
    cmd_t c;
    checks++;
    if (cmds.size() == 0) begin
      failures++; $display("FAIL: missing command %s base %h", d.name(), b);
      return;
    end
    c = cmds.pop_front();
    if (c.dir != d || c.lb != lb || c.base != b || c.cnt != VW'(n)) begin
      failures++;
      $display("FAIL: command %s lb%0d %h %0d, expected %s lb%0d %h %0d",
               c.dir.name(), c.lb, c.base, c.cnt, d.name(), lb, b, n);
    end
  endtask

  task automatic expect_vols(int a, int b, int c);
    int e[3];
    e = '{a, b, c};
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (vols.size() == 0 || vols.pop_front() != VW'(e[i])) begin
        failures++; $display("FAIL: mem_rd_vol of round %0d", i);
      end
    end
  endtask

  initial begin
    int c;
    s_start = 0; job_start = 0; job_mode = MODE_NONE; job_vol = '0; job_src = '0; job_dst = '0;
    eng_done = 0; user_logic_done = 0; str_drained = 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // mode-1, 80 blocks over a 32-block logical bank: rounds of 32, 32, 16
    job(MODE_DUAL_RANDOM, 80, 32'h1000, 32'h5000, c);
    expect_cmd(XFER_IN,  0, 32'h1000, 32); expect_cmd(XFER_OUT, 0, 32'h5000, 32);
    expect_cmd(XFER_IN,  0, 32'h1020, 32); expect_cmd(XFER_OUT, 0, 32'h5020, 32);
    expect_cmd(XFER_IN,  0, 32'h1040, 16); expect_cmd(XFER_OUT, 0, 32'h5040, 16);
    expect_vols(32, 32, 16);
    checks += 2;
    if (rounds != 3)   begin failures++; $display("FAIL: mode-1 rounds %0d", rounds); end
    if (go_rises != 3) begin failures++; $display("FAIL: mode-1 go rises %0d", go_rises); end

    // mode-2, 40 blocks over 16-block logical banks: rounds of 16, 16, 8
    go_rises = 0;
    job(MODE_SINGLE_RANDOM, 40, 32'h2000, 32'h6000, c);
    expect_cmd(XFER_IN,  0, 32'h2000, 16); expect_cmd(XFER_OUT, 1, 32'h6000, 16);
    expect_cmd(XFER_IN,  0, 32'h2010, 16); expect_cmd(XFER_OUT, 1, 32'h6010, 16);
    expect_cmd(XFER_IN,  0, 32'h2020, 8);  expect_cmd(XFER_OUT, 1, 32'h6020, 8);
    expect_vols(16, 16, 8);
    checks += 2;
    if (rounds != 3)   begin failures++; $display("FAIL: mode-2 rounds %0d", rounds); end
    if (go_rises != 3) begin failures++; $display("FAIL: mode-2 go rises %0d", go_rises); end

    // sequential: one run, no transfers, ends only after the drain
    go_rises = 0;
    fork
      job(MODE_SEQUENTIAL, 1000, 32'h3000, 32'h7000, c);
      begin
        wait (user_logic_done);
        @(negedge clk);
        drain_timer = 20;
      end
    join
    checks += 6;
    if (cmds.size() != 0)  begin failures++; $display("FAIL: transfer in mode-3"); end
    if (str_starts != 1)   begin failures++; $display("FAIL: stream starts %0d", str_starts); end
    if (go_rises != 1)     begin failures++; $display("FAIL: mode-3 go rises %0d", go_rises); end
    if (vols.size() == 0 || vols.pop_front() != 1000) begin failures++; $display("FAIL: mode-3 mem_rd_vol"); end
    if (str_src != 32'h3000 || str_dst != 32'h7000) begin failures++; $display("FAIL: stream bases"); end
    if (c < 5 + 20)        begin failures++; $display("FAIL: mode-3 job ended before drain (%0d)", c); end

    // empty job
    job(MODE_DUAL_RANDOM, 0, 32'h0, 32'h0, c);
    checks++;
    if (c > 3 || cmds.size() != 0) begin failures++; $display("FAIL: empty job"); end

    // staged mode-3, 40 blocks over 16-block logical banks: rounds of 16, 16, 8.
    // First the stage-in ends last, then the run does.
    s_job(40, 32'h3000, 32'h7000);
    s_eng_lat = 2; s_user_lat = 15;
    s_job(20, 32'h4000, 32'h8000);
    s_expect(XFER_IN, 0, 32'h3000, 16); s_expect(XFER_OUT, 1, 32'h7000, 16);
    s_expect(XFER_IN, 0, 32'h3010, 16); s_expect(XFER_OUT, 1, 32'h7010, 16);
    s_expect(XFER_IN, 0, 32'h3020, 8);  s_expect(XFER_OUT, 1, 32'h7020, 8);
    s_expect(XFER_IN, 0, 32'h4000, 16); s_expect(XFER_OUT, 1, 32'h8000, 16);
    s_expect(XFER_IN, 0, 32'h4010, 4);  s_expect(XFER_OUT, 1, 32'h8010, 4);
    checks += 4;
    if (s_cmds.size() != 0) begin failures++; $display("FAIL: staged: extra commands"); end
    if (s_rounds != 2)      begin failures++; $display("FAIL: staged rounds %0d", s_rounds); end
    if (s_ls != 5 || s_str != 0) begin failures++; $display("FAIL: staged ls_start %0d str_start %0d", s_ls, s_str); end
    if (s_overlap == 0)     begin failures++; $display("FAIL: staged run never overlapped a stage-in"); end
    foreach (s_vols[i]) begin
      checks++;
      if (s_vols[i] != VW'(i == 2 ? 8 : (i == 4 ? 4 : 16))) begin
        failures++; $display("FAIL: staged mem_rd_vol %0d in run %0d", s_vols[i], i);
      end
    end
    checks++;
    if (s_vols.size() != 5) begin failures++; $display("FAIL: staged runs %0d", s_vols.size()); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
