// tb_mf_multibuf_sched: self-checking test of the multi-buffering scheduler.
//
// The transfer engine and the user logic are replaced by responders that
// take a number of cycles proportional to the chunk size. The testbench
// tracks which chunk each bank window holds and checks, for every command:
//   - a stage-in never overwrites the raw window the user logic is reading,
//     nor a raw chunk that has not been processed yet;
//   - a run starts only on a chunk that is fully staged in, its result
//     window holds no results still waiting to be staged out, and the user
//     window, chunk size and host addresses are right;
//   - the engine window stays put while a transfer is in flight;
//   - a stage-out copies a processed chunk from the right result window to
//     the right host address, and every chunk is staged out exactly once.
// It also checks that transfers really overlap processing (cycles with the
// user logic and the engine both busy) and that a four-chunk job takes less
// than 80 % of the time of the same work done strictly one after another.
module tb_mf_multibuf_sched;
  import mf_pkg::*;

  localparam int unsigned BAW = 5, LAT = 2, HW = 32, VW = 32;
  localparam int unsigned WIN = 1 << (BAW - 1);   // 16 blocks per window

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, busy, done, user_logic_go, user_logic_done, user_win;
  logic [VW-1:0] vol, mem_rd_vol, eng_count;
  logic [HW-1:0] src, dst, eng_host_base;
  logic [15:0] rounds;
  logic eng_start, eng_lbank, eng_win, eng_done;
  xfer_dir_e eng_dir;

  mf_multibuf_sched #(.BANK_AW(BAW), .RD_LAT(LAT), .HADDR_W(HW), .VOL_W(VW)) dut (
    .clk, .rst_n, .start, .vol, .src, .dst, .busy, .done, .rounds,
    .user_logic_go, .user_logic_done, .mem_rd_vol, .user_win,
    .eng_start, .eng_dir, .eng_lbank, .eng_host_base, .eng_count, .eng_win, .eng_done
  );

  int checks = 0, failures = 0;
  int overlap = 0;

  // window bookkeeping: chunk held, -1 when free
  int raw_win[2], res_win[2];
  bit processed[int];
  int staged_out[int];
  int eng_timer = -1, user_timer = -1, cur_run = -1, n_runs = 0;
  xfer_dir_e cur_dir;
  int cur_chunk;
  logic go_q = 1'b0;

  function automatic int chunk_of(logic [HW-1:0] base, logic [HW-1:0] b0);
    return int'((base - b0) / WIN);
  endfunction

  function automatic int len_of(int k);
    int rest;
    rest = int'(vol) - k * int'(WIN);
    return rest > int'(WIN) ? int'(WIN) : rest;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      go_q <= user_logic_go;
      if (user_logic_go && eng_timer >= 0) overlap++;
      if (eng_timer >= 0 && !eng_start && eng_win != cur_chunk[0]) begin
        checks++; failures++;
        $display("FAIL: engine window changed during a transfer");
      end
      if (eng_start) begin
        int k;
        k = (eng_dir == XFER_IN) ? chunk_of(eng_host_base, src) : chunk_of(eng_host_base, dst);
        cur_dir = eng_dir; cur_chunk = k;
        check(eng_win == k[0], "engine window");
        check(eng_count == VW'(len_of(k)), "engine count");
        check(eng_lbank == (eng_dir == XFER_OUT), "engine logical bank");
        if (eng_dir == XFER_IN) begin
          check(!(user_logic_go && cur_run[0] == k[0]), "stage-in into the window being read");
          check(raw_win[k % 2] < 0 || processed.exists(raw_win[k % 2]), "stage-in over unprocessed raw chunk");
          raw_win[k % 2] = -1;
        end else begin
          check(processed.exists(k) && res_win[k % 2] == k, "stage-out of a chunk not ready");
          check(!staged_out.exists(k), "chunk staged out twice");
          staged_out[k] = 1;
        end
      end
      if (user_logic_go && !go_q) begin
        int j;
        j = n_runs;
        n_runs++;
        cur_run = j;
        check(raw_win[j % 2] == j, "run on a chunk not staged in");
        check(res_win[j % 2] < 0 || staged_out.exists(res_win[j % 2]), "run over results not yet staged out");
        check(user_win == j[0], "user window");
        check(mem_rd_vol == VW'(len_of(j)), "mem_rd_vol");
        res_win[j % 2] = j;
      end
    end
  end

  // responders
  always @(negedge clk) begin
    eng_done = 1'b0;
    user_logic_done = 1'b0;
    if (eng_start) eng_timer = int'(eng_count) / 2 + 3;
    else if (eng_timer > 0) eng_timer--;
    else if (eng_timer == 0) begin
      eng_done = 1'b1;
      eng_timer = -1;
      if (cur_dir == XFER_IN) raw_win[cur_chunk % 2] = cur_chunk;
    end
    if (user_logic_go && !go_q && user_timer < 0) user_timer = 2 * int'(mem_rd_vol) + 1;
    else if (user_timer > 0) user_timer--;
    else if (user_timer == 0 && user_logic_go) begin
      user_logic_done = 1'b1;
      user_timer = -1;
      processed[cur_run] = 1;
    end
  end

  task automatic job(int n, logic [HW-1:0] s, logic [HW-1:0] d, output int cycles);
    raw_win = '{-1, -1}; res_win = '{-1, -1};
    processed.delete(); staged_out.delete(); n_runs = 0; cur_run = -1;
    @(negedge clk);
    start = 1'b1; vol = VW'(n); src = s; dst = d;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    check(staged_out.size() == (n + int'(WIN) - 1) / int'(WIN), "every chunk staged out");
    check(rounds == 16'((n + int'(WIN) - 1) / int'(WIN)), "rounds");
  endtask

  initial begin
    int c, serial;
    start = 0; vol = '0; src = '0; dst = '0; eng_done = 0; user_logic_done = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    job(4 * WIN, 32'h1000, 32'h8000, c);
    // the same work one step after another: in, run, out per chunk
    serial = 4 * (2 * (int'(WIN) / 2 + 4) + (2 * int'(WIN) + 2));
    $display("4 chunks: %0d cycles overlapped, %0d serial", c, serial);
    check(c * 10 < serial * 8, "multi-buffering gives no speed-up");
    job(5 * WIN + 7, 32'h2000, 32'h9000, c);
    job(1, 32'h3000, 32'hA000, c);
    job(WIN + 1, 32'h4000, 32'hB000, c);
    check(overlap > 0, "no overlap of transfer and processing");
    $display("overlap cycles: %0d", overlap);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
