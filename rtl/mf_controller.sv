// mf_controller: sequences one job of the memory access framework.
//
// A job is started by a start pulse with the access mode, the raw data
// volume in blocks and the host base addresses of the raw and result data.
// In the two random access modes the job runs in rounds, because the raw
// data may be larger than a logical bank (2^(BANK_AW+SEL) blocks in mode-1,
// half of that in mode-2). Each round:
//   STAGE_IN  copy the next chunk of raw data from host memory into logical
//             bank 0 through the transfer engine;
//   RUN       hold user_logic_go high until the user logic raises
//             user_logic_done; the user logic owns the local memory now;
//   DRAIN     wait until user reads still in the bank pipeline have returned;
//   STAGE_OUT copy the chunk back to host memory, from logical bank 0 in
//             mode-1 (results written in place) and from logical bank 1 in
//             mode-2.
// Transfers and processing do not overlap, which is how the framework runs
// on a platform with four local banks and no spare bank for buffering.
// In sequential mode there is a single run: the stream port is started,
// user_logic_go is held until user_logic_done, and the job ends once the
// stream port has written all results to host memory.
// With SEQ_STAGED set, mode-3 goes through local memory instead of straight
// to host memory: raw data is staged into logical bank 0 (banks 0-1) while
// the user logic already runs and reads behind the transfer
// (mf_local_stream), results are collected in logical bank 1 (banks 2-3)
// and copied out after the run, in rounds of up to half the local memory.
// With MULTI_BUFFER set, a mode-2 job is handed to the multi-buffering
// scheduler (mf_multibuf_sched) instead, which overlaps the transfers with
// processing; its commands and handshakes then drive the outputs, and
// user_win / eng_win name the bank window in use.
// job_done pulses for one cycle at the end; rounds counts the user logic
// runs of the job. mem_rd_vol gives the chunk size of the current round in
// the random modes and the whole volume in sequential mode.
// The result chunk of a round having the size of its raw chunk, and
// user_logic_go being a level held until user_logic_done, are this
// design's choices.
module mf_controller
  import mf_pkg::*;
#(
  parameter int unsigned NUM_BANKS = 4,
  parameter int unsigned BANK_AW   = 18,
  parameter int unsigned RD_LAT    = 2,
  parameter bit          MULTI_BUFFER = 1'b0,
  parameter bit          SEQ_STAGED   = 1'b0,
  parameter int unsigned HADDR_W   = mf_pkg::MF_HADDR_W,
  parameter int unsigned VOL_W     = mf_pkg::MF_VOL_W
) (
  input  logic               clk,
  input  logic               rst_n,
  // job control (host side)
  input  logic               job_start,
  input  mode_e              job_mode,
  input  logic [VOL_W-1:0]   job_vol,
  input  logic [HADDR_W-1:0] job_src,
  input  logic [HADDR_W-1:0] job_dst,
  output logic               job_busy,
  output logic               job_done,
  output logic [15:0]        rounds,
  output mode_e              mode,        // mode of the running job
  // user logic handshake
  output logic               user_logic_go,
  input  logic               user_logic_done,
  output logic [VOL_W-1:0]   mem_rd_vol,
  output logic               user_win,    // window of the user logic (multi-buffered mode-2)
  // transfer engine
  output logic               eng_start,
  output xfer_dir_e          eng_dir,
  output logic               eng_lbank,
  output logic [HADDR_W-1:0] eng_host_base,
  output logic [VOL_W-1:0]   eng_count,
  output logic               eng_win,     // window of the engine (multi-buffered mode-2)
  input  logic               eng_done,
  // stream port
  output logic               ls_start,    // staged mode-3: a round begins
  output logic               str_start,
  output logic [HADDR_W-1:0] str_src,
  output logic [HADDR_W-1:0] str_dst,
  input  logic               str_drained
);

  localparam logic [VOL_W-1:0] CAP_M1 = VOL_W'(64'(NUM_BANKS) << BANK_AW);
  localparam logic [VOL_W-1:0] CAP_M2 = CAP_M1 >> 1;
  localparam int unsigned DW = $clog2(RD_LAT + 2) + 1;

  typedef enum logic [3:0] {
    S_IDLE, S_IN_START, S_IN_WAIT, S_RUN, S_DRAIN, S_OUT_START, S_OUT_WAIT,
    S_SEQ_RUN, S_SEQ_FLUSH, S_MB, S_DONE
  } state_e;

  state_e           state;
  logic [VOL_W-1:0] remaining, chunk, offset;
  logic [HADDR_W-1:0] src_q, dst_q;
  logic [DW-1:0]    drain_cnt;

  logic [VOL_W-1:0] cap, next_chunk;
  logic             staged, in_done;
  assign staged     = SEQ_STAGED && (mode == MODE_SEQUENTIAL);
  assign cap        = (mode == MODE_DUAL_RANDOM) ? CAP_M1 : CAP_M2;
  assign next_chunk = (remaining > cap) ? cap : remaining;

  // multi-buffering scheduler for mode-2
  logic               mb_start, mb_sel, mb_done, mb_go, mb_eng_start, mb_eng_lbank;
  logic [15:0]        mb_rounds;
  logic [VOL_W-1:0]   mb_rd_vol, mb_eng_count;
  logic [HADDR_W-1:0] mb_eng_host_base;
  xfer_dir_e          mb_eng_dir;
  logic               mb_user_win, mb_eng_win;
  logic [15:0]        rounds_q;

  assign mb_start = MULTI_BUFFER && (state == S_IDLE) && job_start &&
                    (job_mode == MODE_SINGLE_RANDOM) && (job_vol != '0);
  assign mb_sel   = (state == S_MB);

  mf_multibuf_sched #(
    .BANK_AW(BANK_AW), .RD_LAT(RD_LAT), .HADDR_W(HADDR_W), .VOL_W(VOL_W)
  ) u_mb (
    .clk, .rst_n,
    .start(mb_start), .vol(job_vol), .src(job_src), .dst(job_dst),
    .busy(), .done(mb_done), .rounds(mb_rounds),
    .user_logic_go(mb_go), .user_logic_done(user_logic_done && mb_sel),
    .mem_rd_vol(mb_rd_vol), .user_win(mb_user_win),
    .eng_start(mb_eng_start), .eng_dir(mb_eng_dir), .eng_lbank(mb_eng_lbank),
    .eng_host_base(mb_eng_host_base), .eng_count(mb_eng_count), .eng_win(mb_eng_win),
    .eng_done(eng_done && mb_sel)
  );

  assign job_busy      = (state != S_IDLE);
  assign user_logic_go = mb_sel ? mb_go : ((state == S_RUN) || (state == S_SEQ_RUN));
  assign eng_start     = mb_sel ? mb_eng_start : ((state == S_IN_START) || (state == S_OUT_START));
  assign eng_dir       = mb_sel ? mb_eng_dir : ((state == S_OUT_START) ? XFER_OUT : XFER_IN);
  assign eng_lbank     = mb_sel ? mb_eng_lbank : ((state == S_OUT_START) && (mode != MODE_DUAL_RANDOM));
  assign eng_host_base = mb_sel ? mb_eng_host_base
                                : ((state == S_OUT_START) ? dst_q : src_q) + HADDR_W'(offset);
  assign eng_count     = mb_sel ? mb_eng_count : ((state == S_IN_START) ? next_chunk : chunk);
  assign eng_win       = mb_sel && mb_eng_win;
  assign user_win      = mb_sel && mb_user_win;
  assign str_src       = src_q;
  assign str_dst       = dst_q;
  assign mem_rd_vol    = mb_sel ? mb_rd_vol : ((mode == MODE_SEQUENTIAL && !staged) ? remaining : chunk);
  assign ls_start      = staged && (state == S_IN_START);
  assign rounds        = mb_sel ? mb_rounds : rounds_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      mode      <= MODE_NONE;
      remaining <= '0;
      chunk     <= '0;
      offset    <= '0;
      src_q     <= '0;
      dst_q     <= '0;
      rounds_q  <= '0;
      drain_cnt <= '0;
      job_done  <= 1'b0;
      str_start <= 1'b0;
      in_done   <= 1'b0;
    end else begin
      job_done  <= 1'b0;
      str_start <= 1'b0;
      unique case (state)
        S_IDLE: if (job_start) begin
          mode      <= job_mode;
          remaining <= job_vol;
          src_q     <= job_src;
          dst_q     <= job_dst;
          offset    <= '0;
          rounds_q  <= '0;
          if (job_vol == '0 || job_mode == MODE_NONE) begin
            state <= S_DONE;
          end else if (mb_start) begin
            state <= S_MB;
          end else if (job_mode == MODE_SEQUENTIAL && !SEQ_STAGED) begin
            str_start <= 1'b1;
            rounds_q  <= 16'd1;
            state     <= S_SEQ_RUN;
          end else begin
            state <= S_IN_START;
          end
        end
        S_IN_START: begin
          chunk   <= next_chunk;
          in_done <= 1'b0;
          if (staged) begin
            // the user logic runs while the chunk is still being staged in
            rounds_q <= rounds_q + 1'b1;
            state    <= S_RUN;
          end else begin
            state <= S_IN_WAIT;
          end
        end
        S_IN_WAIT: if (eng_done) begin
          rounds_q <= rounds_q + 1'b1;
          state  <= S_RUN;
        end
        S_RUN: begin
          if (eng_done) in_done <= 1'b1;
          if (user_logic_done) begin
            drain_cnt <= '0;
            state     <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          if (eng_done) in_done <= 1'b1;
          if (drain_cnt != DW'(RD_LAT + 1)) drain_cnt <= drain_cnt + 1'b1;
          else if (!staged || in_done || eng_done) state <= S_OUT_START;
        end
        S_OUT_START: state <= S_OUT_WAIT;
        S_OUT_WAIT: if (eng_done) begin
          remaining <= remaining - chunk;
          offset    <= offset + chunk;
          state     <= (remaining == chunk) ? S_DONE : S_IN_START;
        end
        S_SEQ_RUN: if (user_logic_done) state <= S_SEQ_FLUSH;
        S_SEQ_FLUSH: if (str_drained) state <= S_DONE;
        S_MB: if (mb_done) begin
          rounds_q <= mb_rounds;
          state    <= S_DONE;
        end
        S_DONE: begin
          job_done <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_mb_idle: assert property (@(posedge clk) disable iff (!rst_n)
    !mb_sel |-> !mb_go);

endmodule
