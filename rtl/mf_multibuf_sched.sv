// mf_multibuf_sched: multi-buffering scheduler for the single-ported random
// access mode (mode-2).
//
// In multi-buffered mode-2 the raw-data bank (physical bank 0) and the
// result bank (physical bank 1) are each split into two windows of
// 2^(BANK_AW-1) blocks, and a logical bank is one window. While the user
// logic works on chunk k in window k%2, the transfer engine uses the other
// window: it copies the results of chunk k-1 out of the result bank and the
// raw data of chunk k+1 into the raw bank. The user logic only reads the raw
// bank and writes the result bank, the engine only writes the raw bank and
// reads the result bank, so with separate read and write ports per bank the
// two never compete for a port. Transfer-in, processing and transfer-out
// thus overlap, in contrast with the plain mode-2 rounds.
//
// Rules, with n = ceil(vol / window) chunks:
//   stage in chunk i   once chunk i-2 has been processed (its raw window is
//                      free again);
//   run chunk j        once it is staged in, the user logic is idle, chunk
//                      j-2's results have been staged out, and RD_LAT+2
//                      cycles have passed since the last run ended;
//   stage out chunk k  once it has been processed; stage-out goes before
//                      stage-in when both are possible.
// The engine takes one command at a time (start pulse, done pulse). done
// pulses when the last chunk is in host memory. eng_win gives the window of
// a new command in its start cycle and of the transfer in flight after it;
// user_win gives the window of the chunk the user logic works on.
// The window split follows the document's multi-buffering description for
// mode-2; the scheduling rules and the fixed choice of banks 0 and 1 are
// this design's.
module mf_multibuf_sched
  import mf_pkg::*;
#(
  parameter int unsigned BANK_AW = 18,
  parameter int unsigned RD_LAT  = 2,
  parameter int unsigned HADDR_W = mf_pkg::MF_HADDR_W,
  parameter int unsigned VOL_W   = mf_pkg::MF_VOL_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [VOL_W-1:0]   vol,
  input  logic [HADDR_W-1:0] src,
  input  logic [HADDR_W-1:0] dst,
  output logic               busy,
  output logic               done,
  output logic [15:0]        rounds,
  // user logic
  output logic               user_logic_go,
  input  logic               user_logic_done,
  output logic [VOL_W-1:0]   mem_rd_vol,
  output logic               user_win,
  // transfer engine
  output logic               eng_start,
  output xfer_dir_e          eng_dir,
  output logic               eng_lbank,
  output logic [HADDR_W-1:0] eng_host_base,
  output logic [VOL_W-1:0]   eng_count,
  output logic               eng_win,
  input  logic               eng_done
);

  localparam logic [VOL_W-1:0] WIN = VOL_W'(64'd1 << (BANK_AW - 1));
  localparam int unsigned GW = $clog2(RD_LAT + 3) + 1;

  logic [VOL_W-1:0] vol_q, nchunks;
  logic [HADDR_W-1:0] src_q, dst_q;
  logic [VOL_W-1:0] n_in, n_run, n_proc, n_out;  // chunks staged in / started / processed / staged out
  logic             running, eng_busy;
  logic [GW-1:0]    gap;

  // block offset and size of chunk i
  function automatic logic [VOL_W-1:0] chunk_off(input logic [VOL_W-1:0] i);
    return i << (BANK_AW - 1);
  endfunction
  function automatic logic [VOL_W-1:0] chunk_len(input logic [VOL_W-1:0] i, input logic [VOL_W-1:0] v);
    logic [VOL_W-1:0] rest;
    rest = v - chunk_off(i);
    return (rest > WIN) ? WIN : rest;
  endfunction

  logic can_out, can_in, can_run;
  assign can_out = busy && !eng_busy && (n_out != n_proc);
  assign can_in  = busy && !eng_busy && !can_out && (n_in != nchunks) && (n_in < n_proc + 2);
  assign can_run = busy && !running && (gap == '0) && (n_run != n_in) && (n_run < n_out + 2);

  assign eng_start     = can_out || can_in;
  assign eng_dir       = can_out ? XFER_OUT : XFER_IN;
  assign eng_lbank     = can_out;
  // window of a new command, then held for the transfer in flight
  logic eng_win_q;
  assign eng_win       = eng_busy ? eng_win_q : (can_out ? n_out[0] : n_in[0]);
  assign eng_host_base = can_out ? dst_q + HADDR_W'(chunk_off(n_out))
                                 : src_q + HADDR_W'(chunk_off(n_in));
  assign eng_count     = can_out ? chunk_len(n_out, vol_q) : chunk_len(n_in, vol_q);

  // the chunk being processed is n_run-1
  assign user_logic_go = running;
  assign user_win      = ~n_run[0];
  assign mem_rd_vol    = chunk_len(n_run - 1'b1, vol_q);
  assign rounds        = 16'(n_run);

  // direction of the command in flight
  xfer_dir_e eng_dir_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      vol_q     <= '0;
      nchunks   <= '0;
      src_q     <= '0;
      dst_q     <= '0;
      n_in      <= '0;
      n_run     <= '0;
      n_proc    <= '0;
      n_out     <= '0;
      running   <= 1'b0;
      eng_busy  <= 1'b0;
      eng_dir_q <= XFER_IN;
      eng_win_q <= 1'b0;
      gap       <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy    <= (vol != '0);
        done    <= (vol == '0);
        vol_q   <= vol;
        nchunks <= (vol + WIN - 1'b1) >> (BANK_AW - 1);
        src_q   <= src;
        dst_q   <= dst;
        n_in    <= '0;
        n_run   <= '0;
        n_proc  <= '0;
        n_out   <= '0;
        running <= 1'b0;
        gap     <= '0;
      end else if (busy) begin
        if (gap != '0) gap <= gap - 1'b1;
        if (eng_start) begin
          eng_busy  <= 1'b1;
          eng_dir_q <= eng_dir;
          eng_win_q <= eng_win;
        end
        if (eng_done) begin
          eng_busy <= 1'b0;
          if (eng_dir_q == XFER_IN) n_in <= n_in + 1'b1;
          else                      n_out <= n_out + 1'b1;
          if (eng_dir_q == XFER_OUT && n_out + 1'b1 == nchunks) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
        if (can_run) begin
          running <= 1'b1;
          n_run   <= n_run + 1'b1;
        end
        if (running && user_logic_done) begin
          running <= 1'b0;
          n_proc  <= n_proc + 1'b1;
          gap     <= GW'(RD_LAT + 2);
        end
      end
    end
  end

  a_one_cmd: assert property (@(posedge clk) disable iff (!rst_n)
    eng_start |-> !eng_busy);

endmodule
