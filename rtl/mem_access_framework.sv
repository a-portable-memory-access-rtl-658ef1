// mem_access_framework: portable memory access framework for an FPGA
// accelerator on a reconfigurable computer.
//
// The framework sits between the user logic and the platform: the host
// memory port of the vendor interface block on one side, the board's local
// memory banks on the other. It gives the user logic a single logical memory
// view whose interface does not depend on the platform, and it moves data
// between host memory and local memory on its own. A job selects one of
// three access modes:
//   mode-1, dual-ported random access: one logical bank of all NUM_BANKS
//     physical banks (16 MB with the default four 4 MB banks); the user logic
//     reads and writes any block of it.
//   mode-2, single-ported random access: logical bank 0 (raw data, read
//     only) and logical bank 1 (results, write only), two banks each (8 MB).
//   mode-3, sequential access: one in-order read stream and one in-order
//     write stream, fed from and to host memory directly, local memory
//     bypassed.
// In the random modes raw data larger than a logical bank is processed in
// several rounds, each one staging a chunk in, running the user logic and
// staging the results out, one after the other.
// With MULTI_BUFFER set, mode-2 instead uses multi-buffering: banks 0 and 1
// are split into two windows each, a logical bank is one window, and the
// transfers of neighbouring chunks run in the window the user logic is not
// using, overlapped with processing (see mf_multibuf_sched).
// With SEQ_STAGED set, mode-3 runs through local memory: raw data is staged
// into banks 0-1 while the user logic already consumes it (mf_local_stream
// keeps every read behind the transfer), results collect in banks 2-3 and
// are copied out after the run.
// The user logic and the transfer engine reach the banks through separate
// bank mappers whose physical ports are merged; assertions check that the
// two never drive the same port of a bank in the same cycle.
//
// User-side interface: user_logic_go / user_logic_done frame a run;
// mem_rd_rq + mem_rd_addr ask for a block, returned in request order with
// mem_rd_data_vld (RD_LAT cycles later in the random modes); mem_wr_rq
// writes mem_wr_data to mem_wr_addr, always accepted in the random modes and
// accepted while mem_wr_ready in mode-3; mem_rd_vol gives the number of raw
// blocks. Addresses count 128-bit blocks.
// Host side: a job is described by job_mode, job_vol (blocks), job_src and
// job_dst (host block addresses) and started by a job_start pulse; job_done
// pulses when all results are in host memory. Host memory is reached through
// a request/response read port and a valid/ready write port, which stand in
// for the vendor interface block. Each physical bank has a read port (data
// RD_LAT cycles after the enable) and a separate write port.
// The platform organisation (four banks with separate read and write ports,
// no overlap of transfer and processing, host memory direct access in
// mode-3) follows the framework's mapping onto a Cray XD1-class machine;
// multi-buffered mode-2 follows its mapping onto the SGI RC-100 and staged
// mode-3 its mapping onto the SRC-6, both applied to the same four-bank
// board. Host port shape, job control, bank read latency
// and FIFO depths are this design's choices.
module mem_access_framework
  import mf_pkg::*;
#(
  parameter int unsigned DATA_W     = 128,
  parameter int unsigned NUM_BANKS  = 4,
  parameter int unsigned BANK_AW    = 18,
  parameter int unsigned RD_LAT     = 2,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter bit          MULTI_BUFFER = 1'b0,
  parameter bit          SEQ_STAGED   = 1'b0,
  parameter int unsigned HADDR_W    = 32,
  parameter int unsigned VOL_W      = 32,
  localparam int unsigned LAW       = BANK_AW + $clog2(NUM_BANKS)
) (
  input  logic                clk,
  input  logic                rst_n,
  // job control
  input  logic                job_start,
  input  mode_e               job_mode,
  input  logic [VOL_W-1:0]    job_vol,
  input  logic [HADDR_W-1:0]  job_src,
  input  logic [HADDR_W-1:0]  job_dst,
  output logic                job_busy,
  output logic                job_done,
  output logic [15:0]         job_rounds,
  // user logic interface
  output logic                user_logic_go,
  input  logic                user_logic_done,
  input  logic                mem_rd_rq,
  input  logic [LAW-1:0]      mem_rd_addr,
  output logic [VOL_W-1:0]    mem_rd_vol,
  output logic                mem_rd_data_vld,
  output logic [DATA_W-1:0]   mem_rd_data,
  input  logic                mem_wr_rq,
  input  logic [LAW-1:0]      mem_wr_addr,
  output logic                mem_wr_ready,
  input  logic [DATA_W-1:0]   mem_wr_data,
  // host memory (vendor interface block)
  output logic                hrd_req_valid,
  input  logic                hrd_req_ready,
  output logic [HADDR_W-1:0]  hrd_req_addr,
  input  logic                hrd_rsp_valid,
  input  logic [DATA_W-1:0]   hrd_rsp_data,
  output logic                hwr_valid,
  input  logic                hwr_ready,
  output logic [HADDR_W-1:0]  hwr_addr,
  output logic [DATA_W-1:0]   hwr_data,
  // local memory banks
  output logic                bank_rd_en   [NUM_BANKS],
  output logic [BANK_AW-1:0]  bank_rd_addr [NUM_BANKS],
  input  logic [DATA_W-1:0]   bank_rd_data [NUM_BANKS],
  output logic                bank_wr_en   [NUM_BANKS],
  output logic [BANK_AW-1:0]  bank_wr_addr [NUM_BANKS],
  output logic [DATA_W-1:0]   bank_wr_data [NUM_BANKS]
);

  mode_e              mode;
  logic               seq_mode, seq_direct, seq_local, user_win, eng_win, ls_start;
  logic [VOL_W-1:0]   eng_progress;
  logic               eng_start, eng_lbank, eng_done, eng_busy;
  xfer_dir_e          eng_dir;
  logic [HADDR_W-1:0] eng_host_base;
  logic [VOL_W-1:0]   eng_count;
  logic               str_start, str_drained;
  logic [HADDR_W-1:0] str_src, str_dst;

  assign seq_mode   = (mode == MODE_SEQUENTIAL);
  assign seq_direct = seq_mode && !SEQ_STAGED;   // mode-3 straight to host memory
  assign seq_local  = seq_mode && SEQ_STAGED;    // mode-3 through local memory

  mf_controller #(
    .NUM_BANKS(NUM_BANKS), .BANK_AW(BANK_AW), .RD_LAT(RD_LAT),
    .MULTI_BUFFER(MULTI_BUFFER), .SEQ_STAGED(SEQ_STAGED), .HADDR_W(HADDR_W), .VOL_W(VOL_W)
  ) u_ctrl (
    .clk, .rst_n,
    .job_start, .job_mode, .job_vol, .job_src, .job_dst,
    .job_busy, .job_done, .rounds(job_rounds), .mode,
    .user_logic_go, .user_logic_done, .mem_rd_vol, .user_win,
    .eng_start, .eng_dir, .eng_lbank, .eng_host_base, .eng_count, .eng_win, .eng_done,
    .ls_start, .str_start, .str_src, .str_dst, .str_drained
  );

  // ---------------- transfer engine (modes 1 and 2) ----------------
  logic               e_hrd_req_valid, e_hwr_valid;
  logic [HADDR_W-1:0] e_hrd_req_addr, e_hwr_addr;
  logic [DATA_W-1:0]  e_hwr_data;
  logic               e_lrd_en, e_lrd_lbank, e_lwr_en, e_lwr_lbank;
  logic [LAW-1:0]     e_lrd_addr, e_lwr_addr;
  logic [DATA_W-1:0]  e_lwr_data;
  logic               m_rd_vld;
  logic [DATA_W-1:0]  m_rd_data;

  mf_transfer_engine #(
    .DATA_W(DATA_W), .LAW(LAW), .HADDR_W(HADDR_W), .VOL_W(VOL_W),
    .FIFO_DEPTH(FIFO_DEPTH)
  ) u_eng (
    .clk, .rst_n,
    .start(eng_start), .dir(eng_dir), .lbank(eng_lbank),
    .host_base(eng_host_base), .count(eng_count),
    .busy(eng_busy), .done(eng_done), .progress(eng_progress),
    .hrd_req_valid(e_hrd_req_valid), .hrd_req_ready(hrd_req_ready && !seq_direct),
    .hrd_req_addr(e_hrd_req_addr),
    .hrd_rsp_valid(hrd_rsp_valid && !seq_direct), .hrd_rsp_data,
    .hwr_valid(e_hwr_valid), .hwr_ready(hwr_ready && !seq_direct),
    .hwr_addr(e_hwr_addr), .hwr_data(e_hwr_data),
    .lrd_en(e_lrd_en), .lrd_lbank(e_lrd_lbank), .lrd_addr(e_lrd_addr),
    .lrd_vld(m_rd_vld), .lrd_data(m_rd_data),
    .lwr_en(e_lwr_en), .lwr_lbank(e_lwr_lbank), .lwr_addr(e_lwr_addr),
    .lwr_data(e_lwr_data)
  );

  // ---------------- bank mappers and physical port merge ----------------
  // The user logic and the transfer engine each have a bank mapper. In the
  // plain modes they are active at different times; in multi-buffered
  // mode-2 they run together but on different ports of banks 0 and 1.
  logic               mb;
  logic               u_rd_en, u_wr_en;
  logic [LAW-1:0]     u_rd_addr, u_wr_addr, e_rd_addr_w, e_wr_addr_w;
  logic               m_u_rd_en, m_u_wr_en, m_u_wr_lbank;
  logic [LAW-1:0]     m_u_rd_addr, m_u_wr_addr;
  logic [DATA_W-1:0]  m_u_wr_data;
  logic               ls_rd_en, ls_wr_en, ls_wr_ready;
  logic [LAW-1:0]     ls_rd_addr, ls_wr_addr;
  logic [DATA_W-1:0]  ls_wr_data;

  assign mb = MULTI_BUFFER && (mode == MODE_SINGLE_RANDOM);

  // In multi-buffered mode-2 a logical bank is one window: the window
  // number becomes the top bit of the in-bank address.
  function automatic logic [LAW-1:0] win_addr(input logic on, input logic w, input logic [LAW-1:0] a);
    logic [LAW-1:0] r;
    r = a;
    if (on) begin
      r = '0;
      r[BANK_AW-1]   = w;
      r[BANK_AW-2:0] = a[BANK_AW-2:0];
    end
    return r;
  endfunction

  assign u_rd_en     = mem_rd_rq && user_logic_go && !seq_mode;
  assign u_wr_en     = mem_wr_rq && user_logic_go && !seq_mode;
  assign u_rd_addr   = win_addr(mb, user_win, mem_rd_addr);
  assign u_wr_addr   = win_addr(mb, user_win, mem_wr_addr);
  assign e_rd_addr_w = win_addr(mb, eng_win, e_lrd_addr);
  assign e_wr_addr_w = win_addr(mb, eng_win, e_lwr_addr);

  // staged mode-3: sequential user ports served from the local banks
  mf_local_stream #(.DATA_W(DATA_W), .LAW(LAW), .VOL_W(VOL_W)) u_lstr (
    .clk, .rst_n,
    .start(ls_start), .active(user_logic_go && seq_local), .avail(eng_progress),
    .mem_rd_rq, .mem_wr_rq, .mem_wr_data, .mem_wr_ready(ls_wr_ready),
    .lrd_en(ls_rd_en), .lrd_addr(ls_rd_addr),
    .lwr_en(ls_wr_en), .lwr_addr(ls_wr_addr), .lwr_data(ls_wr_data)
  );

  always_comb begin
    if (seq_local) begin
      m_u_rd_en    = ls_rd_en;
      m_u_rd_addr  = ls_rd_addr;
      m_u_wr_en    = ls_wr_en;
      m_u_wr_lbank = 1'b1;
      m_u_wr_addr  = ls_wr_addr;
      m_u_wr_data  = ls_wr_data;
    end else begin
      m_u_rd_en    = u_rd_en;
      m_u_rd_addr  = u_rd_addr;
      m_u_wr_en    = u_wr_en;
      m_u_wr_lbank = (mode == MODE_SINGLE_RANDOM);
      m_u_wr_addr  = u_wr_addr;
      m_u_wr_data  = mem_wr_data;
    end
  end

  logic              ub_rd_en [NUM_BANKS], eb_rd_en [NUM_BANKS];
  logic              ub_wr_en [NUM_BANKS], eb_wr_en [NUM_BANKS];
  logic [BANK_AW-1:0] ub_rd_addr [NUM_BANKS], eb_rd_addr [NUM_BANKS];
  logic [BANK_AW-1:0] ub_wr_addr [NUM_BANKS], eb_wr_addr [NUM_BANKS];
  logic [DATA_W-1:0]  ub_wr_data [NUM_BANKS], eb_wr_data [NUM_BANKS];
  logic               u_rd_vld;
  logic [DATA_W-1:0]  u_rd_data;

  mf_bank_mapper #(
    .DATA_W(DATA_W), .NUM_BANKS(NUM_BANKS), .BANK_AW(BANK_AW), .RD_LAT(RD_LAT)
  ) u_map_user (
    .clk, .rst_n, .mode, .mb,
    .rd_en(m_u_rd_en), .rd_lbank(1'b0), .rd_addr(m_u_rd_addr),
    .rd_vld(u_rd_vld), .rd_data(u_rd_data),
    .wr_en(m_u_wr_en), .wr_lbank(m_u_wr_lbank), .wr_addr(m_u_wr_addr),
    .wr_data(m_u_wr_data),
    .bank_rd_en(ub_rd_en), .bank_rd_addr(ub_rd_addr), .bank_rd_data,
    .bank_wr_en(ub_wr_en), .bank_wr_addr(ub_wr_addr), .bank_wr_data(ub_wr_data)
  );

  mf_bank_mapper #(
    .DATA_W(DATA_W), .NUM_BANKS(NUM_BANKS), .BANK_AW(BANK_AW), .RD_LAT(RD_LAT)
  ) u_map_eng (
    .clk, .rst_n, .mode, .mb,
    .rd_en(e_lrd_en), .rd_lbank(e_lrd_lbank), .rd_addr(e_rd_addr_w),
    .rd_vld(m_rd_vld), .rd_data(m_rd_data),
    .wr_en(e_lwr_en), .wr_lbank(e_lwr_lbank), .wr_addr(e_wr_addr_w), .wr_data(e_lwr_data),
    .bank_rd_en(eb_rd_en), .bank_rd_addr(eb_rd_addr), .bank_rd_data,
    .bank_wr_en(eb_wr_en), .bank_wr_addr(eb_wr_addr), .bank_wr_data(eb_wr_data)
  );

  always_comb begin
    for (int i = 0; i < NUM_BANKS; i++) begin
      bank_rd_en[i]   = ub_rd_en[i] || eb_rd_en[i];
      bank_rd_addr[i] = ub_rd_en[i] ? ub_rd_addr[i] : eb_rd_addr[i];
      bank_wr_en[i]   = ub_wr_en[i] || eb_wr_en[i];
      bank_wr_addr[i] = ub_wr_en[i] ? ub_wr_addr[i] : eb_wr_addr[i];
      bank_wr_data[i] = ub_wr_en[i] ? ub_wr_data[i] : eb_wr_data[i];
    end
  end

  // The user logic and the engine never use the same port of a bank at once.
  for (genvar g = 0; g < NUM_BANKS; g++) begin : g_port_check
    a_rd_port_free: assert property (@(posedge clk) disable iff (!rst_n)
      !(ub_rd_en[g] && eb_rd_en[g]));
    a_wr_port_free: assert property (@(posedge clk) disable iff (!rst_n)
      !(ub_wr_en[g] && eb_wr_en[g]));
  end

  // ---------------- stream port (mode 3) ----------------
  logic               s_hrd_req_valid, s_hwr_valid;
  logic [HADDR_W-1:0] s_hrd_req_addr, s_hwr_addr;
  logic [DATA_W-1:0]  s_hwr_data;
  logic               s_rd_vld, s_wr_ready;
  logic [DATA_W-1:0]  s_rd_data;

  mf_stream_port #(
    .DATA_W(DATA_W), .HADDR_W(HADDR_W), .VOL_W(VOL_W), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_str (
    .clk, .rst_n,
    .start(str_start), .src_base(str_src), .dst_base(str_dst), .vol(mem_rd_vol),
    .drained(str_drained),
    .mem_rd_rq(mem_rd_rq && seq_direct && user_logic_go),
    .mem_rd_data_vld(s_rd_vld), .mem_rd_data(s_rd_data),
    .mem_wr_rq(mem_wr_rq && seq_direct && user_logic_go), .mem_wr_data,
    .mem_wr_ready(s_wr_ready),
    .hrd_req_valid(s_hrd_req_valid), .hrd_req_ready(hrd_req_ready && seq_direct),
    .hrd_req_addr(s_hrd_req_addr),
    .hrd_rsp_valid(hrd_rsp_valid && seq_direct), .hrd_rsp_data,
    .hwr_valid(s_hwr_valid), .hwr_ready(hwr_ready && seq_direct),
    .hwr_addr(s_hwr_addr), .hwr_data(s_hwr_data)
  );

  // ---------------- host port and user read return ----------------
  assign hrd_req_valid   = seq_direct ? s_hrd_req_valid : e_hrd_req_valid;
  assign hrd_req_addr    = seq_direct ? s_hrd_req_addr  : e_hrd_req_addr;
  assign hwr_valid       = seq_direct ? s_hwr_valid     : e_hwr_valid;
  assign hwr_addr        = seq_direct ? s_hwr_addr      : e_hwr_addr;
  assign hwr_data        = seq_direct ? s_hwr_data      : e_hwr_data;

  assign mem_rd_data_vld = seq_direct ? s_rd_vld  : u_rd_vld;
  assign mem_rd_data     = seq_direct ? s_rd_data : u_rd_data;
  assign mem_wr_ready    = seq_direct ? s_wr_ready : (seq_local && ls_wr_ready);

  // The host port belongs to one side at a time.
  a_one_host_user: assert property (@(posedge clk) disable iff (!rst_n)
    !(e_hrd_req_valid && s_hrd_req_valid) && !(e_hwr_valid && s_hwr_valid));
  // In multi-buffered mode-2 a logical bank is one window of half a bank.
  a_mb_user_range: assert property (@(posedge clk) disable iff (!rst_n)
    (mb && user_logic_go && (mem_rd_rq || mem_wr_rq)) |->
      ((!mem_rd_rq || mem_rd_addr[LAW-1:BANK_AW-1] == '0) &&
       (!mem_wr_rq || mem_wr_addr[LAW-1:BANK_AW-1] == '0)));
  // The user logic touches memory only while it is allowed to run.
  a_user_in_run: assert property (@(posedge clk) disable iff (!rst_n)
    (mem_wr_rq && !seq_direct) |-> user_logic_go);

endmodule
