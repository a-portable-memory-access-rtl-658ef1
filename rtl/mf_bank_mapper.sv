// mf_bank_mapper: maps logical-bank accesses onto the physical local memory
// banks of the FPGA board.
//
// The framework shows the user logic logical banks instead of the board's
// physical banks. With NUM_BANKS equal physical banks of 2^BANK_AW blocks:
//   mode-1 (dual-ported random access): all physical banks are combined into
//     one logical bank. The top address bits pick the physical bank, the low
//     BANK_AW bits the block inside it (four 4 MB banks -> one 16 MB bank).
//   mode-2 (single-ported random access): the first half of the banks forms
//     logical bank 0 (raw data) and the second half logical bank 1 (result
//     data), each half combined in the same way (two 8 MB logical banks).
//   staged mode-3: laid out like mode-2 (raw data in logical bank 0,
//     results in logical bank 1).
//   multi-buffered mode-2 (mb high): logical bank 0 is physical bank 0 and
//     logical bank 1 physical bank 1; the caller puts the window number in
//     the top bit of the BANK_AW-bit in-bank address.
// Combining banks by address range (not by interleaving) is this design's
// choice. Direct sequential mode bypasses local memory, so the mapper is idle
// then.
// The framework uses two mappers, one for the user logic and one for the
// transfer engine, whose physical ports it merges.
//
// One logical read port and one logical write port, each taking one access
// per cycle. The physical banks return read data RD_LAT cycles after the
// read enable; the mapper keeps the bank number of each read in a shift
// register of the same length and selects the returning data, so rd_vld and
// rd_data appear exactly RD_LAT cycles after rd_en, in request order.
// Writes are passed on in the same cycle and are always accepted. Write
// data and the in-bank addresses go to every bank unchanged; only the enables
// are decoded, so those outputs are plain copies of the inputs.
module mf_bank_mapper
  import mf_pkg::*;
#(
  parameter int unsigned DATA_W    = mf_pkg::MF_DATA_W,
  parameter int unsigned NUM_BANKS = 4,
  parameter int unsigned BANK_AW   = 18,
  parameter int unsigned RD_LAT    = 2,
  localparam int unsigned SEL_W    = $clog2(NUM_BANKS),
  localparam int unsigned LAW      = BANK_AW + SEL_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  mode_e               mode,
  input  logic                mb,
  // logical read port
  input  logic                rd_en,
  input  logic                rd_lbank,
  input  logic [LAW-1:0]      rd_addr,
  output logic                rd_vld,
  output logic [DATA_W-1:0]   rd_data,
  // logical write port
  input  logic                wr_en,
  input  logic                wr_lbank,
  input  logic [LAW-1:0]      wr_addr,
  input  logic [DATA_W-1:0]   wr_data,
  // physical banks
  output logic                bank_rd_en   [NUM_BANKS],
  output logic [BANK_AW-1:0]  bank_rd_addr [NUM_BANKS],
  input  logic [DATA_W-1:0]   bank_rd_data [NUM_BANKS],
  output logic                bank_wr_en   [NUM_BANKS],
  output logic [BANK_AW-1:0]  bank_wr_addr [NUM_BANKS],
  output logic [DATA_W-1:0]   bank_wr_data [NUM_BANKS]
);

  // Physical bank number of a logical access.
  function automatic logic [SEL_W-1:0] phys_bank(mode_e m, logic lbank, logic [LAW-1:0] a);
    logic [SEL_W-1:0] b;
    b = a[LAW-1:BANK_AW];
    if (m != MODE_DUAL_RANDOM) begin
      if (mb) b = SEL_W'(lbank);
      else    b[SEL_W-1] = lbank;
    end
    return b;
  endfunction

  logic [SEL_W-1:0] rd_bank, wr_bank;
  assign rd_bank = phys_bank(mode, rd_lbank, rd_addr);
  assign wr_bank = phys_bank(mode, wr_lbank, wr_addr);

  always_comb begin
    for (int i = 0; i < NUM_BANKS; i++) begin
      bank_rd_en[i]   = rd_en && (rd_bank == SEL_W'(i));
      bank_rd_addr[i] = rd_addr[BANK_AW-1:0];
      bank_wr_en[i]   = wr_en && (wr_bank == SEL_W'(i));
      bank_wr_addr[i] = wr_addr[BANK_AW-1:0];
      bank_wr_data[i] = wr_data;
    end
  end

  // Read return tracking: valid flag and bank number per cycle of latency.
  logic             vpipe [RD_LAT];
  logic [SEL_W-1:0] bpipe [RD_LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < RD_LAT; i++) begin
        vpipe[i] <= 1'b0;
        bpipe[i] <= '0;
      end
    end else begin
      vpipe[0] <= rd_en;
      bpipe[0] <= rd_bank;
      for (int i = 1; i < RD_LAT; i++) begin
        vpipe[i] <= vpipe[i-1];
        bpipe[i] <= bpipe[i-1];
      end
    end
  end

  assign rd_vld  = vpipe[RD_LAT-1];
  assign rd_data = bank_rd_data[bpipe[RD_LAT-1]];

  // In mode-2 (and staged mode-3) a logical bank holds only half of the banks: the address
  // bit that would pick the other half must be zero.
  a_m2_rd_range: assert property (@(posedge clk) disable iff (!rst_n)
    (rd_en && mode != MODE_DUAL_RANDOM) |-> !rd_addr[LAW-1] && (!mb || rd_addr[LAW-1:BANK_AW] == '0));
  a_m2_wr_range: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_en && mode != MODE_DUAL_RANDOM) |-> !wr_addr[LAW-1] && (!mb || wr_addr[LAW-1:BANK_AW] == '0));

endmodule
