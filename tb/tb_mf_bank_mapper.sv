// tb_mf_bank_mapper: self-checking test of the logical-to-physical bank
// mapping.
//
// Four small bank models (16 blocks each) sit behind the mapper. In mode-1
// random writes through the logical port must land in bank addr[5:4] at
// offset addr[3:0], checked by peeking into the bank models; random reads
// must come back exactly RD_LAT cycles later, in order, with the written
// data. In mode-2 logical bank 0 must use banks 0-1 and logical bank 1
// banks 2-3. Back-to-back reads alternating between banks check the
// in-order return across banks. With mb set (multi-buffered mode-2),
// logical bank b must be exactly physical bank b.
module tb_mf_bank_mapper;
  import mf_pkg::*;

  localparam int unsigned DW = 128, NB = 4, BAW = 4, LAT = 2;
  localparam int unsigned LAW = BAW + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mode_e mode;
  logic  mb;
  logic rd_en, rd_lbank, wr_en, wr_lbank, rd_vld;
  logic [LAW-1:0] rd_addr, wr_addr;
  logic [DW-1:0] rd_data, wr_data;
  logic              b_rd_en [NB];
  logic [BAW-1:0]    b_rd_addr [NB];
  logic [DW-1:0]     b_rd_data [NB];
  logic              b_wr_en [NB];
  logic [BAW-1:0]    b_wr_addr [NB];
  logic [DW-1:0]     b_wr_data [NB];

  mf_bank_mapper #(.DATA_W(DW), .NUM_BANKS(NB), .BANK_AW(BAW), .RD_LAT(LAT)) dut (
    .clk, .rst_n, .mode, .mb(mb),
    .rd_en, .rd_lbank, .rd_addr, .rd_vld, .rd_data,
    .wr_en, .wr_lbank, .wr_addr, .wr_data,
    .bank_rd_en(b_rd_en), .bank_rd_addr(b_rd_addr), .bank_rd_data(b_rd_data),
    .bank_wr_en(b_wr_en), .bank_wr_addr(b_wr_addr), .bank_wr_data(b_wr_data)
  );

  for (genvar g = 0; g < NB; g++) begin : g_bank
    mf_sram_bank_model #(.DATA_W(DW), .AW(BAW), .RD_LAT(LAT)) u_bank (
      .clk, .rd_en(b_rd_en[g]), .rd_addr(b_rd_addr[g]), .rd_data(b_rd_data[g]),
      .wr_en(b_wr_en[g]), .wr_addr(b_wr_addr[g]), .wr_data(b_wr_data[g])
    );
  end

  int checks = 0, failures = 0;

  function automatic logic [DW-1:0] peek_bank(int b, logic [BAW-1:0] a);
    case (b)
      0: return g_bank[0].u_bank.peek(a);
      1: return g_bank[1].u_bank.peek(a);
      2: return g_bank[2].u_bank.peek(a);
      default: return g_bank[3].u_bank.peek(a);
    endcase
  endfunction

  // expected read returns: data and the cycle at which they are due
  logic [DW-1:0]   exp_q[$];
  longint unsigned due_q[$];
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n && rd_vld) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected read return");
      end else begin
        logic [DW-1:0] e;
        longint unsigned d;
        e = exp_q.pop_front();
        d = due_q.pop_front();
        if (rd_data !== e || cyc != d) begin
          failures++;
          $display("FAIL: read got %h at %0d, expected %h at %0d", rd_data, cyc, e, d);
        end
      end
    end
  end

  task automatic do_write(logic lb, logic [LAW-1:0] a, logic [DW-1:0] d);
    @(negedge clk);
    wr_en = 1'b1; wr_lbank = lb; wr_addr = a; wr_data = d;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  // issue one read in the coming cycle; expected data given by the caller
  task automatic do_read(logic lb, logic [LAW-1:0] a, logic [DW-1:0] e);
    @(negedge clk);
    rd_en = 1'b1; rd_lbank = lb; rd_addr = a;
    exp_q.push_back(e);
    due_q.push_back(cyc + LAT);
  endtask

  logic [DW-1:0] shadow [2][2**LAW];

  initial begin
    mode = MODE_DUAL_RANDOM; mb = 1'b0;
    rd_en = 0; wr_en = 0; rd_lbank = 0; wr_lbank = 0; rd_addr = '0; wr_addr = '0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- mode-1: all 64 logical addresses, placement checked in the banks
    for (int a = 0; a < 2**LAW; a++) begin
      shadow[0][a] = {$urandom, $urandom, $urandom, $urandom};
      do_write(1'b0, LAW'(a), shadow[0][a]);
    end
    @(negedge clk);
    for (int a = 0; a < 2**LAW; a++) begin
      checks++;
      if (peek_bank(a >> BAW, BAW'(a)) !== shadow[0][a]) begin
        failures++;
        $display("FAIL: mode-1 addr %0d not in bank %0d", a, a >> BAW);
      end
    end
    // back-to-back random reads
    for (int i = 0; i < 100; i++) begin
      int a;
      a = $urandom % (2**LAW);
      do_read(1'b0, LAW'(a), shadow[0][a]);
    end
    @(negedge clk); rd_en = 1'b0;
    repeat (LAT + 2) @(negedge clk);

    // ---- mode-2: two logical banks of 32 blocks
    mode = MODE_SINGLE_RANDOM;
    for (int lb = 0; lb < 2; lb++)
      for (int a = 0; a < 2**(LAW-1); a++) begin
        shadow[lb][a] = {$urandom, $urandom, $urandom, $urandom};
        do_write(lb[0], LAW'(a), shadow[lb][a]);
      end
    @(negedge clk);
    for (int lb = 0; lb < 2; lb++)
      for (int a = 0; a < 2**(LAW-1); a++) begin
        checks++;
        if (peek_bank(2*lb + (a >> BAW), BAW'(a)) !== shadow[lb][a]) begin
          failures++;
          $display("FAIL: mode-2 lbank %0d addr %0d misplaced", lb, a);
        end
      end
    for (int i = 0; i < 100; i++) begin
      int a, lb;
      a = $urandom % (2**(LAW-1));
      lb = i % 2;
      do_read(lb[0], LAW'(a), shadow[lb][a]);
    end
    @(negedge clk); rd_en = 1'b0;
    repeat (LAT + 3) @(negedge clk);

    // ---- multi-buffered mode-2: logical bank b is physical bank b, whole
    mb = 1'b1;
    for (int lb = 0; lb < 2; lb++)
      for (int a = 0; a < 2**BAW; a++) begin
        shadow[lb][a] = {$urandom, $urandom, $urandom, $urandom};
        do_write(lb[0], LAW'(a), shadow[lb][a]);
      end
    @(negedge clk);
    for (int lb = 0; lb < 2; lb++)
      for (int a = 0; a < 2**BAW; a++) begin
        checks++;
        if (peek_bank(lb, BAW'(a)) !== shadow[lb][a]) begin
          failures++;
          $display("FAIL: multi-buffer lbank %0d addr %0d misplaced", lb, a);
        end
      end
    for (int i = 0; i < 60; i++) begin
      int a, lb;
      a = $urandom % (2**BAW);
      lb = (i / 3) % 2;
      do_read(lb[0], LAW'(a), shadow[lb][a]);
    end
    @(negedge clk); rd_en = 1'b0;
    repeat (LAT + 3) @(negedge clk);

    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d reads never returned", exp_q.size());
    end
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
