// tb_meh_rate: throughput of the fine-search pipeline at the HD rate.
//
// Workload: 1920x1080 at 30 frames/s is 8160 macroblocks (1088 coded lines)
// per frame, 244,800 per second; at 108 MHz that leaves 441 clocks per
// macroblock. Eight macroblocks with random windows are pushed through MEH1
// and MEHH back to back, the host writing the next window into the free
// SW1/TB1 buffer at one bus word per clock while MEH1 searches the other.
// Checked: every MEH1 and MEHH result against the reference models, MEHH
// stalling on the shared ports, and the steady start-to-start interval of
// MEH1 (325 clocks: 324 of search plus the start handshake), which must fit
// the 441-clock budget for one reference. A second reference (B-picture)
// would need twice the interval; that figure is printed.
module tb_meh_rate;
  import meh_pkg::*;
  import tb_ref_pkg::*;

  localparam int NJ = 8;
  localparam int BUDGET = 441;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              bus_we, addr_err;
  bus_sel_e          bus_sel;
  logic [9:0]        bus_addr;
  logic [127:0]      bus_wdata;
  logic              meh2_start, meh2_busy, meh2_done;
  mv_t               meh2_cand [4];
  mv_t               meh2_mv;
  logic [13:0]       meh2_sad;
  logic              meh1_start, meh1_buf, meh1_busy, meh1_done;
  mv_t               frame_mv, top_mv, bot_mv;
  logic [15:0]       frame_sad, top_sad, bot_sad;
  logic              hp_busy, hp_done, hp_buf;
  mv_t               hp_mv;
  logic [15:0]       hp_sad;

  meh_top dut (.*);

  win1_t w [NJ];
  tpl1_t t [NJ];
  int    m1_idx = 0, hp_idx = 0, n_stall = 0;
  int    starts [NJ];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && dut.hp_stall) n_stall++;

  always @(negedge clk) if (rst_n && meh1_done) begin
    mv_t ef, et, eb;
    int  sf, st, sb;
    fs_ref(w[m1_idx], t[m1_idx], ef, sf, et, st, eb, sb);
    checks++;
    if (frame_mv !== ef || frame_sad !== 16'(sf) || top_mv !== et || bot_mv !== eb) begin
      failures++;
      $display("FAIL MEH1 job %0d", m1_idx);
    end
    m1_idx++;
  end

  always @(negedge clk) if (rst_n && hp_done) begin
    mv_t ef, et, eb, em;
    int  sf, st, sb, es, sk;
    fs_ref(w[hp_idx], t[hp_idx], ef, sf, et, st, eb, sb);
    hp_ref(w[hp_idx], t[hp_idx], ef, sf, em, es, sk);
    checks++;
    if (hp_mv !== em || hp_sad !== 16'(es)) begin
      failures++;
      $display("FAIL MEHH job %0d", hp_idx);
    end
    hp_idx++;
  end

  // write one job's window and template, one bus word per clock
  task automatic load(int j);
    for (int r = 0; r < 32; r++)
      for (int h = 0; h < 2; h++) begin
        @(negedge clk);
        bus_we = 1; bus_sel = SEL_SW1; bus_addr = 10'({1'(j % 2), 5'(r), 1'(h)});
        for (int k = 0; k < 16; k++) bus_wdata[k*8 +: 8] = w[j][r][h*16 + k];
      end
    for (int r = 0; r < 16; r++) begin
      @(negedge clk);
      bus_we = 1; bus_sel = SEL_TB1; bus_addr = 10'({1'(j % 2), 4'(r)});
      for (int k = 0; k < 16; k++) bus_wdata[k*8 +: 8] = t[j][r][k];
    end
    @(negedge clk);
    bus_we = 0;
  endtask

  initial begin
    bus_we = 0; bus_sel = SEL_SW1; bus_addr = 0; bus_wdata = 0;
    meh2_start = 0; meh1_start = 0; meh1_buf = 0;
    for (int i = 0; i < 4; i++) meh2_cand[i] = '0;
    for (int j = 0; j < NJ; j++) begin
      int dx, dy;
      for (int r = 0; r < 32; r++) for (int c = 0; c < 32; c++) w[j][r][c] = 8'($urandom);
      dx = int'($urandom % 17) - 8; dy = int'($urandom % 17) - 8;
      for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++)
        t[j][r][c] = 8'(w[j][r + dy + 8][c + dx + 8] + ($urandom % 5));
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    load(0);
    for (int j = 0; j < NJ; j++) begin
      // MEH1 has finished job j-1 (and MEHH job j-2): start job j at once
      while (meh1_busy) @(negedge clk);
      meh1_start = 1; meh1_buf = 1'(j % 2);
      starts[j] = $time;
      @(negedge clk);
      meh1_start = 0;
      // the other buffer is free once MEHH has finished job j-1
      if (j + 1 < NJ) begin
        @(negedge clk);
        while (hp_busy) @(negedge clk);
        load(j + 1);
      end
    end
    while (meh1_busy || hp_busy || hp_idx < NJ) @(negedge clk);

    for (int j = 2; j < NJ; j++) begin
      int iv;
      iv = (starts[j] - starts[j-1]) / 10;
      checks++;
      if (iv != 325 || iv > BUDGET) begin
        failures++;
        $display("FAIL interval %0d clocks before job %0d", iv, j);
      end
    end
    $display("one reference: %0d clocks per macroblock of %0d available; two references: %0d",
             (starts[NJ-1] - starts[NJ-2]) / 10, BUDGET, 2 * (starts[NJ-1] - starts[NJ-2]) / 10);
    checks++;
    if (n_stall == 0 || m1_idx != NJ || hp_idx != NJ) begin
      failures++;
      $display("FAIL stalls %0d, MEH1 results %0d, MEHH results %0d", n_stall, m1_idx, hp_idx);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
