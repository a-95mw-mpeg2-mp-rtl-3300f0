// tb_meh1_fs: self-checking test of the MEH1 full search.
//
// The SW1/TB1 buffers are modelled here as arrays with one-clock reads. Each
// search is checked against tb_ref_pkg::fs_ref (frame, top-field and
// bottom-field vectors and SADs) and its start-to-done time against the
// 324 clocks of the phase schedule. Cases: random data, a planted exact match,
// different planted matches for the two fields, matches at the corners of
// the range, and both buffers.
module tb_meh1_fs;
  import meh_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic              start, buf_sel, busy, done;
  fs_phase_e         phase;
  logic              sw_re, tb_re;
  logic [6:0]        sw_addr_a, sw_addr_b;
  logic [4:0]        tb_addr;
  logic [127:0]      sw_rdata_a, sw_rdata_b, tb_rdata;
  mv_t               frame_mv, top_mv, bot_mv;
  logic [15:0]       frame_sad, top_sad, bot_sad;

  win1_t win [2];
  tpl1_t tpl [2];

  meh1_fs dut (.*);

  function automatic logic [127:0] sw_word(logic [6:0] a);
    logic [127:0] w;
    for (int k = 0; k < 16; k++) w[k*8 +: 8] = win[a[6]][a[5:1]][a[0]*16 + k];
    return w;
  endfunction

  always_ff @(posedge clk) begin
    if (sw_re) begin
      sw_rdata_a <= sw_word(sw_addr_a);
      sw_rdata_b <= sw_word(sw_addr_b);
    end
    if (tb_re)
      for (int k = 0; k < 16; k++) tb_rdata[k*8 +: 8] <= tpl[tb_addr[4]][tb_addr[3:0]][k];
  end

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_swapped_loads = 0, n_left = 0, n_right = 0;
  always @(posedge clk) if (rst_n) begin
    if (phase == PH_CALC && sw_re && sw_addr_a[0]) n_swapped_loads++;
    if (dut.op == RING_LEFT)  n_left++;
    if (dut.op == RING_RIGHT) n_right++;
  end

  task automatic fill_random(int b);
    for (int r = 0; r < 32; r++) for (int c = 0; c < 32; c++) win[b][r][c] = 8'($urandom);
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) tpl[b][r][c] = 8'($urandom);
  endtask

  // copy template rows of the given parity from the window at (dx, dy)
  task automatic plant(int b, int dx, int dy, int parity);
    for (int r = 0; r < 16; r++)
      if (parity < 0 || r % 2 == parity)
        for (int c = 0; c < 16; c++) tpl[b][r][c] = win[b][r+dy+8][c+dx+8];
  endtask

  task automatic run(int b, string name);
    mv_t emv_f, emv_t, emv_b;
    int  es_f, es_t, es_b, t0, t1;
    fs_ref(win[b], tpl[b], emv_f, es_f, emv_t, es_t, emv_b, es_b);
    @(negedge clk);
    start = 1'b1; buf_sel = 1'(b);
    t0 = $time;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    t1 = $time;
    checks++;
    if (frame_mv !== emv_f || frame_sad !== 16'(es_f)) begin
      failures++;
      $display("FAIL %s frame: got (%0d,%0d) %0d exp (%0d,%0d) %0d", name,
               frame_mv.x, frame_mv.y, frame_sad, emv_f.x, emv_f.y, es_f);
    end
    checks++;
    if (top_mv !== emv_t || top_sad !== 16'(es_t)) begin
      failures++;
      $display("FAIL %s top: got (%0d,%0d) %0d exp (%0d,%0d) %0d", name,
               top_mv.x, top_mv.y, top_sad, emv_t.x, emv_t.y, es_t);
    end
    checks++;
    if (bot_mv !== emv_b || bot_sad !== 16'(es_b)) begin
      failures++;
      $display("FAIL %s bottom: got (%0d,%0d) %0d exp (%0d,%0d) %0d", name,
               bot_mv.x, bot_mv.y, bot_sad, emv_b.x, emv_b.y, es_b);
    end
    checks++;
    // start is sampled one clock after t0; done is seen half a clock after it rises
    if ((t1 - t0) / 10 - 1 != 324) begin
      failures++;
      $display("FAIL %s latency %0d clocks, expected 324", name, (t1 - t0) / 10 - 1);
    end
  endtask

  initial begin
    start = 1'b0; buf_sel = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fill_random(0); fill_random(1);
    run(0, "random0");
    run(1, "random1");
    fill_random(0); plant(0, 3, -5, -1);
    run(0, "planted");
    checks++; if (frame_mv.x != 3 || frame_mv.y != -5 || frame_sad != 0) failures++;
    fill_random(1); plant(1, -7, 2, 0); plant(1, 6, 8, 1);
    run(1, "fields");
    checks++; if (top_mv.x != -7 || top_mv.y != 2 || bot_mv.x != 6 || bot_mv.y != 8) failures++;
    fill_random(0); plant(0, -8, -8, -1);
    run(0, "corner_tl");
    fill_random(1); plant(1, 8, 8, -1);
    run(1, "corner_br");
    fill_random(0); plant(0, 8, -8, -1);
    run(0, "corner_tr");
    // ring movement: 8 left sweeps and 8 right sweeps of 16 steps per search
    checks++;
    // even candidate rows (9) sweep left, odd ones (8) sweep right, 16 steps each
    if (n_left != 7 * 9 * 16 || n_right != 7 * 8 * 16) begin
      failures++;
      $display("FAIL ring moves left=%0d right=%0d", n_left, n_right);
    end
    checks++;
    if (n_swapped_loads != 7 * 8) begin
      failures++;
      $display("FAIL swapped row loads %0d", n_swapped_loads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
