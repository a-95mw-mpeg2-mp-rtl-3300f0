// tb_hppu: self-checking test of the half-pel processing unit.
//
// SW1/TB1 are arrays here with one-clock reads. The read grant is random
// (about one clock in three refused) except in the latency runs, where it
// is always given and done must follow start by 20 clocks. Each result is
// compared with tb_ref_pkg::hp_ref. Cases: random data, templates planted at
// every half-pel position, integer vectors on the edges and corners of the
// +-8 range (positions outside the window are skipped), and an integer
// result that no half position beats.
module tb_hppu;
  import meh_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         start, buf_sel, busy, done, stall;
  mv_t          int_mv, hp_mv;
  logic [15:0]  int_sad, hp_sad;
  logic         sw_req, sw_gnt, tb_re;
  logic [6:0]   sw_addr_a, sw_addr_b;
  logic [4:0]   tb_addr;
  logic [127:0] sw_rdata_a, sw_rdata_b, tb_rdata;

  win1_t win [2];
  tpl1_t tpl [2];
  bit    always_grant;

  hppu dut (.*);

  function automatic logic [127:0] sw_word(logic [6:0] a);
    logic [127:0] w;
    for (int k = 0; k < 16; k++) w[k*8 +: 8] = win[a[6]][a[5:1]][a[0]*16 + k];
    return w;
  endfunction

  always_ff @(posedge clk) begin
    if (sw_req && sw_gnt) begin
      sw_rdata_a <= sw_word(sw_addr_a);
      sw_rdata_b <= sw_word(sw_addr_b);
    end else begin
      sw_rdata_a <= 128'($urandom);   // ports busy elsewhere: data is not ours
      sw_rdata_b <= 128'($urandom);
    end
    if (tb_re)
      for (int k = 0; k < 16; k++) tb_rdata[k*8 +: 8] <= tpl[tb_addr[4]][tb_addr[3:0]][k];
  end

  always @(negedge clk) sw_gnt = always_grant ? 1'b1 : (($urandom % 3) != 0);

  int n_stalls = 0;
  always @(posedge clk) if (rst_n && stall) n_stalls++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill_random(int b);
    for (int r = 0; r < 32; r++) for (int c = 0; c < 32; c++) win[b][r][c] = 8'($urandom);
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) tpl[b][r][c] = 8'($urandom);
  endtask

  // template = window interpolated at half-pel position (2dx+hx, 2dy+hy)
  task automatic plant(int b, int dx, int dy, int hx, int hy);
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++)
        tpl[b][r][c] = 8'(half_pix(win[b], r + dy + 8, c + dx + 8, hx, hy));
  endtask

  int n_half_wins = 0, n_skips = 0;

  task automatic run(int b, int dx, int dy, string name, int exp_lat = -1);
    mv_t emv;
    int  esad, isad, skipped, t0, t1;
    isad = int_sad_ref(win[b], tpl[b], dx, dy);
    hp_ref(win[b], tpl[b], '{x: 8'(dx), y: 8'(dy)}, isad, emv, esad, skipped);
    n_skips += skipped;
    @(negedge clk);
    start = 1'b1; buf_sel = 1'(b);
    int_mv = '{x: 8'(dx), y: 8'(dy)}; int_sad = 16'(isad);
    t0 = $time;
    @(negedge clk);
    start = 1'b0;
    int_mv = '{x: 8'sd99, y: 8'sd99};   // must have been latched at start
    while (!done) @(negedge clk);
    t1 = $time;
    checks++;
    if (hp_mv !== emv || hp_sad !== 16'(esad)) begin
      failures++;
      $display("FAIL %s: got (%0d,%0d) %0d exp (%0d,%0d) %0d", name,
               hp_mv.x, hp_mv.y, hp_sad, emv.x, emv.y, esad);
    end
    if (emv.x[0] || emv.y[0]) n_half_wins++;
    if (exp_lat >= 0) begin
      checks++;
      if ((t1 - t0) / 10 - 1 != exp_lat) begin
        failures++;
        $display("FAIL %s latency %0d, expected %0d", name, (t1 - t0) / 10 - 1, exp_lat);
      end
    end
  endtask

  initial begin
    int hxs[8] = '{-1, 0, 1, -1, 1, -1, 0, 1};
    int hys[8] = '{-1, -1, -1, 0, 0, 1, 1, 1};
    start = 1'b0; buf_sel = 1'b0; int_mv = '0; int_sad = '0;
    always_grant = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fill_random(0); fill_random(1);
    run(0, 2, -3, "lat_random", 20);
    run(1, 0, 0, "lat_centre", 20);
    always_grant = 1'b0;
    for (int p = 0; p < 8; p++) begin
      int dx, dy;
      dx = int'($urandom % 15) - 7; dy = int'($urandom % 15) - 7;
      fill_random(p % 2);
      plant(p % 2, dx, dy, hxs[p], hys[p]);
      run(p % 2, dx, dy, $sformatf("planted%0d", p));
      checks++;
      if (hp_mv.x != 8'(2*dx + hxs[p]) || hp_mv.y != 8'(2*dy + hys[p]) || hp_sad != 0) begin
        failures++;
        $display("FAIL planted%0d not found exactly", p);
      end
    end
    // edges and corners: half positions outside the window are skipped
    fill_random(0); plant(0, -8, -8, 0, 0);
    run(0, -8, -8, "corner_tl");
    fill_random(1); plant(1, 8, 8, 1, 1);     // (+1,+1) would be outside
    run(1, 8, 8, "corner_br");
    fill_random(0);
    run(0, 8, -8, "corner_tr");
    run(0, -8, 5, "edge_left");
    run(0, 3, 8, "edge_bottom");
    for (int n = 0; n < 6; n++) begin
      fill_random(n % 2);
      run(n % 2, int'($urandom % 17) - 8, int'($urandom % 17) - 8, $sformatf("rand%0d", n));
    end
    checks++;
    if (n_stalls == 0 || n_skips == 0 || n_half_wins == 0) begin
      failures++;
      $display("FAIL mechanisms: stalls=%0d skips=%0d half wins=%0d", n_stalls, n_skips, n_half_wins);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
