// tb_meh2_dds: self-checking test of MEH2, the upper-layer 1D diamond search.
//
// The window and template are written through the buffer write ports, as
// the bus would. Every search is compared with tb_ref_pkg::dds_ref: vector,
// SAD, number of SADs evaluated and number of line searches. Images are
// either random or a smooth ramp, on which the search must also find a
// planted block exactly. Cases include a candidate outside the range
// (clamped), a target on the range boundary (points beyond it skipped) and
// a target equal to a candidate (no line search at all).
module tb_meh2_dds;
  import meh_pkg::*;
  import tb_ref_pkg::*;

  localparam int RX = 64, RY = 32, STEPS = 4, MAX_ITER = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         sw2_we, tb2_we, start, busy, done;
  logic [9:0]   sw2_waddr;
  logic [127:0] sw2_wdata;
  logic [2:0]   tb2_waddr;
  logic [63:0]  tb2_wdata;
  mv_t          cand [4];
  mv_t          best_mv;
  logic [13:0]  best_sad;
  logic [15:0]  n_evals;
  logic [7:0]   n_lines;

  meh2_dds dut (.*);

  win2_t w;
  tpl2_t t;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load();
    for (int r = 0; r < 72; r++)
      for (int wd = 0; wd < 9; wd++) begin
        @(negedge clk);
        sw2_we = 1'b1; sw2_waddr = 10'(r * 9 + wd);
        for (int k = 0; k < 16; k++) sw2_wdata[k*8 +: 8] = w[r][wd*16 + k];
      end
    for (int r = 0; r < 8; r++) begin
      @(negedge clk);
      sw2_we = 1'b0; tb2_we = 1'b1; tb2_waddr = 3'(r);
      for (int k = 0; k < 8; k++) tb2_wdata[k*8 +: 8] = t[r][k];
    end
    @(negedge clk);
    sw2_we = 1'b0; tb2_we = 1'b0;
  endtask

  // a textured bowl centred on the block at vector (tx, ty): SAD grows in every direction
  task automatic smooth_image(int tx, int ty);
    for (int y = 0; y < 72; y++)
      for (int x = 0; x < 144; x++) begin
        int dx, dy, p;
        dx = x - (tx + RX + 4); dy = y - (ty + RY + 4);
        p = (dx*dx + dy*dy) / 12;
        p = (p > 240) ? 240 : p;
        w[y][x] = 8'(p + (((x * x * 7 + y * y * 3 + x * y * 5) >> 3) % 2));   // fine texture
      end
  endtask

  task automatic random_image();
    for (int y = 0; y < 72; y++)
      for (int x = 0; x < 144; x++) w[y][x] = 8'($urandom);
  endtask

  task automatic plant(int tx, int ty);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) t[i][j] = w[i + ty + RY][j + tx + RX];
  endtask

  int tot_lines = 0, tot_evals = 0;

  task automatic run(string name, mv_t c[4]);
    mv_t emv;
    int  esad, ev, nl;
    dds_ref(w, t, c, RX, RY, STEPS, MAX_ITER, emv, esad, ev, nl);
    load();
    @(negedge clk);
    cand = c; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (best_mv !== emv || best_sad !== 14'(esad) || n_evals !== 16'(ev) || n_lines !== 8'(nl)) begin
      failures++;
      $display("FAIL %s: got (%0d,%0d) sad %0d evals %0d lines %0d; exp (%0d,%0d) sad %0d evals %0d lines %0d",
               name, best_mv.x, best_mv.y, best_sad, n_evals, n_lines, emv.x, emv.y, esad, ev, nl);
    end
    tot_lines += nl;
    tot_evals += ev;
  endtask

  function automatic mv_t v(int x, int y);
    return '{x: 8'(x), y: 8'(y)};
  endfunction

  initial begin
    sw2_we = 0; tb2_we = 0; start = 0; sw2_waddr = 0; sw2_wdata = 0; tb2_waddr = 0; tb2_wdata = 0;
    for (int i = 0; i < 4; i++) cand[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    smooth_image(20, -10); plant(20, -10);
    run("smooth", '{v(0, 0), v(5, 5), v(-3, 2), v(30, -20)});
    checks++; if (best_mv != v(20, -10) || best_sad != 0) begin failures++; $display("FAIL smooth target not found %0d %0d sad %0d lines %0d", best_mv.x, best_mv.y, best_sad, n_lines); end

    smooth_image(-41, 17); plant(-41, 17);
    run("smooth_far", '{v(0, 0), v(10, 0), v(0, -10), v(-10, 10)});
    checks++; if (best_mv != v(-41, 17) || best_sad != 0) begin failures++; $display("FAIL smooth_far target not found"); end

    smooth_image(64, 32); plant(64, 32);
    run("boundary", '{v(100, 50), v(0, 0), v(60, 30), v(-64, -32)});
    checks++; if (best_mv != v(64, 32)) begin failures++; $display("FAIL boundary target not found"); end

    smooth_image(7, 3); plant(7, 3);
    run("at_candidate", '{v(1, 1), v(7, 3), v(-5, 0), v(0, 9)});
    checks++; if (n_lines != 0 || best_mv != v(7, 3)) begin failures++; $display("FAIL at_candidate"); end

    for (int n = 0; n < 3; n++) begin
      random_image(); plant(int'($urandom % 129) - 64, int'($urandom % 65) - 32);
      run($sformatf("random%0d", n), '{v(int'($urandom % 129) - 64, int'($urandom % 65) - 32),
                                       v(0, 0), v(int'($urandom % 20) - 10, 0), v(0, int'($urandom % 20) - 10)});
    end
    checks++;
    if (tot_lines == 0) begin failures++; $display("FAIL no line search happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
