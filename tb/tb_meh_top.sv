// tb_meh_top: end-to-end test of the motion estimation core at its default
// sizes.
//
// A host process plays the encoder around the core. Reference and current
// pictures are procedural (smooth waves plus a fine texture); each search
// job is one macroblock against one reference picture with a known true
// motion in half-pel units, and every macroblock is searched forward and
// backward (against two different reference pictures), as for a B-picture.
// Per job the host:
//   1. writes the 2:1 x 2:1 decimated window (+-64 x +-32) and template into
//      SW2/TB2 over the bus and runs MEH2 with four candidate vectors;
//   2. writes the +-8 full-resolution window centred on twice MEH2's vector
//      and the template into the free SW1/TB1 buffer;
//   3. starts MEH1 on that buffer as soon as MEH1 is idle; MEHH refines the
//      result by itself while the host goes on with the next job.
// A checker compares every MEH2, MEH1 (frame, top and bottom field) and
// MEHH result with the reference models, and MEH1's start-to-done time with
// its 324-clock schedule. Counted mechanisms: MEH2 line searches and searches
// that stop at once, MEH1 left and right ring sweeps and swapped row loads,
// MEHH stalls on the shared SW1 ports, MEH1 and MEHH busy together, MEH2
// and MEH1 busy together, a half-pel result, and a rejected bus write.
module tb_meh_top;
  import meh_pkg::*;
  import tb_ref_pkg::*;

  localparam int NJOB = 6;

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

  // ------------------------------------------------------------ pictures
  function automatic int refpix(int f, int x, int y);
    real v;
    int  p;
    v = 128.0 + 60.0 * $sin(x * 0.09 + f) * $cos(y * 0.11 - f)
              + 30.0 * $sin((x + 2 * y) * 0.045 + 2.0 * f);
    p = int'(v) + (((x * x * 7 + y * y * 3 + x * y * 5 + f * 13) >> 3) % 8) - 4;
    return (p < 0) ? 0 : ((p > 255) ? 255 : p);
  endfunction

  // reference picture at half-pel coordinates, MPEG-2 rounding
  function automatic int refhalf(int f, int x2, int y2);
    int x, y, fx, fy;
    x = x2 >>> 1; y = y2 >>> 1; fx = x2 & 1; fy = y2 & 1;
    if (!fx && !fy) return refpix(f, x, y);
    if (!fy) return (refpix(f, x, y) + refpix(f, x + 1, y) + 1) / 2;
    if (!fx) return (refpix(f, x, y) + refpix(f, x, y + 1) + 1) / 2;
    return (refpix(f, x, y) + refpix(f, x + 1, y) + refpix(f, x, y + 1) + refpix(f, x + 1, y + 1) + 2) / 4;
  endfunction

  function automatic int dec(int a, int b, int c, int d);
    return (a + b + c + d + 2) / 4;
  endfunction

  typedef struct {
    int f;        // reference picture
    int bx, by;   // macroblock position
    int hx, hy;   // true motion, half-pel units
    int buffer;
    mv_t  v2;     // MEH2 result
    win1_t w1;
    tpl1_t t1;
  } job_t;

  job_t jobs [NJOB];
  job_t m1_q [$];     // jobs handed to MEH1, in order
  job_t hp_q [$];

  // current macroblock pixel = reference moved by the true motion
  function automatic int curpix(job_t j, int x, int y);
    return refhalf(j.f, 2 * x + j.hx, 2 * y + j.hy);
  endfunction

  // ------------------------------------------------------------ bus
  task automatic bus_write(bus_sel_e sel, int addr, logic [127:0] data);
    @(negedge clk);
    bus_we = 1'b1; bus_sel = sel; bus_addr = 10'(addr); bus_wdata = data;
    @(negedge clk);
    bus_we = 1'b0;
  endtask

  // ------------------------------------------------------------ mechanisms
  int n_swaps = 0, n_left = 0, n_right = 0, n_stall = 0, n_m1_hp = 0, n_m2_m1 = 0;
  int n_lines_total = 0, n_no_line = 0, n_half = 0, n_exact = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_meh1.phase == PH_CALC && dut.m1_sw_re && dut.m1_sw_a[0]) n_swaps++;
    if (dut.u_meh1.op == RING_LEFT)  n_left++;
    if (dut.u_meh1.op == RING_RIGHT) n_right++;
    if (dut.hp_stall) n_stall++;
    if (meh1_busy && hp_busy) n_m1_hp++;
    if (meh2_busy && meh1_busy) n_m2_m1++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ checkers
  int m1_t0;
  always @(posedge clk) if (rst_n && meh1_start && !meh1_busy) m1_t0 = $time;

  always @(negedge clk) if (rst_n && meh1_done) begin
    job_t j;
    mv_t  ef, et, eb;
    int   sf, st, sb;
    j = m1_q.pop_front();
    fs_ref(j.w1, j.t1, ef, sf, et, st, eb, sb);
    checks++;
    if (frame_mv !== ef || frame_sad !== 16'(sf) || top_mv !== et || top_sad !== 16'(st) ||
        bot_mv !== eb || bot_sad !== 16'(sb)) begin
      failures++;
      $display("FAIL MEH1 frame (%0d,%0d)/(%0d,%0d) top (%0d,%0d)/(%0d,%0d) bot (%0d,%0d)/(%0d,%0d)",
               frame_mv.x, frame_mv.y, ef.x, ef.y, top_mv.x, top_mv.y, et.x, et.y,
               bot_mv.x, bot_mv.y, eb.x, eb.y);
    end
    checks++;
    if (($time - m1_t0) / 10 != 324) begin
      failures++;
      $display("FAIL MEH1 took %0d clocks", ($time - m1_t0) / 10);
    end
    hp_q.push_back(j);
  end

  always @(negedge clk) if (rst_n && hp_done) begin
    job_t j;
    mv_t  em, ef, et, eb;
    int   es, sf, st, sb, skipped, fx, fy;
    j = hp_q.pop_front();
    fs_ref(j.w1, j.t1, ef, sf, et, st, eb, sb);
    hp_ref(j.w1, j.t1, ef, sf, em, es, skipped);
    checks++;
    if (hp_mv !== em || hp_sad !== 16'(es) || hp_buf !== 1'(j.buffer)) begin
      failures++;
      $display("FAIL MEHH (%0d,%0d) %0d exp (%0d,%0d) %0d", hp_mv.x, hp_mv.y, hp_sad, em.x, em.y, es);
    end
    if (hp_mv.x[0] || hp_mv.y[0]) n_half++;
    fx = 4 * j.v2.x + hp_mv.x; fy = 4 * j.v2.y + hp_mv.y;
    if (fx == j.hx && fy == j.hy) n_exact++;
    $display("job f=%0d mb=(%0d,%0d) true (%0d,%0d)/2 coarse (%0d,%0d) final (%0d,%0d)/2 sad %0d",
             j.f, j.bx, j.by, j.hx, j.hy, int'(j.v2.x), int'(j.v2.y), fx, fy, hp_sad);
  end

  // ------------------------------------------------------------ host
  int   pending = -1;
  job_t pend_job;

  task automatic start_meh1(job_t j);
    m1_q.push_back(j);
    meh1_start = 1; meh1_buf = 1'(j.buffer);
    @(negedge clk);
    meh1_start = 0;
  endtask

  initial begin
    bus_we = 0; bus_sel = SEL_SW2; bus_addr = 0; bus_wdata = 0;
    meh2_start = 0; meh1_start = 0; meh1_buf = 0;
    for (int i = 0; i < 4; i++) meh2_cand[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // forward (picture 0) and backward (picture 1) search for three macroblocks
    for (int m = 0; m < NJOB / 2; m++) begin
      jobs[2*m]   = '{f: 0, bx: 320 + 48 * m, by: 200, hx: (m == 2) ? 61 : 48, hy: (m == 2) ? -31 : -24,
                      buffer: 0, v2: '0, w1: '{default: 0}, t1: '{default: 0}};
      jobs[2*m+1] = '{f: 1, bx: 320 + 48 * m, by: 200, hx: -90 + 7 * m, hy: 17 - 4 * m,
                      buffer: 0, v2: '0, w1: '{default: 0}, t1: '{default: 0}};
    end

    // a write beyond TB2 must be rejected
    bus_write(SEL_TB2, 9, '1);
    @(negedge clk);
    checks++;
    if (!addr_err) begin failures++; $display("FAIL out-of-range write accepted"); end

    for (int n = 0; n < NJOB; n++) begin
      job_t j;
      win2_t w2;
      tpl2_t t2;
      mv_t   cands [4], e2;
      int    bx2, by2, es2, ev2, nl2;
      j = jobs[n];
      j.buffer = n % 2;
      bx2 = j.bx / 2; by2 = j.by / 2;
      // 1. upper layer
      for (int r = 0; r < 72; r++)
        for (int c = 0; c < 144; c++) begin
          int X, Y;
          X = bx2 - 64 + c; Y = by2 - 32 + r;
          w2[r][c] = 8'(dec(refpix(j.f, 2*X, 2*Y), refpix(j.f, 2*X+1, 2*Y),
                            refpix(j.f, 2*X, 2*Y+1), refpix(j.f, 2*X+1, 2*Y+1)));
        end
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          int x, y;
          x = j.bx + 2*c; y = j.by + 2*r;
          t2[r][c] = 8'(dec(curpix(j, x, y), curpix(j, x+1, y), curpix(j, x, y+1), curpix(j, x+1, y+1)));
        end
      for (int r = 0; r < 72; r++)
        for (int wd = 0; wd < 9; wd++) begin
          logic [127:0] d;
          for (int k = 0; k < 16; k++) d[k*8 +: 8] = w2[r][wd*16 + k];
          bus_write(SEL_SW2, r * 9 + wd, d);
        end
      for (int r = 0; r < 8; r++) begin
        logic [127:0] d;
        d = '0;
        for (int k = 0; k < 8; k++) d[k*8 +: 8] = t2[r][k];
        bus_write(SEL_TB2, r, d);
      end
      // candidates: zero, the same picture's previous macroblock, a rough guess, a far point
      cands[0] = '0;
      cands[1] = (n >= 2) ? jobs[n-2].v2 : '0;
      cands[2] = (n == 2) ? '{x: 8'(j.hx / 4), y: 8'(j.hy / 4)} : '{x: 8'(j.hx / 4 + 5), y: 8'(j.hy / 4 - 3)};
      cands[3] = '{x: -8'sd60, y: 8'sd30};
      dds_ref(w2, t2, cands, 64, 32, 4, 16, e2, es2, ev2, nl2);
      if (pending >= 0) begin
        while (meh1_busy) @(negedge clk);
        start_meh1(pend_job);          // runs while MEH2 searches the next job
        pending = -1;
      end
      @(negedge clk);
      meh2_cand = cands; meh2_start = 1;
      @(negedge clk);
      meh2_start = 0;
      while (!meh2_done) @(negedge clk);
      checks++;
      if (meh2_mv !== e2 || meh2_sad !== 14'(es2)) begin
        failures++;
        $display("FAIL MEH2 (%0d,%0d) %0d exp (%0d,%0d) %0d", meh2_mv.x, meh2_mv.y, meh2_sad, e2.x, e2.y, es2);
      end
      if (dut.u_meh2.n_lines == 0) n_no_line++;
      n_lines_total += dut.u_meh2.n_lines;
      j.v2 = meh2_mv;
      jobs[n].v2 = meh2_mv;
      // 2. lower layer window around twice the coarse vector
      for (int r = 0; r < 32; r++)
        for (int c = 0; c < 32; c++)
          j.w1[r][c] = 8'(refpix(j.f, j.bx + 2 * j.v2.x - 8 + c, j.by + 2 * j.v2.y - 8 + r));
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++) j.t1[r][c] = 8'(curpix(j, j.bx + c, j.by + r));
      // the buffer is free once MEH1 and MEHH are done with the job before last
      while (hp_busy || m1_q.size() > 1 || hp_q.size() > 1 ||
             (m1_q.size() == 1 && m1_q[0].buffer == j.buffer) ||
             (hp_q.size() == 1 && hp_q[0].buffer == j.buffer)) @(negedge clk);
      for (int r = 0; r < 32; r++)
        for (int h = 0; h < 2; h++) begin
          logic [127:0] d;
          for (int k = 0; k < 16; k++) d[k*8 +: 8] = j.w1[r][h*16 + k];
          bus_write(SEL_SW1, {j.buffer[0], 5'(r), 1'(h)}, d);
        end
      for (int r = 0; r < 16; r++) begin
        logic [127:0] d;
        for (int k = 0; k < 16; k++) d[k*8 +: 8] = j.t1[r][k];
        bus_write(SEL_TB1, {j.buffer[0], 4'(r)}, d);
      end
      // 3. odd jobs start the moment MEH1 finishes the previous one, so MEHH
      //    refines that one while MEH1 reads its new window; even jobs wait
      //    and start together with the next MEH2 search
      if (n % 2 == 1) begin
        while (meh1_busy) @(negedge clk);
        start_meh1(j);
      end else begin
        pending = n;
        pend_job = j;
      end
    end
    if (pending >= 0) begin
      while (meh1_busy) @(negedge clk);
      start_meh1(pend_job);
    end
    while (m1_q.size() > 0 || hp_q.size() > 0 || meh1_busy || hp_busy) @(negedge clk);
    repeat (5) @(negedge clk);

    $display("mechanisms: lines=%0d no_line=%0d swaps=%0d left=%0d right=%0d stalls=%0d m1+hp=%0d m2+m1=%0d half=%0d exact=%0d",
             n_lines_total, n_no_line, n_swaps, n_left, n_right, n_stall, n_m1_hp, n_m2_m1, n_half, n_exact);
    checks++; if (n_lines_total == 0) begin failures++; $display("FAIL no MEH2 line search"); end
    checks++; if (n_no_line == 0) begin failures++; $display("FAIL no MEH2 search stopped at once"); end
    checks++; if (n_swaps != NJOB * 8) begin failures++; $display("FAIL swapped loads %0d", n_swaps); end
    checks++; if (n_left != NJOB * 9 * 16 || n_right != NJOB * 8 * 16) begin failures++; $display("FAIL ring sweeps"); end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL MEHH never stalled"); end
    checks++; if (n_m1_hp == 0) begin failures++; $display("FAIL MEH1 and MEHH never overlapped"); end
    checks++; if (n_m2_m1 == 0) begin failures++; $display("FAIL MEH2 and MEH1 never overlapped"); end
    checks++; if (n_half == 0) begin failures++; $display("FAIL no half-pel result"); end
    checks++; if (n_exact == 0) begin failures++; $display("FAIL no job found its true motion"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
