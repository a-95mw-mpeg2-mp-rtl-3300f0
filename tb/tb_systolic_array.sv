// tb_systolic_array: self-checking test of the ring-connected PE/SR array.
//
// A random 16x16 template and a 32-column window are shifted in row by row
// (RING_UP), then the ring is rotated left 16 times, one row shift is made
// with the halves of the new row swapped, and the ring is rotated right 16
// times. For every ring state the frame, top-field and bottom-field sums
// two clocks later must match a model that tracks the horizontal offset of
// the ring and the window row under each template row.
module tb_systolic_array;
  import meh_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  ring_op_e    op;
  logic        t_load, calc, sad_valid;
  pix_t        pe_in [16], sr_in [16], t_in [16];
  logic [15:0] tag, sad_tag, sad_frame, sad_top, sad_bot;

  systolic_array #(.N(16), .TAG_W(16)) dut (.*);

  byte unsigned win [17][32];
  byte unsigned tpl [16][16];
  int q_f [$], q_t [$], q_b [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && sad_valid) begin
    int ef, et, eb;
    ef = q_f.pop_front(); et = q_t.pop_front(); eb = q_b.pop_front();
    checks++;
    if (sad_frame !== 16'(ef) || sad_top !== 16'(et) || sad_bot !== 16'(eb)) begin
      failures++;
      $display("FAIL tag %0d frame %0d/%0d top %0d/%0d bot %0d/%0d", sad_tag, sad_frame, ef, sad_top, et, sad_bot, eb);
    end
  end

  // expected sums with template row i over window row i+row0, columns j+off
  task automatic expect_sums(int row0, int off);
    int st, sb;
    st = 0; sb = 0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        int a, b, d;
        a = tpl[i][j]; b = win[i + row0][(j + off) % 32];
        d = (a > b) ? a - b : b - a;
        if (i % 2 == 0) st += d; else sb += d;
      end
    q_f.push_back(st + sb); q_t.push_back(st); q_b.push_back(sb);
  endtask

  initial begin
    op = RING_HOLD; t_load = 0; calc = 0; tag = 0;
    for (int k = 0; k < 16; k++) begin pe_in[k] = 0; sr_in[k] = 0; t_in[k] = 0; end
    for (int r = 0; r < 17; r++) for (int c = 0; c < 32; c++) win[r][c] = 8'($urandom);
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) tpl[r][c] = 8'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 16; r++) begin
      op = RING_UP; t_load = 1;
      for (int k = 0; k < 16; k++) begin pe_in[k] = win[r][k]; sr_in[k] = win[r][16 + k]; t_in[k] = tpl[r][k]; end
      @(negedge clk);
    end
    t_load = 0;
    for (int h = 0; h <= 16; h++) begin
      calc = 1; tag = 16'(h);
      op = (h < 16) ? RING_LEFT : RING_HOLD;
      expect_sums(0, h);
      @(negedge clk);
    end
    // next row enters with its halves swapped: the ring is rotated by 16
    calc = 0; op = RING_UP;
    for (int k = 0; k < 16; k++) begin pe_in[k] = win[16][16 + k]; sr_in[k] = win[16][k]; end
    @(negedge clk);
    for (int h = 0; h <= 16; h++) begin
      calc = 1; tag = 16'(100 + h);
      op = (h < 16) ? RING_RIGHT : RING_HOLD;
      expect_sums(1, 16 - h);
      @(negedge clk);
    end
    calc = 0; op = RING_HOLD;
    repeat (4) @(negedge clk);
    checks++;
    if (q_f.size() != 0) begin failures++; $display("FAIL %0d sums missing", q_f.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
