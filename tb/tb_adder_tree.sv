// tb_adder_tree: self-checking test of the frame/field adder tree.
// Random 16x16 absolute differences every clock (with gaps); frame, top
// (even rows) and bottom (odd rows) sums and the tag must come out two
// clocks later.
module tb_adder_tree;
  import meh_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid, out_valid;
  logic [15:0] in_tag, out_tag;
  pix_t        ad [16][16];
  logic [15:0] sad_frame, sad_top, sad_bot;

  adder_tree #(.N(16), .TAG_W(16)) dut (.*);

  int q_top [$], q_bot [$], q_tag [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare what leaves the tree with what entered two clocks earlier
  always @(negedge clk) if (rst_n && out_valid) begin
    int et, eb, eg;
    et = q_top.pop_front(); eb = q_bot.pop_front(); eg = q_tag.pop_front();
    checks++;
    if (sad_top !== 16'(et) || sad_bot !== 16'(eb) || sad_frame !== 16'(et + eb) || out_tag !== 16'(eg)) begin
      failures++;
      $display("FAIL top %0d/%0d bot %0d/%0d frame %0d tag %0d/%0d", sad_top, et, sad_bot, eb, sad_frame, out_tag, eg);
    end
  end

  initial begin
    in_valid = 0; in_tag = 0;
    for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++) ad[i][j] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int st, sb;
      @(negedge clk);
      st = 0; sb = 0;
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          ad[i][j] = (n == 1) ? 8'hff : 8'($urandom);
          if (i % 2 == 0) st += ad[i][j]; else sb += ad[i][j];
        end
      in_valid = (n % 7 != 3);
      in_tag = 16'($urandom);
      if (in_valid) begin q_top.push_back(st); q_bot.push_back(sb); q_tag.push_back(in_tag); end
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (q_top.size() != 0) begin failures++; $display("FAIL %0d sums never came out", q_top.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
