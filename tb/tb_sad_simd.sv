// tb_sad_simd: self-checking test of the 16-way SIMD SAD datapath.
// Random and extreme pixel vectors; the sum must appear one clock after
// in_valid with out_valid, and hold while in_valid is low.
module tb_sad_simd;
  import meh_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid, out_valid;
  pix_t        a [16], b [16];
  logic [11:0] sad;

  sad_simd #(.LANES(16)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_sum, held;
    in_valid = 0;
    for (int l = 0; l < 16; l++) begin a[l] = 0; b[l] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      exp_sum = 0;
      for (int l = 0; l < 16; l++) begin
        a[l] = (n == 0) ? 8'hff : 8'($urandom);
        b[l] = (n == 0) ? 8'h00 : 8'($urandom);
        exp_sum += (a[l] > b[l]) ? a[l] - b[l] : b[l] - a[l];
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || sad !== 12'(exp_sum)) begin
        failures++;
        $display("FAIL n=%0d got %0d exp %0d valid %b", n, sad, exp_sum, out_valid);
      end
      held = sad;
      for (int l = 0; l < 16; l++) a[l] = 8'($urandom);
      @(negedge clk);
      checks++;
      if (out_valid || sad !== 12'(held)) begin failures++; $display("FAIL hold n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
