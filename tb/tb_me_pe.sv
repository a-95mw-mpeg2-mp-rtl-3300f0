// tb_me_pe: self-checking test of one processor element.
// Random ring operations against a model of the search and template
// registers; the absolute difference is checked every clock.
module tb_me_pe;
  import meh_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  ring_op_e op;
  logic     t_load;
  pix_t     t_in, from_right, from_left, from_below, s, t, ad;

  me_pe dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ms, mt, ops [4];
    ops = '{0, 0, 0, 0};
    // load both registers first
    @(negedge clk);
    op = RING_UP; t_load = 1; from_below = 8'd10; t_in = 8'd200; from_left = 0; from_right = 0;
    ms = 10; mt = 200;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      checks++;
      if (s !== 8'(ms) || t !== 8'(mt) || ad !== 8'((ms > mt) ? ms - mt : mt - ms)) begin
        failures++;
        $display("FAIL n=%0d s %0d/%0d t %0d/%0d ad %0d", n, s, ms, t, mt, ad);
      end
      op = ring_op_e'($urandom % 4); t_load = 1'($urandom);
      t_in = 8'($urandom); from_right = 8'($urandom); from_left = 8'($urandom); from_below = 8'($urandom);
      ops[op]++;
      case (op)
        RING_LEFT:  ms = from_right;
        RING_RIGHT: ms = from_left;
        RING_UP:    ms = from_below;
        default:    ;
      endcase
      if (t_load) mt = t_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
