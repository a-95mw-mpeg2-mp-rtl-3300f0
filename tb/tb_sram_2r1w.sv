// tb_sram_2r1w: self-checking test of the 3-port SRAM model.
// Random writes and reads on both read ports against a shadow array; checks
// the one-clock read latency, independent ports, read-during-write returning
// the old word, and that a port without re keeps its last output.
module tb_sram_2r1w;
  localparam int W = 32, D = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         we, re_a, re_b;
  logic [3:0]   waddr, raddr_a, raddr_b;
  logic [W-1:0] wdata, rdata_a, rdata_b;
  logic [W-1:0] shadow [D];

  sram_2r1w #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_a, exp_b;
    we = 0; re_a = 0; re_b = 0; waddr = 0; raddr_a = 0; raddr_b = 0; wdata = 0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1; waddr = 4'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 0; re_a = 1; re_b = 1; raddr_a = 0; raddr_b = 1;
    exp_a = shadow[0]; exp_b = shadow[1];
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      re_a = 1'($urandom); re_b = 1'($urandom);
      raddr_a = 4'($urandom); raddr_b = 4'($urandom);
      we = 1'($urandom); waddr = (n % 5 == 0) ? raddr_a : 4'($urandom); wdata = $urandom;
      if (re_a) exp_a = shadow[raddr_a];     // old word even if written now
      if (re_b) exp_b = shadow[raddr_b];
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      checks++;
      if (rdata_a !== exp_a || rdata_b !== exp_b) begin
        failures++;
        $display("FAIL n=%0d a %h/%h b %h/%h", n, rdata_a, exp_a, rdata_b, exp_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
