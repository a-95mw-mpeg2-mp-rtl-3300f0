// tb_mem_if: self-checking test of the bus write port.
// Random writes to the four buffers, inside and beyond each buffer's size:
// exactly the right write enable must rise one clock later with the
// registered address and data, and out-of-range writes must be dropped and
// set the sticky error flag.
module tb_mem_if;
  import meh_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         bus_we, sw2_we, tb2_we, sw1_we, tb1_we, addr_err;
  bus_sel_e     bus_sel;
  logic [9:0]   bus_addr, waddr;
  logic [127:0] bus_wdata, wdata;

  mem_if dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int depth [4] = '{648, 8, 128, 32};
    bit err_exp;
    bus_we = 0; bus_sel = SEL_SW2; bus_addr = 0; bus_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    err_exp = 0;
    for (int n = 0; n < 400; n++) begin
      bit ok;
      @(negedge clk);
      bus_we = 1'($urandom);
      bus_sel = bus_sel_e'($urandom % 4);
      bus_addr = ($urandom % 4 == 0) ? 10'(depth[bus_sel] + $urandom % 8) : 10'($urandom % depth[bus_sel]);
      bus_wdata = {$urandom, $urandom, $urandom, $urandom};
      ok = bus_we && (int'(bus_addr) < depth[bus_sel]);
      if (bus_we && !ok) err_exp = 1;
      @(negedge clk);
      checks++;
      if (sw2_we !== (ok && bus_sel == SEL_SW2) || tb2_we !== (ok && bus_sel == SEL_TB2) ||
          sw1_we !== (ok && bus_sel == SEL_SW1) || tb1_we !== (ok && bus_sel == SEL_TB1) ||
          addr_err !== err_exp || (ok && (waddr !== bus_addr || wdata !== bus_wdata))) begin
        failures++;
        $display("FAIL n=%0d sel %0d addr %0d we %b%b%b%b err %b", n, bus_sel, bus_addr,
                 sw2_we, tb2_we, sw1_we, tb1_we, addr_err);
      end
      bus_we = 0;
    end
    checks++;
    if (!err_exp) begin failures++; $display("FAIL no out-of-range write tried"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
