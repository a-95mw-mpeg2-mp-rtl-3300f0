// mem_if: memory-bus write port of the core.
//
// The core is fed over a 128-bit memory bus (16 pixels per word). A write
// names one of the four buffers (bus_sel) and a word address inside it; the
// port registers the write and steers it to that buffer one clock later. A
// write whose address lies beyond the buffer is dropped and sets the sticky
// addr_err flag (cleared by reset).
//   SW2: address row*WPR2 + word, WPR2 16-pixel words per window row
//   TB2: address = template row 0..7, pixels in the low 64 bits
//   SW1: address {buffer, row 0..31, half}
//   TB1: address {buffer, row 0..15}
module mem_if
  import meh_pkg::*;
#(
  parameter int SW2_DEPTH = 648,
  parameter int TB2_DEPTH = UB,
  parameter int SW1_DEPTH = 2 * WIN1 * 2,
  parameter int TB1_DEPTH = 2 * MB
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bus_we,
  input  bus_sel_e         bus_sel,
  input  logic [9:0]       bus_addr,
  input  logic [BUS_W-1:0] bus_wdata,
  output logic             sw2_we,
  output logic             tb2_we,
  output logic             sw1_we,
  output logic             tb1_we,
  output logic [9:0]       waddr,
  output logic [BUS_W-1:0] wdata,
  output logic             addr_err
);

  logic in_range;
  always_comb begin
    unique case (bus_sel)
      SEL_SW2: in_range = int'(bus_addr) < SW2_DEPTH;
      SEL_TB2: in_range = int'(bus_addr) < TB2_DEPTH;
      SEL_SW1: in_range = int'(bus_addr) < SW1_DEPTH;
      default: in_range = int'(bus_addr) < TB1_DEPTH;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sw2_we   <= 1'b0;
      tb2_we   <= 1'b0;
      sw1_we   <= 1'b0;
      tb1_we   <= 1'b0;
      addr_err <= 1'b0;
    end else begin
      sw2_we <= bus_we && in_range && (bus_sel == SEL_SW2);
      tb2_we <= bus_we && in_range && (bus_sel == SEL_TB2);
      sw1_we <= bus_we && in_range && (bus_sel == SEL_SW1);
      tb1_we <= bus_we && in_range && (bus_sel == SEL_TB1);
      if (bus_we && !in_range) addr_err <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (bus_we) begin
      waddr <= bus_addr;
      wdata <= bus_wdata;
    end
  end

endmodule
