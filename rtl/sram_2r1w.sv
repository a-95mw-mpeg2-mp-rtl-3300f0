// sram_2r1w: three-port SRAM (two read ports, one write port).
//
// Model of the 3-port buffers used for SW1, TB1, SW2 and TB2. Both read ports
// are synchronous: the word at raddr_x appears on rdata_x one clock after
// re_x. A read of the address being written in the same cycle returns the old
// word. The write port writes wdata at waddr when we is high. Contents are
// not reset; the user must write a word before reading it.
module sram_2r1w #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re_a,
  input  logic [AW-1:0]    raddr_a,
  output logic [WIDTH-1:0] rdata_a,
  input  logic             re_b,
  input  logic [AW-1:0]    raddr_b,
  output logic [WIDTH-1:0] rdata_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re_a) rdata_a <= mem[raddr_a];
    if (re_b) rdata_b <= mem[raddr_b];
  end

endmodule
