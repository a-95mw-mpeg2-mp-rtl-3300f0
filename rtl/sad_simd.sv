// sad_simd: the LANES-way SIMD absolute-difference datapath of MEH2.
//
// Each clock with in_valid it takes LANES search pixels and LANES template
// pixels, forms the LANES absolute differences and their sum. The sum is
// registered: out_valid and sad follow in_valid by one clock. In MEH2 the
// 16 lanes cover two 8-pixel rows of the decimated block per clock.
module sad_simd
  import meh_pkg::*;
#(
  parameter int LANES = 16,
  localparam int SW   = PIX_W + $clog2(LANES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  pix_t          a [LANES],
  input  pix_t          b [LANES],
  output logic          out_valid,
  output logic [SW-1:0] sad
);

  logic [SW-1:0] sum_c;
  always_comb begin
    sum_c = '0;
    for (int l = 0; l < LANES; l++)
      sum_c += SW'((a[l] > b[l]) ? pix_t'(a[l] - b[l]) : pix_t'(b[l] - a[l]));
  end

  always_ff @(posedge clk) begin
    if (in_valid) sad <= sum_c;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
