// adder_tree: sums the 16x16 absolute differences of the PE array.
//
// Besides the frame SAD of the whole 16x16 block it forms the two field SADs
// (even rows = top field, odd rows = bottom field), so one pass of the full
// search yields the frame vector and both field vectors. Two register
// stages: per-row sums, then the three totals. A tag (the candidate vector)
// travels with the data; out_valid follows in_valid by two clocks.
module adder_tree
  import meh_pkg::*;
#(
  parameter int N     = MB,
  parameter int TAG_W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [TAG_W-1:0]     in_tag,
  input  pix_t                 ad [N][N],
  output logic                 out_valid,
  output logic [TAG_W-1:0]     out_tag,
  output logic [SAD1_W-1:0]    sad_frame,
  output logic [SAD1_W-1:0]    sad_top,
  output logic [SAD1_W-1:0]    sad_bot
);

  localparam int ROW_W = PIX_W + $clog2(N);

  logic [ROW_W-1:0] row_sum_c [N];
  logic [ROW_W-1:0] row_sum_q [N];
  logic             v1;
  logic [TAG_W-1:0] tag1;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      row_sum_c[i] = '0;
      for (int j = 0; j < N; j++) row_sum_c[i] += ROW_W'(ad[i][j]);
    end
  end

  always_ff @(posedge clk) begin
    row_sum_q <= row_sum_c;
    tag1      <= in_tag;
  end

  logic [SAD1_W-1:0] top_c, bot_c;
  always_comb begin
    top_c = '0;
    bot_c = '0;
    for (int i = 0; i < N; i += 2) begin
      top_c += SAD1_W'(row_sum_q[i]);
      bot_c += SAD1_W'(row_sum_q[i+1]);
    end
  end

  always_ff @(posedge clk) begin
    sad_top   <= top_c;
    sad_bot   <= bot_c;
    sad_frame <= top_c + bot_c;
    out_tag   <= tag1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
  end

endmodule
