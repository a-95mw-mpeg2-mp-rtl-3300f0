// systolic_array: N x N PE array, N x N shift-register array and adder tree
// of the MEH1 full search.
//
// Row i of the PE array and row i of the SR array form one ring of 2N search
// pixels: PE 0..N-1 followed by SR 0..N-1, with SR N-1 wrapping back to
// PE 0. Rotating the ring by one moves the search window one pixel
// horizontally under the stationary template, so each clock of rotation
// gives the SAD of the next horizontal candidate. A RING_UP operation shifts
// every row one row up and loads a new window row (N pixels for the PE half,
// N for the SR half) into the bottom row; the array is filled with N such
// operations and moves to the next candidate row with one. Template pixels
// enter the same way when t_load is high.
//
// Timing: ad (inside) is combinational on the current ring state; the adder
// tree registers it twice, so sums for the state seen in cycle t come out in
// cycle t+2 together with the tag given in cycle t.
module systolic_array
  import meh_pkg::*;
#(
  parameter int N     = MB,
  parameter int TAG_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ring_op_e          op,
  input  logic              t_load,
  input  pix_t              pe_in [N],   // new bottom row, PE half
  input  pix_t              sr_in [N],   // new bottom row, SR half
  input  pix_t              t_in  [N],   // new bottom template row
  input  logic              calc,        // ring state is a candidate: sum it
  input  logic [TAG_W-1:0]  tag,
  output logic              sad_valid,
  output logic [TAG_W-1:0]  sad_tag,
  output logic [SAD1_W-1:0] sad_frame,
  output logic [SAD1_W-1:0] sad_top,
  output logic [SAD1_W-1:0] sad_bot
);

  pix_t pe_s [N][N];
  pix_t pe_t [N][N];
  pix_t ad   [N][N];
  pix_t sr   [N][N];

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      pix_t right_n, left_n, below_n, t_below;
      assign right_n = (j == N-1) ? sr[i][0]   : pe_s[i][(j+1)%N];
      assign left_n  = (j == 0)   ? sr[i][N-1] : pe_s[i][(j+N-1)%N];
      if (i == N-1) begin : g_bottom
        assign below_n = pe_in[j];
        assign t_below = t_in[j];
      end else begin : g_inner
        assign below_n = pe_s[i+1][j];
        assign t_below = pe_t[i+1][j];
      end

      me_pe u_pe (
        .clk       (clk),
        .op        (op),
        .t_load    (t_load),
        .t_in      (t_below),
        .from_right(right_n),
        .from_left (left_n),
        .from_below(below_n),
        .s         (pe_s[i][j]),
        .t         (pe_t[i][j]),
        .ad        (ad[i][j])
      );

      // Shift register SR[i][j] sits at ring position N + j.
      pix_t sr_right, sr_left, sr_below;
      assign sr_right = (j == N-1) ? pe_s[i][0]   : sr[i][(j+1)%N];
      assign sr_left  = (j == 0)   ? pe_s[i][N-1] : sr[i][(j+N-1)%N];
      if (i == N-1) begin : g_sr_bottom
        assign sr_below = sr_in[j];
      end else begin : g_sr_inner
        assign sr_below = sr[i+1][j];
      end

      always_ff @(posedge clk) begin
        unique case (op)
          RING_LEFT:  sr[i][j] <= sr_right;
          RING_RIGHT: sr[i][j] <= sr_left;
          RING_UP:    sr[i][j] <= sr_below;
          default:    sr[i][j] <= sr[i][j];
        endcase
      end
    end
  end

  adder_tree #(.N(N), .TAG_W(TAG_W)) u_tree (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (calc),
    .in_tag   (tag),
    .ad       (ad),
    .out_valid(sad_valid),
    .out_tag  (sad_tag),
    .sad_frame(sad_frame),
    .sad_top  (sad_top),
    .sad_bot  (sad_bot)
  );

endmodule
