// sad_min: keeps the smallest SAD seen since the last clear and its vector.
//
// A candidate replaces the best one when its SAD is smaller, or equal with a
// smaller (y, x) vector in signed order. The tie rule makes the result
// independent of the order in which candidates arrive (the full search scans
// in a serpentine). clear starts a new search; best_sad then reads all ones.
module sad_min
  import meh_pkg::*;
#(
  parameter int SAD_W = SAD1_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  logic [SAD_W-1:0] in_sad,
  input  mv_t              in_mv,
  output logic [SAD_W-1:0] best_sad,
  output mv_t              best_mv
);

  logic better;
  always_comb begin
    better = (in_sad < best_sad) ||
             ((in_sad == best_sad) &&
              ((in_mv.y < best_mv.y) || ((in_mv.y == best_mv.y) && (in_mv.x < best_mv.x))));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_sad <= '1;
      best_mv  <= '{x: 8'sd127, y: 8'sd127};
    end else if (clear) begin
      best_sad <= '1;
      best_mv  <= '{x: 8'sd127, y: 8'sd127};
    end else if (in_valid && better) begin
      best_sad <= in_sad;
      best_mv  <= in_mv;
    end
  end

endmodule
