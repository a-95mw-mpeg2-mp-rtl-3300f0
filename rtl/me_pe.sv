// me_pe: processor element of the MEH1 systolic array.
//
// A PE holds one template pixel (stationary for a whole search) and one
// search-window pixel that belongs to a ring running through its row of the
// PE array and the shift-register (SR) array. Each clock the search pixel
// either holds, takes the pixel of its right neighbour (ring moves left),
// of its left neighbour (ring moves right) or of the PE in the row below
// (vertical shift, also used to load the array). The absolute difference of
// the two pixels is combinational and feeds the adder tree.
module me_pe
  import meh_pkg::*;
(
  input  logic     clk,
  input  ring_op_e op,
  input  logic     t_load,    // template shifts up together with a RING_UP
  input  pix_t     t_in,      // template pixel from the row below
  input  pix_t     from_right,
  input  pix_t     from_left,
  input  pix_t     from_below,
  output pix_t     s,         // current search pixel
  output pix_t     t,         // current template pixel
  output pix_t     ad         // |s - t|
);

  always_ff @(posedge clk) begin
    unique case (op)
      RING_LEFT:  s <= from_right;
      RING_RIGHT: s <= from_left;
      RING_UP:    s <= from_below;
      default:    s <= s;
    endcase
    if (t_load) t <= t_in;
  end

  assign ad = (s > t) ? pix_t'(s - t) : pix_t'(t - s);

endmodule
