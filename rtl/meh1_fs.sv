// meh1_fs: MEH1, the +-8 x +-8 integer-pel full search of the lower layer.
//
// The 16x16 template and a 32x32 search window are read from the shared
// buffers TB1 and SW1 (outside this module, one-clock synchronous reads). A
// window row is 32 pixels = two 128-bit words: word "half 0" holds columns
// 0..15, "half 1" columns 16..31. Window column c / row r corresponds to the
// displacement c-8 / r-8 of the pixel above template column 0 / row 0.
//
// Phases (fs_phase_e):
//   INIT  17 clocks: rows 0..15 of the window (both halves, read ports A and
//         B) and of the template are read and shifted up into the array.
//   CALC  17 clocks per candidate row: the ring rotates 16 times, giving the
//         SADs of dx = -8..+8 (even rows, ring moves left) or +8..-8 (odd
//         rows, ring moves right) for the current dy. The next window row is
//         read during the last CALC clock.
//   INPUT 1 clock: all rows shift up, the new row enters the bottom. After a
//         left sweep the ring is rotated by 16, i.e. its PE and SR halves
//         have swapped, so the new row is read with port A on half 1 and port
//         B on half 0; after a right sweep it is read straight. The swap is
//         done by the read addresses, with no crossbar.
//   DRAIN 2 clocks for the adder tree, then done pulses for one clock.
// A search takes 17 + 17*17 + 16 + 2 = 324 clocks from start to done.
// SW1 is read only in INIT, in the last CALC clock of each row and never
// otherwise; sw_re tells the arbiter that MEH1 is using both read ports.
//
// Outputs: the best frame vector and SAD, and the best vectors for the top
// field (even template rows) and the bottom field (odd template rows), all
// from the same pass. Ties go to the smaller (dy, dx).
module meh1_fs
  import meh_pkg::*;
#(
  parameter int N = MB,
  localparam int R = (N / 2)   // search range, +-N/2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              buf_sel,      // which of the two SW1/TB1 buffers
  output logic              busy,
  output logic              done,
  output fs_phase_e         phase,
  // SW1 read ports A and B: {buffer, row, half}
  output logic              sw_re,
  output logic [$clog2(2*N)+1:0] sw_addr_a,
  output logic [$clog2(2*N)+1:0] sw_addr_b,
  input  logic [N*PIX_W-1:0] sw_rdata_a,
  input  logic [N*PIX_W-1:0] sw_rdata_b,
  // TB1 read port A: {buffer, row}
  output logic              tb_re,
  output logic [$clog2(N):0] tb_addr,
  input  logic [N*PIX_W-1:0] tb_rdata,
  // results, valid from done until the next start
  output mv_t               frame_mv,
  output logic [SAD1_W-1:0] frame_sad,
  output mv_t               top_mv,
  output logic [SAD1_W-1:0] top_sad,
  output mv_t               bot_mv,
  output logic [SAD1_W-1:0] bot_sad
);

  localparam int RW = $clog2(2*N);   // window row index width
  localparam int CW = $clog2(2*R+2);

  logic          bsel;
  logic [RW:0]   cnt;      // INIT row counter
  logic [CW-1:0] v;        // candidate row 0..2R
  logic [CW-1:0] h;        // candidate column step 0..2R
  logic [1:0]    drain;

  // --------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      bsel  <= 1'b0;
      cnt   <= '0;
      v     <= '0;
      h     <= '0;
      drain <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        PH_IDLE: if (start) begin
          phase <= PH_INIT;
          bsel  <= buf_sel;
          cnt   <= '0;
        end
        PH_INIT: begin
          cnt <= cnt + 1'b1;
          if (cnt == (RW+1)'(N)) begin
            phase <= PH_CALC;
            v     <= '0;
            h     <= '0;
          end
        end
        PH_CALC: begin
          if (h == CW'(2*R)) begin
            if (v == CW'(2*R)) begin
              phase <= PH_DRAIN;
              drain <= '0;
            end else begin
              phase <= PH_INPUT;
            end
          end else begin
            h <= h + 1'b1;
          end
        end
        PH_INPUT: begin
          v     <= v + 1'b1;
          h     <= '0;
          phase <= PH_CALC;
        end
        PH_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 2'd1) begin
            phase <= PH_IDLE;
            done  <= 1'b1;
          end
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  assign busy = (phase != PH_IDLE);

  // ------------------------------------------------------ buffer addresses
  logic          last_calc;
  logic [RW-1:0] rd_row;
  logic          swap;
  assign last_calc = (phase == PH_CALC) && (h == CW'(2*R)) && (v != CW'(2*R));

  always_comb begin
    sw_re   = 1'b0;
    tb_re   = 1'b0;
    rd_row  = '0;
    swap    = 1'b0;
    if (phase == PH_INIT && cnt < (RW+1)'(N)) begin
      sw_re  = 1'b1;
      tb_re  = 1'b1;
      rd_row = RW'(cnt);
    end else if (last_calc) begin
      sw_re  = 1'b1;
      rd_row = RW'(v) + RW'(N);
      swap   = ~v[0];          // a left sweep leaves the ring rotated by N
    end
    sw_addr_a = {bsel, rd_row, swap};
    sw_addr_b = {bsel, rd_row, ~swap};
    tb_addr   = {bsel, rd_row[$clog2(N)-1:0]};
  end

  // ----------------------------------------------------------------- array
  ring_op_e op;
  logic     t_load;
  logic     calc;
  mv_t      cand;
  pix_t     pe_in [N];
  pix_t     sr_in [N];
  pix_t     t_in  [N];

  always_comb begin
    for (int k = 0; k < N; k++) begin
      pe_in[k] = sw_rdata_a[k*PIX_W +: PIX_W];
      sr_in[k] = sw_rdata_b[k*PIX_W +: PIX_W];
      t_in[k]  = tb_rdata[k*PIX_W +: PIX_W];
    end
    op     = RING_HOLD;
    t_load = 1'b0;
    calc   = 1'b0;
    cand.y = 8'(signed'({1'b0, v})) - 8'(R);
    cand.x = v[0] ? (8'(R) - 8'(signed'({1'b0, h}))) : (8'(signed'({1'b0, h})) - 8'(R));
    unique case (phase)
      PH_INIT: if (cnt != '0) begin
        op     = RING_UP;
        t_load = 1'b1;
      end
      PH_CALC: begin
        calc = 1'b1;
        if (h != CW'(2*R)) op = v[0] ? RING_RIGHT : RING_LEFT;
      end
      PH_INPUT: op = RING_UP;
      default: ;
    endcase
  end

  logic              s_valid;
  logic [15:0]       s_tag;
  logic [SAD1_W-1:0] s_frame, s_top, s_bot;

  systolic_array #(.N(N), .TAG_W(16)) u_array (
    .clk      (clk),
    .rst_n    (rst_n),
    .op       (op),
    .t_load   (t_load),
    .pe_in    (pe_in),
    .sr_in    (sr_in),
    .t_in     (t_in),
    .calc     (calc),
    .tag      (cand),
    .sad_valid(s_valid),
    .sad_tag  (s_tag),
    .sad_frame(s_frame),
    .sad_top  (s_top),
    .sad_bot  (s_bot)
  );

  logic clr;
  assign clr = (phase == PH_IDLE) && start;

  sad_min #(.SAD_W(SAD1_W)) u_min_frame (
    .clk(clk), .rst_n(rst_n), .clear(clr), .in_valid(s_valid), .in_sad(s_frame),
    .in_mv(mv_t'(s_tag)), .best_sad(frame_sad), .best_mv(frame_mv));
  sad_min #(.SAD_W(SAD1_W)) u_min_top (
    .clk(clk), .rst_n(rst_n), .clear(clr), .in_valid(s_valid), .in_sad(s_top),
    .in_mv(mv_t'(s_tag)), .best_sad(top_sad), .best_mv(top_mv));
  sad_min #(.SAD_W(SAD1_W)) u_min_bot (
    .clk(clk), .rst_n(rst_n), .clear(clr), .in_valid(s_valid), .in_sad(s_bot),
    .in_mv(mv_t'(s_tag)), .best_sad(bot_sad), .best_mv(bot_mv));

endmodule
