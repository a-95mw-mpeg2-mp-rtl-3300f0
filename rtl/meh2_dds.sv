// meh2_dds: MEH2, the coarse search of the upper (2:1 x 2:1 decimated) layer
// with the one-dimensional diamond search (1D-DS).
//
// Buffers: SW2 holds the decimated search window, (UB+2*RY) rows of
// (UB+2*RX) pixels, rounded up to whole 16-pixel bus words per row; it is
// built from 16 byte-wide 3-port banks, bank b holding the columns with
// column mod 16 = b, so that any 8 consecutive pixels of a row can be read
// on each of the two read ports in one clock. TB2 holds the 8x8 decimated
// template, one 8-pixel row per word. A bus write stores one aligned 16-pixel
// word in SW2 (address row*WPR + word) or one template row in TB2 (low 64
// bits).
//
// Candidate evaluation: a vector (vx, vy), |vx| <= RX, |vy| <= RY, takes 4
// clocks of reads (rows 2p and 2p+1 of block and window on ports A and B)
// and the 16-way SIMD datapath sums two rows per clock; its SAD is ready 6
// clocks after the evaluation starts.
//
// Search (1D-DS):
//   1. the four candidate vectors given at start (clamped to the range) are
//      evaluated and the best becomes the centre;
//   2. the four neighbours at distance 1 (+x, -x, +y, -y) are evaluated;
//      if none is better than the centre, the centre is the result;
//   3. otherwise the search continues along the best neighbour's direction
//      at distances 2..STEPS; the best point on that line becomes the new
//      centre and step 2 repeats, at most MAX_ITER times.
// Points outside the range are skipped. Ties keep the earlier point.
// Result: the upper-layer vector (multiply by 2 for full resolution).
module meh2_dds
  import meh_pkg::*;
#(
  parameter int RX       = UR_X,   // +-RX upper-layer pixels horizontally
  parameter int RY       = UR_Y,   // +-RY upper-layer pixels vertically
  parameter int STEPS    = 4,      // farthest point of a line search
  parameter int MAX_ITER = 16,     // bound on direction changes
  localparam int B       = UB,
  localparam int COLS    = B + 2*RX,
  localparam int ROWS    = B + 2*RY,
  localparam int WPR     = (COLS + BUS_PIX - 1) / BUS_PIX,   // words per row
  localparam int DEPTH   = ROWS * WPR,
  localparam int AW      = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // buffer writes
  input  logic              sw2_we,
  input  logic [AW-1:0]     sw2_waddr,
  input  logic [BUS_W-1:0]  sw2_wdata,
  input  logic              tb2_we,
  input  logic [2:0]        tb2_waddr,
  input  logic [B*PIX_W-1:0] tb2_wdata,
  // search control
  input  logic              start,
  input  mv_t               cand [4],     // initial candidate vectors
  output logic              busy,
  output logic              done,
  output mv_t               best_mv,
  output logic [SAD2_W-1:0] best_sad,
  output logic [15:0]       n_evals,      // SADs evaluated in the last search
  output logic [7:0]        n_lines       // 1-D line searches in the last search
);

  localparam int NB = BUS_PIX;            // 16 banks
  localparam int SIMD_W = PIX_W + 4;

  // ------------------------------------------------------------- evaluator
  logic        ev_start, ev_done;
  mv_t         ev_mv;
  logic [SAD2_W-1:0] ev_sad;
  logic [2:0]  ev_cnt;        // issue counter 0..3, 4 = idle
  logic [$clog2(COLS)-1:0] x0;
  logic [$clog2(ROWS)-1:0] y0;
  logic        issuing;
  assign issuing = (ev_cnt < 3'd4);

  logic [$clog2(ROWS)-1:0] ya, yb;
  assign ya = y0 + $clog2(ROWS)'({ev_cnt[1:0], 1'b0});
  assign yb = ya + 1'b1;

  pix_t bank_a [NB];
  pix_t bank_b [NB];
  logic [AW-1:0] ra [NB];
  logic [AW-1:0] rb [NB];

  for (genvar b = 0; b < NB; b++) begin : g_bank
    logic [3:0] kk;
    logic [$clog2(COLS+NB)-1:0] col;
    assign kk  = 4'(b) - 4'(x0);                     // pixel index this bank serves
    assign col = $bits(col)'(x0) + $bits(col)'(kk);
    assign ra[b] = AW'(ya * WPR) + AW'(col / NB);
    assign rb[b] = AW'(yb * WPR) + AW'(col / NB);

    sram_2r1w #(.WIDTH(PIX_W), .DEPTH(DEPTH)) u_sw2 (
      .clk    (clk),
      .we     (sw2_we),
      .waddr  (sw2_waddr),
      .wdata  (sw2_wdata[b*PIX_W +: PIX_W]),
      .re_a   (issuing && kk < 4'(B)),
      .raddr_a(ra[b]),
      .rdata_a(bank_a[b]),
      .re_b   (issuing && kk < 4'(B)),
      .raddr_b(rb[b]),
      .rdata_b(bank_b[b])
    );
  end

  logic [B*PIX_W-1:0] tb_a, tb_b;
  sram_2r1w #(.WIDTH(B*PIX_W), .DEPTH(B)) u_tb2 (
    .clk    (clk),
    .we     (tb2_we),
    .waddr  (tb2_waddr),
    .wdata  (tb2_wdata),
    .re_a   (issuing),
    .raddr_a({ev_cnt[1:0], 1'b0}),
    .rdata_a(tb_a),
    .re_b   (issuing),
    .raddr_b({ev_cnt[1:0], 1'b1}),
    .rdata_b(tb_b)
  );

  // align the banks' pixels to the block columns
  logic [3:0] x0_d;
  logic       rd_valid;
  pix_t       simd_a [2*B];
  pix_t       simd_b [2*B];
  always_comb begin
    for (int k = 0; k < B; k++) begin
      simd_a[k]     = bank_a[4'(x0_d + 4'(k))];
      simd_a[B + k] = bank_b[4'(x0_d + 4'(k))];
      simd_b[k]     = tb_a[k*PIX_W +: PIX_W];
      simd_b[B + k] = tb_b[k*PIX_W +: PIX_W];
    end
  end

  logic              s_valid;
  logic [SIMD_W-1:0] s_sad;
  sad_simd #(.LANES(2*B)) u_simd (
    .clk(clk), .rst_n(rst_n), .in_valid(rd_valid), .a(simd_a), .b(simd_b),
    .out_valid(s_valid), .sad(s_sad));

  logic [1:0]        acc_cnt;
  logic [SAD2_W-1:0] acc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ev_cnt   <= 3'd4;
      x0       <= '0;
      y0       <= '0;
      x0_d     <= '0;
      rd_valid <= 1'b0;
      acc_cnt  <= '0;
      acc      <= '0;
      ev_done  <= 1'b0;
      ev_sad   <= '0;
    end else begin
      ev_done  <= 1'b0;
      rd_valid <= issuing;
      x0_d     <= 4'(x0);
      if (ev_start) begin
        ev_cnt <= 3'd0;
        x0     <= $bits(x0)'(10'(ev_mv.x) + 10'(RX));
        y0     <= $bits(y0)'(10'(ev_mv.y) + 10'(RY));
      end else if (issuing) begin
        ev_cnt <= ev_cnt + 1'b1;
      end
      if (s_valid) begin
        acc_cnt <= acc_cnt + 1'b1;
        acc     <= ((acc_cnt == 2'd0) ? '0 : acc) + SAD2_W'(s_sad);
        if (acc_cnt == 2'd3) begin
          ev_done <= 1'b1;
          ev_sad  <= acc + SAD2_W'(s_sad);
        end
      end
    end
  end

  // ------------------------------------------------------------ 1D-DS FSM
  typedef enum logic [1:0] {DS_INIT, DS_AROUND, DS_LINE} ds_ph_e;
  typedef enum logic [1:0] {C_IDLE, C_ISSUE, C_WAIT} ctl_e;

  ctl_e              ctl;
  ds_ph_e            ph;
  logic [2:0]        idx;
  mv_t               cands [4];
  mv_t               ctr_mv;
  logic [SAD2_W-1:0] ctr_sad;
  mv_t               lb_mv;
  logic [SAD2_W-1:0] lb_sad;
  logic [1:0]        lb_dir;
  logic [7:0]        iter;

  function automatic logic signed [9:0] dir_x(logic [1:0] d);
    return (d == 2'd0) ? 10'sd1 : ((d == 2'd1) ? -10'sd1 : 10'sd0);
  endfunction
  function automatic logic signed [9:0] dir_y(logic [1:0] d);
    return (d == 2'd2) ? 10'sd1 : ((d == 2'd3) ? -10'sd1 : 10'sd0);
  endfunction
  function automatic logic signed [9:0] clampv(logic signed [9:0] v, logic signed [9:0] r);
    if (v > r)  return r;
    if (v < -r) return -r;
    return v;
  endfunction

  // point under consideration
  logic signed [9:0] px, py;
  logic              p_ok;
  logic [2:0]        last_idx;
  always_comb begin
    px = '0;
    py = '0;
    last_idx = 3'd3;
    unique case (ph)
      DS_INIT: begin
        px = clampv(10'(cands[idx[1:0]].x), 10'(RX));
        py = clampv(10'(cands[idx[1:0]].y), 10'(RY));
      end
      DS_AROUND: begin
        px = 10'(ctr_mv.x) + dir_x(idx[1:0]);
        py = 10'(ctr_mv.y) + dir_y(idx[1:0]);
      end
      default: begin
        px = 10'(ctr_mv.x) + dir_x(lb_dir) * (10'(idx) + 10'sd2);
        py = 10'(ctr_mv.y) + dir_y(lb_dir) * (10'(idx) + 10'sd2);
        last_idx = 3'(STEPS - 2);
      end
    endcase
    p_ok = (px <= 10'(RX)) && (px >= -10'(RX)) && (py <= 10'(RY)) && (py >= -10'(RY));
  end

  // vector of the evaluation in flight
  mv_t ev_mv_q;
  always_ff @(posedge clk) if (ev_start) ev_mv_q <= ev_mv;

  assign ev_start = (ctl == C_ISSUE) && p_ok;
  assign ev_mv    = '{x: 8'(px), y: 8'(py)};
  assign busy     = (ctl != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl      <= C_IDLE;
      ph       <= DS_INIT;
      idx      <= '0;
      ctr_mv   <= '0;
      ctr_sad  <= '1;
      lb_mv    <= '0;
      lb_sad   <= '1;
      lb_dir   <= '0;
      iter     <= '0;
      done     <= 1'b0;
      best_mv  <= '0;
      best_sad <= '0;
      n_evals  <= '0;
      n_lines  <= '0;
      for (int i = 0; i < 4; i++) cands[i] <= '0;
    end else begin
      mv_t               n_ctr_mv, n_lb_mv;
      logic [SAD2_W-1:0] n_ctr_sad, n_lb_sad;
      logic [1:0]        n_lb_dir;
      logic              point_end, line_end;
      n_ctr_mv  = ctr_mv;  n_ctr_sad = ctr_sad;
      n_lb_mv   = lb_mv;   n_lb_sad  = lb_sad;   n_lb_dir = lb_dir;
      point_end = 1'b0;
      line_end  = 1'b0;
      done <= 1'b0;

      unique case (ctl)
        C_IDLE: if (start) begin
          cands   <= cand;
          ph      <= DS_INIT;
          idx     <= '0;
          iter    <= '0;
          n_evals <= '0;
          n_lines <= '0;
          ctl     <= C_ISSUE;
        end
        C_ISSUE: begin
          if (p_ok) begin
            ctl     <= C_WAIT;
            n_evals <= n_evals + 1'b1;
          end else begin
            point_end = 1'b1;
            line_end  = (ph == DS_LINE);   // further points are out of range too
          end
        end
        C_WAIT: if (ev_done) begin
          point_end = 1'b1;
          unique case (ph)
            DS_INIT: if (idx == 3'd0 || ev_sad < ctr_sad) begin
              n_ctr_mv = ev_mv_q; n_ctr_sad = ev_sad;
            end
            DS_AROUND: if (ev_sad < lb_sad) begin
              n_lb_mv = ev_mv_q; n_lb_sad = ev_sad; n_lb_dir = idx[1:0];
            end
            default: if (ev_sad < lb_sad) begin
              n_lb_mv = ev_mv_q; n_lb_sad = ev_sad;
            end
          endcase
        end
        default: ctl <= C_IDLE;
      endcase

      if (point_end) begin
        if (idx == last_idx || line_end) begin
          idx <= '0;
          unique case (ph)
            DS_INIT: begin
              ph       <= DS_AROUND;
              n_lb_sad = '1;
              ctl      <= C_ISSUE;
            end
            DS_AROUND: begin
              if (n_lb_sad < n_ctr_sad) begin
                ph      <= DS_LINE;
                n_lines <= n_lines + 1'b1;
                ctl     <= C_ISSUE;
              end else begin
                ctl      <= C_IDLE;
                done     <= 1'b1;
                best_mv  <= n_ctr_mv;
                best_sad <= n_ctr_sad;
              end
            end
            default: begin
              n_ctr_mv  = n_lb_mv;
              n_ctr_sad = n_lb_sad;
              n_lb_sad  = '1;
              iter <= iter + 1'b1;
              if (iter == 8'(MAX_ITER - 1)) begin
                ctl      <= C_IDLE;
                done     <= 1'b1;
                best_mv  <= n_ctr_mv;
                best_sad <= n_ctr_sad;
              end else begin
                ph  <= DS_AROUND;
                ctl <= C_ISSUE;
              end
            end
          endcase
        end else begin
          idx <= idx + 1'b1;
          ctl <= C_ISSUE;
        end
      end

      ctr_mv <= n_ctr_mv;  ctr_sad <= n_ctr_sad;
      lb_mv  <= n_lb_mv;   lb_sad  <= n_lb_sad;   lb_dir <= n_lb_dir;
    end
  end

endmodule
