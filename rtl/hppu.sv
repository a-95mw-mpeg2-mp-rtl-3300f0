// hppu: half-pel processing unit (MEHH), the last stage of the search.
//
// Given the integer vector (dx, dy) found by MEH1 and its SAD, the unit
// evaluates the eight half-pel positions around it and returns the best of
// the nine, as a vector in half-pel units (2*dx + hx, 2*dy + hy). It reads
// the same SW1 window and TB1 template as MEH1, so no extra cache is needed.
//
// Operation: the 18 window rows dy+7 .. dy+24 are read one per clock (both
// halves at once, ports A and B of SW1) and the 18 pixels of columns
// dx+7 .. dx+24 of each are kept in a three-row line buffer. When row k
// arrives, template row k-2 (read from TB1 at the same time) is compared
// with the interpolated rows around it: 8 positions x 16 pixels of
// interpolation and absolute difference per clock, accumulated per
// position. Interpolation follows the MPEG-2 rule: (a+b+1)>>1 for a
// horizontal or vertical half position, (a+b+c+d+2)>>2 for a diagonal one.
// A half position that needs a pixel outside the 32x32 window (dx or dy at
// +-8 on that side) is skipped. Ties keep the integer vector, then the
// earlier position in the order (-1,-1),(0,-1),(+1,-1),(-1,0),(+1,0),
// (-1,+1),(0,+1),(+1,+1).
//
// SW1 access: sw_req asks for both read ports; the row is read only in a
// clock where sw_gnt is high (MEH1 has priority), otherwise the unit stalls.
// Rows outside the window are not read. With no stalls, done follows start
// by 20 clocks. The lowest bit of sw_addr_a and sw_addr_b (the half select)
// is a constant 0 and 1: port A always reads the left 16 pixels of a row
// and port B the right 16. These bits are kept so the addresses have the
// same format as MEH1's and can share the SW1 port multiplexers.
module hppu
  import meh_pkg::*;
#(
  parameter int N = MB,
  localparam int R  = N / 2,
  localparam int RW = $clog2(2*N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              buf_sel,
  input  mv_t               int_mv,
  input  logic [SAD1_W-1:0] int_sad,
  output logic              busy,
  output logic              done,
  output logic              stall,
  // SW1: {buffer, row, half}
  output logic              sw_req,
  input  logic              sw_gnt,
  output logic [RW+1:0]     sw_addr_a,
  output logic [RW+1:0]     sw_addr_b,
  input  logic [N*PIX_W-1:0] sw_rdata_a,
  input  logic [N*PIX_W-1:0] sw_rdata_b,
  // TB1: {buffer, row}
  output logic              tb_re,
  output logic [$clog2(N):0] tb_addr,
  input  logic [N*PIX_W-1:0] tb_rdata,
  // result: half-pel vector and its SAD
  output mv_t               hp_mv,
  output logic [SAD1_W-1:0] hp_sad
);

  localparam int KW = $clog2(N+3);
  localparam int NP = 8;

  typedef enum logic [1:0] {HS_IDLE, HS_RUN, HS_FINAL} hs_e;
  hs_e state;

  logic              bsel;
  mv_t               imv;
  logic [SAD1_W-1:0] isad;
  logic [KW-1:0]     k;           // next row to issue, 0..N+1
  logic              issued_all;

  // row index in the window of issue k: dy + R - 1 + k
  logic signed [8:0] row_s;
  logic              row_in;
  assign row_s  = 9'(imv.y) + 9'(R - 1) + 9'(signed'({1'b0, k}));
  assign row_in = (row_s >= 0) && (row_s < 9'(2*N));

  logic issue;
  always_comb begin
    sw_req = (state == HS_RUN) && !issued_all && row_in;
    issue  = (state == HS_RUN) && !issued_all && (!row_in || sw_gnt);
    stall  = sw_req && !sw_gnt;
    sw_addr_a = {bsel, RW'(row_s), 1'b0};
    sw_addr_b = {bsel, RW'(row_s), 1'b1};
    tb_re     = issue && (k >= KW'(2));
    tb_addr   = {bsel, $clog2(N)'(k - KW'(2))};
  end

  // response stage: data of the row issued last clock
  logic          r_valid, r_zero;
  logic [KW-1:0] r_k;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= HS_IDLE;
      k          <= '0;
      issued_all <= 1'b0;
      r_valid    <= 1'b0;
      r_zero     <= 1'b0;
      r_k        <= '0;
      done       <= 1'b0;
      bsel       <= 1'b0;
      imv        <= '0;
      isad       <= '0;
    end else begin
      done    <= 1'b0;
      r_valid <= issue;
      r_zero  <= !row_in;
      r_k     <= k;
      unique case (state)
        HS_IDLE: if (start) begin
          state      <= HS_RUN;
          bsel       <= buf_sel;
          imv        <= int_mv;
          isad       <= int_sad;
          k          <= '0;
          issued_all <= 1'b0;
        end
        HS_RUN: begin
          if (issue) begin
            k <= k + 1'b1;
            if (k == KW'(N+1)) issued_all <= 1'b1;
          end
          if (r_valid && r_k == KW'(N+1)) state <= HS_FINAL;
        end
        HS_FINAL: begin
          state <= HS_IDLE;
          done  <= 1'b1;
        end
        default: state <= HS_IDLE;
      endcase
    end
  end

  assign busy = (state != HS_IDLE);

  // ---------------------------------------------------- line buffer rows
  pix_t cur [N+2];
  pix_t lb0 [N+2];   // two rows above cur
  pix_t lb1 [N+2];   // one row above cur
  pix_t tpl [N];

  always_comb begin
    for (int m = 0; m < N+2; m++) begin
      logic signed [8:0] c;
      c = 9'(imv.x) + 9'(R - 1) + 9'(m);
      cur[m] = '0;
      if (!r_zero && c >= 0 && c < 9'(2*N)) begin
        if (c < 9'(N)) cur[m] = sw_rdata_a[5'(c)*PIX_W +: PIX_W];
        else           cur[m] = sw_rdata_b[5'(c - 9'(N))*PIX_W +: PIX_W];
      end
    end
    for (int j = 0; j < N; j++) tpl[j] = tb_rdata[j*PIX_W +: PIX_W];
  end

  always_ff @(posedge clk) begin
    if (r_valid) begin
      lb0 <= lb1;
      lb1 <= cur;
    end
  end

  // ----------------------------------------- interpolation and SAD of a row
  function automatic pix_t avg2(pix_t a, pix_t b);
    logic [PIX_W:0] s;
    s = {1'b0, a} + {1'b0, b} + (PIX_W+1)'(1);
    return s[PIX_W:1];   // the sum's LSB is dropped by the halving
  endfunction

  function automatic pix_t avg4(pix_t a, pix_t b, pix_t c, pix_t d);
    logic [PIX_W+1:0] s;
    s = {2'b0, a} + {2'b0, b} + {2'b0, c} + {2'b0, d} + (PIX_W+2)'(2);
    return s[PIX_W+1:2];   // the two LSBs are dropped by the quartering
  endfunction

  function automatic pix_t absd(pix_t a, pix_t b);
    return (a > b) ? pix_t'(a - b) : pix_t'(b - a);
  endfunction

  logic [PIX_W+$clog2(N)-1:0] row_sad [NP];
  always_comb begin
    for (int p = 0; p < NP; p++) row_sad[p] = '0;
    for (int j = 0; j < N; j++) begin
      pix_t ul, up, ur, lf, c0, rt, dl, dn, dr;
      ul = lb0[j]; up = lb0[j+1]; ur = lb0[j+2];
      lf = lb1[j]; c0 = lb1[j+1]; rt = lb1[j+2];
      dl = cur[j]; dn = cur[j+1]; dr = cur[j+2];
      row_sad[0] += $bits(row_sad[0])'(absd(tpl[j], avg4(ul, up, lf, c0)));
      row_sad[1] += $bits(row_sad[0])'(absd(tpl[j], avg2(up, c0)));
      row_sad[2] += $bits(row_sad[0])'(absd(tpl[j], avg4(up, ur, c0, rt)));
      row_sad[3] += $bits(row_sad[0])'(absd(tpl[j], avg2(lf, c0)));
      row_sad[4] += $bits(row_sad[0])'(absd(tpl[j], avg2(c0, rt)));
      row_sad[5] += $bits(row_sad[0])'(absd(tpl[j], avg4(lf, c0, dl, dn)));
      row_sad[6] += $bits(row_sad[0])'(absd(tpl[j], avg2(c0, dn)));
      row_sad[7] += $bits(row_sad[0])'(absd(tpl[j], avg4(c0, rt, dn, dr)));
    end
  end

  logic [SAD1_W-1:0] acc [NP];
  always_ff @(posedge clk) begin
    if (state == HS_IDLE && start) begin
      for (int p = 0; p < NP; p++) acc[p] <= '0;
    end else if (r_valid && r_k >= KW'(2)) begin
      for (int p = 0; p < NP; p++) acc[p] <= acc[p] + SAD1_W'(row_sad[p]);
    end
  end

  // ------------------------------------------------------------ final pick
  // position p: hx = HX[p], hy = HY[p] in half pels
  localparam logic signed [1:0] HX [NP] = '{-2'sd1, 2'sd0, 2'sd1, -2'sd1, 2'sd1, -2'sd1, 2'sd0, 2'sd1};
  localparam logic signed [1:0] HY [NP] = '{-2'sd1, -2'sd1, -2'sd1, 2'sd0, 2'sd0, 2'sd1, 2'sd1, 2'sd1};

  logic [NP-1:0]     pvalid;
  logic [SAD1_W-1:0] pick_sad;
  mv_t               pick_mv;
  always_comb begin
    for (int p = 0; p < NP; p++)
      pvalid[p] = !((HX[p] < 0 && imv.x == -8'(R)) || (HX[p] > 0 && imv.x == 8'(R)) ||
                    (HY[p] < 0 && imv.y == -8'(R)) || (HY[p] > 0 && imv.y == 8'(R)));
    pick_sad  = isad;
    pick_mv.x = imv.x <<< 1;
    pick_mv.y = imv.y <<< 1;
    for (int p = 0; p < NP; p++) begin
      if (pvalid[p] && acc[p] < pick_sad) begin
        pick_sad  = acc[p];
        pick_mv.x = (imv.x <<< 1) + 8'(HX[p]);
        pick_mv.y = (imv.y <<< 1) + 8'(HY[p]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hp_mv  <= '0;
      hp_sad <= '0;
    end else if (state == HS_FINAL) begin
      hp_sad <= pick_sad;
      hp_mv  <= pick_mv;
    end
  end

endmodule
