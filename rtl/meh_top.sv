// meh_top: the motion estimation core (MEH).
//
// Three search processors work on three different macroblocks at once:
//   MEH2  (meh2_dds) coarse 1D diamond search over +-128 x +-64 full-res
//         pixels on the decimated upper layer, with its own SW2/TB2;
//   MEH1  (meh1_fs)  +-8 x +-8 integer full search on the ring-connected
//         systolic array, around the position the host derives from MEH2's
//         vector, giving frame, top-field and bottom-field vectors;
//   MEHH  (hppu)     half-pel refinement of MEH1's frame vector.
// SW1 and TB1 hold two buffers each: while MEH1 searches one, the host loads
// the other and MEHH refines the result of the previous search in it.
// MEHH starts by itself in the clock MEH1's done is high. MEH1 and MEHH share SW1's two
// read ports: MEH1 reads only in its Init phase and once per candidate row,
// and MEHH takes the ports in every other clock (it stalls otherwise).
// TB1 read port A belongs to MEH1, port B to MEHH.
//
// The host fills the buffers through the 128-bit bus (see mem_if), starts
// MEH2 with four candidate vectors and reads its vector, fetches the
// full-resolution window for MEH1 into a free SW1/TB1 buffer and starts
// MEH1 on it. Each processor signals done with a one-clock pulse; results
// hold until its next start.
module meh_top
  import meh_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // memory bus (writes into the buffers)
  input  logic              bus_we,
  input  bus_sel_e          bus_sel,
  input  logic [9:0]        bus_addr,
  input  logic [BUS_W-1:0]  bus_wdata,
  output logic              addr_err,
  // MEH2
  input  logic              meh2_start,
  input  mv_t               meh2_cand [4],
  output logic              meh2_busy,
  output logic              meh2_done,
  output mv_t               meh2_mv,
  output logic [SAD2_W-1:0] meh2_sad,
  // MEH1
  input  logic              meh1_start,
  input  logic              meh1_buf,
  output logic              meh1_busy,
  output logic              meh1_done,
  output mv_t               frame_mv,
  output logic [SAD1_W-1:0] frame_sad,
  output mv_t               top_mv,
  output logic [SAD1_W-1:0] top_sad,
  output mv_t               bot_mv,
  output logic [SAD1_W-1:0] bot_sad,
  // MEHH
  output logic              hp_busy,
  output logic              hp_done,
  output logic              hp_buf,
  output mv_t               hp_mv,
  output logic [SAD1_W-1:0] hp_sad
);

  localparam int SW1_AW = $clog2(2 * WIN1 * 2);   // {buffer, row, half}
  localparam int TB1_AW = $clog2(2 * MB);         // {buffer, row}

  // ----------------------------------------------------------- bus port
  logic             sw2_we, tb2_we, sw1_we, tb1_we;
  logic [9:0]       waddr;
  logic [BUS_W-1:0] wdata;

  mem_if u_mem_if (
    .clk(clk), .rst_n(rst_n),
    .bus_we(bus_we), .bus_sel(bus_sel), .bus_addr(bus_addr), .bus_wdata(bus_wdata),
    .sw2_we(sw2_we), .tb2_we(tb2_we), .sw1_we(sw1_we), .tb1_we(tb1_we),
    .waddr(waddr), .wdata(wdata), .addr_err(addr_err));

  // --------------------------------------------------------------- MEH2
  logic [15:0] meh2_evals;
  logic [7:0]  meh2_lines;

  meh2_dds u_meh2 (
    .clk(clk), .rst_n(rst_n),
    .sw2_we(sw2_we), .sw2_waddr(waddr), .sw2_wdata(wdata),
    .tb2_we(tb2_we), .tb2_waddr(waddr[2:0]), .tb2_wdata(wdata[UB*PIX_W-1:0]),
    .start(meh2_start), .cand(meh2_cand),
    .busy(meh2_busy), .done(meh2_done), .best_mv(meh2_mv), .best_sad(meh2_sad),
    .n_evals(meh2_evals), .n_lines(meh2_lines));

  // ---------------------------------------------------------- SW1 / TB1
  logic              sw_re_a, sw_re_b;
  logic [SW1_AW-1:0] sw_ra, sw_rb;
  logic [BUS_W-1:0]  sw_da, sw_db;
  logic              tb_re_a, tb_re_b;
  logic [TB1_AW-1:0] tb_ra, tb_rb;
  logic [BUS_W-1:0]  tb_da, tb_db;

  sram_2r1w #(.WIDTH(BUS_W), .DEPTH(2 * WIN1 * 2)) u_sw1 (
    .clk(clk), .we(sw1_we), .waddr(waddr[SW1_AW-1:0]), .wdata(wdata),
    .re_a(sw_re_a), .raddr_a(sw_ra), .rdata_a(sw_da),
    .re_b(sw_re_b), .raddr_b(sw_rb), .rdata_b(sw_db));

  sram_2r1w #(.WIDTH(BUS_W), .DEPTH(2 * MB)) u_tb1 (
    .clk(clk), .we(tb1_we), .waddr(waddr[TB1_AW-1:0]), .wdata(wdata),
    .re_a(tb_re_a), .raddr_a(tb_ra), .rdata_a(tb_da),
    .re_b(tb_re_b), .raddr_b(tb_rb), .rdata_b(tb_db));

  // --------------------------------------------------------------- MEH1
  logic              m1_sw_re;
  logic [SW1_AW-1:0] m1_sw_a, m1_sw_b;
  logic [TB1_AW-1:0] m1_tb_a;
  fs_phase_e         m1_phase;

  meh1_fs u_meh1 (
    .clk(clk), .rst_n(rst_n),
    .start(meh1_start), .buf_sel(meh1_buf), .busy(meh1_busy), .done(meh1_done),
    .phase(m1_phase),
    .sw_re(m1_sw_re), .sw_addr_a(m1_sw_a), .sw_addr_b(m1_sw_b),
    .sw_rdata_a(sw_da), .sw_rdata_b(sw_db),
    .tb_re(tb_re_a), .tb_addr(m1_tb_a), .tb_rdata(tb_da),
    .frame_mv(frame_mv), .frame_sad(frame_sad),
    .top_mv(top_mv), .top_sad(top_sad), .bot_mv(bot_mv), .bot_sad(bot_sad));

  assign tb_ra = m1_tb_a;

  // --------------------------------------------------------------- MEHH
  logic              hp_req, hp_gnt, hp_stall, hp_tb_re;
  logic [SW1_AW-1:0] hp_sw_a, hp_sw_b;
  logic [TB1_AW-1:0] hp_tb_a;
  logic              hp_start;
  logic              m1_buf_q;

  // MEH1's done pulse starts MEHH on the same clock edge at which a new MEH1
  // start could clear the result, so MEHH always latches the finished one
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m1_buf_q <= 1'b0;
      hp_buf   <= 1'b0;
    end else begin
      if (meh1_start && !meh1_busy) m1_buf_q <= meh1_buf;
      if (meh1_done) hp_buf <= m1_buf_q;
    end
  end

  assign hp_start = meh1_done;

  assign hp_gnt = !m1_sw_re;

  hppu u_hppu (
    .clk(clk), .rst_n(rst_n),
    .start(hp_start), .buf_sel(m1_buf_q), .int_mv(frame_mv), .int_sad(frame_sad),
    .busy(hp_busy), .done(hp_done), .stall(hp_stall),
    .sw_req(hp_req), .sw_gnt(hp_gnt), .sw_addr_a(hp_sw_a), .sw_addr_b(hp_sw_b),
    .sw_rdata_a(sw_da), .sw_rdata_b(sw_db),
    .tb_re(hp_tb_re), .tb_addr(hp_tb_a), .tb_rdata(tb_db),
    .hp_mv(hp_mv), .hp_sad(hp_sad));

  assign tb_re_b = hp_tb_re;
  assign tb_rb   = hp_tb_a;

  // SW1 read ports: MEH1 first, MEHH in the clocks MEH1 leaves free
  always_comb begin
    sw_re_a = m1_sw_re || (hp_req && hp_gnt);
    sw_re_b = sw_re_a;
    sw_ra   = m1_sw_re ? m1_sw_a : hp_sw_a;
    sw_rb   = m1_sw_re ? m1_sw_b : hp_sw_b;
  end

  // MEHH must never be handed data while MEH1 owns the ports
  a_no_conflict: assert property (@(posedge clk) disable iff (!rst_n)
    !(m1_sw_re && hp_req && hp_gnt));
  // a new MEH1 search must not start before MEHH has taken the last result
  a_hp_ready: assert property (@(posedge clk) disable iff (!rst_n)
    meh1_done |-> !hp_busy);

endmodule
