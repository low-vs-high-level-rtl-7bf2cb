// Frame accumulator of the two-dimensional statistics module.
//
// Pixels of an N x N frame arrive row by row, INPUT_W pixels per AXI4-Stream
// beat, one beat per clock. For pixel value p at column x and row y the block
// forms, over the whole frame,
//   tot = sum p,  sx = sum x*p,  sy = sum y*p,  sx2 = sum x^2*p,  sy2 = sum y^2*p
// which are the only per-sample operations needed for mean and variance
// (multiplications and additions; the divisions follow once per frame).
// Pipeline: 1 register the beat with its position, 2 per-pixel products x*p,
// x^2*p and their sums over the beat, 3 the row terms y*sum(p), y^2*sum(p),
// 4 accumulate (the first beat of a frame loads instead of adding). The
// totals are presented with a one-clock 'done' pulse and stay unchanged for at
// least that clock.
//
// Frames are delimited by counting beats from reset, N/INPUT_W beats per row
// and N rows. A single accumulator per quantity after a per-beat adder tree
// keeps one beat per clock; that structure, and the 'hold' input, are this
// design's choices. While 'hold' is high, or while the totals of the previous
// frame have not yet been presented, the last beat of a frame is refused, so
// a consumer that is still busy never loses a frame's totals.
module frame_accumulator #(
  parameter int N       = stats_pkg::N,
  parameter int INPUT_W = stats_pkg::INPUT_W,
  parameter int PIXEL_W = stats_pkg::PIXEL_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [INPUT_W*PIXEL_W-1:0]  s_tdata,
  input  logic                        s_tvalid,
  output logic                        s_tready,
  input  logic                        hold,
  output logic                        done,
  output stats_pkg::frame_totals_t    totals
);
  localparam int POS_W   = stats_pkg::POS_W;
  localparam int BEATS   = N / INPUT_W;
  localparam int BX_W    = (BEATS > 1) ? $clog2(BEATS) : 1;
  localparam int ROW_W   = (N > 1) ? $clog2(N) : 1;
  localparam int SUMP_W  = PIXEL_W + $clog2(INPUT_W) + 1;
  localparam int XP_W    = PIXEL_W + POS_W + $clog2(INPUT_W) + 1;
  localparam int X2P_W   = PIXEL_W + 2*POS_W + $clog2(INPUT_W) + 1;

  logic [BX_W-1:0]  bx;
  logic [ROW_W-1:0] row;
  logic             first_beat, last_beat, accept, last_pending;

  assign first_beat = (bx == '0) && (row == '0);
  assign last_beat  = (bx == BX_W'(BEATS-1)) && (row == ROW_W'(N-1));
  assign s_tready   = !(last_beat && (hold || last_pending));
  assign accept     = s_tvalid && s_tready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bx  <= '0;
      row <= '0;
    end else if (accept) begin
      if (bx == BX_W'(BEATS-1)) begin
        bx  <= '0;
        row <= (row == ROW_W'(N-1)) ? '0 : row + 1'b1;
      end else begin
        bx <= bx + 1'b1;
      end
    end
  end

  // Stage 1: the beat and its position.
  logic [PIXEL_W-1:0] pix1 [INPUT_W];
  logic [POS_W-1:0]   x1, y1;
  logic               v1, f1, l1;
  // Stage 2: sums over the beat.
  logic [SUMP_W-1:0]  sump2;
  logic [XP_W-1:0]    sxp2;
  logic [X2P_W-1:0]   sx2p2;
  logic [POS_W-1:0]   y2;
  logic               v2, f2, l2;
  // Stage 3: row terms.
  logic [SUMP_W-1:0]  sump3;
  logic [XP_W-1:0]    sxp3, syp3;
  logic [X2P_W-1:0]   sx2p3, sy2p3;
  logic               v3, f3, l3;

  logic [SUMP_W-1:0]  sump_c;
  logic [XP_W-1:0]    sxp_c;
  logic [X2P_W-1:0]   sx2p_c;

  always_comb begin
    sump_c = '0;
    sxp_c  = '0;
    sx2p_c = '0;
    for (int j = 0; j < INPUT_W; j++) begin
      logic [POS_W-1:0] xj;
      xj     = x1 + POS_W'(j);
      sump_c = sump_c + SUMP_W'(pix1[j]);
      sxp_c  = sxp_c  + XP_W'(xj) * XP_W'(pix1[j]);
      sx2p_c = sx2p_c + X2P_W'(xj) * X2P_W'(xj) * X2P_W'(pix1[j]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
      f1 <= 1'b0; f2 <= 1'b0; f3 <= 1'b0;
      l1 <= 1'b0; l2 <= 1'b0; l3 <= 1'b0;
      for (int j = 0; j < INPUT_W; j++) pix1[j] <= '0;
      x1 <= '0; y1 <= '0; y2 <= '0;
      sump2 <= '0; sxp2 <= '0; sx2p2 <= '0;
      sump3 <= '0; sxp3 <= '0; syp3 <= '0; sx2p3 <= '0; sy2p3 <= '0;
      totals <= '0;
      done   <= 1'b0;
    end else begin
      // stage 1
      v1 <= accept;
      f1 <= first_beat;
      l1 <= last_beat;
      x1 <= POS_W'(bx) * POS_W'(INPUT_W);
      y1 <= POS_W'(row);
      for (int j = 0; j < INPUT_W; j++) pix1[j] <= s_tdata[j*PIXEL_W +: PIXEL_W];
      // stage 2
      v2 <= v1; f2 <= f1; l2 <= l1;
      sump2 <= sump_c;
      sxp2  <= sxp_c;
      sx2p2 <= sx2p_c;
      y2    <= y1;
      // stage 3
      v3 <= v2; f3 <= f2; l3 <= l2;
      sump3 <= sump2;
      sxp3  <= sxp2;
      sx2p3 <= sx2p2;
      syp3  <= XP_W'(y2) * XP_W'(sump2);
      sy2p3 <= X2P_W'(y2) * X2P_W'(y2) * X2P_W'(sump2);
      // stage 4
      done <= v3 && l3;
      if (v3) begin
        if (f3) begin
          totals.tot <= stats_pkg::SUM_W'(sump3);
          totals.sx  <= stats_pkg::SX_W'(sxp3);
          totals.sy  <= stats_pkg::SX_W'(syp3);
          totals.sx2 <= stats_pkg::SX2_W'(sx2p3);
          totals.sy2 <= stats_pkg::SX2_W'(sy2p3);
        end else begin
          totals.tot <= totals.tot + stats_pkg::SUM_W'(sump3);
          totals.sx  <= totals.sx  + stats_pkg::SX_W'(sxp3);
          totals.sy  <= totals.sy  + stats_pkg::SX_W'(syp3);
          totals.sx2 <= totals.sx2 + stats_pkg::SX2_W'(sx2p3);
          totals.sy2 <= totals.sy2 + stats_pkg::SX2_W'(sy2p3);
        end
      end
    end
  end

  assign last_pending = (v1 && l1) || (v2 && l2) || (v3 && l3) || done;
endmodule
