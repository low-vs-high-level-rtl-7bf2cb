// Centre (mean) and size (standard deviation) of a two-dimensional intensity
// distribution, such as a beam spot in a camera image, in X and in Y.
//
// Instead of the two-pass "mean first, then deviations" method, the module
// uses var = (1/S) * sum(x^2 * p) - mean^2 with S = sum(p), so each pixel
// needs only multiplications and additions and the frame is read once, on the
// fly. Per frame:
//   axis_reg_slice      registers the pixel stream in both directions
//   frame_accumulator   streams the N x N frame (INPUT_W pixels per beat,
//                       one beat per clock) into five totals
//   4 x seq_divider     meanx = sx/S, meany = sy/S, ex2 = sx2/S, ey2 = sy2/S
//                       (truncated integer quotients), in parallel
//   variance            varx = ex2 - meanx^2, vary = ey2 - meany^2
//   2 x int_sqrt        stdx = floor(sqrt(varx)), stdy = floor(sqrt(vary))
// The results are registered, flagged by a one-clock result_valid pulse, and
// readable through the AXI4-Lite registers of stats_axil_regs.
//
// Timing: the results follow the frame's last beat by about 68 clocks (input
// slice, accumulator pipeline, 45 division steps, 9 square-root steps, a few
// control states), far less
// than a 512 x 512 frame (65536 beats), and the next frame is accumulated
// meanwhile. Only a frame shorter than the post-processing would see its
// last beat held back until the unit is free.
//
// This design's own choices: the variance is kept in VAR_W = 18 bits (a
// 16-bit signed variance wraps for a distribution spread over 0..511), a
// negative variance from truncation is clamped to 0, and a frame whose pixels
// are all zero reports zeros.
module two_dim_stdev #(
  parameter int N       = stats_pkg::N,
  parameter int INPUT_W = stats_pkg::INPUT_W,
  parameter int PIXEL_W = stats_pkg::PIXEL_W,
  parameter int VAR_W   = stats_pkg::VAR_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // pixel stream
  input  logic [INPUT_W*PIXEL_W-1:0]  s_tdata,
  input  logic                        s_tvalid,
  output logic                        s_tready,
  // AXI4-Lite result registers
  input  logic [4:0]                  s_axil_awaddr,
  input  logic                        s_axil_awvalid,
  output logic                        s_axil_awready,
  input  logic [31:0]                 s_axil_wdata,
  input  logic [3:0]                  s_axil_wstrb,
  input  logic                        s_axil_wvalid,
  output logic                        s_axil_wready,
  output logic [1:0]                  s_axil_bresp,
  output logic                        s_axil_bvalid,
  input  logic                        s_axil_bready,
  input  logic [4:0]                  s_axil_araddr,
  input  logic                        s_axil_arvalid,
  output logic                        s_axil_arready,
  output logic [31:0]                 s_axil_rdata,
  output logic [1:0]                  s_axil_rresp,
  output logic                        s_axil_rvalid,
  input  logic                        s_axil_rready,
  // results, also as plain outputs
  output logic [stats_pkg::RES_W-1:0] meanx,
  output logic [stats_pkg::RES_W-1:0] stdx,
  output logic [stats_pkg::RES_W-1:0] meany,
  output logic [stats_pkg::RES_W-1:0] stdy,
  output logic                        result_valid,
  output logic [31:0]                 frame_cnt
);
  import stats_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_DIV_START, S_DIV, S_VAR, S_SQRT_START, S_SQRT, S_DONE} state_t;
  state_t state;

  logic          acc_done;
  frame_totals_t acc_tot, tot_r;
  logic          busy;

  // registered pixel input
  logic [INPUT_W*PIXEL_W-1:0] px_tdata;
  logic                       px_tvalid, px_tready;

  axis_reg_slice #(.DATA_W(INPUT_W*PIXEL_W)) u_in_slice (
    .clk      (clk),
    .rst_n    (rst_n),
    .s_tdata  (s_tdata),
    .s_tvalid (s_tvalid),
    .s_tready (s_tready),
    .m_tdata  (px_tdata),
    .m_tvalid (px_tvalid),
    .m_tready (px_tready)
  );

  frame_accumulator #(.N(N), .INPUT_W(INPUT_W), .PIXEL_W(PIXEL_W)) u_acc (
    .clk      (clk),
    .rst_n    (rst_n),
    .s_tdata  (px_tdata),
    .s_tvalid (px_tvalid),
    .s_tready (px_tready),
    .hold     (busy),
    .done     (acc_done),
    .totals   (acc_tot)
  );

  assign busy = (state != S_IDLE);

  // Four dividers sharing the divisor S.
  logic                div_start;
  logic [3:0]          div_busy, div_done;
  logic [SX2_W-1:0]    div_n [4];
  logic [SX2_W-1:0]    div_q [4];
  logic [3:0]          div_fin;

  assign div_n[0] = SX2_W'(tot_r.sx);
  assign div_n[1] = SX2_W'(tot_r.sy);
  assign div_n[2] = tot_r.sx2;
  assign div_n[3] = tot_r.sy2;

  for (genvar i = 0; i < 4; i++) begin : g_div
    seq_divider #(.DIVIDEND_W(SX2_W), .DIVISOR_W(SUM_W)) u_div (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (div_start),
      .dividend (div_n[i]),
      .divisor  (tot_r.tot),
      .busy     (div_busy[i]),
      .done     (div_done[i]),
      .quotient (div_q[i])
    );
  end

  // Variance and square roots.
  localparam int MEAN_W = POS_W;
  localparam int WIDE_W = 2*POS_W + 2;
  logic [MEAN_W-1:0]       mx, my;
  logic signed [WIDE_W-1:0] vx_wide, vy_wide;
  logic [VAR_W-1:0]        vx, vy;
  logic                    sq_start;
  logic [1:0]              sq_busy, sq_done, sq_fin;
  logic [VAR_W/2-1:0]      sq_root [2];

  function automatic logic [VAR_W-1:0] clamp_var(input logic signed [WIDE_W-1:0] v);
    if (v < 0)                                 return '0;
    else if (v > WIDE_W'({VAR_W{1'b1}}))       return '1;
    else                                       return v[VAR_W-1:0];
  endfunction

  always_comb begin
    mx      = div_q[0][MEAN_W-1:0];
    my      = div_q[1][MEAN_W-1:0];
    vx_wide = signed'(WIDE_W'(div_q[2])) - signed'(WIDE_W'(mx) * WIDE_W'(mx));
    vy_wide = signed'(WIDE_W'(div_q[3])) - signed'(WIDE_W'(my) * WIDE_W'(my));
  end

  int_sqrt #(.IN_W(VAR_W)) u_sqrt_x (
    .clk(clk), .rst_n(rst_n), .start(sq_start), .value(vx),
    .busy(sq_busy[0]), .done(sq_done[0]), .root(sq_root[0]));
  int_sqrt #(.IN_W(VAR_W)) u_sqrt_y (
    .clk(clk), .rst_n(rst_n), .start(sq_start), .value(vy),
    .busy(sq_busy[1]), .done(sq_done[1]), .root(sq_root[1]));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      tot_r        <= '0;
      div_start    <= 1'b0;
      div_fin      <= '0;
      sq_start     <= 1'b0;
      sq_fin       <= '0;
      vx           <= '0;
      vy           <= '0;
      meanx        <= '0;
      stdx         <= '0;
      meany        <= '0;
      stdy         <= '0;
      result_valid <= 1'b0;
      frame_cnt    <= '0;
    end else begin
      div_start    <= 1'b0;
      sq_start     <= 1'b0;
      result_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (acc_done) begin
          tot_r <= acc_tot;
          state <= S_DIV_START;
        end
        S_DIV_START: begin
          if (tot_r.tot == '0) begin
            // empty frame: nothing to divide by
            meanx <= '0; stdx <= '0; meany <= '0; stdy <= '0;
            state <= S_DONE;
          end else begin
            div_start <= 1'b1;
            div_fin   <= '0;
            state     <= S_DIV;
          end
        end
        S_DIV: begin
          div_fin <= div_fin | div_done;
          if ((div_fin | div_done) == 4'hF) state <= S_VAR;
        end
        S_VAR: begin
          vx    <= clamp_var(vx_wide);
          vy    <= clamp_var(vy_wide);
          meanx <= RES_W'(mx);
          meany <= RES_W'(my);
          state <= S_SQRT_START;
        end
        S_SQRT_START: begin
          sq_start <= 1'b1;
          sq_fin   <= '0;
          state    <= S_SQRT;
        end
        S_SQRT: begin
          sq_fin <= sq_fin | sq_done;
          if ((sq_fin | sq_done) == 2'b11) begin
            stdx  <= RES_W'(sq_root[0]);
            stdy  <= RES_W'(sq_root[1]);
            state <= S_DONE;
          end
        end
        S_DONE: begin
          result_valid <= 1'b1;
          frame_cnt    <= frame_cnt + 1'b1;
          state        <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  stats_axil_regs #(.ADDR_W(5)) u_regs (
    .clk            (clk),
    .rst_n          (rst_n),
    .s_axil_awaddr  (s_axil_awaddr),
    .s_axil_awvalid (s_axil_awvalid),
    .s_axil_awready (s_axil_awready),
    .s_axil_wdata   (s_axil_wdata),
    .s_axil_wstrb   (s_axil_wstrb),
    .s_axil_wvalid  (s_axil_wvalid),
    .s_axil_wready  (s_axil_wready),
    .s_axil_bresp   (s_axil_bresp),
    .s_axil_bvalid  (s_axil_bvalid),
    .s_axil_bready  (s_axil_bready),
    .s_axil_araddr  (s_axil_araddr),
    .s_axil_arvalid (s_axil_arvalid),
    .s_axil_arready (s_axil_arready),
    .s_axil_rdata   (s_axil_rdata),
    .s_axil_rresp   (s_axil_rresp),
    .s_axil_rvalid  (s_axil_rvalid),
    .s_axil_rready  (s_axil_rready),
    .meanx          (32'(meanx)),
    .stdx           (32'(stdx)),
    .meany          (32'(meany)),
    .stdy           (32'(stdy)),
    .frame_cnt      (frame_cnt)
  );
endmodule
