// Polynomial linearization of a multi-lane ADC stream (harmonic spur
// suppression). Each 128-bit AXI4-Stream beat carries LANES samples, one per
// 16-bit slot, right-aligned 12-bit two's complement. Every lane is passed
// through its own lin_horner_lane pipeline, so the whole beat is processed in
// one clock: interval 1, latency 6 beats. The output has the same format as
// the input (slot sign-extended), so downstream modules see no difference
// whether the linearization is enabled or bypassed.
//
// Flow control is this design's choice: the pipeline is one shift register of
// beats that advances whenever its output register is empty or being taken
// (ce = !m_tvalid || m_tready), and s_tready equals that enable. A beat
// accepted with bypass high leaves unchanged. tlast travels with its beat.
module linearization
#(
  parameter int LANES    = lin_pkg::LANES,
  parameter int SAMPLE_W = lin_pkg::SAMPLE_W,
  parameter int SLOT_W   = lin_pkg::SLOT_W,
  parameter logic signed [lin_pkg::COEF_W-1:0] A0 = lin_pkg::A0_DEFAULT,
  parameter logic signed [lin_pkg::COEF_W-1:0] A1 = lin_pkg::A1_DEFAULT,
  parameter logic signed [lin_pkg::COEF_W-1:0] A2 = lin_pkg::A2_DEFAULT
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      bypass,
  // AXI4-Stream slave (from the ADC interface)
  input  logic [LANES*SLOT_W-1:0]   s_tdata,
  input  logic                      s_tvalid,
  output logic                      s_tready,
  input  logic                      s_tlast,
  // AXI4-Stream master (to a DMA or further DSP)
  output logic [LANES*SLOT_W-1:0]   m_tdata,
  output logic                      m_tvalid,
  input  logic                      m_tready,
  output logic                      m_tlast
);
  localparam int LATENCY = 6;

  logic ce;
  logic [LATENCY-1:0] vld_sr, last_sr;

  assign ce       = !m_tvalid || m_tready;
  assign s_tready = ce;
  assign m_tvalid = vld_sr[LATENCY-1];
  assign m_tlast  = last_sr[LATENCY-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld_sr  <= '0;
      last_sr <= '0;
    end else if (ce) begin
      vld_sr  <= {vld_sr[LATENCY-2:0], s_tvalid};
      last_sr <= {last_sr[LATENCY-2:0], s_tlast && s_tvalid};
    end
  end

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic signed [SAMPLE_W-1:0] x_l, y_l;
    assign x_l = s_tdata[l*SLOT_W +: SAMPLE_W];
    lin_horner_lane #(
      .SAMPLE_W (SAMPLE_W),
      .A0       (A0),
      .A1       (A1),
      .A2       (A2)
    ) u_lane (
      .clk    (clk),
      .rst_n  (rst_n),
      .ce     (ce),
      .bypass (bypass),
      .x      (x_l),
      .y      (y_l)
    );
    assign m_tdata[l*SLOT_W +: SLOT_W] = SLOT_W'(y_l);
  end

  // AXI4-Stream rule: a presented beat stays until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n) (m_tvalid && !m_tready) |=> (m_tvalid && $stable(m_tdata));
  endproperty
  a_hold: assert property (p_hold);
endmodule
