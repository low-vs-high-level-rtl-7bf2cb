// AXI4-Stream register slice, registered in both directions.
// It cuts every combinational path through a stream interface: m_tvalid and
// m_tdata come from flip-flops, and so does s_tready. A two-entry buffer (the
// output register plus one skid register) keeps the full rate of one beat per
// clock. When the output stalls, the beat already in flight is parked in
// the skid register and s_tready drops one clock later. Beats are delivered
// in order, none lost or duplicated. Latency is one clock.
// The statistics unit registers its pixel input like this; the two-entry
// skid structure is this design's choice.
module axis_reg_slice #(
  parameter int DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] s_tdata,
  input  logic              s_tvalid,
  output logic              s_tready,
  output logic [DATA_W-1:0] m_tdata,
  output logic              m_tvalid,
  input  logic              m_tready
);
  logic [DATA_W-1:0] skid_data;
  logic              skid_valid;

  assign s_tready = !skid_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_tvalid   <= 1'b0;
      m_tdata    <= '0;
      skid_valid <= 1'b0;
      skid_data  <= '0;
    end else begin
      if (!m_tvalid || m_tready) begin
        // output register free: take the parked beat first, else the input
        if (skid_valid) begin
          m_tdata    <= skid_data;
          m_tvalid   <= 1'b1;
          skid_valid <= 1'b0;
        end else begin
          m_tdata  <= s_tdata;
          m_tvalid <= s_tvalid;
        end
      end else if (s_tvalid && s_tready) begin
        // output stalled: park the incoming beat
        skid_data  <= s_tdata;
        skid_valid <= 1'b1;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata));
endmodule
