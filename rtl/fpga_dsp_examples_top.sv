// Three independent streaming DSP units for beam-instrumentation data
// acquisition, placed side by side on one clock and reset:
//   lin_*  polynomial linearization of an 8-lane, 128-bit ADC sample stream
//          (AXI4-Stream in and out, bypass control), latency 6, interval 1
//   st_*   mean and standard deviation in X and Y of a 512 x 512 image,
//          4 pixels per beat (AXI4-Stream in), results on AXI4-Lite and as
//          plain outputs with a per-frame valid pulse
//   iir_*  second-order IIR filter, one 18-bit sample per clock, latency 4,
//          coefficients as inputs
// The units share nothing but clk and rst_n (active-low, synchronous). All
// sizes are the default parameters of the individual modules.
module fpga_dsp_examples_top (
  input  logic         clk,
  input  logic         rst_n,
  // linearization
  input  logic         lin_bypass,
  input  logic [127:0] lin_s_tdata,
  input  logic         lin_s_tvalid,
  output logic         lin_s_tready,
  input  logic         lin_s_tlast,
  output logic [127:0] lin_m_tdata,
  output logic         lin_m_tvalid,
  input  logic         lin_m_tready,
  output logic         lin_m_tlast,
  // two-dimensional statistics
  input  logic [31:0]  st_s_tdata,
  input  logic         st_s_tvalid,
  output logic         st_s_tready,
  input  logic [4:0]   st_axil_awaddr,
  input  logic         st_axil_awvalid,
  output logic         st_axil_awready,
  input  logic [31:0]  st_axil_wdata,
  input  logic [3:0]   st_axil_wstrb,
  input  logic         st_axil_wvalid,
  output logic         st_axil_wready,
  output logic [1:0]   st_axil_bresp,
  output logic         st_axil_bvalid,
  input  logic         st_axil_bready,
  input  logic [4:0]   st_axil_araddr,
  input  logic         st_axil_arvalid,
  output logic         st_axil_arready,
  output logic [31:0]  st_axil_rdata,
  output logic [1:0]   st_axil_rresp,
  output logic         st_axil_rvalid,
  input  logic         st_axil_rready,
  output logic [15:0]  st_meanx,
  output logic [15:0]  st_stdx,
  output logic [15:0]  st_meany,
  output logic [15:0]  st_stdy,
  output logic         st_result_valid,
  output logic [31:0]  st_frame_cnt,
  // IIR filter
  input  logic [17:0]  iir_coeff_b0,
  input  logic [17:0]  iir_coeff_b1,
  input  logic [17:0]  iir_coeff_b2,
  input  logic [17:0]  iir_coeff_a1,
  input  logic [17:0]  iir_coeff_a2,
  input  logic [17:0]  iir_data_in,
  input  logic         iir_data_in_vld,
  output logic [17:0]  iir_data_out,
  output logic         iir_data_out_vld
);
  linearization u_lin (
    .clk      (clk),
    .rst_n    (rst_n),
    .bypass   (lin_bypass),
    .s_tdata  (lin_s_tdata),
    .s_tvalid (lin_s_tvalid),
    .s_tready (lin_s_tready),
    .s_tlast  (lin_s_tlast),
    .m_tdata  (lin_m_tdata),
    .m_tvalid (lin_m_tvalid),
    .m_tready (lin_m_tready),
    .m_tlast  (lin_m_tlast)
  );

  two_dim_stdev u_stats (
    .clk            (clk),
    .rst_n          (rst_n),
    .s_tdata        (st_s_tdata),
    .s_tvalid       (st_s_tvalid),
    .s_tready       (st_s_tready),
    .s_axil_awaddr  (st_axil_awaddr),
    .s_axil_awvalid (st_axil_awvalid),
    .s_axil_awready (st_axil_awready),
    .s_axil_wdata   (st_axil_wdata),
    .s_axil_wstrb   (st_axil_wstrb),
    .s_axil_wvalid  (st_axil_wvalid),
    .s_axil_wready  (st_axil_wready),
    .s_axil_bresp   (st_axil_bresp),
    .s_axil_bvalid  (st_axil_bvalid),
    .s_axil_bready  (st_axil_bready),
    .s_axil_araddr  (st_axil_araddr),
    .s_axil_arvalid (st_axil_arvalid),
    .s_axil_arready (st_axil_arready),
    .s_axil_rdata   (st_axil_rdata),
    .s_axil_rresp   (st_axil_rresp),
    .s_axil_rvalid  (st_axil_rvalid),
    .s_axil_rready  (st_axil_rready),
    .meanx          (st_meanx),
    .stdx           (st_stdx),
    .meany          (st_meany),
    .stdy           (st_stdy),
    .result_valid   (st_result_valid),
    .frame_cnt      (st_frame_cnt)
  );

  biquad_iir u_iir (
    .clk          (clk),
    .rst_n        (rst_n),
    .coeff_b0     (iir_coeff_b0),
    .coeff_b1     (iir_coeff_b1),
    .coeff_b2     (iir_coeff_b2),
    .coeff_a1     (iir_coeff_a1),
    .coeff_a2     (iir_coeff_a2),
    .data_in      (iir_data_in),
    .data_in_vld  (iir_data_in_vld),
    .data_out     (iir_data_out),
    .data_out_vld (iir_data_out_vld)
  );
endmodule
