// AXI4-Lite slave holding the results of the two-dimensional statistics
// module for a processor to read. Register map (32-bit words, this design's
// choice):
//   0x00 meanx   0x04 stdx   0x08 meany   0x0C stdy   0x10 frame counter
// Other addresses read as 0. Writes are accepted with an OKAY response and
// ignored, since every register is a result. One read and one write are
// handled at a time: AR is taken when no read response is pending and the
// data answer follows one clock later; AW and W are taken together.
module stats_axil_regs #(
  parameter int ADDR_W = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  // write address / data / response
  input  logic [ADDR_W-1:0] s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  // read address / data
  input  logic [ADDR_W-1:0] s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  // register contents
  input  logic [31:0]       meanx,
  input  logic [31:0]       stdx,
  input  logic [31:0]       meany,
  input  logic [31:0]       stdy,
  input  logic [31:0]       frame_cnt
);
  logic [31:0] rd_word;

  always_comb begin
    unique case (s_axil_araddr[ADDR_W-1:2])
      (ADDR_W-2)'(0): rd_word = meanx;
      (ADDR_W-2)'(1): rd_word = stdx;
      (ADDR_W-2)'(2): rd_word = meany;
      (ADDR_W-2)'(3): rd_word = stdy;
      (ADDR_W-2)'(4): rd_word = frame_cnt;
      default:        rd_word = '0;
    endcase
  end

  assign s_axil_arready = !s_axil_rvalid;
  assign s_axil_awready = !s_axil_bvalid && s_axil_wvalid;
  assign s_axil_wready  = !s_axil_bvalid && s_axil_awvalid;
  assign s_axil_rresp   = 2'b00;
  assign s_axil_bresp   = 2'b00;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
      s_axil_bvalid <= 1'b0;
    end else begin
      if (s_axil_arvalid && s_axil_arready) begin
        s_axil_rvalid <= 1'b1;
        s_axil_rdata  <= rd_word;
      end else if (s_axil_rready) begin
        s_axil_rvalid <= 1'b0;
      end
      if (s_axil_awvalid && s_axil_awready) begin
        s_axil_bvalid <= 1'b1;
      end else if (s_axil_bready) begin
        s_axil_bvalid <= 1'b0;
      end
    end
  end

  // AXI rule: a response stays valid, with its data, until it is taken.
  a_rhold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata));
  a_bhold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid);
endmodule
