// guidance_accel_top: programmable-logic side of the onboard guidance
// accelerators, the three IP cores that take over the two most expensive
// routines of the interior-point solver running on the processor.
//
//  - u_kkt  (kkt_factor):   sparse LDL^T numeric factorization of the KKT
//                           matrix, IEEE double;
//  - u_smv  (sparsemv_fp):  sparse matrix-vector product, IEEE double;
//  - u_smvx (sparsemv_fix): the same product in fixed point (first design,
//                           39/78-bit types), casts done inside the core.
// The cores are independent and stand side by side. Each has an AXI4-Lite
// control port, which the processor system reaches through its
// general-purpose master port and an AXI interconnect, and AXI4-Stream ports
// that connect to AXI DMA engines (simple mode) on the processor's
// high-performance ports. The processor system, the DMA engines, the
// interconnect and the cycle-count timer are vendor blocks outside this
// module; their sides of the connections are the ports below, prefixed kkt_,
// smv_ and smvx_. One clock (100 MHz in the document) and one active-low
// reset serve all three cores.
// The document builds one system per core on the board; placing the three
// in one top is this design's way of keeping them in a single netlist.
module guidance_accel_top (
  input  logic         clk,
  input  logic         rst_n,
  // factorization core (kkt_factor): AXI4-Lite control (from the PS general-purpose port),
  // AXI4-Stream to and from its AXI DMA
  input  logic [7:0]   kkt_s_axi_awaddr,
  input  logic         kkt_s_axi_awvalid,
  output logic         kkt_s_axi_awready,
  input  logic [31:0]  kkt_s_axi_wdata,
  input  logic [3:0]   kkt_s_axi_wstrb,
  input  logic         kkt_s_axi_wvalid,
  output logic         kkt_s_axi_wready,
  output logic [1:0]   kkt_s_axi_bresp,
  output logic         kkt_s_axi_bvalid,
  input  logic         kkt_s_axi_bready,
  input  logic [7:0]   kkt_s_axi_araddr,
  input  logic         kkt_s_axi_arvalid,
  output logic         kkt_s_axi_arready,
  output logic [31:0]  kkt_s_axi_rdata,
  output logic [1:0]   kkt_s_axi_rresp,
  output logic         kkt_s_axi_rvalid,
  input  logic         kkt_s_axi_rready,
  output logic         kkt_irq,
  input  logic [31:0]  kkt_s_axis_int_tdata,
  input  logic         kkt_s_axis_int_tvalid,
  output logic         kkt_s_axis_int_tready,
  input  logic         kkt_s_axis_int_tlast,
  input  logic [63:0]  kkt_s_axis_dbl_tdata,
  input  logic         kkt_s_axis_dbl_tvalid,
  output logic         kkt_s_axis_dbl_tready,
  input  logic         kkt_s_axis_dbl_tlast,
  output logic [31:0]  kkt_m_axis_int_tdata,
  output logic         kkt_m_axis_int_tvalid,
  input  logic         kkt_m_axis_int_tready,
  output logic         kkt_m_axis_int_tlast,
  output logic [63:0]  kkt_m_axis_dbl_tdata,
  output logic         kkt_m_axis_dbl_tvalid,
  input  logic         kkt_m_axis_dbl_tready,
  output logic         kkt_m_axis_dbl_tlast,
  // floating-point sparseMV core: AXI4-Lite control (from the PS general-purpose port),
  // AXI4-Stream to and from its AXI DMA
  input  logic [7:0]   smv_s_axi_awaddr,
  input  logic         smv_s_axi_awvalid,
  output logic         smv_s_axi_awready,
  input  logic [31:0]  smv_s_axi_wdata,
  input  logic [3:0]   smv_s_axi_wstrb,
  input  logic         smv_s_axi_wvalid,
  output logic         smv_s_axi_wready,
  output logic [1:0]   smv_s_axi_bresp,
  output logic         smv_s_axi_bvalid,
  input  logic         smv_s_axi_bready,
  input  logic [7:0]   smv_s_axi_araddr,
  input  logic         smv_s_axi_arvalid,
  output logic         smv_s_axi_arready,
  output logic [31:0]  smv_s_axi_rdata,
  output logic [1:0]   smv_s_axi_rresp,
  output logic         smv_s_axi_rvalid,
  input  logic         smv_s_axi_rready,
  output logic         smv_irq,
  input  logic [31:0]  smv_s_axis_int_tdata,
  input  logic         smv_s_axis_int_tvalid,
  output logic         smv_s_axis_int_tready,
  input  logic         smv_s_axis_int_tlast,
  input  logic [63:0]  smv_s_axis_dbl_tdata,
  input  logic         smv_s_axis_dbl_tvalid,
  output logic         smv_s_axis_dbl_tready,
  input  logic         smv_s_axis_dbl_tlast,
  output logic [63:0]  smv_m_axis_dbl_tdata,
  output logic         smv_m_axis_dbl_tvalid,
  input  logic         smv_m_axis_dbl_tready,
  output logic         smv_m_axis_dbl_tlast,
  // fixed-point sparseMV core: AXI4-Lite control (from the PS general-purpose port),
  // AXI4-Stream to and from its AXI DMA
  input  logic [7:0]   smvx_s_axi_awaddr,
  input  logic         smvx_s_axi_awvalid,
  output logic         smvx_s_axi_awready,
  input  logic [31:0]  smvx_s_axi_wdata,
  input  logic [3:0]   smvx_s_axi_wstrb,
  input  logic         smvx_s_axi_wvalid,
  output logic         smvx_s_axi_wready,
  output logic [1:0]   smvx_s_axi_bresp,
  output logic         smvx_s_axi_bvalid,
  input  logic         smvx_s_axi_bready,
  input  logic [7:0]   smvx_s_axi_araddr,
  input  logic         smvx_s_axi_arvalid,
  output logic         smvx_s_axi_arready,
  output logic [31:0]  smvx_s_axi_rdata,
  output logic [1:0]   smvx_s_axi_rresp,
  output logic         smvx_s_axi_rvalid,
  input  logic         smvx_s_axi_rready,
  output logic         smvx_irq,
  input  logic [31:0]  smvx_s_axis_int_tdata,
  input  logic         smvx_s_axis_int_tvalid,
  output logic         smvx_s_axis_int_tready,
  input  logic         smvx_s_axis_int_tlast,
  input  logic [63:0]  smvx_s_axis_dbl_tdata,
  input  logic         smvx_s_axis_dbl_tvalid,
  output logic         smvx_s_axis_dbl_tready,
  input  logic         smvx_s_axis_dbl_tlast,
  output logic [63:0]  smvx_m_axis_dbl_tdata,
  output logic         smvx_m_axis_dbl_tvalid,
  input  logic         smvx_m_axis_dbl_tready,
  output logic         smvx_m_axis_dbl_tlast
);

  kkt_factor u_kkt (
    .clk, .rst_n,
    .s_axi_awaddr(kkt_s_axi_awaddr),
    .s_axi_awvalid(kkt_s_axi_awvalid),
    .s_axi_awready(kkt_s_axi_awready),
    .s_axi_wdata(kkt_s_axi_wdata),
    .s_axi_wstrb(kkt_s_axi_wstrb),
    .s_axi_wvalid(kkt_s_axi_wvalid),
    .s_axi_wready(kkt_s_axi_wready),
    .s_axi_bresp(kkt_s_axi_bresp),
    .s_axi_bvalid(kkt_s_axi_bvalid),
    .s_axi_bready(kkt_s_axi_bready),
    .s_axi_araddr(kkt_s_axi_araddr),
    .s_axi_arvalid(kkt_s_axi_arvalid),
    .s_axi_arready(kkt_s_axi_arready),
    .s_axi_rdata(kkt_s_axi_rdata),
    .s_axi_rresp(kkt_s_axi_rresp),
    .s_axi_rvalid(kkt_s_axi_rvalid),
    .s_axi_rready(kkt_s_axi_rready),
    .irq(kkt_irq),
    .s_axis_int_tdata(kkt_s_axis_int_tdata),
    .s_axis_int_tvalid(kkt_s_axis_int_tvalid),
    .s_axis_int_tready(kkt_s_axis_int_tready),
    .s_axis_int_tlast(kkt_s_axis_int_tlast),
    .s_axis_dbl_tdata(kkt_s_axis_dbl_tdata),
    .s_axis_dbl_tvalid(kkt_s_axis_dbl_tvalid),
    .s_axis_dbl_tready(kkt_s_axis_dbl_tready),
    .s_axis_dbl_tlast(kkt_s_axis_dbl_tlast),
    .m_axis_int_tdata(kkt_m_axis_int_tdata),
    .m_axis_int_tvalid(kkt_m_axis_int_tvalid),
    .m_axis_int_tready(kkt_m_axis_int_tready),
    .m_axis_int_tlast(kkt_m_axis_int_tlast),
    .m_axis_dbl_tdata(kkt_m_axis_dbl_tdata),
    .m_axis_dbl_tvalid(kkt_m_axis_dbl_tvalid),
    .m_axis_dbl_tready(kkt_m_axis_dbl_tready),
    .m_axis_dbl_tlast(kkt_m_axis_dbl_tlast)
  );

  sparsemv_fp u_smv (
    .clk, .rst_n,
    .s_axi_awaddr(smv_s_axi_awaddr),
    .s_axi_awvalid(smv_s_axi_awvalid),
    .s_axi_awready(smv_s_axi_awready),
    .s_axi_wdata(smv_s_axi_wdata),
    .s_axi_wstrb(smv_s_axi_wstrb),
    .s_axi_wvalid(smv_s_axi_wvalid),
    .s_axi_wready(smv_s_axi_wready),
    .s_axi_bresp(smv_s_axi_bresp),
    .s_axi_bvalid(smv_s_axi_bvalid),
    .s_axi_bready(smv_s_axi_bready),
    .s_axi_araddr(smv_s_axi_araddr),
    .s_axi_arvalid(smv_s_axi_arvalid),
    .s_axi_arready(smv_s_axi_arready),
    .s_axi_rdata(smv_s_axi_rdata),
    .s_axi_rresp(smv_s_axi_rresp),
    .s_axi_rvalid(smv_s_axi_rvalid),
    .s_axi_rready(smv_s_axi_rready),
    .irq(smv_irq),
    .s_axis_int_tdata(smv_s_axis_int_tdata),
    .s_axis_int_tvalid(smv_s_axis_int_tvalid),
    .s_axis_int_tready(smv_s_axis_int_tready),
    .s_axis_int_tlast(smv_s_axis_int_tlast),
    .s_axis_dbl_tdata(smv_s_axis_dbl_tdata),
    .s_axis_dbl_tvalid(smv_s_axis_dbl_tvalid),
    .s_axis_dbl_tready(smv_s_axis_dbl_tready),
    .s_axis_dbl_tlast(smv_s_axis_dbl_tlast),
    .m_axis_dbl_tdata(smv_m_axis_dbl_tdata),
    .m_axis_dbl_tvalid(smv_m_axis_dbl_tvalid),
    .m_axis_dbl_tready(smv_m_axis_dbl_tready),
    .m_axis_dbl_tlast(smv_m_axis_dbl_tlast)
  );

  sparsemv_fix u_smvx (
    .clk, .rst_n,
    .s_axi_awaddr(smvx_s_axi_awaddr),
    .s_axi_awvalid(smvx_s_axi_awvalid),
    .s_axi_awready(smvx_s_axi_awready),
    .s_axi_wdata(smvx_s_axi_wdata),
    .s_axi_wstrb(smvx_s_axi_wstrb),
    .s_axi_wvalid(smvx_s_axi_wvalid),
    .s_axi_wready(smvx_s_axi_wready),
    .s_axi_bresp(smvx_s_axi_bresp),
    .s_axi_bvalid(smvx_s_axi_bvalid),
    .s_axi_bready(smvx_s_axi_bready),
    .s_axi_araddr(smvx_s_axi_araddr),
    .s_axi_arvalid(smvx_s_axi_arvalid),
    .s_axi_arready(smvx_s_axi_arready),
    .s_axi_rdata(smvx_s_axi_rdata),
    .s_axi_rresp(smvx_s_axi_rresp),
    .s_axi_rvalid(smvx_s_axi_rvalid),
    .s_axi_rready(smvx_s_axi_rready),
    .irq(smvx_irq),
    .s_axis_int_tdata(smvx_s_axis_int_tdata),
    .s_axis_int_tvalid(smvx_s_axis_int_tvalid),
    .s_axis_int_tready(smvx_s_axis_int_tready),
    .s_axis_int_tlast(smvx_s_axis_int_tlast),
    .s_axis_dbl_tdata(smvx_s_axis_dbl_tdata),
    .s_axis_dbl_tvalid(smvx_s_axis_dbl_tvalid),
    .s_axis_dbl_tready(smvx_s_axis_dbl_tready),
    .s_axis_dbl_tlast(smvx_s_axis_dbl_tlast),
    .m_axis_dbl_tdata(smvx_m_axis_dbl_tdata),
    .m_axis_dbl_tvalid(smvx_m_axis_dbl_tvalid),
    .m_axis_dbl_tready(smvx_m_axis_dbl_tready),
    .m_axis_dbl_tlast(smvx_m_axis_dbl_tlast)
  );

endmodule
