// tb_hls_ctrl_axil: drives the AXI4-Lite control bank as the processor
// would: argument registers (full and byte-masked writes, read back), the
// start bit and its clearing by ap_ready, the clear-on-read done bit, idle,
// auto-restart, and the interrupt path (GIE, IER, ISR with toggle-on-write).
// Random stalls on BREADY/RREADY exercise the response-hold rule.
module tb_hls_ctrl_axil;
  import accel_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic        irq, ap_start, ap_done = 0, ap_idle = 1, ap_ready = 0;
  logic [2:0][31:0] args;
  int checks = 0, failures = 0;

  hls_ctrl_axil #(.NARGS(3)) dut (
    .clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .irq, .ap_start, .ap_done, .ap_idle, .ap_ready, .args);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wr(input logic [7:0] ad, input logic [31:0] d, input logic [3:0] s = 4'hF);
    @(negedge clk);
    awaddr = ad; awvalid = 1; wdata = d; wstrb = s; wvalid = 1; bready = 0;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    repeat ($urandom % 3) @(negedge clk);          // hold off the response
    bready = 1;
    while (!bvalid) @(negedge clk);
    @(posedge clk);
    @(negedge clk);
    bready = 0;
  endtask

  task automatic rd(input logic [7:0] ad, output logic [31:0] d);
    @(negedge clk);
    araddr = ad; arvalid = 1; rready = 0;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 0;
    repeat ($urandom % 3) @(negedge clk);
    rready = 1;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(posedge clk);
    @(negedge clk);
    rready = 0;
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1;
    @(negedge clk); s = 0;
  endtask

  initial begin
    logic [31:0] d;
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // arguments
    wr(8'h10, 32'hDEAD_BEEF);
    wr(8'h14, 32'h1234_5678);
    wr(8'h18, 32'hFFFF_FFFF);
    wr(8'h18, 32'h0000_AB00, 4'b0010);               // byte 1 only
    expect_eq("arg0", args[0], 32'hDEAD_BEEF);
    expect_eq("arg1", args[1], 32'h1234_5678);
    expect_eq("arg2 strobe", args[2], 32'hFFFF_ABFF);
    rd(8'h14, d); expect_eq("arg1 read", d, 32'h1234_5678);
    rd(8'h00, d); expect_eq("ctrl idle", d, 32'h4);

    // start, then ready clears it
    wr(8'h00, 32'h1);
    expect_eq("ap_start set", ap_start, 1);
    ap_idle = 0;
    rd(8'h00, d); expect_eq("ctrl running", d, 32'h1);
    pulse(ap_ready);
    @(negedge clk);
    expect_eq("ap_start cleared by ready", ap_start, 0);
    // done is sticky until read
    pulse(ap_done);
    ap_idle = 1;
    rd(8'h00, d); expect_eq("ctrl done+ready+idle", d, 32'hE);
    rd(8'h00, d); expect_eq("done cleared on read", d, 32'h4);

    // interrupts
    wr(8'h04, 32'h1);
    wr(8'h08, 32'h1);
    expect_eq("no irq yet", irq, 0);
    pulse(ap_done);
    @(negedge clk);
    expect_eq("irq on done", irq, 1);
    rd(8'h0C, d); expect_eq("isr", d, 32'h1);
    wr(8'h0C, 32'h1);                                // toggle clears
    expect_eq("irq cleared", irq, 0);
    pulse(ap_ready);                                 // ready irq disabled
    @(negedge clk);
    expect_eq("ready irq masked", irq, 0);

    // auto restart keeps ap_start across ready
    wr(8'h00, 32'h81);
    pulse(ap_ready);
    @(negedge clk);
    expect_eq("auto restart", ap_start, 1);
    wr(8'h00, 32'h00);
    pulse(ap_ready);
    @(negedge clk);
    expect_eq("auto restart off", ap_start, 0);
    expect_eq("resp okay", {28'd0, bresp, rresp}, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
