// tb_sparsemv_fix_wide: end-to-end test of the fixed-point sparseMV core in
// its second, more precise configuration: inputs 55 bits with 5 integer bits
// (about 8.9e-16), y 110 bits with 10 integer bits (about 7.9e-31). Random
// sparse matrices in compressed-column form (including empty columns and
// rows) are streamed in with the processor-side tasks, the four modes of the
// operation (y = Ax, y += Ax, y = -Ax, y -= Ax) are run, and y is compared
// bit for bit with an independent fixed-point model on wide integers. Also
// checked: TLAST on the last y word, the ap_done bit, and that with no gaps
// or stalls every stream moves one word per cycle.
module tb_sparsemv_fix_wide;
  import accel_pkg::*;

  logic clk = 0, rst_n = 0;
  int   cyc = 0;
  logic [7:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic        irq;
  logic [31:0] si_tdata;  logic si_tvalid, si_tready, si_tlast;
  logic [63:0] sd_tdata;  logic sd_tvalid, sd_tready, sd_tlast;
  logic [31:0] mi_tdata;  logic mi_tvalid, mi_tready, mi_tlast;   // unused by this core
  logic [63:0] md_tdata;  logic md_tvalid, md_tready, md_tlast;
  int checks = 0, failures = 0;

  sparsemv_fix #(.W_IN(55), .I_IN(5), .W_OUT(110), .I_OUT(10)) dut (
    .clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .irq,
    .s_axis_int_tdata(si_tdata), .s_axis_int_tvalid(si_tvalid),
    .s_axis_int_tready(si_tready), .s_axis_int_tlast(si_tlast),
    .s_axis_dbl_tdata(sd_tdata), .s_axis_dbl_tvalid(sd_tvalid),
    .s_axis_dbl_tready(sd_tready), .s_axis_dbl_tlast(sd_tlast),
    .m_axis_dbl_tdata(md_tdata), .m_axis_dbl_tvalid(md_tvalid),
    .m_axis_dbl_tready(md_tready), .m_axis_dbl_tlast(md_tlast));

  assign mi_tdata = '0; assign mi_tvalid = 1'b0; assign mi_tlast = 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "tb_axi_tasks.svh"

  task automatic expect_eq(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // double -> input type (floor, |v| < 16 so no wrap), as a 110-bit integer
  function automatic logic signed [109:0] fin(input real v);
    return 110'($signed(longint'($floor(v * (2.0 ** 50)))));
  endfunction

  // 110-bit integer with 100 fractional bits -> nearest double
  function automatic real fout(input logic signed [109:0] sx);
    logic [109:0] mag, lo;
    int p, k;
    real h, l, r;
    mag = sx[109] ? 110'(-sx) : 110'(sx);
    p = -1;
    for (int i = 0; i < 110; i++) if (mag[i]) p = i;
    k  = (p > 52) ? p - 52 : 0;
    h  = real'(longint'(64'(mag >> k)));
    lo = mag & ((110'd1 << k) - 110'd1);
    l  = real'(longint'(64'(lo)));
    r  = (h * (2.0 ** k) + l) * (2.0 ** -100);
    return sx[109] ? -r : r;
  endfunction

  function automatic real rnd_val();
    return (real'($urandom % 2000001) - 1000000.0) / 250000.0;   // [-4, 4]
  endfunction

  // one call of the core on an m-by-n random matrix
  task automatic run(input int n, input int m, input int a, input int newv,
                     input int gap, input int stall);
    int ap[$], ai[$];
    real ax[$], x[$], y0[$];
    logic signed [109:0] y[$], pr;
    logic [31:0] iq[$];
    logic [63:0] dq[$], yq[$];
    logic [31:0] st;
    int lastpos, nnz;
    ap.push_back(0);
    for (int j = 0; j < n; j++) begin
      int c = (j % 5 == 3) ? 0 : int'($urandom % 4);
      for (int e = 0; e < c; e++) begin
        ai.push_back(int'($urandom % m));
        ax.push_back(rnd_val());
      end
      ap.push_back(ai.size());
    end
    nnz = ai.size();
    for (int j = 0; j < n; j++) x.push_back(rnd_val());
    for (int r = 0; r < m; r++) y0.push_back(rnd_val());
    // reference, same operation order as the core
    foreach (y0[r]) y.push_back((newv > 0) ? 110'sd0 : (fin(y0[r]) <<< 50));
    for (int j = 0; j < n; j++)
      for (int p = ap[j]; p < ap[j+1]; p++) begin
        pr = fin(ax[p]) * fin(x[j]);
        if (a > 0) y[ai[p]] = y[ai[p]] + pr;
        else       y[ai[p]] = y[ai[p]] - pr;
      end
    // pack the streams
    iq = {32'(n), 32'(m), 32'(nnz)};
    foreach (ap[k]) iq.push_back(32'(ap[k]));
    foreach (ai[k]) iq.push_back(32'(ai[k]));
    foreach (ax[k]) dq.push_back($realtobits(ax[k]));
    foreach (x[k])  dq.push_back($realtobits(x[k]));
    foreach (y0[k]) dq.push_back($realtobits(y0[k]));
    axil_wr(8'h10, 32'(a));
    axil_wr(8'h14, 32'(newv));
    axil_wr(8'h00, 32'h1);
    fork
      send_int(iq, gap);
      send_dbl(dq, gap);
      recv_dbl(yq, stall, lastpos);
    join
    expect_eq("y length", yq.size(), m);
    expect_eq("tlast on last word", lastpos, m - 1);
    for (int r = 0; r < m && r < yq.size(); r++)
      expect_eq($sformatf("y[%0d]", r), yq[r], $realtobits(fout(y[r])));
    if (gap == 0) begin
      expect_eq("int stream one word per cycle", si_last_cyc - si_first, iq.size() - 1);
      expect_eq("dbl stream one word per cycle", sd_last_cyc - sd_first, dq.size() - 1);
    end
    if (stall == 0)
      expect_eq("y stream one word per cycle", md_last_cyc - md_first, m - 1);
    repeat (3) @(negedge clk);
    axil_rd(8'h00, st);
    expect_eq("ap_done and idle", {60'd0, st[3:0] & 4'b0110}, 4'b0110);
  endtask

  initial begin
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0;
    si_tvalid = 0; si_tlast = 0; si_tdata = 0;
    sd_tvalid = 0; sd_tlast = 0; sd_tdata = 0;
    md_tready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(10, 12,  1, 1, 0, 0);
    run(10, 12,  1, 0, 30, 30);
    run(17,  9, -1, 1, 0, 50);
    run(17,  9, -1, 0, 20, 0);
    run(40, 30,  1, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
