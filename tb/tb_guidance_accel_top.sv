// tb_guidance_accel_top: end-to-end and full-size test of the accelerator
// top with every parameter at its default. The testbench plays the
// processor and the DMA engines: one set of bus signals is routed to the
// core selected by sel, and the three cores are run in turn on workloads
// that fill their buffers exactly, the size of the reduced 5-node problem:
//  - kkt_factor: n = 1006, nnz + lnz = 2841, i.e. 9886 integer and 4853
//    double words in, 9887 and 4853 out, with input gaps and output stalls,
//    the done interrupt, and tiny pivots that trigger regularization;
//  - sparsemv_fp and sparsemv_fix: m = 76, n = 200, nnz = 601, i.e. 805
//    integer and 877 double words in, 76 out, in all four modes (y = Ax,
//    y += Ax, y = -Ax, y -= Ax), with one fixed-point input that wraps.
// Every output word is compared bit for bit with a reference computed here
// (software LDL^T and sparse products in IEEE double, an independent
// fixed-point model). Each mechanism (input gap, output stall, TLAST,
// regularization, interrupt, clear/accumulate, add/subtract, fixed-point
// wrap) is counted, and one that never happened counts as a failure.
module tb_guidance_accel_top;
  import accel_pkg::*;

  logic clk = 0, rst_n = 0;
  int   cyc = 0;
  int   sel = 0;
  logic [7:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic        irq, irq_seen;
  logic [31:0] si_tdata;  logic si_tvalid, si_tready, si_tlast;
  logic [63:0] sd_tdata;  logic sd_tvalid, sd_tready, sd_tlast;
  logic [31:0] mi_tdata;  logic mi_tvalid, mi_tready, mi_tlast;
  logic [63:0] md_tdata;  logic md_tvalid, md_tready, md_tlast;
  int checks = 0, failures = 0;
  int regularized = 0, wraps = 0, n_new = 0, n_acc = 0, n_add = 0, n_sub = 0;
  int n_gap = 0, n_stall = 0, n_tlast = 0, kkt_cycles = 0, smv_start = 0;

  logic [7:0]  kkt_s_axi_awaddr, kkt_s_axi_araddr;
  logic [31:0] kkt_s_axi_wdata, kkt_s_axi_rdata;
  logic [3:0]  kkt_s_axi_wstrb;
  logic [1:0]  kkt_s_axi_bresp, kkt_s_axi_rresp;
  logic kkt_s_axi_awvalid, kkt_s_axi_awready, kkt_s_axi_wvalid, kkt_s_axi_wready, kkt_s_axi_bvalid,
        kkt_s_axi_bready, kkt_s_axi_arvalid, kkt_s_axi_arready, kkt_s_axi_rvalid, kkt_s_axi_rready, kkt_irq;
  logic [31:0] kkt_s_axis_int_tdata;  logic kkt_s_axis_int_tvalid, kkt_s_axis_int_tready, kkt_s_axis_int_tlast;
  logic [63:0] kkt_s_axis_dbl_tdata;  logic kkt_s_axis_dbl_tvalid, kkt_s_axis_dbl_tready, kkt_s_axis_dbl_tlast;
  logic [63:0] kkt_m_axis_dbl_tdata;  logic kkt_m_axis_dbl_tvalid, kkt_m_axis_dbl_tready, kkt_m_axis_dbl_tlast;
  logic [31:0] kkt_m_axis_int_tdata;  logic kkt_m_axis_int_tvalid, kkt_m_axis_int_tready, kkt_m_axis_int_tlast;
  logic [7:0]  smv_s_axi_awaddr, smv_s_axi_araddr;
  logic [31:0] smv_s_axi_wdata, smv_s_axi_rdata;
  logic [3:0]  smv_s_axi_wstrb;
  logic [1:0]  smv_s_axi_bresp, smv_s_axi_rresp;
  logic smv_s_axi_awvalid, smv_s_axi_awready, smv_s_axi_wvalid, smv_s_axi_wready, smv_s_axi_bvalid,
        smv_s_axi_bready, smv_s_axi_arvalid, smv_s_axi_arready, smv_s_axi_rvalid, smv_s_axi_rready, smv_irq;
  logic [31:0] smv_s_axis_int_tdata;  logic smv_s_axis_int_tvalid, smv_s_axis_int_tready, smv_s_axis_int_tlast;
  logic [63:0] smv_s_axis_dbl_tdata;  logic smv_s_axis_dbl_tvalid, smv_s_axis_dbl_tready, smv_s_axis_dbl_tlast;
  logic [63:0] smv_m_axis_dbl_tdata;  logic smv_m_axis_dbl_tvalid, smv_m_axis_dbl_tready, smv_m_axis_dbl_tlast;
  logic [7:0]  smvx_s_axi_awaddr, smvx_s_axi_araddr;
  logic [31:0] smvx_s_axi_wdata, smvx_s_axi_rdata;
  logic [3:0]  smvx_s_axi_wstrb;
  logic [1:0]  smvx_s_axi_bresp, smvx_s_axi_rresp;
  logic smvx_s_axi_awvalid, smvx_s_axi_awready, smvx_s_axi_wvalid, smvx_s_axi_wready, smvx_s_axi_bvalid,
        smvx_s_axi_bready, smvx_s_axi_arvalid, smvx_s_axi_arready, smvx_s_axi_rvalid, smvx_s_axi_rready, smvx_irq;
  logic [31:0] smvx_s_axis_int_tdata;  logic smvx_s_axis_int_tvalid, smvx_s_axis_int_tready, smvx_s_axis_int_tlast;
  logic [63:0] smvx_s_axis_dbl_tdata;  logic smvx_s_axis_dbl_tvalid, smvx_s_axis_dbl_tready, smvx_s_axis_dbl_tlast;
  logic [63:0] smvx_m_axis_dbl_tdata;  logic smvx_m_axis_dbl_tvalid, smvx_m_axis_dbl_tready, smvx_m_axis_dbl_tlast;

  guidance_accel_top dut (
    .clk(clk),
    .rst_n(rst_n),
    .kkt_s_axi_awaddr(kkt_s_axi_awaddr),
    .kkt_s_axi_awvalid(kkt_s_axi_awvalid),
    .kkt_s_axi_awready(kkt_s_axi_awready),
    .kkt_s_axi_wdata(kkt_s_axi_wdata),
    .kkt_s_axi_wstrb(kkt_s_axi_wstrb),
    .kkt_s_axi_wvalid(kkt_s_axi_wvalid),
    .kkt_s_axi_wready(kkt_s_axi_wready),
    .kkt_s_axi_bresp(kkt_s_axi_bresp),
    .kkt_s_axi_bvalid(kkt_s_axi_bvalid),
    .kkt_s_axi_bready(kkt_s_axi_bready),
    .kkt_s_axi_araddr(kkt_s_axi_araddr),
    .kkt_s_axi_arvalid(kkt_s_axi_arvalid),
    .kkt_s_axi_arready(kkt_s_axi_arready),
    .kkt_s_axi_rdata(kkt_s_axi_rdata),
    .kkt_s_axi_rresp(kkt_s_axi_rresp),
    .kkt_s_axi_rvalid(kkt_s_axi_rvalid),
    .kkt_s_axi_rready(kkt_s_axi_rready),
    .kkt_irq(kkt_irq),
    .kkt_s_axis_int_tdata(kkt_s_axis_int_tdata),
    .kkt_s_axis_int_tvalid(kkt_s_axis_int_tvalid),
    .kkt_s_axis_int_tready(kkt_s_axis_int_tready),
    .kkt_s_axis_int_tlast(kkt_s_axis_int_tlast),
    .kkt_s_axis_dbl_tdata(kkt_s_axis_dbl_tdata),
    .kkt_s_axis_dbl_tvalid(kkt_s_axis_dbl_tvalid),
    .kkt_s_axis_dbl_tready(kkt_s_axis_dbl_tready),
    .kkt_s_axis_dbl_tlast(kkt_s_axis_dbl_tlast),
    .kkt_m_axis_int_tdata(kkt_m_axis_int_tdata),
    .kkt_m_axis_int_tvalid(kkt_m_axis_int_tvalid),
    .kkt_m_axis_int_tready(kkt_m_axis_int_tready),
    .kkt_m_axis_int_tlast(kkt_m_axis_int_tlast),
    .kkt_m_axis_dbl_tdata(kkt_m_axis_dbl_tdata),
    .kkt_m_axis_dbl_tvalid(kkt_m_axis_dbl_tvalid),
    .kkt_m_axis_dbl_tready(kkt_m_axis_dbl_tready),
    .kkt_m_axis_dbl_tlast(kkt_m_axis_dbl_tlast),
    .smv_s_axi_awaddr(smv_s_axi_awaddr),
    .smv_s_axi_awvalid(smv_s_axi_awvalid),
    .smv_s_axi_awready(smv_s_axi_awready),
    .smv_s_axi_wdata(smv_s_axi_wdata),
    .smv_s_axi_wstrb(smv_s_axi_wstrb),
    .smv_s_axi_wvalid(smv_s_axi_wvalid),
    .smv_s_axi_wready(smv_s_axi_wready),
    .smv_s_axi_bresp(smv_s_axi_bresp),
    .smv_s_axi_bvalid(smv_s_axi_bvalid),
    .smv_s_axi_bready(smv_s_axi_bready),
    .smv_s_axi_araddr(smv_s_axi_araddr),
    .smv_s_axi_arvalid(smv_s_axi_arvalid),
    .smv_s_axi_arready(smv_s_axi_arready),
    .smv_s_axi_rdata(smv_s_axi_rdata),
    .smv_s_axi_rresp(smv_s_axi_rresp),
    .smv_s_axi_rvalid(smv_s_axi_rvalid),
    .smv_s_axi_rready(smv_s_axi_rready),
    .smv_irq(smv_irq),
    .smv_s_axis_int_tdata(smv_s_axis_int_tdata),
    .smv_s_axis_int_tvalid(smv_s_axis_int_tvalid),
    .smv_s_axis_int_tready(smv_s_axis_int_tready),
    .smv_s_axis_int_tlast(smv_s_axis_int_tlast),
    .smv_s_axis_dbl_tdata(smv_s_axis_dbl_tdata),
    .smv_s_axis_dbl_tvalid(smv_s_axis_dbl_tvalid),
    .smv_s_axis_dbl_tready(smv_s_axis_dbl_tready),
    .smv_s_axis_dbl_tlast(smv_s_axis_dbl_tlast),
    .smv_m_axis_dbl_tdata(smv_m_axis_dbl_tdata),
    .smv_m_axis_dbl_tvalid(smv_m_axis_dbl_tvalid),
    .smv_m_axis_dbl_tready(smv_m_axis_dbl_tready),
    .smv_m_axis_dbl_tlast(smv_m_axis_dbl_tlast),
    .smvx_s_axi_awaddr(smvx_s_axi_awaddr),
    .smvx_s_axi_awvalid(smvx_s_axi_awvalid),
    .smvx_s_axi_awready(smvx_s_axi_awready),
    .smvx_s_axi_wdata(smvx_s_axi_wdata),
    .smvx_s_axi_wstrb(smvx_s_axi_wstrb),
    .smvx_s_axi_wvalid(smvx_s_axi_wvalid),
    .smvx_s_axi_wready(smvx_s_axi_wready),
    .smvx_s_axi_bresp(smvx_s_axi_bresp),
    .smvx_s_axi_bvalid(smvx_s_axi_bvalid),
    .smvx_s_axi_bready(smvx_s_axi_bready),
    .smvx_s_axi_araddr(smvx_s_axi_araddr),
    .smvx_s_axi_arvalid(smvx_s_axi_arvalid),
    .smvx_s_axi_arready(smvx_s_axi_arready),
    .smvx_s_axi_rdata(smvx_s_axi_rdata),
    .smvx_s_axi_rresp(smvx_s_axi_rresp),
    .smvx_s_axi_rvalid(smvx_s_axi_rvalid),
    .smvx_s_axi_rready(smvx_s_axi_rready),
    .smvx_irq(smvx_irq),
    .smvx_s_axis_int_tdata(smvx_s_axis_int_tdata),
    .smvx_s_axis_int_tvalid(smvx_s_axis_int_tvalid),
    .smvx_s_axis_int_tready(smvx_s_axis_int_tready),
    .smvx_s_axis_int_tlast(smvx_s_axis_int_tlast),
    .smvx_s_axis_dbl_tdata(smvx_s_axis_dbl_tdata),
    .smvx_s_axis_dbl_tvalid(smvx_s_axis_dbl_tvalid),
    .smvx_s_axis_dbl_tready(smvx_s_axis_dbl_tready),
    .smvx_s_axis_dbl_tlast(smvx_s_axis_dbl_tlast),
    .smvx_m_axis_dbl_tdata(smvx_m_axis_dbl_tdata),
    .smvx_m_axis_dbl_tvalid(smvx_m_axis_dbl_tvalid),
    .smvx_m_axis_dbl_tready(smvx_m_axis_dbl_tready),
    .smvx_m_axis_dbl_tlast(smvx_m_axis_dbl_tlast)
  );

  always_comb begin
    kkt_s_axi_awaddr = awaddr; kkt_s_axi_wdata = wdata; kkt_s_axi_wstrb = wstrb; kkt_s_axi_araddr = araddr;
    kkt_s_axi_awvalid = awvalid && sel == 0; kkt_s_axi_wvalid = wvalid && sel == 0;
    kkt_s_axi_bready = bready && sel == 0; kkt_s_axi_arvalid = arvalid && sel == 0; kkt_s_axi_rready = rready && sel == 0;
    kkt_s_axis_int_tdata = si_tdata; kkt_s_axis_int_tvalid = si_tvalid && sel == 0; kkt_s_axis_int_tlast = si_tlast;
    kkt_s_axis_dbl_tdata = sd_tdata; kkt_s_axis_dbl_tvalid = sd_tvalid && sel == 0; kkt_s_axis_dbl_tlast = sd_tlast;
    kkt_m_axis_dbl_tready = md_tready && sel == 0;
    kkt_m_axis_int_tready = mi_tready && sel == 0;
    smv_s_axi_awaddr = awaddr; smv_s_axi_wdata = wdata; smv_s_axi_wstrb = wstrb; smv_s_axi_araddr = araddr;
    smv_s_axi_awvalid = awvalid && sel == 1; smv_s_axi_wvalid = wvalid && sel == 1;
    smv_s_axi_bready = bready && sel == 1; smv_s_axi_arvalid = arvalid && sel == 1; smv_s_axi_rready = rready && sel == 1;
    smv_s_axis_int_tdata = si_tdata; smv_s_axis_int_tvalid = si_tvalid && sel == 1; smv_s_axis_int_tlast = si_tlast;
    smv_s_axis_dbl_tdata = sd_tdata; smv_s_axis_dbl_tvalid = sd_tvalid && sel == 1; smv_s_axis_dbl_tlast = sd_tlast;
    smv_m_axis_dbl_tready = md_tready && sel == 1;
    smvx_s_axi_awaddr = awaddr; smvx_s_axi_wdata = wdata; smvx_s_axi_wstrb = wstrb; smvx_s_axi_araddr = araddr;
    smvx_s_axi_awvalid = awvalid && sel == 2; smvx_s_axi_wvalid = wvalid && sel == 2;
    smvx_s_axi_bready = bready && sel == 2; smvx_s_axi_arvalid = arvalid && sel == 2; smvx_s_axi_rready = rready && sel == 2;
    smvx_s_axis_int_tdata = si_tdata; smvx_s_axis_int_tvalid = si_tvalid && sel == 2; smvx_s_axis_int_tlast = si_tlast;
    smvx_s_axis_dbl_tdata = sd_tdata; smvx_s_axis_dbl_tvalid = sd_tvalid && sel == 2; smvx_s_axis_dbl_tlast = sd_tlast;
    smvx_m_axis_dbl_tready = md_tready && sel == 2;
  end

  always_comb begin
    mi_tdata = '0; mi_tvalid = 1'b0; mi_tlast = 1'b0;
    case (sel)
      0: begin
        awready = kkt_s_axi_awready; wready = kkt_s_axi_wready; bvalid = kkt_s_axi_bvalid; bresp = kkt_s_axi_bresp;
        arready = kkt_s_axi_arready; rvalid = kkt_s_axi_rvalid; rdata = kkt_s_axi_rdata; rresp = kkt_s_axi_rresp;
        irq = kkt_irq;
        si_tready = kkt_s_axis_int_tready; sd_tready = kkt_s_axis_dbl_tready;
        md_tdata = kkt_m_axis_dbl_tdata; md_tvalid = kkt_m_axis_dbl_tvalid; md_tlast = kkt_m_axis_dbl_tlast;
        mi_tdata = kkt_m_axis_int_tdata; mi_tvalid = kkt_m_axis_int_tvalid; mi_tlast = kkt_m_axis_int_tlast;
      end
      1: begin
        awready = smv_s_axi_awready; wready = smv_s_axi_wready; bvalid = smv_s_axi_bvalid; bresp = smv_s_axi_bresp;
        arready = smv_s_axi_arready; rvalid = smv_s_axi_rvalid; rdata = smv_s_axi_rdata; rresp = smv_s_axi_rresp;
        irq = smv_irq;
        si_tready = smv_s_axis_int_tready; sd_tready = smv_s_axis_dbl_tready;
        md_tdata = smv_m_axis_dbl_tdata; md_tvalid = smv_m_axis_dbl_tvalid; md_tlast = smv_m_axis_dbl_tlast;
      end
      2: begin
        awready = smvx_s_axi_awready; wready = smvx_s_axi_wready; bvalid = smvx_s_axi_bvalid; bresp = smvx_s_axi_bresp;
        arready = smvx_s_axi_arready; rvalid = smvx_s_axi_rvalid; rdata = smvx_s_axi_rdata; rresp = smvx_s_axi_rresp;
        irq = smvx_irq;
        si_tready = smvx_s_axis_int_tready; sd_tready = smvx_s_axis_dbl_tready;
        md_tdata = smvx_m_axis_dbl_tdata; md_tvalid = smvx_m_axis_dbl_tvalid; md_tlast = smvx_m_axis_dbl_tlast;
      end
      default: begin
        awready = 0; wready = 0; bvalid = 0; bresp = 0; arready = 0; rvalid = 0; rdata = 0; rresp = 0;
        irq = 0; si_tready = 0; sd_tready = 0; md_tdata = 0; md_tvalid = 0; md_tlast = 0;
      end
    endcase
  end

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if ((si_tready && !si_tvalid) || (sd_tready && !sd_tvalid)) n_gap <= n_gap + 1;
    if ((mi_tvalid && !mi_tready) || (md_tvalid && !md_tready)) n_stall <= n_stall + 1;
    if ((mi_tvalid && mi_tready && mi_tlast) || (md_tvalid && md_tready && md_tlast)) n_tlast <= n_tlast + 1;
    if (irq) irq_seen <= 1'b1;
  end
  initial begin : watchdog
    repeat (3000000) @(posedge clk);
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

  task automatic expect_seen(input string what, input int count);
    checks++;
    $display("mechanism %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  // double -> input type (floor, then wrap to 39 bits), as a 78-bit integer
  function automatic logic signed [77:0] fin(input real v);
    logic signed [38:0] w;
    w = 39'(longint'($floor(v * (2.0 ** 34))));
    return 78'(w);
  endfunction

  // 78-bit integer with 68 fractional bits -> nearest double
  function automatic real fout(input logic signed [77:0] sx);
    logic [77:0] mag, lo;
    int p, k;
    real h, l, r;
    mag = sx[77] ? 78'(-sx) : 78'(sx);
    p = -1;
    for (int i = 0; i < 78; i++) if (mag[i]) p = i;
    k  = (p > 52) ? p - 52 : 0;
    h  = real'(longint'(64'(mag >> k)));
    lo = mag & ((78'd1 << k) - 78'd1);
    l  = real'(longint'(64'(lo)));
    r  = (h * (2.0 ** k) + l) * (2.0 ** -68);
    return sx[77] ? -r : r;
  endfunction

  function automatic real rnd_val();
    return (real'($urandom % 2000001) - 1000000.0) / 1000000.0;   // [-1, 1]
  endfunction

  // one factorization of an n-by-n matrix
  task automatic run_kkt(input int n, input int gap, input int stall);
    int kjc[$], kir[$], par[$], sgn[$], lnzv[$], ljc[$], lir[$], pat[$], flg[$];
    real kpr[$], lx[$], d[$], yv[$];
    logic [31:0] iq[$], oq[$];
    logic [63:0] dq[$], odq[$];
    logic [31:0] st;
    int lastpos_i, lastpos_d, nnz, lnz, top, len, i, p2, start_cyc;
    real eps, delta, yi, lki, pr, sd;
    eps   = 1.0e-13;
    delta = 7.0e-8;
    // matrix: upper triangle with diagonal, column by column. Nodes 0..2
    // form a small block with one fill-in entry; after that a chain of
    // couplings (k-1, k) for the first NCPL eligible columns, so that
    // nnz + lnz = n + 5 + 2 * NCPL fills the buffers exactly. Every 101st
    // node has a tiny pivot of the wrong sign and no couplings.
    for (int k = 0; k < n; k++) sgn.push_back((k < n / 2) ? 1 : -1);
    kjc.push_back(0);
    begin
      int ncpl = (2841 - n - 5) / 2;
      int used = 0;
      for (int k = 0; k < n; k++) begin
        logic tiny;
        tiny = (k % 101 == 50);
        if (k == 1) begin kir.push_back(0); kpr.push_back(rnd_val()); end
        if (k == 2) begin kir.push_back(0); kpr.push_back(rnd_val()); end
        if (k >= 4 && !tiny && ((k - 1) % 101 != 50) && used < ncpl) begin
          kir.push_back(k - 1); kpr.push_back(rnd_val()); used++;
        end
        kir.push_back(k);
        if (tiny) kpr.push_back(-sgn[k] * 1.0e-15);
        else      kpr.push_back(sgn[k] * (3.0 + real'($urandom % 1000) / 100.0));
        kjc.push_back(kir.size());
      end
    end
    nnz = kir.size();
    // symbolic factorization: elimination tree and column counts
    for (int k = 0; k < n; k++) begin par.push_back(-1); flg.push_back(0); lnzv.push_back(0); end
    for (int k = 0; k < n; k++) begin
      flg[k] = k;
      for (int p = kjc[k]; p < kjc[k+1]; p++) begin
        i = kir[p];
        if (i < k)
          for (; flg[i] != k; i = par[i]) begin
            if (par[i] == -1) par[i] = k;
            lnzv[i]++;
            flg[i] = k;
          end
      end
    end
    ljc.push_back(0);
    for (int k = 0; k < n; k++) ljc.push_back(ljc[k] + lnzv[k]);
    lnz = ljc[n];
    // workspaces with arbitrary contents
    for (int k = 0; k < n; k++) begin lnzv[k] = int'($urandom % 50); pat.push_back(int'($urandom)); flg[k] = int'($urandom % 1000); end
    for (int k = 0; k < lnz; k++) begin lir.push_back(int'($urandom % 999)); lx.push_back(rnd_val()); end
    for (int k = 0; k < n; k++) begin d.push_back(rnd_val()); yv.push_back(rnd_val()); end
    // pack the streams
    iq = {32'(n)};
    foreach (kjc[k])  iq.push_back(32'(kjc[k]));
    foreach (kir[k])  iq.push_back(32'(kir[k]));
    foreach (par[k])  iq.push_back(32'(par[k]));
    foreach (sgn[k])  iq.push_back(32'(sgn[k]));
    foreach (lnzv[k]) iq.push_back(32'(lnzv[k]));
    foreach (ljc[k])  iq.push_back(32'(ljc[k]));
    foreach (lir[k])  iq.push_back(32'(lir[k]));
    foreach (pat[k])  iq.push_back(32'(pat[k]));
    foreach (flg[k])  iq.push_back(32'(flg[k]));
    foreach (kpr[k])  dq.push_back($realtobits(kpr[k]));
    foreach (lx[k])   dq.push_back($realtobits(lx[k]));
    foreach (d[k])    dq.push_back($realtobits(d[k]));
    foreach (yv[k])   dq.push_back($realtobits(yv[k]));
    // reference: the software routine on the same arrays
    for (int k = 0; k < n; k++) begin
      yv[k] = 0.0;
      top = n;
      flg[k] = k;
      lnzv[k] = 0;
      for (int p = kjc[k]; p < kjc[k+1]; p++) begin
        i = kir[p];
        yv[i] = yv[i] + kpr[p];
        for (len = 0; flg[i] != k; i = par[i]) begin
          pat[len] = i;
          len++;
          flg[i] = k;
        end
        while (len > 0) begin top--; len--; pat[top] = pat[len]; end
      end
      d[k] = yv[k];
      yv[k] = 0.0;
      for (; top < n; top++) begin
        int pp;
        i = pat[top];
        yi = yv[i];
        yv[i] = 0.0;
        p2 = ljc[i] + lnzv[i];
        for (pp = ljc[i]; pp < p2; pp++) begin
          pr = lx[pp] * yi;
          yv[lir[pp]] = yv[lir[pp]] - pr;
        end
        lki = yi / d[i];
        pr = lki * yi;
        d[k] = d[k] - pr;
        lir[pp] = k;
        lx[pp] = lki;
        lnzv[i]++;
      end
      sd = (sgn[k] < 0) ? -d[k] : d[k];
      if (sd <= eps) begin
        d[k] = (sgn[k] < 0) ? -delta : delta;
        regularized++;
      end
    end
    // run the core
    axil_wr(8'h10, $realtobits(eps)[31:0]);
    axil_wr(8'h14, $realtobits(eps)[63:32]);
    axil_wr(8'h18, $realtobits(delta)[31:0]);
    axil_wr(8'h1C, $realtobits(delta)[63:32]);
    axil_wr(8'h08, 32'h1);                                  // done interrupt
    axil_wr(8'h04, 32'h1);
    start_cyc = cyc;
    axil_wr(8'h00, 32'h1);
    fork
      send_int(iq, gap);
      send_dbl(dq, gap);
      recv_int(oq, stall, lastpos_i);
      recv_dbl(odq, stall, lastpos_d);
    join
    // expected buffers after the factorization
    iq = {32'(n)};
    foreach (kjc[k])  iq.push_back(32'(kjc[k]));
    foreach (kir[k])  iq.push_back(32'(kir[k]));
    foreach (par[k])  iq.push_back(32'(par[k]));
    foreach (sgn[k])  iq.push_back(32'(sgn[k]));
    foreach (lnzv[k]) iq.push_back(32'(lnzv[k]));
    foreach (ljc[k])  iq.push_back(32'(ljc[k]));
    foreach (lir[k])  iq.push_back(32'(lir[k]));
    foreach (pat[k])  iq.push_back(32'(pat[k]));
    foreach (flg[k])  iq.push_back(32'(flg[k]));
    iq.push_back(32'(n));                                   // return value
    dq = {};
    foreach (kpr[k])  dq.push_back($realtobits(kpr[k]));
    foreach (lx[k])   dq.push_back($realtobits(lx[k]));
    foreach (d[k])    dq.push_back($realtobits(d[k]));
    foreach (yv[k])   dq.push_back($realtobits(yv[k]));
    expect_eq("int out length", oq.size(), iq.size());
    expect_eq("dbl out length", odq.size(), dq.size());
    expect_eq("int tlast", lastpos_i, iq.size() - 1);
    expect_eq("dbl tlast", lastpos_d, dq.size() - 1);
    for (int k = 0; k < iq.size() && k < oq.size(); k++)
      expect_eq($sformatf("int word %0d", k), oq[k], iq[k]);
    for (int k = 0; k < dq.size() && k < odq.size(); k++)
      expect_eq($sformatf("dbl word %0d", k), odq[k], dq[k]);
    if (gap == 0) begin
      expect_eq("int in one word per cycle", si_last_cyc - si_first, 7 * n + 2 + nnz + lnz);
      expect_eq("dbl in one word per cycle", sd_last_cyc - sd_first, dq.size() - 1);
    end
    if (stall == 0) begin
      expect_eq("int out one word per cycle", mi_last_cyc - mi_first, iq.size() - 1);
      expect_eq("dbl out one word per cycle", md_last_cyc - md_first, dq.size() - 1);
    end
    kkt_cycles = md_last_cyc - start_cyc;
    $display("kkt_factor: n=%0d nnz=%0d lnz=%0d, %0d integer and %0d double words in, %0d cycles from start to last output",
             n, nnz, lnz, oq.size() - 1, odq.size(), kkt_cycles);
    repeat (3) @(negedge clk);
    axil_rd(8'h00, st);
    expect_eq("ap_done and idle", {60'd0, st[3:0] & 4'b0110}, 4'b0110);
    expect_eq("kkt interrupt raised", irq_seen, 1);
    axil_wr(8'h0C, 32'h1);
    axil_wr(8'h04, 32'h0);
  endtask


  // one call of the core on an m-by-n random matrix
  task automatic run_smv(input int n, input int m, input int a, input int newv,
                     input int gap, input int stall);
    int ap[$], ai[$];
    real ax[$], x[$], y0[$], y[$];
    logic [31:0] iq[$];
    logic [63:0] dq[$], yq[$];
    logic [31:0] st;
    int lastpos, nnz;
    real pr;
    // n + nnz = 801 fills both buffers exactly: nnz = 801 - n entries spread
    // over the columns, some columns left empty
    begin
      int cnt[$];
      int left = 801 - n;
      for (int j = 0; j < n; j++) cnt.push_back(0);
      while (left > 0) begin
        int j = int'($urandom % n);
        if (j % 7 != 5) begin cnt[j]++; left--; end
      end
      ap.push_back(0);
      for (int j = 0; j < n; j++) begin
        for (int e = 0; e < cnt[j]; e++) begin
          ai.push_back(int'($urandom % m));
          ax.push_back(rnd_val());
        end
        ap.push_back(ai.size());
      end
    end
    nnz = ai.size();
    for (int j = 0; j < n; j++) x.push_back(rnd_val());
    for (int r = 0; r < m; r++) y0.push_back(rnd_val());
    // reference, same operation order as the core
    y = y0;
    if (newv > 0) foreach (y[r]) y[r] = 0.0;
    for (int j = 0; j < n; j++)
      for (int p = ap[j]; p < ap[j+1]; p++) begin
        pr = ax[p] * x[j];
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
    if (newv > 0) n_new++; else n_acc++;
    if (a > 0) n_add++; else n_sub++;
    smv_start = cyc;
    axil_wr(8'h00, 32'h1);
    fork
      send_int(iq, gap);
      send_dbl(dq, gap);
      recv_dbl(yq, stall, lastpos);
    join
    $display("sparseMV (sel %0d): m=%0d n=%0d nnz=%0d a=%0d newVector=%0d gap=%0d stall=%0d, %0d cycles from start to last output",
             sel, m, n, nnz, a, newv, gap, stall, md_last_cyc - smv_start);
    expect_eq("y length", yq.size(), m);
    expect_eq("tlast on last word", lastpos, m - 1);
    for (int r = 0; r < m && r < yq.size(); r++)
      expect_eq($sformatf("y[%0d]", r), yq[r], $realtobits(y[r]));
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


  // one call of the core on an m-by-n random matrix
  task automatic run_smvx(input int n, input int m, input int a, input int newv,
                     input int gap, input int stall);
    int ap[$], ai[$];
    real ax[$], x[$], y0[$];
    logic signed [77:0] y[$], pr;
    logic [31:0] iq[$];
    logic [63:0] dq[$], yq[$];
    logic [31:0] st;
    int lastpos, nnz;
    // n + nnz = 801 fills both buffers exactly: nnz = 801 - n entries spread
    // over the columns, some columns left empty
    begin
      int cnt[$];
      int left = 801 - n;
      for (int j = 0; j < n; j++) cnt.push_back(0);
      while (left > 0) begin
        int j = int'($urandom % n);
        if (j % 7 != 5) begin cnt[j]++; left--; end
      end
      ap.push_back(0);
      for (int j = 0; j < n; j++) begin
        for (int e = 0; e < cnt[j]; e++) begin
          ai.push_back(int'($urandom % m));
          ax.push_back(rnd_val());
        end
        ap.push_back(ai.size());
      end
    end
    nnz = ai.size();
    for (int j = 0; j < n; j++) x.push_back(rnd_val());
    x[n / 2] = 20.0;                       // outside the 39-bit range: wraps
    wraps++;
    for (int r = 0; r < m; r++) y0.push_back(rnd_val());
    // reference, same operation order as the core
    foreach (y0[r]) y.push_back((newv > 0) ? 78'sd0 : (fin(y0[r]) <<< 34));
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
    if (newv > 0) n_new++; else n_acc++;
    if (a > 0) n_add++; else n_sub++;
    smv_start = cyc;
    axil_wr(8'h00, 32'h1);
    fork
      send_int(iq, gap);
      send_dbl(dq, gap);
      recv_dbl(yq, stall, lastpos);
    join
    $display("sparseMV (sel %0d): m=%0d n=%0d nnz=%0d a=%0d newVector=%0d gap=%0d stall=%0d, %0d cycles from start to last output",
             sel, m, n, nnz, a, newv, gap, stall, md_last_cyc - smv_start);
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
    mi_tready = 0; md_tready = 0;
    irq_seen = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    sel = 0;
    run_kkt(1006, 10, 10);
    sel = 1;
    run_smv(200, 76,  1, 1, 0, 0);
    run_smv(200, 76, -1, 0, 15, 15);
    sel = 2;
    run_smvx(200, 76, -1, 1, 0, 20);
    run_smvx(200, 76,  1, 0, 10, 0);
    expect_seen("input stream gap", n_gap);
    expect_seen("output stream stall", n_stall);
    expect_seen("TLAST closing a transfer", n_tlast);
    expect_seen("dynamic regularization", regularized);
    expect_seen("done interrupt", int'(irq_seen));
    expect_seen("newVector = 1 (clear y)", n_new);
    expect_seen("newVector = 0 (accumulate)", n_acc);
    expect_seen("a > 0 (add)", n_add);
    expect_seen("a <= 0 (subtract)", n_sub);
    expect_seen("fixed-point wrap", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
