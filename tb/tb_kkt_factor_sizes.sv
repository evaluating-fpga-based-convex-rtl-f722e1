// tb_kkt_factor_sizes: the LDL^T factorization core at the two problem
// sizes of the guidance application, with its buffers sized for the larger
// one (100 nodes: 197695 integer and 97662 double words in). Each run builds
// a quasi-definite KKT-like matrix whose streams fill the buffers exactly:
//  - 5 nodes:   n = 1006,  nnz + lnz = 2841  (9886 and 4853 words);
//  - 100 nodes: n = 20006, nnz + lnz = 57650 (197695 and 97662 words).
// The symbolic factorization is done here, as the software does before it
// calls the core, and every returned integer and double word, plus the
// return value, is compared with the software routine run in IEEE double
// arithmetic. Also checked: TLAST positions, the done interrupt, ap_done,
// one word per cycle on every stream, and that regularization happened.
module tb_kkt_factor_sizes;
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
  logic [31:0] mi_tdata;  logic mi_tvalid, mi_tready, mi_tlast;
  logic [63:0] md_tdata;  logic md_tvalid, md_tready, md_tlast;
  int checks = 0, failures = 0;

  kkt_factor #(.INT_DEPTH(197695), .DBL_DEPTH(97662)) dut (
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
    .m_axis_int_tdata(mi_tdata), .m_axis_int_tvalid(mi_tvalid),
    .m_axis_int_tready(mi_tready), .m_axis_int_tlast(mi_tlast),
    .m_axis_dbl_tdata(md_tdata), .m_axis_dbl_tvalid(md_tvalid),
    .m_axis_dbl_tready(md_tready), .m_axis_dbl_tlast(md_tlast));

  int regularized = 0, kkt_cycles = 0;
  logic irq_seen;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (irq) irq_seen <= 1'b1;
  end
  initial begin : watchdog
    repeat (8000000) @(posedge clk);
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

  function automatic real rnd_val();
    return (real'($urandom % 2000001) - 1000000.0) / 1000000.0;   // [-1, 1]
  endfunction

  // one factorization of an n-by-n matrix
  task automatic run_kkt(input int n, input int tot, input int gap, input int stall);
    int kjc[$], kir[$], par[$], sgn[$], lnzv[$], ljc[$], lir[$], pat[$], flg[$];
    real kpr[$], lx[$], d[$], yv[$];
    logic [31:0] iq[$], oq[$];
    logic [63:0] dq[$], odq[$];
    logic [31:0] st;
    int lastpos_i, lastpos_d, nnz, lnz, top, len, i, p2, start_cyc;
    real eps, delta, yi, lki, pr, sd;
    eps   = 1.0e-13;
    delta = 7.0e-8;
    // matrix: upper triangle with diagonal, column by column, built so that
    // nnz + lnz = tot exactly. Head blocks {b, b+1, b+2} with entries
    // (b, b+1) and (b, b+2) give 2 + 2 words plus one fill-in each; one or
    // two of them fix the parity of tot - n. After that, a chain of
    // couplings (k-1, k) adds two words each (one in K, one in L). Every
    // 101st node has a tiny pivot of the wrong sign and no couplings.
    for (int k = 0; k < n; k++) sgn.push_back((k < n / 2) ? 1 : -1);
    kjc.push_back(0);
    begin
      int heads = ((tot - n) % 2 == 1) ? 1 : 2;
      int ncpl  = (tot - n - 5 * heads) / 2;
      int used  = 0;
      for (int k = 0; k < n; k++) begin
        logic tiny;
        tiny = (k % 101 == 50);
        if (k % 3 != 0 && k < 3 * heads) begin
          kir.push_back(k - k % 3); kpr.push_back(rnd_val());
        end
        if (k >= 3 * heads + 1 && !tiny && ((k - 1) % 101 != 50) && used < ncpl) begin
          kir.push_back(k - 1); kpr.push_back(rnd_val()); used++;
        end
        kir.push_back(k);
        if (tiny) kpr.push_back(-sgn[k] * 1.0e-15);
        else      kpr.push_back(sgn[k] * (3.0 + real'($urandom % 1000) / 100.0));
        kjc.push_back(kir.size());
      end
      if (used != ncpl) begin
        failures++;
        $display("FAIL generator: %0d of %0d couplings placed", used, ncpl);
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

  initial begin
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 0;
    si_tvalid = 0; si_tlast = 0; si_tdata = 0;
    sd_tvalid = 0; sd_tlast = 0; sd_tdata = 0;
    mi_tready = 0; md_tready = 0;
    irq_seen = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    irq_seen = 0;
    run_kkt(1006, 2841, 0, 0);
    irq_seen = 0;
    run_kkt(20006, 57650, 0, 0);
    expect_eq("regularization exercised", regularized > 0, 1);
    $display("regularized pivots: %0d", regularized);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
