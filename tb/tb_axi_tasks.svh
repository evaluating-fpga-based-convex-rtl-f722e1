// tb_axi_tasks.svh: processor-side bus tasks shared by the core testbenches,
// included inside a testbench module. They play the roles of the processor
// (AXI4-Lite master) and of the DMA engines (AXI4-Stream source and sink)
// and expect these module-level signals: clk, cyc (cycle counter),
// awaddr/awvalid/awready/wdata/wstrb/wvalid/wready/bvalid/bready,
// araddr/arvalid/arready/rdata/rvalid/rready, the input streams si_* (32-bit)
// and sd_* (64-bit), and the output streams mi_* (32-bit) and md_* (64-bit).
// Each stream task records the cycles of its first and last handshake, so
// that a testbench can check one word per cycle. All signals are driven and
// sampled at the falling edge; a handshake seen there completes at the next
// rising edge (the cores' TREADY, TVALID and TDATA come from registers).

int si_first, si_last_cyc, sd_first, sd_last_cyc, mi_first, mi_last_cyc, md_first, md_last_cyc;

task automatic axil_wr(input logic [7:0] ad, input logic [31:0] d);
  @(negedge clk);
  awaddr = ad; awvalid = 1; wdata = d; wstrb = 4'hF; wvalid = 1; bready = 1;
  #1;
  while (!(awready && wready)) begin @(negedge clk); #1; end
  @(negedge clk);
  awvalid = 0; wvalid = 0;
  while (!bvalid) @(negedge clk);
  @(negedge clk);
endtask

task automatic axil_rd(input logic [7:0] ad, output logic [31:0] d);
  @(negedge clk);
  araddr = ad; arvalid = 1; rready = 1;
  #1;
  while (!arready) begin @(negedge clk); #1; end
  @(negedge clk);
  arvalid = 0;
  while (!rvalid) @(negedge clk);
  d = rdata;
  @(negedge clk);
endtask

// gap: percentage of cycles with TVALID low
task automatic send_int(input logic [31:0] q[$], input int gap);
  for (int k = 0; k < q.size(); k++) begin
    @(negedge clk);
    while (($urandom % 100) < gap) begin si_tvalid = 0; @(negedge clk); end
    si_tdata = q[k]; si_tvalid = 1; si_tlast = (k == q.size() - 1);
    while (!si_tready) @(negedge clk);
    if (k == 0) si_first = cyc;
    si_last_cyc = cyc;
  end
  @(negedge clk);
  si_tvalid = 0; si_tlast = 0;
endtask

task automatic send_dbl(input logic [63:0] q[$], input int gap);
  for (int k = 0; k < q.size(); k++) begin
    @(negedge clk);
    while (($urandom % 100) < gap) begin sd_tvalid = 0; @(negedge clk); end
    sd_tdata = q[k]; sd_tvalid = 1; sd_tlast = (k == q.size() - 1);
    while (!sd_tready) @(negedge clk);
    if (k == 0) sd_first = cyc;
    sd_last_cyc = cyc;
  end
  @(negedge clk);
  sd_tvalid = 0; sd_tlast = 0;
endtask

// stall: percentage of cycles with TREADY low; stops at TLAST.
// lastpos returns the index of the word that carried TLAST.
task automatic recv_int(output logic [31:0] q[$], input int stall, output int lastpos);
  q = {};
  lastpos = -1;
  forever begin
    @(negedge clk);
    mi_tready = (($urandom % 100) >= stall);
    if (mi_tvalid && mi_tready) begin
      if (q.size() == 0) mi_first = cyc;
      mi_last_cyc = cyc;
      q.push_back(mi_tdata);
      if (mi_tlast) begin lastpos = q.size() - 1; break; end
    end
  end
  @(negedge clk);
  mi_tready = 0;
endtask

task automatic recv_dbl(output logic [63:0] q[$], input int stall, output int lastpos);
  q = {};
  lastpos = -1;
  forever begin
    @(negedge clk);
    md_tready = (($urandom % 100) >= stall);
    if (md_tvalid && md_tready) begin
      if (q.size() == 0) md_first = cyc;
      md_last_cyc = cyc;
      q.push_back(md_tdata);
      if (md_tlast) begin lastpos = q.size() - 1; break; end
    end
  end
  @(negedge clk);
  md_tready = 0;
endtask
