// hls_ctrl_axil: AXI4-Lite control slave of an accelerator core.
//
// The processor starts a core and reads its status through this register
// bank, and passes the scalar arguments of the accelerated function through
// it. Register map (byte offsets):
//   0x00 CTRL  bit0 ap_start (write 1 to start, cleared by ap_ready unless
//              auto_restart), bit1 ap_done (clear on read), bit2 ap_idle,
//              bit3 ap_ready (clear on read), bit7 auto_restart
//   0x04 GIE   bit0 global irq enable
//   0x08 IER   bit0 done irq enable, bit1 ready irq enable
//   0x0C ISR   bit0 done, bit1 ready; writing a 1 toggles the bit
//   0x10 + 4*i scalar argument i (32 bits, read/write), i < NARGS
// The document states that control uses AXI4-Lite with start/status
// commands; the map follows the common high-level-synthesis layout and the
// argument placement is this design's choice.
// AXI4-Lite timing: a write is taken when AWVALID and WVALID are both high
// and no response is pending, BVALID follows one cycle later; a read is
// taken when no read data is pending, RVALID follows one cycle later.
// WSTRB is honoured per byte on the argument registers.
module hls_ctrl_axil
  import accel_pkg::*;
#(
  parameter int NARGS = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
  input  logic [7:0]  s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [7:0]  s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  output logic        irq,
  // core handshake
  output logic        ap_start,
  input  logic        ap_done,
  input  logic        ap_idle,
  input  logic        ap_ready,
  output logic [NARGS-1:0][31:0] args
);

  logic       done_sticky, ready_sticky, auto_restart, gie;
  logic [1:0] ier, isr;
  logic       wr_en, rd_en;

  assign wr_en = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign rd_en = s_axi_arvalid && !s_axi_rvalid;
  assign s_axi_awready = wr_en;
  assign s_axi_wready  = wr_en;
  assign s_axi_arready = rd_en;
  assign s_axi_bresp   = 2'b00;
  assign s_axi_rresp   = 2'b00;
  assign irq     = gie && ((ier & isr) != 2'b00);

  function automatic logic [31:0] apply_strb(input logic [31:0] old, input logic [31:0] nw,
                                             input logic [3:0] strb);
    logic [31:0] r;
    for (int k = 0; k < 4; k++) r[8*k +: 8] = strb[k] ? nw[8*k +: 8] : old[8*k +: 8];
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ap_start     <= 1'b0;
      done_sticky  <= 1'b0;
      ready_sticky <= 1'b0;
      auto_restart <= 1'b0;
      gie          <= 1'b0;
      ier          <= 2'b00;
      isr          <= 2'b00;
      args         <= '0;
      s_axi_bvalid <= 1'b0;
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else begin
      // core events
      if (ap_ready && !auto_restart) ap_start <= 1'b0;
      if (ap_done)  done_sticky  <= 1'b1;
      if (ap_ready) ready_sticky <= 1'b1;
      if (ap_done  && ier[0]) isr[0] <= 1'b1;
      if (ap_ready && ier[1]) isr[1] <= 1'b1;

      // write channel
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (wr_en) begin
        s_axi_bvalid <= 1'b1;
        case (s_axi_awaddr)
          REG_CTRL: if (s_axi_wstrb[0]) begin
            if (s_axi_wdata[CTRL_START]) ap_start <= 1'b1;
            auto_restart <= s_axi_wdata[CTRL_AUTO_RESTART];
          end
          REG_GIE: if (s_axi_wstrb[0]) gie <= s_axi_wdata[0];
          REG_IER: if (s_axi_wstrb[0]) ier <= s_axi_wdata[1:0];
          REG_ISR: if (s_axi_wstrb[0]) isr <= isr ^ s_axi_wdata[1:0];
          default: begin
            for (int i = 0; i < NARGS; i++)
              if (s_axi_awaddr == REG_ARG0 + 8'(4 * i))
                args[i] <= apply_strb(args[i], s_axi_wdata, s_axi_wstrb);
          end
        endcase
      end

      // read channel
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;
      if (rd_en) begin
        s_axi_rvalid <= 1'b1;
        s_axi_rdata  <= '0;
        case (s_axi_araddr)
          REG_CTRL: begin
            s_axi_rdata[CTRL_START]        <= ap_start;
            s_axi_rdata[CTRL_DONE]         <= done_sticky;
            s_axi_rdata[CTRL_IDLE]         <= ap_idle;
            s_axi_rdata[CTRL_READY]        <= ready_sticky;
            s_axi_rdata[CTRL_AUTO_RESTART] <= auto_restart;
            if (!ap_done)  done_sticky  <= 1'b0;     // clear on read
            if (!ap_ready) ready_sticky <= 1'b0;
          end
          REG_GIE: s_axi_rdata[0]   <= gie;
          REG_IER: s_axi_rdata[1:0] <= ier;
          REG_ISR: s_axi_rdata[1:0] <= isr;
          default: begin
            for (int i = 0; i < NARGS; i++)
              if (s_axi_araddr == REG_ARG0 + 8'(4 * i)) s_axi_rdata <= args[i];
          end
        endcase
      end
    end
  end

  // AXI4-Lite rule: a response, once valid, stays valid until accepted
  property p_hold(logic v, logic r);
    @(posedge clk) disable iff (!rst_n) (v && !r) |=> v;
  endproperty
  a_bvalid_hold: assert property (p_hold(s_axi_bvalid, s_axi_bready));
  a_rvalid_hold: assert property (p_hold(s_axi_rvalid, s_axi_rready));

endmodule
