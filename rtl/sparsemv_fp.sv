// sparsemv_fp: accelerator core for the sparse matrix-vector product of the
// interior-point solver (sparseMV), in IEEE-754 double precision.
//
//   newVector = 1, a > 0:  y  =  A x        newVector = 0, a > 0:  y += A x
//   newVector = 1, a <= 0: y  = -A x        newVector = 0, a <= 0: y -= A x
//
// A is m-by-n in compressed-column form (Ap column starts, Ai row indices,
// Ax values). Operation (ap_start from the AXI4-Lite bank, then three
// phases):
//  1. load    - integer stream into the integer buffer: n | m | nnz |
//               Ap[n+1] | Ai[nnz]; double stream into the double buffer:
//               Ax[nnz] | x[n] | y[m]. One word per stream per cycle, each
//               ending on TLAST.
//  2. compute - if newVector, y is cleared; then for every column j and every
//               stored entry p of it, y[Ai[p]] = y[Ai[p]] +/- Ax[p] * x[j].
//               Sequential: 3 cycles per stored entry, 3 per column.
//  3. unload  - y (m words) on the double output stream, TLAST on the last.
// Arguments: a at 0x10 and newVector at 0x14 of the AXI4-Lite bank (signed
// 32-bit). From the document: the operation, the argument list, the stream
// types and sizes (805 integer and 877 double words in, 76 double words out
// for the reduced 5-node problem, which set the buffer depths), TLAST on the
// output. The order of the arrays in the streams and the register placement
// of a and newVector are this design's choices.
module sparsemv_fp
  import accel_pkg::*;
#(
  parameter int INT_DEPTH = 805,
  parameter int DBL_DEPTH = 877
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite control
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
  // integer input stream
  input  logic [31:0] s_axis_int_tdata,
  input  logic        s_axis_int_tvalid,
  output logic        s_axis_int_tready,
  input  logic        s_axis_int_tlast,
  // double input stream
  input  logic [63:0] s_axis_dbl_tdata,
  input  logic        s_axis_dbl_tvalid,
  output logic        s_axis_dbl_tready,
  input  logic        s_axis_dbl_tlast,
  // double output stream (y)
  output logic [63:0] m_axis_dbl_tdata,
  output logic        m_axis_dbl_tvalid,
  input  logic        m_axis_dbl_tready,
  output logic        m_axis_dbl_tlast
);

  localparam int IAW = $clog2(INT_DEPTH);
  localparam int DAW = $clog2(DBL_DEPTH);

  // ---------------------------------------------------------------- control
  logic ap_start, ap_done, ap_idle, ap_ready;
  logic [1:0][31:0] args;
  logic add_mode, new_vector;
  assign add_mode   = ($signed(args[0]) > 0);
  assign new_vector = ($signed(args[1]) > 0);

  hls_ctrl_axil #(.NARGS(2)) u_ctrl (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready, .s_axi_wdata, .s_axi_wstrb,
    .s_axi_wvalid, .s_axi_wready, .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready, .s_axi_rdata, .s_axi_rresp,
    .s_axi_rvalid, .s_axi_rready, .irq,
    .ap_start, .ap_done, .ap_idle, .ap_ready, .args
  );

  typedef enum logic [1:0] {PH_IDLE, PH_LOAD, PH_COMPUTE, PH_UNLOAD} phase_e;
  phase_e phase;

  typedef enum logic [3:0] {
    S_H0, S_H1, S_H2, S_H3, S_Z, S_J, S_J1, S_J2, S_I, S_I1, S_I2, S_END
  } cstate_e;
  cstate_e cs;

  // ---------------------------------------------------------------- buffers
  logic           im_en, im_we, dm_en, dm_we;
  logic [IAW-1:0] im_addr;
  logic [DAW-1:0] dm_addr;
  idx_t           im_wd, im_q;
  fp64_t          dm_wd, dm_q;

  sp_ram #(.W(32), .DEPTH(INT_DEPTH)) u_imem (
    .clk, .en(im_en), .we(im_we), .addr(im_addr), .wdata(im_wd), .rdata(im_q));
  sp_ram #(.W(64), .DEPTH(DBL_DEPTH)) u_dmem (
    .clk, .en(dm_en), .we(dm_we), .addr(dm_addr), .wdata(dm_wd), .rdata(dm_q));

  // ---------------------------------------------------------------- streams
  logic ld_start, ld_i_done, ld_d_done, ld_i_seen, ld_d_seen;
  logic ldi_en, ldd_en, ldi_ovf, ldd_ovf;
  logic [IAW-1:0] ldi_addr;
  logic [DAW-1:0] ldd_addr;
  logic [31:0] ldi_data;
  logic [63:0] ldd_data;
  logic [IAW:0] int_cnt;
  logic [DAW:0] dbl_cnt;

  axis_load #(.W(32), .DEPTH(INT_DEPTH)) u_ld_int (
    .clk, .rst_n, .start(ld_start),
    .s_tdata(s_axis_int_tdata), .s_tvalid(s_axis_int_tvalid),
    .s_tready(s_axis_int_tready), .s_tlast(s_axis_int_tlast),
    .wr_en(ldi_en), .wr_addr(ldi_addr), .wr_data(ldi_data),
    .count(int_cnt), .overflow(ldi_ovf), .done(ld_i_done));
  axis_load #(.W(64), .DEPTH(DBL_DEPTH)) u_ld_dbl (
    .clk, .rst_n, .start(ld_start),
    .s_tdata(s_axis_dbl_tdata), .s_tvalid(s_axis_dbl_tvalid),
    .s_tready(s_axis_dbl_tready), .s_tlast(s_axis_dbl_tlast),
    .wr_en(ldd_en), .wr_addr(ldd_addr), .wr_data(ldd_data),
    .count(dbl_cnt), .overflow(ldd_ovf), .done(ld_d_done));

  logic ul_start, ul_done, uld_en;
  logic [DAW:0] uld_addr, uld_idx;
  idx_t n, m, nnz, j, p, p2, r;
  fp64_t xj, prod;

  axis_unload #(.CW(DAW+1)) u_ul (
    .clk, .rst_n, .start(ul_start), .count(m[DAW:0]),
    .rd_en(uld_en), .rd_addr(uld_addr),
    .m_tvalid(m_axis_dbl_tvalid), .m_tready(m_axis_dbl_tready),
    .m_tlast(m_axis_dbl_tlast), .idx(uld_idx), .done(ul_done));
  assign m_axis_dbl_tdata = dm_q;

  // ---------------------------------------------------------------- arithmetic
  fp64_t mul_y, add_y;
  fp64_mul    u_mul (.a(dm_q), .b(xj), .y(mul_y));
  fp64_addsub u_add (.a(dm_q), .b(prod), .sub(!add_mode), .y(add_y));

  // array bases
  idx_t o_ap, o_ai, d_x, d_y;
  always_comb begin
    o_ap = 3;
    o_ai = 3 + n + 1;
    d_x  = nnz;
    d_y  = nnz + n;
  end

  idx_t ia, da;
  always_comb begin
    im_en = 1'b0; im_we = 1'b0; ia = '0; im_wd = '0;
    dm_en = 1'b0; dm_we = 1'b0; da = '0; dm_wd = '0;
    case (phase)
      PH_LOAD: begin
        im_en = ldi_en; im_we = 1'b1; ia = idx_t'(ldi_addr); im_wd = ldi_data;
        dm_en = ldd_en; dm_we = 1'b1; da = idx_t'(ldd_addr); dm_wd = ldd_data;
      end
      PH_UNLOAD: begin
        dm_en = uld_en; da = d_y + idx_t'(uld_addr);
      end
      PH_COMPUTE: begin
        case (cs)
          S_H0: begin im_en = 1'b1; ia = 0; end
          S_H1: begin im_en = 1'b1; ia = 1; end
          S_H2: begin im_en = 1'b1; ia = 2; end
          S_Z:  if (new_vector && r < m) begin
                  dm_en = 1'b1; dm_we = 1'b1; da = d_y + r; dm_wd = FP64_ZERO;
                end
          S_J:  if (j < n) begin
                  im_en = 1'b1; ia = o_ap + j;
                  dm_en = 1'b1; da = d_x + j;
                end
          S_J1: begin im_en = 1'b1; ia = o_ap + j + 1; end
          S_I:  if (p < p2) begin
                  im_en = 1'b1; ia = o_ai + p;
                  dm_en = 1'b1; da = p;
                end
          S_I1: begin dm_en = 1'b1; da = d_y + im_q; end
          S_I2: begin dm_en = 1'b1; dm_we = 1'b1; da = d_y + r; dm_wd = add_y; end
          default: ;
        endcase
      end
      default: ;
    endcase
    im_addr = ia[IAW-1:0];
    dm_addr = da[DAW-1:0];
  end

  // ---------------------------------------------------------------- sequencing
  assign ap_idle  = (phase == PH_IDLE);
  assign ld_start = (phase == PH_IDLE) && ap_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      cs <= S_H0;
      ap_done <= 1'b0; ap_ready <= 1'b0; ul_start <= 1'b0;
      ld_i_seen <= 1'b0; ld_d_seen <= 1'b0;
      n <= '0; m <= '0; nnz <= '0; j <= '0; p <= '0; p2 <= '0; r <= '0;
      xj <= '0; prod <= '0;
    end else begin
      ap_done  <= 1'b0;
      ap_ready <= 1'b0;
      ul_start <= 1'b0;
      case (phase)
        PH_IDLE: if (ap_start) begin
          phase <= PH_LOAD;
          ld_i_seen <= 1'b0;
          ld_d_seen <= 1'b0;
        end
        PH_LOAD: begin
          if (ld_i_done) ld_i_seen <= 1'b1;
          if (ld_d_done) ld_d_seen <= 1'b1;
          if ((ld_i_seen || ld_i_done) && (ld_d_seen || ld_d_done)) begin
            phase    <= PH_COMPUTE;
            cs       <= S_H0;
            ap_ready <= 1'b1;
          end
        end
        PH_COMPUTE: begin
          case (cs)
            S_H0: cs <= S_H1;
            S_H1: begin n <= im_q; cs <= S_H2; end
            S_H2: begin m <= im_q; cs <= S_H3; end
            S_H3: begin nnz <= im_q; r <= 0; cs <= S_Z; end
            S_Z:  begin
              if (new_vector && r < m) r <= r + 1;
              else begin j <= 0; cs <= S_J; end
            end
            S_J:  if (j < n) cs <= S_J1;
                  else       cs <= S_END;
            S_J1: begin p <= im_q; xj <= dm_q; cs <= S_J2; end
            S_J2: begin p2 <= im_q; cs <= S_I; end
            S_I:  if (p < p2) cs <= S_I1;
                  else begin j <= j + 1; cs <= S_J; end
            S_I1: begin r <= im_q; prod <= mul_y; cs <= S_I2; end
            S_I2: begin p <= p + 1; cs <= S_I; end
            S_END: begin phase <= PH_UNLOAD; ul_start <= 1'b1; end
            default: cs <= S_H0;
          endcase
        end
        PH_UNLOAD: if (ul_done) begin
          phase   <= PH_IDLE;
          ap_done <= 1'b1;
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

endmodule
