// sparsemv_fix: fixed-point variant of the sparseMV accelerator core.
//
//   newVector = 1, a > 0:  y  =  A x        newVector = 0, a > 0:  y += A x
//   newVector = 1, a <= 0: y  = -A x        newVector = 0, a <= 0: y -= A x
//
// Same streams, buffers and phases as sparsemv_fp; the arithmetic is done in
// two's-complement fixed point and the type casting happens inside the core:
//  - every double of the input stream (Ax, x and the incoming y) is cast on
//    arrival to the input type, W_IN bits with I_IN integer bits (sign
//    included), truncating toward minus infinity and wrapping on overflow;
//  - y is kept in its own buffer in the output type, W_OUT bits with I_OUT
//    integer bits; products Ax[p] * x[j] are formed at full width
//    (2*W_IN bits, 2*B_IN fractional bits) and aligned to the output type;
//  - on the way out each y word is cast back to double.
// Defaults are the document's first design (input 39 bits with 5 integer
// bits, output 78 bits with 10 integer bits, precision about 5.8e-11 and
// 3.4e-21); its second design uses W_IN = 55, I_IN = 5, W_OUT = 110,
// I_OUT = 10. Integers (sizes, column starts, row indices) are stored in
// the document's integer type, W_INT = 11 bits signed: the low 11 bits of
// each 32-bit stream word are kept, and read back sign-extended, which holds
// every index of the reduced problem (at most 876). Timing: 3 cycles per stored entry, 3 per column, 2 per
// element of y to initialise it. Arguments: a at 0x10, newVector at 0x14.
module sparsemv_fix
  import accel_pkg::*;
#(
  parameter int INT_DEPTH = 805,
  parameter int DBL_DEPTH = 877,
  parameter int Y_DEPTH   = 76,
  parameter int W_INT     = 11,
  parameter int W_IN      = 39,
  parameter int I_IN      = 5,
  parameter int W_OUT     = 78,
  parameter int I_OUT     = 10
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
  localparam int YAW = $clog2(Y_DEPTH);
  localparam int B_IN  = W_IN - I_IN;
  localparam int B_OUT = W_OUT - I_OUT;
  localparam int PW    = 2 * W_IN;                 // full product width
  localparam int XW    = W_OUT + PW + 2;           // alignment headroom

  typedef logic signed [W_IN-1:0]  fin_t;
  typedef logic signed [W_OUT-1:0] fout_t;

  // align a value with FB fractional bits (sign-extended to XW bits) to the
  // output type: shift by B_OUT - FB, floor on right shifts, wrap to W_OUT
  function automatic fout_t to_out(input logic signed [XW-1:0] v, input int fb);
    logic signed [XW-1:0] t;
    if (B_OUT >= fb) t = v <<< (B_OUT - fb);
    else             t = v >>> (fb - B_OUT);
    return t[W_OUT-1:0];
  endfunction

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
    S_H0, S_H1, S_H2, S_H3, S_Z, S_Z1, S_J, S_J1, S_J2, S_I, S_I1, S_I2, S_END
  } cstate_e;
  cstate_e cs;

  // ---------------------------------------------------------------- buffers
  logic           im_en, im_we, dm_en, dm_we;
  logic [IAW-1:0] im_addr;
  logic [DAW-1:0] dm_addr;
  logic [W_INT-1:0] im_wd, im_rd;
  idx_t           im_q;
  fin_t           dm_wd, dm_q;
  logic           ym_en, ym_we;
  logic [YAW-1:0] ym_addr;
  fout_t          ym_wd, ym_q;

  sp_ram #(.W(W_INT), .DEPTH(INT_DEPTH)) u_imem (
    .clk, .en(im_en), .we(im_we), .addr(im_addr), .wdata(im_wd), .rdata(im_rd));
  assign im_q = idx_t'($signed(im_rd));
  sp_ram #(.W(W_IN), .DEPTH(DBL_DEPTH)) u_dmem (
    .clk, .en(dm_en), .we(dm_we), .addr(dm_addr), .wdata(dm_wd), .rdata(dm_q));
  sp_ram #(.W(W_OUT), .DEPTH(Y_DEPTH)) u_ymem (
    .clk, .en(ym_en), .we(ym_we), .addr(ym_addr), .wdata(ym_wd), .rdata(ym_q));

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
  logic [YAW:0] uld_addr, uld_idx;
  idx_t n, m, nnz, j, p, p2, r;
  fin_t  xj;
  fout_t prod;

  axis_unload #(.CW(YAW+1)) u_ul (
    .clk, .rst_n, .start(ul_start), .count(m[YAW:0]),
    .rd_en(uld_en), .rd_addr(uld_addr),
    .m_tvalid(m_axis_dbl_tvalid), .m_tready(m_axis_dbl_tready),
    .m_tlast(m_axis_dbl_tlast), .idx(uld_idx), .done(ul_done));

  // ---------------------------------------------------------------- casts
  fin_t ld_fix;
  fp64_to_fix #(.W(W_IN), .I(I_IN))   u_cast_in  (.a(ldd_data), .y(ld_fix));
  fix_to_fp64 #(.W(W_OUT), .I(I_OUT)) u_cast_out (.a(ym_q), .y(m_axis_dbl_tdata));

  // ---------------------------------------------------------------- arithmetic
  logic signed [PW-1:0] mul_full;
  fout_t mul_y, add_y, y_init;
  always_comb begin
    mul_full = dm_q * xj;
    mul_y    = to_out(XW'(mul_full), 2 * B_IN);
    add_y    = add_mode ? (ym_q + prod) : (ym_q - prod);
    y_init   = new_vector ? '0 : to_out(XW'(dm_q), B_IN);
  end

  // array bases
  idx_t o_ap, o_ai, d_x, d_y;
  always_comb begin
    o_ap = 3;
    o_ai = 3 + n + 1;
    d_x  = nnz;
    d_y  = nnz + n;
  end

  idx_t ia, da, ya;
  always_comb begin
    im_en = 1'b0; im_we = 1'b0; ia = '0; im_wd = '0;
    dm_en = 1'b0; dm_we = 1'b0; da = '0; dm_wd = '0;
    ym_en = 1'b0; ym_we = 1'b0; ya = '0; ym_wd = '0;
    case (phase)
      PH_LOAD: begin
        im_en = ldi_en; im_we = 1'b1; ia = idx_t'(ldi_addr); im_wd = ldi_data[W_INT-1:0];
        dm_en = ldd_en; dm_we = 1'b1; da = idx_t'(ldd_addr); dm_wd = ld_fix;
      end
      PH_UNLOAD: begin
        ym_en = uld_en; ya = idx_t'(uld_addr);
      end
      PH_COMPUTE: begin
        case (cs)
          S_H0: begin im_en = 1'b1; ia = 0; end
          S_H1: begin im_en = 1'b1; ia = 1; end
          S_H2: begin im_en = 1'b1; ia = 2; end
          S_Z:  if (r < m) begin dm_en = 1'b1; da = d_y + r; end
          S_Z1: begin ym_en = 1'b1; ym_we = 1'b1; ya = r; ym_wd = y_init; end
          S_J:  if (j < n) begin
                  im_en = 1'b1; ia = o_ap + j;
                  dm_en = 1'b1; da = d_x + j;
                end
          S_J1: begin im_en = 1'b1; ia = o_ap + j + 1; end
          S_I:  if (p < p2) begin
                  im_en = 1'b1; ia = o_ai + p;
                  dm_en = 1'b1; da = p;
                end
          S_I1: begin ym_en = 1'b1; ya = im_q; end
          S_I2: begin ym_en = 1'b1; ym_we = 1'b1; ya = r; ym_wd = add_y; end
          default: ;
        endcase
      end
      default: ;
    endcase
    im_addr = ia[IAW-1:0];
    dm_addr = da[DAW-1:0];
    ym_addr = ya[YAW-1:0];
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
            S_Z:  if (r < m) cs <= S_Z1;
                  else begin j <= 0; cs <= S_J; end
            S_Z1: begin r <= r + 1; cs <= S_Z; end
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
