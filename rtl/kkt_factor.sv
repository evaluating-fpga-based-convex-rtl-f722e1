// kkt_factor: accelerator core for the numeric LDL^T factorization of the
// permuted KKT matrix of the interior-point solver (the LDL_numeric2 routine
// behind kkt_factor).
//
// Operation (ap_start from the AXI4-Lite bank, then three phases):
//  1. load   - the integer stream and the double stream are written into two
//              local buffers at one word per stream per cycle, each ending on
//              TLAST. Integer buffer layout (n = matrix size, nnz = Kjc[n],
//              lnz = Ljc[n]):
//                n | Kjc[n+1] | Kir[nnz] | Parent[n] | Sign[n] | Lnz[n] |
//                Ljc[n+1] | Lir[lnz] | Pattern[n] | Flag[n]
//              Double buffer layout: Kpr[nnz] | Lx[lnz] | D[n] | Y[n].
//              K is the upper triangle (with diagonal) of P*KKT*P' in
//              compressed-column form; Parent and Ljc come from the symbolic
//              factorization done in software.
//  2. factor - up-looking factorization, one row k of L at a time: the
//              column k of K is scattered into Y, the row pattern is found by
//              walking the elimination tree (Flag marks visited nodes,
//              Pattern collects them in topological order), then a sparse
//              triangular solve computes l_ki = y_i / d_i and
//              d_k = a_kk - sum l_ki * y_i. Dynamic regularization: if
//              Sign[k] * d_k <= eps then d_k = Sign[k] * delta.
//  3. unload - the whole integer buffer, updated in place, followed by the
//              return value nd = n, goes out on the integer stream, and the
//              whole double buffer on the double stream; TLAST marks the last
//              word of each.
// The factorization is sequential: each state does at most one access to
// each buffer, additions and multiplications take one cycle and a division
// 58 cycles. ap_ready pulses when both input streams are consumed, ap_done
// after the last output word. Arguments: eps at 0x10 (low word) / 0x14 (high word), delta at
// 0x18 / 0x1C of the AXI4-Lite bank.
// From the document: the algorithm, its argument list, the use of one
// integer and one double AXI4-Stream in each direction, TLAST on the
// outputs, AXI4-Lite control, IEEE double arithmetic, and the stream sizes
// (9886 integer and 4853 double words in, one integer word more out, for
// the reduced 5-node problem), which set the buffer depths. The order of
// the arrays in the streams, the placement of eps/delta in registers and
// the state sequence are this design's choices.
module kkt_factor
  import accel_pkg::*;
#(
  parameter int INT_DEPTH = 9886,
  parameter int DBL_DEPTH = 4853
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
  // integer output stream
  output logic [31:0] m_axis_int_tdata,
  output logic        m_axis_int_tvalid,
  input  logic        m_axis_int_tready,
  output logic        m_axis_int_tlast,
  // double output stream
  output logic [63:0] m_axis_dbl_tdata,
  output logic        m_axis_dbl_tvalid,
  input  logic        m_axis_dbl_tready,
  output logic        m_axis_dbl_tlast
);

  localparam int IAW = $clog2(INT_DEPTH);
  localparam int DAW = $clog2(DBL_DEPTH);

  // ---------------------------------------------------------------- control
  logic ap_start, ap_done, ap_idle, ap_ready;
  logic [3:0][31:0] args;
  fp64_t eps, delta;
  assign eps   = {args[1], args[0]};
  assign delta = {args[3], args[2]};

  hls_ctrl_axil #(.NARGS(4)) u_ctrl (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready, .s_axi_wdata, .s_axi_wstrb,
    .s_axi_wvalid, .s_axi_wready, .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready, .s_axi_rdata, .s_axi_rresp,
    .s_axi_rvalid, .s_axi_rready, .irq,
    .ap_start, .ap_done, .ap_idle, .ap_ready, .args
  );

  typedef enum logic [1:0] {PH_IDLE, PH_LOAD, PH_FACTOR, PH_UNLOAD} phase_e;
  phase_e phase;

  typedef enum logic [5:0] {
    C_HDR0, C_HDR1, C_HDR2, C_HDR3,
    C_K, C_K1, C_K2, C_K3, C_K4,
    C_P, C_P1, C_P2, C_F1, C_F2, C_F3, C_F4, C_B0, C_B1,
    C_DG0, C_DG1,
    C_T, C_T1, C_T2, C_T3, C_I, C_I1, C_I2,
    C_L0, C_L1, C_L2, C_L3, C_L4,
    C_R0, C_R1, C_END
  } cstate_e;
  cstate_e cs;

  // ---------------------------------------------------------------- buffers
  logic            im_en, im_we;
  logic [IAW-1:0]  im_addr;
  idx_t            im_wd, im_q;
  logic            dm_en, dm_we;
  logic [DAW-1:0]  dm_addr;
  fp64_t           dm_wd, dm_q;

  sp_ram #(.W(32), .DEPTH(INT_DEPTH)) u_imem (
    .clk, .en(im_en), .we(im_we), .addr(im_addr), .wdata(im_wd), .rdata(im_q));
  sp_ram #(.W(64), .DEPTH(DBL_DEPTH)) u_dmem (
    .clk, .en(dm_en), .we(dm_we), .addr(dm_addr), .wdata(dm_wd), .rdata(dm_q));

  // ---------------------------------------------------------------- streams
  logic ld_start, ld_i_done, ld_d_done, ld_i_seen, ld_d_seen;
  logic ldi_en, ldd_en;
  logic [IAW-1:0] ldi_addr;
  logic [DAW-1:0] ldd_addr;
  logic [31:0] ldi_data;
  logic [63:0] ldd_data;
  logic [IAW:0] int_cnt;
  logic [DAW:0] dbl_cnt;
  logic ldi_ovf, ldd_ovf;

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

  logic ul_start, ul_i_done, ul_d_done, ul_i_seen, ul_d_seen;
  logic uli_en, uld_en;
  logic [IAW:0] uli_addr, uli_idx;
  logic [DAW:0] uld_addr, uld_idx;
  idx_t nd;

  axis_unload #(.CW(IAW+1)) u_ul_int (
    .clk, .rst_n, .start(ul_start), .count(int_cnt + 1'b1),
    .rd_en(uli_en), .rd_addr(uli_addr),
    .m_tvalid(m_axis_int_tvalid), .m_tready(m_axis_int_tready),
    .m_tlast(m_axis_int_tlast), .idx(uli_idx), .done(ul_i_done));
  axis_unload #(.CW(DAW+1)) u_ul_dbl (
    .clk, .rst_n, .start(ul_start), .count(dbl_cnt),
    .rd_en(uld_en), .rd_addr(uld_addr),
    .m_tvalid(m_axis_dbl_tvalid), .m_tready(m_axis_dbl_tready),
    .m_tlast(m_axis_dbl_tlast), .idx(uld_idx), .done(ul_d_done));

  // the word after the integer buffer is the return value
  assign m_axis_int_tdata = (uli_idx == int_cnt) ? nd : im_q;
  assign m_axis_dbl_tdata = dm_q;

  // ---------------------------------------------------------------- arithmetic
  fp64_t add_a, add_b, add_y, mul_a, mul_b, mul_y, div_a, div_b, div_y;
  logic  add_sub, div_start, div_busy, div_done;

  fp64_addsub u_add (.a(add_a), .b(add_b), .sub(add_sub), .y(add_y));
  fp64_mul    u_mul (.a(mul_a), .b(mul_b), .y(mul_y));
  fp64_div    u_div (.clk, .rst_n, .start(div_start), .a(div_a), .b(div_b),
                     .busy(div_busy), .done(div_done), .y(div_y));

  // ---------------------------------------------------------------- factor state
  idx_t  n, nnz, lnz, k, p, p2, i, r, len, top, lnzi;
  fp64_t ax, yi, dk, prod, lki;

  // array bases in the integer and double buffers
  idx_t o_kjc, o_kir, o_par, o_sign, o_lnz, o_ljc, o_lir, o_pat, o_flag;
  idx_t d_kpr, d_lx, d_d, d_y;
  always_comb begin
    o_kjc  = 1;
    o_kir  = n + 2;
    o_par  = o_kir + nnz;
    o_sign = o_par + n;
    o_lnz  = o_sign + n;
    o_ljc  = o_lnz + n;
    o_lir  = o_ljc + n + 1;
    o_pat  = o_lir + lnz;
    o_flag = o_pat + n;
    d_kpr  = 0;
    d_lx   = nnz;
    d_d    = nnz + lnz;
    d_y    = d_d + n;
  end

  // regularized pivot
  logic  sign_neg;
  fp64_t sd, dk_reg;
  always_comb begin
    sign_neg = im_q[31];
    sd       = sign_neg ? fp64_neg(dk) : dk;
    dk_reg   = fp64_le(sd, eps) ? (sign_neg ? fp64_neg(delta) : delta) : dk;
  end

  // per-state buffer accesses and operand selection
  idx_t ia, da;
  always_comb begin
    im_en = 1'b0; im_we = 1'b0; ia = '0; im_wd = '0;
    dm_en = 1'b0; dm_we = 1'b0; da = '0; dm_wd = '0;
    add_a = dm_q; add_b = ax; add_sub = 1'b0;
    mul_a = dm_q; mul_b = yi;
    div_a = yi;   div_b = dm_q; div_start = 1'b0;
    case (phase)
      PH_LOAD: begin
        im_en = ldi_en; im_we = 1'b1; ia = idx_t'(ldi_addr); im_wd = ldi_data;
        dm_en = ldd_en; dm_we = 1'b1; da = idx_t'(ldd_addr); dm_wd = ldd_data;
      end
      PH_UNLOAD: begin
        im_en = uli_en && (uli_addr < int_cnt); ia = idx_t'(uli_addr);
        dm_en = uld_en;                         da = idx_t'(uld_addr);
      end
      PH_FACTOR: begin
        case (cs)
          C_HDR0: begin im_en = 1'b1; ia = 0; end
          C_HDR1: begin im_en = 1'b1; ia = o_kjc + im_q; end                   // Kjc[n]
          C_HDR2: begin im_en = 1'b1; ia = 5 * n + 2 + im_q; end               // Ljc[n]
          C_K:    if (k != n) begin
                    dm_en = 1'b1; dm_we = 1'b1; da = d_y + k; dm_wd = FP64_ZERO;
                    im_en = 1'b1; im_we = 1'b1; ia = o_flag + k; im_wd = k;
                  end
          C_K1:   begin im_en = 1'b1; im_we = 1'b1; ia = o_lnz + k; im_wd = 0; end
          C_K2:   begin im_en = 1'b1; ia = o_kjc + k; end
          C_K3:   begin im_en = 1'b1; ia = o_kjc + k + 1; end
          C_P:    if (p < p2) begin
                    im_en = 1'b1; ia = o_kir + p;
                    dm_en = 1'b1; da = d_kpr + p;
                  end
          C_P1:   begin dm_en = 1'b1; da = d_y + im_q; end
          C_P2:   begin
                    add_a = dm_q; add_b = ax;
                    dm_en = 1'b1; dm_we = 1'b1; da = d_y + i; dm_wd = add_y;
                    im_en = 1'b1; ia = o_flag + i;
                  end
          C_F1:   if (im_q != k) begin
                    im_en = 1'b1; im_we = 1'b1; ia = o_pat + len; im_wd = i;
                  end
          C_F2:   begin im_en = 1'b1; im_we = 1'b1; ia = o_flag + i; im_wd = k; end
          C_F3:   begin im_en = 1'b1; ia = o_par + i; end
          C_F4:   begin im_en = 1'b1; ia = o_flag + im_q; end
          C_B0:   if (len != 0) begin im_en = 1'b1; ia = o_pat + len - 1; end
          C_B1:   begin im_en = 1'b1; im_we = 1'b1; ia = o_pat + top; im_wd = im_q; end
          C_DG0:  begin dm_en = 1'b1; da = d_y + k; end
          C_DG1:  begin dm_en = 1'b1; dm_we = 1'b1; da = d_y + k; dm_wd = FP64_ZERO; end
          C_T:    if (top < n) begin im_en = 1'b1; ia = o_pat + top; end
          C_T1:   begin
                    dm_en = 1'b1; da = d_y + im_q;
                    im_en = 1'b1; ia = o_ljc + im_q;
                  end
          C_T2:   begin
                    dm_en = 1'b1; dm_we = 1'b1; da = d_y + i; dm_wd = FP64_ZERO;
                    im_en = 1'b1; ia = o_lnz + i;
                  end
          C_I:    if (p < p2) begin
                    im_en = 1'b1; ia = o_lir + p;
                    dm_en = 1'b1; da = d_lx + p;
                  end
          C_I1:   begin
                    mul_a = dm_q; mul_b = yi;
                    dm_en = 1'b1; da = d_y + im_q;
                  end
          C_I2:   begin
                    add_a = dm_q; add_b = prod; add_sub = 1'b1;
                    dm_en = 1'b1; dm_we = 1'b1; da = d_y + r; dm_wd = add_y;
                  end
          C_L0:   begin dm_en = 1'b1; da = d_d + i; end
          C_L1:   begin div_a = yi; div_b = dm_q; div_start = 1'b1; end
          C_L3:   begin
                    mul_a = lki; mul_b = yi;
                    dm_en = 1'b1; dm_we = 1'b1; da = d_lx + p; dm_wd = lki;
                  end
          C_L4:   begin
                    add_a = dk; add_b = prod; add_sub = 1'b1;
                    im_en = 1'b1; im_we = 1'b1; ia = o_lnz + i; im_wd = lnzi + 1;
                  end
          C_R0:   begin
                    im_en = 1'b1; im_we = 1'b1; ia = o_lir + p; im_wd = k;
                  end
          C_R1:   begin im_en = 1'b1; ia = o_sign + k; end
          C_END:  begin dm_en = 1'b1; dm_we = 1'b1; da = d_d + k; dm_wd = dk_reg; end
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
      cs    <= C_HDR0;
      ap_done <= 1'b0;
      ap_ready <= 1'b0;
      ul_start <= 1'b0;
      ld_i_seen <= 1'b0; ld_d_seen <= 1'b0;
      ul_i_seen <= 1'b0; ul_d_seen <= 1'b0;
      n <= '0; nnz <= '0; lnz <= '0; k <= '0; p <= '0; p2 <= '0; i <= '0; r <= '0;
      len <= '0; top <= '0; lnzi <= '0; nd <= '0;
      ax <= '0; yi <= '0; dk <= '0; prod <= '0; lki <= '0;
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
            phase    <= PH_FACTOR;
            cs       <= C_HDR0;
            ap_ready <= 1'b1;                  // inputs consumed
          end
        end
        PH_UNLOAD: begin
          if (ul_i_done) ul_i_seen <= 1'b1;
          if (ul_d_done) ul_d_seen <= 1'b1;
          if ((ul_i_seen || ul_i_done) && (ul_d_seen || ul_d_done)) begin
            phase    <= PH_IDLE;
            ap_done  <= 1'b1;
          end
        end
        PH_FACTOR: begin
          case (cs)
            C_HDR0: cs <= C_HDR1;
            C_HDR1: begin n <= im_q; cs <= C_HDR2; end
            C_HDR2: begin nnz <= im_q; cs <= C_HDR3; end
            C_HDR3: begin lnz <= im_q; k <= 0; cs <= C_K; end
            C_K: begin
              if (k == n) begin
                nd        <= n;
                phase     <= PH_UNLOAD;
                ul_start  <= 1'b1;
                ul_i_seen <= 1'b0;
                ul_d_seen <= 1'b0;
              end else begin
                top <= n;
                cs  <= C_K1;
              end
            end
            C_K1: cs <= C_K2;
            C_K2: cs <= C_K3;
            C_K3: begin p <= im_q; cs <= C_K4; end
            C_K4: begin p2 <= im_q; cs <= C_P; end
            // scatter column k of K into Y and collect the row pattern
            C_P:  cs <= (p < p2) ? C_P1 : C_DG0;
            C_P1: begin i <= im_q; ax <= dm_q; cs <= C_P2; end
            C_P2: begin len <= 0; cs <= C_F1; end
            C_F1: cs <= (im_q == k) ? C_B0 : C_F2;
            C_F2: begin len <= len + 1; cs <= C_F3; end
            C_F3: cs <= C_F4;
            C_F4: begin i <= im_q; cs <= C_F1; end
            C_B0: begin
              if (len == 0) begin
                p  <= p + 1;
                cs <= C_P;
              end else begin
                len <= len - 1;
                top <= top - 1;
                cs  <= C_B1;
              end
            end
            C_B1: cs <= C_B0;
            // diagonal seed
            C_DG0: cs <= C_DG1;
            C_DG1: begin dk <= dm_q; cs <= C_T; end
            // sparse triangular solve over the pattern
            C_T:  cs <= (top < n) ? C_T1 : C_R1;
            C_T1: begin i <= im_q; cs <= C_T2; end
            C_T2: begin yi <= dm_q; p <= im_q; cs <= C_T3; end
            C_T3: begin lnzi <= im_q; p2 <= p + im_q; cs <= C_I; end
            C_I:  cs <= (p < p2) ? C_I1 : C_L0;
            C_I1: begin r <= im_q; prod <= mul_y; cs <= C_I2; end
            C_I2: begin p <= p + 1; cs <= C_I; end
            C_L0: cs <= C_L1;
            C_L1: cs <= C_L2;
            C_L2: if (div_done) begin lki <= div_y; cs <= C_L3; end
            C_L3: begin prod <= mul_y; cs <= C_L4; end
            C_L4: begin dk <= add_y; cs <= C_R0; end
            C_R0: begin top <= top + 1; cs <= C_T; end
            // dynamic regularization and store of d_k
            C_R1: cs <= C_END;
            C_END: begin dk <= dk_reg; k <= k + 1; cs <= C_K; end
            default: cs <= C_HDR0;
          endcase
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

endmodule
