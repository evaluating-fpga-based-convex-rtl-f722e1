// axis_unload: send side of a core's AXI4-Stream output (step 3 of the
// core's read / compute / write flow).
//
// After start it reads count words from the core's local buffer, whose read
// data appears one cycle after the address (sp_ram), and presents them on
// the stream, one word per cycle while TREADY stays high. The buffer's read
// register is the output register: a new read is issued only when the
// register is empty or being emptied, so back-pressure holds TDATA stable.
// TLAST marks the last word, as the DMA's S2MM channel needs to close the
// transfer. idx is the index of the word now in TDATA, which lets a core
// substitute a word that does not come from the buffer. done pulses with
// the last handshake. count must be at least 1.
module axis_unload #(
  parameter int CW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] count,
  // buffer read port
  output logic          rd_en,
  output logic [CW-1:0] rd_addr,
  // stream control (TDATA comes from the buffer read data)
  output logic          m_tvalid,
  input  logic          m_tready,
  output logic          m_tlast,
  output logic [CW-1:0] idx,
  output logic          done
);

  logic          active;
  logic [CW-1:0] nxt;

  assign rd_en   = active && (nxt < count) && (!m_tvalid || m_tready);
  assign rd_addr = nxt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      nxt      <= '0;
      m_tvalid <= 1'b0;
      m_tlast  <= 1'b0;
      idx      <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        active   <= 1'b1;
        nxt      <= '0;
        m_tvalid <= 1'b0;
        m_tlast  <= 1'b0;
      end else begin
        if (m_tvalid && m_tready && m_tlast) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
        if (rd_en) begin
          nxt      <= nxt + 1'b1;
          idx      <= nxt;
          m_tvalid <= 1'b1;
          m_tlast  <= (nxt == count - 1'b1);
        end else if (m_tvalid && m_tready) begin
          m_tvalid <= 1'b0;
          m_tlast  <= 1'b0;
        end
      end
    end
  end

  // AXI4-Stream rule: TVALID, once high, stays high until TREADY
  a_tvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  (m_tvalid && !m_tready) |=> m_tvalid);

endmodule
