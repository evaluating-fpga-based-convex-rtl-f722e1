// axis_load: receive side of a core's AXI4-Stream input (step 1 of the
// core's read / compute / write flow).
//
// After start it holds TREADY high and writes every accepted word to the
// next address of the core's local buffer, one word per cycle, until the
// word carrying TLAST. Words beyond DEPTH are accepted but dropped and
// flagged by overflow. count is the number of words received; done pulses
// in the cycle after the last word is written. Ending the transfer on TLAST
// (which the DMA's MM2S channel marks at the end of every transfer) is this
// design's choice.
module axis_load #(
  parameter int W     = 32,
  parameter int DEPTH = 1024,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  // stream
  input  logic [W-1:0]  s_tdata,
  input  logic          s_tvalid,
  output logic          s_tready,
  input  logic          s_tlast,
  // buffer write port
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output logic [W-1:0]  wr_data,
  // status
  output logic [AW:0]   count,
  output logic          overflow,
  output logic          done
);

  logic active;

  assign s_tready = active;
  assign wr_en    = active && s_tvalid && (count < (AW+1)'(DEPTH));
  assign wr_addr  = count[AW-1:0];
  assign wr_data  = s_tdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      count    <= '0;
      overflow <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        active   <= 1'b1;
        count    <= '0;
        overflow <= 1'b0;
      end else if (active && s_tvalid) begin
        if (count < (AW+1)'(DEPTH)) count <= count + 1'b1;
        else                        overflow <= 1'b1;
        if (s_tlast) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end

endmodule
