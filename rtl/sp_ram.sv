// sp_ram: single-port RAM with synchronous read, the local array memory of
// the accelerator cores (block RAM on the FPGA).
//
// One access per cycle: with en and we high, wdata is written at addr; with
// en high and we low, rdata shows mem[addr] after the clock edge. rdata
// holds its value while en is low, which the stream output stages rely on.
// Contents are not reset.
module sp_ram #(
  parameter int W     = 32,
  parameter int DEPTH = 1024,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
