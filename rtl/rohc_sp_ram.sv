// rohc_sp_ram: single-port synchronous RAM (the packet RAM).
//
// One port shared by reads and writes: on a clock edge with we the word at
// addr is written; otherwise the word at addr appears on rdata after that
// edge (one cycle read latency). Contents are not reset.
//
// Source: the reference design has a packet RAM of 1 KB; the single port
// and the read latency are this design's choices.
// Interface: we, addr, wdata, rdata; DEPTH words of W bits.
module rohc_sp_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = 32
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    else    rdata     <= mem[addr];
  end

endmodule
