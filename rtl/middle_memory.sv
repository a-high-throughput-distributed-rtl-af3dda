// middle_memory: one middle-memory bank (10 flits in the main configuration).
// It takes one write (from XB1) and gives one read (to XB2) per cycle, which
// is why two flits in one bank may never share a departure time. The write
// lands at the clock edge; the read is combinational, so a flit is read out
// and crosses XB2 in the cycle its timestamp comes up (the MM_RD/XB2 stage).
// Bank size and one-write/one-read per cycle follow the published design;
// the address given by the reservation table and the asynchronous read are
// this design's choices.
module middle_memory
  import dsb_pkg::*;
#(
  parameter int DEPTH = DEF_MM_DEPTH,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  flit_t         wr_flit,
  input  logic [AW-1:0] rd_addr,
  output flit_t         rd_flit
);
  flit_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_flit;
  end

  assign rd_flit = mem[rd_addr];
endmodule
