// slave_mem: the 16K-byte memory of one Slave (eight 16K x 1 dynamic RAMs in
// the document). Port A is the Group's own port: the Master's address, used
// for instruction fetch, data reads and the Slave's stores, and stolen by the
// common bus when the host or another Master writes. Port B is read-only and
// serves the neighbouring Group, which reads this Slave's memory across the
// Group boundary at its own address. Writes are synchronous; both reads are
// combinational (the multi-clock DRAM access time is counted by the Master).
// Two ports and the access timing are this design's choices.
module slave_mem
  import ppan_pkg::*;
#(
  parameter int unsigned DEPTH = MEM_DEPTH,
  parameter int unsigned AW    = ADDR_W
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  byte_t         wdata,
  output byte_t         rdata,
  input  logic [AW-1:0] nb_addr,
  output byte_t         nb_rdata
);
  byte_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata    = mem[addr];
  assign nb_rdata = mem[nb_addr];
endmodule
