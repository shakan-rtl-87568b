// shakan_me: memory element holding the node instructions of one tree level
// position of the ring.
//
// One read port used by its PE (address in cycle 1, instruction registered at
// the next clock edge, as a block RAM does) and one write port through which
// the host loads the forest. DEPTH defaults to 512 64-bit words, the data
// capacity of one 36 Kb block RAM; ADDR_W is the 10-bit child-address width
// of the instruction format, of which only the low bits index the array.
// The content is not reset: the host writes every slot a sample can reach.
module shakan_me
  import shakan_pkg::*;
#(
  parameter int unsigned DEPTH  = 512,
  parameter int unsigned ADDR_W = CHILD_W
) (
  input  logic                clk,
  // read port
  input  logic                rd_en,
  input  logic [ADDR_W-1:0]   rd_addr,
  output logic [INSTR_W-1:0]  rd_data,
  // write port (host loading)
  input  logic                wr_en,
  input  logic [ADDR_W-1:0]   wr_addr,
  input  logic [INSTR_W-1:0]  wr_data
);
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [INSTR_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[IDX_W'(wr_addr)] <= wr_data;
    if (rd_en) rd_data <= mem[IDX_W'(rd_addr)];
  end
endmodule
