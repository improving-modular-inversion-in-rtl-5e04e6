// chan_regs -- the register file of one RNS channel.
//
// DEPTH words of W bits with two combinational read ports (operands a and b
// of the channel's rower) and two synchronous write ports: one from the I/O
// bus (loading an input residue) and one from the rower output (write-back).
// The rower write wins if both target the same word in one cycle. The last
// word is also brought out on res_o, where the inverter leaves its result.
// All words reset to zero.
//
// The inverter uses the words as follows: 0..2 hold the three "3" operands
// (V3, U3 and a free slot, renamed by the controller), 3..5 the matching
// "1" operands, 6 the input residue x and 7 the result.
//
// A per-channel register bank, written from the I/O bus and from the rower
// output and read by the rower, follows the source's architecture, which
// draws a single read path to the rower. The second read port is this
// design's own: it lets a V + U or V - U operation read both operands in
// one cycle. The depth, the slot assignment and the renaming scheme are
// also this design's own.
module chan_regs #(
  parameter int unsigned W     = 17,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          io_we_i,
  input  logic [AW-1:0] io_addr_i,
  input  logic [W-1:0]  io_data_i,
  input  logic          we_i,
  input  logic [AW-1:0] waddr_i,
  input  logic [W-1:0]  wdata_i,
  input  logic [AW-1:0] raddr_a_i,
  output logic [W-1:0]  rdata_a_o,
  input  logic [AW-1:0] raddr_b_i,
  output logic [W-1:0]  rdata_b_o,
  output logic [W-1:0]  res_o
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else begin
      if (io_we_i) mem[io_addr_i] <= io_data_i;
      if (we_i)    mem[waddr_i]   <= wdata_i;
    end
  end

  assign rdata_a_o = mem[raddr_a_i];
  assign rdata_b_o = mem[raddr_b_i];
  assign res_o     = mem[DEPTH-1];

endmodule
