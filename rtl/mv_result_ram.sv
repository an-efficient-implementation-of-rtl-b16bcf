// mv_result_ram: on-chip memory holding the output vector G.
//
// One word per element of G, DEPTH words (1024 in the source design). One
// write port, used by the controller as each element of G is finished, and
// one read port with a registered output: rd_data shows word rd_addr one
// clock after rd_addr is presented, the behaviour of an FPGA block RAM.
// Reset (active high) clears the read register; the array itself is not
// cleared, which is this design's choice (every word is written in each
// frame before it is meant to be read).
module mv_result_ram #(
  parameter int unsigned DEPTH  = mm_pkg::MV_ROWS,
  parameter int unsigned WIDTH  = mm_pkg::sum_width(mm_pkg::MV_DATA_W, mm_pkg::MV_DATA_W,
                                                    mm_pkg::MV_COLS),
  localparam int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [WIDTH-1:0]  wr_data,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [WIDTH-1:0]  rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (wr_en) mem[wr_addr] <= wr_data;

  always_ff @(posedge clk)
    if (rst) rd_data <= '0;
    else     rd_data <= mem[rd_addr];

endmodule
