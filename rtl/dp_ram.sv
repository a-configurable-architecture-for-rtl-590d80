// dp_ram: simple dual-port RAM with one write port and one registered read port, used for the
// three buffers of the design (row filtering output buffer, intermediate RAM between the two
// modules, matrix multiplication phase 1 output buffer). Each word holds a data mantissa and
// its scale-factor side by side (DW bits in total, packed by the user).
// Timing: a write takes effect at the clock edge; rd_data shows the word at rd_addr one cycle
// after rd_en. Reading and writing the same address in one cycle returns the old word.
// The contents are not reset; the control never reads a word before writing it.
module dp_ram #(
  parameter int DW    = gm_pkg::W + gm_pkg::SFW,
  parameter int DEPTH = gm_pkg::MMAX * (gm_pkg::MAXORD + 1),
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
