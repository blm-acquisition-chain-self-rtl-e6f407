// sample_ram: one period of a filtered signal (DEPTH words of WIDTH bits).
//
// A plain simple-dual-port memory written as an array so that synthesis maps it onto a
// block RAM: one write port and one read port with a registered output (rd_data follows
// rd_addr by one clock). The memory has no reset; its words are only read after a full
// acquisition has written all of them.
module sample_ram
  import blm_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W + 2,
  parameter int unsigned DEPTH = N_SAMPLES,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
