// poly_ram: coefficient memory for one or more polynomials (RAM1..RAM4 of
// the R-LWE datapath).
//
// An array of DEPTH words of WIDTH bits with two synchronous read ports
// and two write ports, the shape of a true dual-port block RAM used with
// one read and one write per port. Reads return the word stored before the
// clock edge (read-first), one cycle after the address. The two write ports
// must not write the same address in the same cycle.
//
// Interface: re0/raddr0 -> rdata0, re1/raddr1 -> rdata1 (each holds its
// value while its re is low); we0/waddr0/wdata0 and we1/waddr1/wdata1.
//
// The published design names the four RAMs and their contents; the port structure
// and the read timing are this design's choices.
module poly_ram #(
  parameter int unsigned DEPTH = rlwe_pkg::N_POLY,
  parameter int unsigned WIDTH = rlwe_pkg::QW
) (
  input  logic                     clk,
  input  logic                     re0,
  input  logic [$clog2(DEPTH)-1:0] raddr0,
  output logic [WIDTH-1:0]         rdata0,
  input  logic                     re1,
  input  logic [$clog2(DEPTH)-1:0] raddr1,
  output logic [WIDTH-1:0]         rdata1,
  input  logic                     we0,
  input  logic [$clog2(DEPTH)-1:0] waddr0,
  input  logic [WIDTH-1:0]         wdata0,
  input  logic                     we1,
  input  logic [$clog2(DEPTH)-1:0] waddr1,
  input  logic [WIDTH-1:0]         wdata1
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re0) rdata0 <= mem[raddr0];
    if (re1) rdata1 <= mem[raddr1];
    if (we0) mem[waddr0] <= wdata0;
    if (we1) mem[waddr1] <= wdata1;
  end

  assert property (@(posedge clk) !(we0 && we1 && waddr0 == waddr1))
    else $error("poly_ram: both ports write the same address");

endmodule
