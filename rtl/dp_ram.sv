// dp_ram: simple dual-port memory, one write port and one synchronous read port.
// Used for every on-chip storage of the design (first and second storage of the cell
// extractor, FV buffer, reference and PSED storage). A read issued with rd_en returns data
// on the next clock edge and the output holds until the next read. Reading an address in
// the same cycle it is written returns the old word; the users avoid that case by a fixed
// clock-cycle delay between the two accesses, as the document prescribes.
module dp_ram #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd_en,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (rd_en) rdata <= mem[raddr];
  end
endmodule
